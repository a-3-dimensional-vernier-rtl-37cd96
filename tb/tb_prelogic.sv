// Test of the pre-logic model: for random edge pairs, the earlier edge must
// come out on the slow-ring output and the later one on the fast-ring output,
// with their spacing preserved, and the sign bit must say which input led.
`timescale 1ps/100fs
module tb_prelogic;

  localparam realtime T_TAP = 30.0, T_BUF = 120.0, T_OUT = 30.0;
  localparam realtime T_ALL = T_TAP + T_BUF + T_OUT;
  logic ref_sig, fb_sig, rst, slow_out, fast_out, sign;

  prelogic #(.T_TAP(T_TAP), .T_BUF(T_BUF), .T_OUT(T_OUT)) dut (.*);

  int checks = 0, failures = 0;
  realtime t0, ts, tf, gap;
  logic fb_first;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge slow_out) ts = $realtime;
  always @(posedge fast_out) tf = $realtime;

  initial begin
    ref_sig = 0; fb_sig = 0; rst = 0;
    #10 rst = 1; #100 rst = 0; #100;
    repeat (100) begin
      gap = ($urandom % 100) + 1.5;     // below T_BUF, the decision window
      fb_first = 1'($urandom);
      t0 = $realtime;
      if (fb_first) begin fb_sig = 1; #(gap); ref_sig = 1; end
      else          begin ref_sig = 1; #(gap); fb_sig = 1; end
      #(T_ALL + 50);
      checks++;
      if (sign !== fb_first) begin failures++; $display("FAIL sign=%b fb_first=%b", sign, fb_first); end
      checks++;
      if (ts - t0 < T_ALL - 0.1 || ts - t0 > T_ALL + 0.1 ||
          tf - ts < gap - 0.1 || tf - ts > gap + 0.1) begin
        failures++; $display("FAIL timing slow at %0.1f fast at %0.1f gap %0.1f", ts - t0, tf - ts, gap);
      end
      ref_sig = 0; fb_sig = 0;
      #(T_ALL + 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
