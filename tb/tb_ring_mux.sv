// Test of the ring MUX model: sel low passes the input pair, sel high the
// feedback pair, each after T_SW.
`timescale 1ps/100fs
module tb_ring_mux;

  localparam realtime TSW = 49.5;
  logic sel, in_p, in_m, fb_p, fb_m, yp, ym;

  ring_mux #(.T_SW(TSW)) dut (.*);
  assign in_m = ~in_p;
  assign fb_m = ~fb_p;

  int checks = 0, failures = 0;
  logic e;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 0; in_p = 0; fb_p = 0;
    #200;
    repeat (100) begin
      sel = 1'($urandom); in_p = 1'($urandom); fb_p = 1'($urandom);
      #200;
      e = sel ? fb_p : in_p;
      checks++;
      if (yp !== e || ym !== ~e) begin failures++; $display("FAIL sel=%b", sel); end
    end
    // Delay: change the selected input and look just before and after T_SW.
    sel = 0; in_p = 0; #200;
    in_p = 1; #(TSW - 0.5);
    checks++; if (yp !== 1'b0) begin failures++; $display("FAIL too early"); end
    #1.0;
    checks++; if (yp !== 1'b1) begin failures++; $display("FAIL too late"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
