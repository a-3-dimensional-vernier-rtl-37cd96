// Test of the evaluation logic.
//
// Random lap counts, fine codes, MUX delays and signs are loaded; one clock
// later the code must equal +/- [(N_S - N_F)(240 + 2 tSW) + 60 N_F + TH],
// computed here in integer arithmetic, and `valid` must be high for exactly
// that cycle.
`timescale 1ps/100fs
module tb_evaluation_logic;
  import vr_tdc_pkg::*;

  logic clk = 1'b0, rst, load, sign;
  logic [CNT_W-1:0] ns, nf;
  logic [TH_W-1:0] th;
  logic [TSW_W-1:0] tsw_r;
  logic signed [MAG_W:0] code;
  logic valid;

  evaluation_logic dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int e, d, n_f;

  initial begin
    rst = 1'b0; load = 1'b0; sign = 1'b0; ns = '0; nf = '0; th = '0; tsw_r = '0;
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (valid || code != 0) begin failures++; $display("FAIL reset"); end
    repeat (400) begin
      n_f = $urandom % 256;
      d   = $urandom % 256;
      nf  = CNT_W'(n_f);
      ns  = CNT_W'(n_f + d);          // may wrap: only the difference counts
      th  = TH_W'($urandom % 61);
      tsw_r = TSW_W'($urandom % 64);
      sign = 1'($urandom);
      e = d * (240 + 2 * int'(tsw_r)) + 60 * n_f + int'(th);
      if (sign) e = -e;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      checks++;
      if (!valid || code != e) begin
        failures++; $display("FAIL ns=%0d nf=%0d th=%0d tsw=%0d sign=%b: got %0d exp %0d", ns, nf, th, tsw_r, sign, code, e);
      end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
