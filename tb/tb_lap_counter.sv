// Test of the lap counter: counts rising clock edges only while enabled,
// clears on reset and wraps modulo 2^W.
`timescale 1ps/100fs
module tb_lap_counter;

  localparam int W = 8;
  logic clk, en, rst;
  logic [W-1:0] count;

  lap_counter #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  int model;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; en = 0; rst = 0;
    #5 rst = 1; #5 rst = 0;
    model = 0;
    checks++;
    if (count != 0) begin failures++; $display("FAIL reset"); end
    repeat (700) begin
      en = 1'($urandom);
      #5 clk = 1;
      if (en) model = (model + 1) % (1 << W);
      #5 clk = 0;
      checks++;
      if (count != W'(model)) begin
        failures++; $display("FAIL count=%0d model=%0d", count, model);
      end
    end
    #5 rst = 1; #1;
    checks++;
    if (count != 0) begin failures++; $display("FAIL second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
