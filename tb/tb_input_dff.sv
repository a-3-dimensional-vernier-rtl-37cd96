// Test of the input DFF: a rising input edge sets it, a low rst_sw_n or a high
// rst clears it and keeps it clear, and the m output is the complement.
`timescale 1ps/100fs
module tb_input_dff;

  logic clk_p, clk_m, rst_sw_n, rst, q_p, q_m;

  input_dff dut (.*);
  assign clk_m = ~clk_p;

  int checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(logic e, string what);
    #1;
    checks++;
    if (q_p !== e || q_m !== ~e) begin
      failures++; $display("FAIL %s: q_p=%b q_m=%b", what, q_p, q_m);
    end
  endtask

  initial begin
    clk_p = 0; rst_sw_n = 1; rst = 0;
    #5 rst = 1; expect_q(0, "global reset");
    #5 rst = 0;
    #5 clk_p = 1; expect_q(1, "input edge sets");
    #5 clk_p = 0; expect_q(1, "falling input holds");
    #5 rst_sw_n = 0; expect_q(0, "ring closed clears");
    #5 clk_p = 1; expect_q(0, "held clear while ring closed");
    #5 rst_sw_n = 1; expect_q(0, "released, no new edge");
    #5 clk_p = 0; #5 clk_p = 1; expect_q(1, "next edge sets again");
    #5 rst = 1; expect_q(0, "global reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
