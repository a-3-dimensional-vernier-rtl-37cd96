// Test of the differential comparator DFF model: on a rising clock it
// captures the sign of the data pair and shows it T_CQ later; it holds
// between clocks and clears on clr.
`timescale 1ps/100fs
module tb_diff_dff;

  localparam realtime TCQ = 20.0;
  logic clk_p, clk_m, dp, dm, clr, q;

  diff_dff #(.T_CQ(TCQ)) dut (.*);
  assign clk_m = ~clk_p;
  assign dm = ~dp;

  int checks = 0, failures = 0;
  logic d, q_prev;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_p = 0; dp = 0; clr = 0;
    #10 clr = 1; #30 clr = 0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL clear"); end
    repeat (200) begin
      d = 1'($urandom);
      q_prev = q;
      dp = d;
      #50 clk_p = 1;
      #1 dp = ~d;                      // data changes 1 ps after the edge
      #(TCQ - 2.0);
      checks++;
      if (q === d && q_prev !== d) begin failures++; $display("FAIL output before T_CQ"); end
      #2;
      checks++;
      if (q !== d) begin failures++; $display("FAIL captured %b expected %b", q, d); end
      #50 clk_p = 0;
      #50;
      checks++;
      if (q !== d) begin failures++; $display("FAIL not held"); end
    end
    #10 dp = 1; #10 clk_p = 1; #50 clr = 1; #(TCQ + 1.0);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL clr"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
