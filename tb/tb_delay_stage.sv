// Test of the delay-stage model: with complementary inputs, each output rail
// follows its input edge after exactly T_STAGE (checked just before and just
// after), and the stage is non-inverting on the (p, m) pair.
`timescale 1ps/100fs
module tb_delay_stage;

  localparam realtime T = 148.5;
  logic ap, am, yp, ym;

  delay_stage #(.T_STAGE(T)) dut (.*);
  assign am = ~ap;

  int checks = 0, failures = 0;
  logic v;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ap = 0;
    #1000;
    for (int n = 0; n < 20; n++) begin
      v = ~ap;
      ap = v;
      #(T - 0.5);
      checks++;
      if (yp !== ~v || ym !== v) begin failures++; $display("FAIL early change"); end
      #1.0;
      checks++;
      if (yp !== v || ym !== ~v) begin failures++; $display("FAIL no change after T"); end
      #500;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
