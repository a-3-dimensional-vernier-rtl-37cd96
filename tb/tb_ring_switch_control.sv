// Test of the ring switch control: F3/S3 rising edges close the rings,
// DFF61 and Rst open them, calibration keeps them open, and Rst_F/Rst_S are
// the inverted switch states.
`timescale 1ps/100fs
module tb_ring_switch_control;

  logic f3, s3, dff61, rst, calibration;
  logic sw_f, sw_s, rst_f_n, rst_s_n;

  ring_switch_control dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sw(logic ef, logic es, string what);
    #1;
    checks++;
    if (sw_f !== ef || sw_s !== es || rst_f_n !== ~ef || rst_s_n !== ~es) begin
      failures++;
      $display("FAIL %s: sw_f=%b sw_s=%b rst_f_n=%b rst_s_n=%b", what, sw_f, sw_s, rst_f_n, rst_s_n);
    end
  endtask

  initial begin
    f3 = 0; s3 = 0; dff61 = 0; rst = 0; calibration = 0;
    #5 rst = 1; expect_sw(0, 0, "reset");
    #5 rst = 0;
    #5 s3 = 1;  expect_sw(0, 1, "S3 closes slow ring");
    #5 f3 = 1;  expect_sw(1, 1, "F3 closes fast ring");
    #5 s3 = 0; f3 = 0; expect_sw(1, 1, "falling edges ignored");
    #5 dff61 = 1; expect_sw(0, 0, "DFF61 breaks both rings");
    #5 f3 = 1; s3 = 1; expect_sw(0, 0, "held open while DFF61 high");
    #5 f3 = 0; s3 = 0; dff61 = 0;
    #5 rst = 1; #5 rst = 0;
    #5 f3 = 1; expect_sw(1, 0, "F3 alone");
    #5 rst = 1; expect_sw(0, 0, "Rst clears");
    #5 rst = 0; f3 = 0;
    calibration = 1;
    #5 f3 = 1; s3 = 1; expect_sw(0, 0, "calibration keeps rings open");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
