// Test of the splitter model: both rails switch T_SPLIT after the input, p in
// phase and m inverted.
`timescale 1ps/100fs
module tb_splitter;

  localparam realtime TD = 30.0;
  logic vin, vop, vom;

  splitter #(.T_SPLIT(TD)) dut (.*);

  int checks = 0, failures = 0;
  logic v;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 0; #200;
    for (int n = 0; n < 20; n++) begin
      v = ~vin; vin = v;
      #(TD - 0.5);
      checks++;
      if (vop !== ~v || vom !== v) begin failures++; $display("FAIL early"); end
      #1.0;
      checks++;
      if (vop !== v || vom !== ~v) begin failures++; $display("FAIL late"); end
      #200;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
