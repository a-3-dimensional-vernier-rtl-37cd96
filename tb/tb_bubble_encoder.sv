// Test of the bubble correction and binary encoder.
//
// Clean thermometers with the 0-to-1 step after every position 0..60 must
// give that position as TH. Thermometers with a one-bit bubble next to the
// step (...0 1 0 1 1...) must give a single, corrected position. Random
// patterns are compared with a reference model written here as a loop over
// the correction equation.
`timescale 1ps/100fs
module tb_bubble_encoder;
  import vr_tdc_pkg::*;

  logic [THERM_W:1] therm;
  logic [TH_W-1:0]  th;
  logic             found;

  bubble_encoder dut (.therm(therm), .th(th), .found(found));

  int checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Thermometer value at index k, with the boundary values around it.
  function automatic logic bit_at(logic [THERM_W:1] t, int k);
    if (k <= 0) return 1'b0;
    if (k > THERM_W) return 1'b1;
    return t[k];
  endfunction

  function automatic logic [TH_W-1:0] ref_th(logic [THERM_W:1] t);
    logic [TH_W-1:0] r = '0;
    for (int i = 0; i < THERM_W; i++)
      if ((bit_at(t, i-1) != bit_at(t, i+2)) && (bit_at(t, i) != bit_at(t, i+1)))
        r |= TH_W'(i);
    return r;
  endfunction

  initial begin
    // Clean codes: DFF1..DFFp = 0, DFF(p+1).. = 1.
    for (int p = 0; p <= 60; p++) begin
      for (int k = 1; k <= THERM_W; k++) therm[k] = (k > p);
      #10;
      checks++;
      if (th != TH_W'(p) || !found) begin
        failures++; $display("FAIL clean p=%0d th=%0d found=%b", p, th, found);
      end
    end
    // One bubble: DFF(p+1) = 1, DFF(p+2) = 0 inside the zero run.
    for (int p = 1; p <= 57; p++) begin
      for (int k = 1; k <= THERM_W; k++) therm[k] = (k > p);
      therm[p+1] = 1'b1; therm[p+2] = 1'b0;
      #10;
      checks++;
      if (th != TH_W'(p+1) || !found) begin
        failures++; $display("FAIL bubble p=%0d th=%0d", p, th);
      end
    end
    // Random patterns against the reference loop.
    repeat (500) begin
      therm = {$urandom, $urandom};
      #10;
      checks++;
      if (th != ref_th(therm)) begin
        failures++; $display("FAIL random %b th=%0d ref=%0d", therm, th, ref_th(therm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
