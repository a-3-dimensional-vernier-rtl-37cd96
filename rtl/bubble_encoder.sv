// Bubble correction and binary encoder.
//
// The 61 comparator outputs DFF1..DFF61 form a thermometer that is 0 below and
// 1 at and above the residual delay of the lag edge. A disturbed comparator
// can leave a bubble such as ...0001011... . The correction marks position i
// only when both the inner pair and the outer pair around it differ:
//   BC(i) = (DFF(i-1) xor DFF(i+2)) and (DFF(i) xor DFF(i+1)),
// which suppresses isolated bubbles and keeps one mark at the real 0-to-1
// step. The mark's index i (0..60) is the 6-bit fine code TH.
//
// The correction equation is the published one. The boundary values
// (DFF(-1) = DFF(0) = 0 below the code, DFF(62) = 1 above it) and the OR-type
// one-hot-to-binary encoder are this design's choices. `found` is low if no
// transition was marked.
//
// Timing: purely combinational.
`timescale 1ps/100fs
module bubble_encoder
  import vr_tdc_pkg::*;
(
  input  logic [THERM_W:1] therm,   // DFF1..DFF61
  output logic [TH_W-1:0]  th,
  output logic             found
);

  // Thermometer extended by the boundary values, index -1..62 shifted by +1.
  logic [THERM_W+2:0] ext;
  logic [THERM_W-1:0] bc;   // BC(0)..BC(60)

  always_comb begin
    ext = {1'b1, therm, 2'b00};
    for (int i = 0; i < THERM_W; i++) begin
      bc[i] = (ext[i] ^ ext[i+3]) & (ext[i+1] ^ ext[i+2]);
    end
  end

  always_comb begin
    th = '0;
    for (int i = 0; i < THERM_W; i++) begin
      if (bc[i]) th = th | TH_W'(i);
    end
    found = |bc;
  end

endmodule
