// Ring switch control of the Vernier ring TDC.
//
// Two flip-flops hold the MUX controls SW_F and SW_S. The first rising edge of
// fast-ring stage 3 (F3) clocks the inverse of `calibration` into SW_F, the
// first rising edge of slow-ring stage 3 (S3) does the same for SW_S: in normal
// operation this closes the rings a few stage delays after the edges entered
// them, in calibration mode the rings stay open. The inverted outputs Rst_F and
// Rst_S (active low) clear the input DFFs while a ring is closed.
//
// Both flops are cleared asynchronously by the global reset rst before every
// conversion and by the catch-up comparator DFF61, which breaks both rings as
// soon as the lag edge has caught up with the lead edge. This structure is the
// published one; only the active-high polarity of rst is this design's choice.
`timescale 1ps/100fs
module ring_switch_control (
  input  logic f3,           // fast-ring stage 3, p rail
  input  logic s3,           // slow-ring stage 3, p rail
  input  logic dff61,        // catch-up comparator output
  input  logic rst,          // global reset, active high
  input  logic calibration,  // 1: keep both rings open
  output logic sw_f,         // fast-ring MUX select, 1 = ring closed
  output logic sw_s,         // slow-ring MUX select, 1 = ring closed
  output logic rst_f_n,      // clear for the fast input DFF, active low
  output logic rst_s_n       // clear for the slow input DFF, active low
);

  logic clr;
  assign clr = rst | dff61;

  always_ff @(posedge f3 or posedge clr) begin
    if (clr) sw_f <= 1'b0;
    else     sw_f <= ~calibration;
  end

  always_ff @(posedge s3 or posedge clr) begin
    if (clr) sw_s <= 1'b0;
    else     sw_s <= ~calibration;
  end

  assign rst_f_n = ~sw_f;
  assign rst_s_n = ~sw_s;

endmodule
