// Input DFF of one Vernier ring.
//
// A rising edge on the (differential) ring input sets the flop, which launches
// one edge into the open ring through the ring MUX. Once that edge reaches
// stage 3, the ring switch control closes the ring and pulls rst_sw_n low,
// which clears the flop again; from then on the ring is isolated from its
// input, and when the ring is later broken the MUX re-selects a flop that is
// already back at zero, so no stray edge is injected.
//
// The set-on-edge behaviour and the rst_sw_n clear follow the published
// design. The additional clear from the global reset rst is this design's
// choice, so that the flop starts every conversion at zero.
//
// Interface: clk_p/clk_m are the ring input rails (only the rising p rail
// clocks the flop), q_p/q_m the differential output. Timing: q rises on the
// rising input edge and falls asynchronously on either clear.
`timescale 1ps/100fs
module input_dff (
  input  logic clk_p,      // lead or lag signal, p rail
  input  logic clk_m,      // m rail, unused by the digital model
  input  logic rst_sw_n,   // Rst_S / Rst_F from the ring switch control
  input  logic rst,        // global reset, active high
  output logic q_p,
  output logic q_m
);

  logic q;

  logic clr;
  assign clr = rst | ~rst_sw_n;

  always_ff @(posedge clk_p or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= 1'b1;
  end

  assign q_p = q;
  assign q_m = ~q;

  logic unused;
  assign unused = clk_m;

endmodule
