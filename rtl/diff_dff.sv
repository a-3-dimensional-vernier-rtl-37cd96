// Behavioural model (not synthesizable logic as written): the differential
// sense-amplifier DFF used as phase comparator in the comparator matrix.
//
// The silicon cell is a clocked differential pair with a cross-coupled latch
// and an RS latch at the output. On the rising edge of Clkp it resolves the
// sign of Dp - Dm and holds it until the next clock, so unlike an arbiter it
// needs no reset between laps. Here the decision is `dp & ~dm` (1 when the
// data pair is positive), the output appears T_CQ after the clock (20 ps, this
// model's choice), and metastability is not modelled.
//
// The asynchronous clear `clr` is not part of the published cell. It is this
// design's addition so that every conversion starts with a known comparator
// state (the catch-up comparator DFF61 must start at zero).
`timescale 1ps/100fs
module diff_dff #(
  parameter realtime T_CQ = 20.0
) (
  input  logic clk_p,
  input  logic clk_m,     // complementary clock, unused by the model
  input  logic dp,
  input  logic dm,
  input  logic clr,
  output logic q
);

  logic state;

  always @(posedge clk_p or posedge clr) begin
    if (clr) state <= 1'b0;
    else     state <= dp & ~dm;
  end

  assign #(T_CQ) q = state;

  logic unused;
  assign unused = clk_m;

endmodule
