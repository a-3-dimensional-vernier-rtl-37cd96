// Behavioural model (not synthesizable logic): single-ended to differential
// splitter in front of each ring input.
//
// The circuit drives the p rail through a transmission gate and inverters and
// the m rail through one more inverter; the transmission gate matches the
// extra inverter's delay, cross-coupled inverters hold the rails complementary
// and Schmitt triggers add noise immunity. The model gives both rails the same
// delay T_SPLIT (30 ps, this model's choice), so an input edge appears on p as
// the same edge and on m inverted, at the same time. Hysteresis and noise are
// not modelled. Interface: vin in, vop/vom out, both T_SPLIT after vin; a
// tool that ignores delays sees vop as a plain copy of vin.
`timescale 1ps/100fs
module splitter #(
  parameter realtime T_SPLIT = 30.0
) (
  input  logic vin,
  output logic vop,
  output logic vom
);

  assign #(T_SPLIT) vop = vin;
  assign #(T_SPLIT) vom = ~vin;

endmodule
