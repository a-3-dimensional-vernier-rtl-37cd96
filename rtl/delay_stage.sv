// Behavioural model (not synthesizable logic): one pseudo-differential delay
// stage of the Vernier rings.
//
// The transistor-level stage is a pair of current-starved inverters, one per
// rail: the Am input drives the Yp output and the Ap input drives the Ym
// output, so with complementary inputs the pair behaves as a non-inverting
// differential buffer of delay T_STAGE. The delay is trimmed in silicon by the
// analog Vctrl/Vbias voltages and the binary-weighted E1-E2 current sources;
// here it is the T_STAGE parameter (165 ps for a slow stage, 148.5 ps for a
// fast stage in the nominal design) and those analog controls are not modelled.
//
// Timing: every output change follows its input change after T_STAGE.
`timescale 1ps/100fs
module delay_stage #(
  parameter realtime T_STAGE = 165.0
) (
  input  logic ap,
  input  logic am,
  output logic yp,
  output logic ym
);

  assign #(T_STAGE) yp = ~am;
  assign #(T_STAGE) ym = ~ap;

endmodule
