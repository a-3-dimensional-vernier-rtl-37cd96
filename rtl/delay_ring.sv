// Behavioural model (not synthesizable logic): one Vernier delay ring, a ring
// MUX followed by N_STAGES differential delay stages.
//
// The last stage is fed back to the MUX with its rails crossed, so an edge that
// enters as a rising p-rail edge returns as a falling one: on odd laps every
// stage's p rail rises, on even laps its m rail rises. This is why the
// comparator matrix has one set of comparators for odd laps and one for even
// laps. When sw is low the ring is open and settles to the input value.
//
// The feedback path is a deliberate combinational loop: with sw high the ring
// is an oscillator whose only delays are the stage and MUX delays. Stage k's
// outputs are stage_p[k]/stage_m[k] (S1..S12 or F1..F10 in the published
// figure); the lap period is N_STAGES*T_STAGE + T_SW.
`timescale 1ps/100fs
module delay_ring #(
  parameter int unsigned N_STAGES = 12,
  parameter realtime     T_STAGE  = 165.0,
  parameter realtime     T_SW     = 49.5
) (
  input  logic                in_p,      // edge from the input DFF
  input  logic                in_m,
  input  logic                sw,        // 1: ring closed
  output logic [N_STAGES:1]   stage_p,
  output logic [N_STAGES:1]   stage_m
);

  logic mux_p, mux_m;

  ring_mux #(.T_SW(T_SW)) u_mux (
    .sel  (sw),
    .in_p (in_p),
    .in_m (in_m),
    .fb_p (stage_m[N_STAGES]),   // crossed rails: one inversion per lap
    .fb_m (stage_p[N_STAGES]),
    .yp   (mux_p),
    .ym   (mux_m)
  );

  for (genvar k = 1; k <= N_STAGES; k++) begin : g_stage
    if (k == 1) begin : g_first
      delay_stage #(.T_STAGE(T_STAGE)) u_stage (
        .ap(mux_p), .am(mux_m), .yp(stage_p[k]), .ym(stage_m[k]));
    end else begin : g_next
      delay_stage #(.T_STAGE(T_STAGE)) u_stage (
        .ap(stage_p[k-1]), .am(stage_m[k-1]), .yp(stage_p[k]), .ym(stage_m[k]));
    end
  end

endmodule
