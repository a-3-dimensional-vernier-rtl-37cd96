// Differential Vernier ring TDC core.
//
// The lead edge enters the slow ring (12 stages of ts = 10R) and the lag edge
// the fast ring (10 stages of tf = 9R), each through an input DFF and a ring
// MUX. When an edge reaches stage 3, the ring switch control closes that ring,
// and the edges circulate lap after lap; on every lap of the lag the comparator
// matrix measures how far it still is behind the lead. Over one full period
// (two laps) the lag gains 60R. When comparator DFF61 sees the lag within 61R
// of the lead, both rings are broken: the last period's comparators hold a
// thermometer of the residual, and the lap counters hold the number of
// complete periods each ring ran before that, N_S and N_F. The measured
// interval is then (N_S - N_F)(240R + 2tSW) + 60R*N_F + TH*R.
//
// In calibration mode the rings stay open, the edges make one lap, and DFF0
// reports whether ten fast stages are faster than nine slow ones (the
// condition 9ts = 10tf that makes the comparator planes seamless).
//
// The structure follows the published core. The ring rails, comparator
// numbering and counter triggering are described in the submodules. The ring
// loops pass through the delay-stage models only, so the core is a netlist of
// behavioural models and digital control. A tool that drops the delays sees
// every ring stage at the same level; DFF61's window (fast stage 1 low, stage
// 8 high) then never opens and that output reduces to a constant 0. Only the
// timed model shows the real behaviour.
//
// Interface: differential lead/lag inputs, rst (active high, held before each
// conversion), calibration; outputs the 61-bit thermometer, N_S, N_F, DFF0 and
// the two ring-closed flags. Outputs are final once both rings have come to
// rest, at most (N_S + 2) slow periods after the lead edge.
`timescale 1ps/100fs
module vr_tdc_core
  import vr_tdc_pkg::*;
#(
  parameter realtime T_SLOW = TS_PS,    // slow stage delay ts
  parameter realtime T_FAST = TF_PS,    // fast stage delay tf
  parameter realtime T_SW   = 49.5,     // ring MUX delay tSW
  parameter realtime T_CQ   = 20.0      // comparator clock-to-output
) (
  input  logic               lead_p,    // lead signal, to the slow ring
  input  logic               lead_m,
  input  logic               lag_p,     // lag signal, to the fast ring
  input  logic               lag_m,
  input  logic               rst,
  input  logic               calibration,
  output logic [THERM_W:1]   therm,
  output logic               dff0,
  output logic [CNT_W-1:0]   ns,
  output logic [CNT_W-1:0]   nf,
  output logic               sw_s,
  output logic               sw_f
);

  logic rst_s_n, rst_f_n;
  logic in_s_p, in_s_m, in_f_p, in_f_m;
  logic [N_SLOW:1] slow_p, slow_m;
  logic [N_FAST:1] fast_p, fast_m;

  input_dff u_in_s (
    .clk_p(lead_p), .clk_m(lead_m), .rst_sw_n(rst_s_n), .rst(rst),
    .q_p(in_s_p), .q_m(in_s_m));

  input_dff u_in_f (
    .clk_p(lag_p), .clk_m(lag_m), .rst_sw_n(rst_f_n), .rst(rst),
    .q_p(in_f_p), .q_m(in_f_m));

  delay_ring #(.N_STAGES(N_SLOW), .T_STAGE(T_SLOW), .T_SW(T_SW)) u_slow_ring (
    .in_p(in_s_p), .in_m(in_s_m), .sw(sw_s),
    .stage_p(slow_p), .stage_m(slow_m));

  delay_ring #(.N_STAGES(N_FAST), .T_STAGE(T_FAST), .T_SW(T_SW)) u_fast_ring (
    .in_p(in_f_p), .in_m(in_f_m), .sw(sw_f),
    .stage_p(fast_p), .stage_m(fast_m));

  ring_switch_control u_sw (
    .f3(fast_p[3]), .s3(slow_p[3]), .dff61(therm[THERM_W]),
    .rst(rst), .calibration(calibration),
    .sw_f(sw_f), .sw_s(sw_s), .rst_f_n(rst_f_n), .rst_s_n(rst_s_n));

  comparator_matrix #(.T_CQ(T_CQ)) u_matrix (
    .slow_p(slow_p), .slow_m(slow_m), .fast_p(fast_p), .fast_m(fast_m),
    .clr(rst), .therm(therm), .dff0(dff0));

  lap_counter #(.W(CNT_W)) u_ns (
    .clk(slow_m[N_SLOW]), .en(sw_s), .rst(rst), .count(ns));

  lap_counter #(.W(CNT_W)) u_nf (
    .clk(fast_m[N_FAST]), .en(sw_f), .rst(rst), .count(nf));

endmodule
