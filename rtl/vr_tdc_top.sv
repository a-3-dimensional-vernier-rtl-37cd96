// 3-D Vernier ring time-to-digital converter, complete chip.
//
// The converter measures the time between a ref_sig edge and a fb_sig
// edge (as in an all-digital PLL) with a resolution R set by the difference of
// two stage delays, ts - tf = 16.5 ps, over a range limited only by the lap
// counters. The pre-logic sends the earlier edge to the slow ring and the
// later one to the fast ring and outputs the sign. Splitters make both edges
// differential. In the core, the two edges race around the rings: the
// lead edge runs alone for N_S - N_F periods (coarse part, 240R + 2tSW each);
// then the lag edge gains 60R per period on it until it catches up (N_F
// periods); the comparator matrix finally captures the residual TH as a
// thermometer, which the bubble correction turns into a 6-bit number. The
// evaluation logic forms the signed code
//   code = +/- [(N_S - N_F)(240 + 2 tSW/R) + 60 N_F + TH].
//
// The block structure is the published one. Readout is this design's choice:
// a conversion is started by releasing rst, the caller waits for the rings to
// come to rest and then pulses `load` for one `clk` cycle; `code` is valid one
// cycle later (code_valid). The ring MUX delay tSW is given in units of R on
// tsw_r. In calibration mode the rings stay open and dff0_cal reports whether
// ten fast stages are faster than nine slow stages.
`timescale 1ps/100fs
module vr_tdc_top
  import vr_tdc_pkg::*;
#(
  parameter realtime T_SLOW = TS_PS,   // slow stage delay ts
  parameter realtime T_FAST = TF_PS,   // fast stage delay tf
  parameter realtime T_SW   = 49.5     // ring MUX delay tSW (3R)
) (
  input  logic                   ref_sig,
  input  logic                   fb_sig,
  input  logic                   rst,          // held high between conversions
  input  logic                   calibration,
  input  logic                   clk,          // readout clock
  input  logic                   load,         // capture the result
  input  logic [TSW_W-1:0]       tsw_r,        // tSW in units of R
  output logic signed [MAG_W:0]  code,
  output logic                   code_valid,
  output logic                   sign,
  output logic [TH_W-1:0]        th,
  output logic                   th_found,
  output logic [CNT_W-1:0]       ns,
  output logic [CNT_W-1:0]       nf,
  output logic                   dff0_cal,
  output logic                   rings_closed
);

  logic slow_se, fast_se;
  logic lead_p, lead_m, lag_p, lag_m;
  logic [THERM_W:1] therm;
  logic sw_s, sw_f;

  prelogic u_prelogic (
    .ref_sig(ref_sig), .fb_sig(fb_sig), .rst(rst),
    .slow_out(slow_se), .fast_out(fast_se), .sign(sign));

  splitter u_split_slow (.vin(slow_se), .vop(lead_p), .vom(lead_m));
  splitter u_split_fast (.vin(fast_se), .vop(lag_p),  .vom(lag_m));

  vr_tdc_core #(.T_SLOW(T_SLOW), .T_FAST(T_FAST), .T_SW(T_SW)) u_core (
    .lead_p(lead_p), .lead_m(lead_m), .lag_p(lag_p), .lag_m(lag_m),
    .rst(rst), .calibration(calibration),
    .therm(therm), .dff0(dff0_cal), .ns(ns), .nf(nf),
    .sw_s(sw_s), .sw_f(sw_f));

  bubble_encoder u_enc (.therm(therm), .th(th), .found(th_found));

  evaluation_logic u_eval (
    .clk(clk), .rst(rst), .load(load), .sign(sign),
    .ns(ns), .nf(nf), .th(th), .tsw_r(tsw_r),
    .code(code), .valid(code_valid));

  assign rings_closed = sw_s | sw_f;

endmodule
