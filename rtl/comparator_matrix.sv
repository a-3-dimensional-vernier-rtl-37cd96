// Comparator matrix of the 3-D Vernier ring TDC: DFF0..DFF61.
//
// Each comparator is clocked by a slow-ring stage S_j and samples a fast-ring
// stage F_i, i.e. it records whether the lag edge had already passed F_i when
// the lead edge reached S_j. The pair (F_i, S_j) detects the delay difference
// j*ts - i*tf = (10j - 9i)R, so three diagonals j = i, i+1, i+2 (i = 1..10)
// give R..30R in one lap:
//   DFF k, k = 1..30:  i = (k-1)%10 + 1, j = i + (k-1)/10, odd laps (p rails)
//   DFF k, k = 31..60: same pair as DFF k-30, even laps (m rails), k*R
// so DFF1..DFF60 form a thermometer over one full ring period (two laps) that
// reads 0 below and 1 at and above the lag's residual delay.
//   DFF61: F1 against S4 on even laps, 4ts - tf + 30R = 61R, which equals F1
//          against S1 one lap later: the catch-up detector, sampled nine fast
//          stages before the ring MUXes.
//   DFF0:  F10 against S9 on the first lap, 9ts - 10tf = 0: the calibration
//          comparator, 1 when ten fast stages are faster than nine slow ones.
// The counts (62 comparators, 30 odd, 31 even), the DFF61 and DFF0 positions
// and the three-diagonal layout follow the published design. The assignment of
// the comparator numbers to diagonals, the clock/data roles of the two rings,
// and the qualification of DFF61's data by fast stage 8 are this design's
// choices. A bare F1 sample cannot tell a lag edge level with the lead from
// one more than half a period behind it (or from an idle fast ring, whose m
// rails are high), so DFF61 samples F1_m AND F8_p, which is true only while
// the lag's even-lap edge lies between F1 and F8.
//
// Interface: stage rails in, therm[61:1] (DFF1..DFF61) and dff0 out. Timing:
// each output changes T_CQ after its clocking slow-stage edge; clr (global
// reset) clears all comparators.
`timescale 1ps/100fs
module comparator_matrix
  import vr_tdc_pkg::*;
#(
  parameter realtime T_CQ = 20.0
) (
  input  logic [N_SLOW:1]  slow_p,
  input  logic [N_SLOW:1]  slow_m,
  input  logic [N_FAST:1]  fast_p,
  input  logic [N_FAST:1]  fast_m,
  input  logic             clr,
  output logic [THERM_W:1] therm,
  output logic             dff0
);

  // Fast-stage index i and slow-stage index j of DFF k (k = 1..30).
  function automatic int unsigned fi(int unsigned k);
    return (k - 1) % N_FAST + 1;
  endfunction
  function automatic int unsigned sj(int unsigned k);
    return (k - 1) % N_FAST + 1 + (k - 1) / N_FAST;
  endfunction

  localparam int unsigned PLANE = THERM_W / 2;   // 30 comparators per lap
  // DFF61 only counts the lag as caught up while its even-lap edge lies
  // between F1 and F8: 7 fast stages = 63R, just over the 60R the lag gains
  // per period, so every race is detected exactly once.
  localparam int unsigned DFF61_WIN = 8;

  for (genvar k = 1; k <= PLANE; k++) begin : g_plane
    // Odd laps: p rails rise.
    diff_dff #(.T_CQ(T_CQ)) u_odd (
      .clk_p (slow_p[sj(k)]), .clk_m (slow_m[sj(k)]),
      .dp    (fast_p[fi(k)]), .dm    (fast_m[fi(k)]),
      .clr   (clr),
      .q     (therm[k]));
    // Even laps: m rails rise.
    diff_dff #(.T_CQ(T_CQ)) u_even (
      .clk_p (slow_m[sj(k)]), .clk_m (slow_p[sj(k)]),
      .dp    (fast_m[fi(k)]), .dm    (fast_p[fi(k)]),
      .clr   (clr),
      .q     (therm[k+PLANE]));
  end

  // DFF61: catch-up detector, F1 against S4 on even laps.
  logic d61_p, d61_m;
  assign d61_p = fast_m[1] & fast_p[DFF61_WIN];
  assign d61_m = ~d61_p;

  diff_dff #(.T_CQ(T_CQ)) u_dff61 (
    .clk_p (slow_m[4]), .clk_m (slow_p[4]),
    .dp    (d61_p),     .dm    (d61_m),
    .clr   (clr),
    .q     (therm[THERM_W]));

  // DFF0: calibration comparator, F10 against S9 on the first lap.
  diff_dff #(.T_CQ(T_CQ)) u_dff0 (
    .clk_p (slow_p[9]), .clk_m (slow_m[9]),
    .dp    (fast_p[N_FAST]), .dm (fast_m[N_FAST]),
    .clr   (clr),
    .q     (dff0));

endmodule
