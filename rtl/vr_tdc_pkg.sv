// Shared constants of the 3-D Vernier ring time-to-digital converter.
//
// The converter races a lead edge around a slow ring of N_SLOW stages and a
// lag edge around a fast ring of N_FAST stages. All times are in units of the
// resolution R = ts - tf. The stage delays ts = 10R and tf = 9R, the ring sizes
// (12 slow, 10 fast) and the 61-bit thermometer follow the published design;
// the counter width and the switch-delay field width are this design's choice.
`timescale 1ps/100fs
package vr_tdc_pkg;

  // Ring geometry.
  localparam int unsigned N_SLOW = 12;            // slow-ring delay stages
  localparam int unsigned N_FAST = 10;            // fast-ring delay stages
  localparam int unsigned TS_R   = 10;            // slow stage delay, in R
  localparam int unsigned TF_R   = 9;             // fast stage delay, in R

  // Delay range of one comparator plane (one lap): tz = 12ts - 10tf = 30R.
  localparam int unsigned TZ_R       = N_SLOW * TS_R - N_FAST * TF_R;
  // Slow-ring period without the two MUX passes: 24ts = 240R.
  localparam int unsigned SLOW_PER_R = 2 * N_SLOW * TS_R;
  // Time the lag gains on the lead per full ring period (two laps): 60R.
  localparam int unsigned GAIN_PER_R = 2 * TZ_R;

  // Comparator matrix: DFF1..DFF60 cover R..60R over one period, DFF61 is the
  // catch-up detector (equivalent to 61R), DFF0 is the calibration comparator.
  localparam int unsigned THERM_W = 61;
  localparam int unsigned TH_W    = 6;            // binary fine code TH

  localparam int unsigned CNT_W   = 8;            // lap counters N_S, N_F
  localparam int unsigned TSW_W   = 6;            // MUX delay tSW, in R
  // Magnitude width: (2^CNT_W-1)*(SLOW_PER_R+2*(2^TSW_W-1)) + GAIN_PER_R*(2^CNT_W-1) + 63.
  localparam int unsigned MAG_W   = 17;

  // Nominal timing of the behavioural models (resolution 16.5 ps).
  localparam realtime R_PS  = 16.5;
  localparam realtime TS_PS = 165.0;              // 10 R
  localparam realtime TF_PS = 148.5;              // 9 R

endpackage
