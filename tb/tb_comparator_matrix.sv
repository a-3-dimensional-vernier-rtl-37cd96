// Test of the comparator matrix with synthetic ring waveforms.
//
// For a lag residual r (in R, lag edge r*R after the lead edge), the test
// drives the slow rails as a lead edge passing S_j at j*ts on lap 1 and
// falling one lap (12ts + tSW) later, and the fast rails likewise with tf and
// 10tf + tSW. Expected results, from the arrival times:
//   DFF k (1..60): 1 iff r <= k (the lag had passed its fast stage when the
//                  lead reached its slow stage)
//   DFF61: 1 iff on lap 2 the lag passed F1, but not yet F8, before the lead
//          reached S4
//   DFF0: 1 iff the lag reached F10 before the lead reached S9 on lap 1.
`timescale 1ps/100fs
module tb_comparator_matrix;
  import vr_tdc_pkg::*;

  localparam realtime R   = R_PS;
  localparam realtime TS  = TS_PS;
  localparam realtime TF  = TF_PS;
  localparam realtime TSW = 3 * R_PS;
  localparam realtime LS  = N_SLOW * TS + TSW;
  localparam realtime LF  = N_FAST * TF + TSW;

  logic [N_SLOW:1] slow_p, slow_m;
  logic [N_FAST:1] fast_p, fast_m;
  logic clr;
  logic [THERM_W:1] therm;
  logic dff0;

  comparator_matrix #(.T_CQ(20.0)) dut (.*);
  assign slow_m = ~slow_p;
  assign fast_m = ~fast_p;

  int checks = 0, failures = 0;
  realtime r, base, lead_s4, lag_f1, lag_f8;
  logic e61, e0;
  logic [THERM_W:1] exp_t;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic race(realtime rr);
    slow_p = '0; fast_p = '0;
    #500 clr = 1; #100 clr = 0; #100;
    base = $realtime + 100;
    fork
      for (int j = 1; j <= N_SLOW; j++) begin
        automatic int jj = j;
        fork
          begin #(base - $realtime + jj * TS);       slow_p[jj] = 1; end
          begin #(base - $realtime + LS + jj * TS);  slow_p[jj] = 0; end
        join_none
      end
      for (int i = 1; i <= N_FAST; i++) begin
        automatic int ii = i;
        fork
          begin #(base - $realtime + rr * R + ii * TF);      fast_p[ii] = 1; end
          begin #(base - $realtime + rr * R + LF + ii * TF); fast_p[ii] = 0; end
        join_none
      end
    join
    #(2 * LS + 1000);
  endtask

  initial begin
    slow_p = '0; fast_p = '0; clr = 0;
    for (int n = 0; n < 150; n++) begin
      r = real'(int'($urandom % 72) - 6) + 0.5;
      race(r);
      for (int k = 1; k <= 60; k++) exp_t[k] = (r <= k);
      lead_s4 = LS + 4 * TS;
      lag_f1  = r * R + LF + TF;
      lag_f8  = r * R + LF + 8 * TF;
      e61 = (lag_f1 <= lead_s4) && (lag_f8 > lead_s4);
      e0  = (r * R + N_FAST * TF) < 9 * TS;
      exp_t[61] = e61;
      checks++;
      if (therm !== exp_t || dff0 !== e0) begin
        failures++;
        $display("FAIL r=%0.1f therm=%b exp=%b dff0=%b exp=%b", r, therm, exp_t, dff0, e0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
