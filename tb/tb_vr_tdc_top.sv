// End-to-end test of the 3-D Vernier ring TDC at its default parameters.
//
// For a sweep of input intervals, positive and negative, the test resets the
// converter, launches a reference and a feedback edge separated by the
// interval, waits until both rings are at rest, reads the result and
// compares it with the interval expressed in units of R = 16.5 ps: the code
// must be floor(|t|/R) with the sign of t, except that an interval falling
// within 2R below a multiple of the slow-ring period may read up to 2 codes
// high with TH = 0 (the catch-up window is 63R wide, 3R more than the 60R
// gained per period). It also counts the mechanisms the
// conversion relies on, and fails if one never occurred: coarse laps
// (N_S > N_F), fine laps (N_F > 0), a catch-up in the odd-lap plane and in the
// even-lap plane, both signs, intervals near the end of the 8-bit lap-counter
// range, and the calibration mode with the rings held open.
`timescale 1ps/100fs
module tb_vr_tdc_top;
  import vr_tdc_pkg::*;

  localparam realtime R    = R_PS;
  localparam int      TSWR = 3;                   // tSW = 49.5 ps = 3R
  localparam realtime PS   = (SLOW_PER_R + 2 * TSWR) * R_PS;   // slow period

  logic ref_sig, fb_sig, rst, calibration, clk, load;
  logic [TSW_W-1:0] tsw_r;
  logic signed [MAG_W:0] code;
  logic code_valid, sign, th_found, dff0_cal, rings_closed;
  logic [TH_W-1:0] th;
  logic [CNT_W-1:0] ns, nf;

  vr_tdc_top dut (.*);

  int checks = 0, failures = 0;
  int n_coarse = 0, n_fine = 0, n_odd = 0, n_even = 0, n_pos = 0, n_neg = 0,
      n_cal = 0, n_long = 0, n_edge = 0;

  initial clk = 1'b0;
  always #5000 clk = ~clk;                        // 100 MHz readout clock

  // Watchdog.
  initial begin
    #(2ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input realtime t_in, output logic signed [MAG_W:0] result);
    rst = 1'b0; load = 1'b0;
    #1 rst = 1'b1;                               // rising edge for the async clears
    ref_sig = 1'b0; fb_sig = 1'b0;
    #(PS);                                       // rings settle while open
    rst = 1'b0;
    #1000;
    if (t_in >= 0) begin
      ref_sig = 1'b1; #(t_in); fb_sig = 1'b1;
    end else begin
      fb_sig = 1'b1; #(-t_in); ref_sig = 1'b1;
    end
    // Wait until both rings have been broken, then let the edges settle.
    #(PS);
    while (rings_closed) #(1000);
    #(2 * PS);
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    if (!code_valid) begin
      failures++; $display("FAIL: code_valid missing");
    end
    result = code;
  endtask

  function automatic int expected_code(realtime t_in);
    realtime a;
    int n;
    a = (t_in < 0) ? -t_in : t_in;
    n = int'($floor(a / R));
    return (t_in < 0) ? -n : n;
  endfunction

  realtime t;
  logic signed [MAG_W:0] got;
  int exp_c;

  initial begin
    tsw_r = TSW_W'(TSWR);
    calibration = 1'b0;
    ref_sig = 1'b0; fb_sig = 1'b0; load = 1'b0;
    // Power-up: the clears are edge-triggered in simulation and some are
    // ORed with state that starts at random, so pulse the reset three times
    // (comparators and counters, then switch control, then input DFFs).
    repeat (3) begin
      rst = 1'b0; #(100);
      rst = 1'b1; #(PS);
    end
    for (int n = 0; n < 300; n++) begin
      // Intervals at (k + 0.5) R, mostly over the first three slow periods,
      // some up to the end of the 8-bit lap-counter range; both signs.
      if (n % 10 == 9) t = (($urandom % 62000) + 0.5) * R;
      else             t = (($urandom % 760) + 0.5) * R;
      if (n % 3 == 2) t = -t;
      if (n < 8) t = (n * 9 + 0.5) * R;            // small ones first
      convert(t, got);
      exp_c = expected_code(t);
      checks++;
      if (got == exp_c) begin
        if (ns != nf) n_coarse++;
        if (nf != 0)  n_fine++;
        if (th <= 30) n_odd++; else n_even++;
        if (sign) n_neg++; else n_pos++;
        if (ns > 8'd200) n_long++;
      end else if (th == 0 && (got - exp_c) * (t < 0 ? -1 : 1) inside {[1:2]}) begin
        // The lag edge arrived less than 2R before the start of a lead
        // period: it is first seen level with the lead, reading TH = 0.
        n_edge++;
      end else begin
        failures++;
        $display("FAIL: t=%0.1f ps expected %0d got %0d (ns=%0d nf=%0d th=%0d sign=%b)",
                 t, exp_c, got, ns, nf, th, sign);
      end
    end

    // Calibration mode: rings stay open, DFF0 reports 10tf < 9ts for the lag
    // edge arriving together with the lead (tie broken by 1 ps either way).
    calibration = 1'b1;
    convert(-1.0, got);       // feedback leads by 1 ps: lag edge 1 ps behind
    checks++;
    if (dff0_cal !== 1'b0 || ns != 0 || nf != 0) begin
      failures++; $display("FAIL: calibration, lag 1 ps behind: dff0=%b", dff0_cal);
    end else n_cal++;
    calibration = 1'b0;

    $display("mechanisms: coarse=%0d fine=%0d odd_plane=%0d even_plane=%0d pos=%0d neg=%0d cal=%0d long=%0d period_edge=%0d",
             n_coarse, n_fine, n_odd, n_even, n_pos, n_neg, n_cal, n_long, n_edge);
    checks++; if (n_coarse == 0) begin failures++; $display("FAIL: no coarse laps seen"); end
    checks++; if (n_fine == 0)   begin failures++; $display("FAIL: no fine laps seen"); end
    checks++; if (n_odd == 0)    begin failures++; $display("FAIL: no odd-plane catch-up"); end
    checks++; if (n_even == 0)   begin failures++; $display("FAIL: no even-plane catch-up"); end
    checks++; if (n_long == 0)   begin failures++; $display("FAIL: no long interval seen"); end
    checks++; if (n_pos == 0 || n_neg == 0) begin failures++; $display("FAIL: sign not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
