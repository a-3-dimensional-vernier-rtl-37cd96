// Measurement workloads of the 3-D Vernier ring TDC, run on the top at its
// default parameters (R = 16.5 ps, 8-bit lap counters).
//
//   1. Transfer characteristic: a ramp of intervals from 0 to 5000 ps in 2 ps
//      steps. Every code must equal floor(t/R), with two exceptions: an
//      interval within 2R below a multiple of the slow-ring period may read up
//      to 2 codes high with TH = 0 (the known limit of the catch-up window),
//      and an interval that is an exact multiple of R puts lead and lag edges
//      level at a comparator, which may then decide either way (1 code). The
//      codes must not fall along the ramp by more than such a tie allows, and
//      the last one must be floor(5000/16.5).
//   2. Code distribution at two constant intervals that give codes 209 and
//      210, 8096 conversions each. The model has no noise or jitter, so every
//      conversion must give the same code.
//   3. Conversion rate: each conversion, from the first input edge until both
//      rings are broken and the last edges have run out, must fit in one
//      sample period at 15 MS/s (66.7 ns).
// The readout protocol is the one the end-to-end test uses: reset pulse,
// edges, wait for the rings to open, then one load cycle.
`timescale 1ps/100fs
module tb_vr_tdc_workloads;
  import vr_tdc_pkg::*;

  localparam realtime R       = R_PS;
  localparam int      TSWR    = 3;                // tSW = 49.5 ps = 3R
  localparam realtime PS      = (SLOW_PER_R + 2 * TSWR) * R_PS;
  localparam realtime T_SAMPLE = 1.0e6 / 15.0;    // 15 MS/s, in ps
  localparam int      HITS    = 8096;

  logic ref_sig, fb_sig, rst, calibration, clk, load;
  logic [TSW_W-1:0] tsw_r;
  logic signed [MAG_W:0] code;
  logic code_valid, sign, th_found, dff0_cal, rings_closed;
  logic [TH_W-1:0] th;
  logic [CNT_W-1:0] ns, nf;

  vr_tdc_top dut (.*);

  int checks = 0, failures = 0;
  int n_edge = 0, n_coarse = 0, n_tie = 0;
  realtime busy_max = 0.0;

  initial clk = 1'b0;
  always #5000 clk = ~clk;

  initial begin
    #(20ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Busy time: from the first input edge until the rings are open again,
  // plus two slow periods for the edges still inside the rings to run out.
  task automatic convert(input realtime t_in, output logic signed [MAG_W:0] result);
    realtime t0, busy;
    rst = 1'b0; load = 1'b0;
    #1 rst = 1'b1;
    ref_sig = 1'b0; fb_sig = 1'b0;
    #(PS);
    rst = 1'b0;
    #1000;
    t0 = $realtime;
    ref_sig = 1'b1; #(t_in); fb_sig = 1'b1;
    #(PS);
    while (rings_closed) #(100);
    busy = $realtime - t0 + 2 * PS;
    if (busy > busy_max) busy_max = busy;
    checks++;
    if (busy > T_SAMPLE) begin
      failures++; $display("FAIL: t=%0.1f ps conversion took %0.1f ps", t_in, busy);
    end
    #(2 * PS);
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    result = code;
  endtask

  realtime t, frac;
  bit tie;
  logic signed [MAG_W:0] got, prev;
  int exp_c, n_codes[int];

  initial begin
    tsw_r = TSW_W'(TSWR);
    calibration = 1'b0;
    ref_sig = 1'b0; fb_sig = 1'b0; load = 1'b0;
    repeat (3) begin
      rst = 1'b0; #(100);
      rst = 1'b1; #(PS);
    end

    // 1. Ramp 0..5000 ps in 2 ps steps.
    prev = '0;
    for (int s = 0; s <= 2500; s++) begin
      t = 2.0 * s;
      convert(t, got);
      exp_c = int'($floor(t / R));
      frac  = t / R - $floor(t / R + 0.5);
      tie   = (frac < 1.0e-6) && (frac > -1.0e-6);
      checks++;
      if (got == exp_c) begin
        if (ns != nf) n_coarse++;
      end else if (th == 0 && (got - exp_c) inside {[1:2]}) begin
        n_edge++;
      end else if (tie && (int'(got) - exp_c) >= -1 && (int'(got) - exp_c) <= 1) begin
        n_tie++;                                  // lead and lag exactly level
      end else begin
        failures++;
        $display("FAIL: ramp t=%0.1f ps expected %0d got %0d", t, exp_c, got);
      end
      checks++;
      if (got < prev && !(prev - exp_c inside {[1:2]}) && !(prev - got == 1)) begin
        failures++; $display("FAIL: ramp not monotonic at t=%0.1f ps", t);
      end
      prev = got;
    end
    checks++;
    if (got != int'($floor(5000.0 / R))) begin
      failures++; $display("FAIL: ramp end code %0d", got);
    end
    $display("ramp: %0d conversions, %0d with coarse laps, %0d in the period-edge window, %0d exact multiples of R, last code %0d",
             2501, n_coarse, n_edge, n_tie, got);

    // 2. Constant intervals: codes 209 and 210.
    for (int c = 209; c <= 210; c++) begin
      n_codes.delete();
      t = (c + 0.5) * R;
      for (int h = 0; h < HITS; h++) begin
        convert(t, got);
        n_codes[int'(got)]++;
      end
      checks++;
      if (n_codes.num() != 1 || !n_codes.exists(c) || n_codes[c] != HITS) begin
        failures++; $display("FAIL: constant interval for code %0d gave %0d distinct codes", c, n_codes.num());
      end
      $display("constant %0.1f ps: %0d hits, %0d distinct code(s)", t, HITS, n_codes.num());
    end

    checks++;
    if (n_coarse == 0) begin failures++; $display("FAIL: ramp never used coarse laps"); end
    $display("longest conversion %0.1f ps, sample period at 15 MS/s %0.1f ps", busy_max, T_SAMPLE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
