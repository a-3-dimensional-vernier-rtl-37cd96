// Test of the Vernier ring TDC core on its own.
//
// Lead and lag edges (differential) with random spacing t are applied; once
// the rings are at rest, the position of the first 1 in the thermometer gives
// TH, and (N_S - N_F)(240 + 2*3) + 60 N_F + TH must equal floor(t/R) (tSW is
// 3R in this core), or read up to 2 codes high with TH = 0 when t falls just
// below a slow-period multiple. Both rings must have been closed during the
// conversion and be open at its end. A second core, whose fast stages are
// 1.5 ps faster, checks calibration mode: rings stay open, lap counters stay
// at zero, and DFF0 is 1 only for the faster fast ring.
`timescale 1ps/100fs
module tb_vr_tdc_core;
  import vr_tdc_pkg::*;

  localparam realtime R  = R_PS;
  localparam realtime PS = (SLOW_PER_R + 6) * R_PS;

  logic lead, lag, rst, calibration;
  logic [THERM_W:1] therm, therm_c;
  logic dff0, dff0_c, sw_s, sw_f, sw_s_c, sw_f_c;
  logic [CNT_W-1:0] ns, nf, ns_c, nf_c;

  vr_tdc_core dut (
    .lead_p(lead), .lead_m(~lead), .lag_p(lag), .lag_m(~lag),
    .rst(rst), .calibration(calibration),
    .therm(therm), .dff0(dff0), .ns(ns), .nf(nf), .sw_s(sw_s), .sw_f(sw_f));

  vr_tdc_core #(.T_FAST(147.0)) dut_fast (
    .lead_p(lead), .lead_m(~lead), .lag_p(lag), .lag_m(~lag),
    .rst(rst), .calibration(calibration),
    .therm(therm_c), .dff0(dff0_c), .ns(ns_c), .nf(nf_c), .sw_s(sw_s_c), .sw_f(sw_f_c));

  int checks = 0, failures = 0, n_closed = 0;
  logic saw_s, saw_f;

  always @(posedge sw_s) saw_s = 1'b1;
  always @(posedge sw_f) saw_f = 1'b1;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(realtime t);
    lead = 0; lag = 0;
    rst = 0; #100 rst = 1; #(PS); rst = 0; #500;
    saw_s = 0; saw_f = 0;
    lead = 1; #(t); lag = 1;
    #(PS);
    while (sw_s || sw_f) #(1000);
    #(2 * PS);
  endtask

  function automatic int first_one(logic [THERM_W:1] v);
    for (int k = 1; k <= THERM_W; k++) if (v[k]) return k - 1;
    return THERM_W;
  endfunction

  realtime t;
  int th, got, e;

  initial begin
    lead = 0; lag = 0; calibration = 0;
    repeat (3) begin rst = 0; #100 rst = 1; #(PS); end
    for (int n = 0; n < 120; n++) begin
      t = (($urandom % 1500) + 0.5) * R;
      run(t);
      th  = first_one(therm);
      got = (int'(ns) - int'(nf)) * (SLOW_PER_R + 6) + GAIN_PER_R * int'(nf) + th;
      e   = int'($floor(t / R));
      checks++;
      if (!(got == e || (th == 0 && got - e inside {[1:2]}))) begin
        failures++; $display("FAIL t=%0.1f got %0d exp %0d (ns=%0d nf=%0d th=%0d)", t, got, e, ns, nf, th);
      end
      checks++;
      if (!saw_s || !saw_f) begin failures++; $display("FAIL rings never closed"); end
      else n_closed++;
    end
    // Calibration mode: lag 0.5R behind the lead.
    calibration = 1;
    run(0.5 * R);
    checks++;
    if (saw_s || saw_f || ns != 0 || nf != 0 || ns_c != 0 || nf_c != 0) begin
      failures++; $display("FAIL rings closed in calibration mode");
    end
    checks++;
    if (dff0 !== 1'b0 || dff0_c !== 1'b1) begin
      failures++; $display("FAIL DFF0 nominal=%b fast=%b", dff0, dff0_c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
