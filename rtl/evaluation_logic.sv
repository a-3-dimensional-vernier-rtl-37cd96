// Evaluation logic: turns the raw conversion result into a signed code.
//
// The measured interval, in units of the resolution R, is
//   |t_IN| / R = (N_S - N_F) * (240 + 2*tSW/R) + 60 * N_F + TH
// where N_S - N_F full slow-ring periods elapsed before the lag edge arrived
// (coarse part), N_F full periods of 60R each were needed to close the gap,
// and TH is the residual from the thermometer. The sign bit from the
// pre-logic gives the polarity. The equation is the published one; tSW (the
// ring MUX delay) is supplied as an input in units of R, since it must be
// measured or calibrated.
//
// Interface and timing: on a clock edge with `load` high the inputs are
// evaluated and the result is registered into `code` at that edge; `valid`
// is high for the cycle after each load. `code` is two's complement,
// negative when the feedback edge led the reference edge (this polarity, the
// register and the widths are this design's choices).
// rst clears the result asynchronously.
`timescale 1ps/100fs
module evaluation_logic
  import vr_tdc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,
  input  logic                    sign,     // 1: feedback led
  input  logic [CNT_W-1:0]        ns,
  input  logic [CNT_W-1:0]        nf,
  input  logic [TH_W-1:0]         th,
  input  logic [TSW_W-1:0]        tsw_r,    // MUX delay in R
  output logic signed [MAG_W:0]   code,
  output logic                    valid
);

  logic [CNT_W-1:0]  coarse_laps;
  logic [MAG_W-1:0]  coarse_per;
  logic [MAG_W-1:0]  mag;

  always_comb begin
    coarse_laps = ns - nf;                                   // modulo 2^CNT_W
    coarse_per  = MAG_W'(SLOW_PER_R) + (MAG_W'(tsw_r) << 1);
    mag = MAG_W'(coarse_laps) * coarse_per
        + MAG_W'(nf) * MAG_W'(GAIN_PER_R)
        + MAG_W'(th);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) code <= sign ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    end
  end

endmodule
