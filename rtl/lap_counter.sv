// Lap counter of one Vernier ring (N_S for the slow ring, N_F for the fast).
//
// The counter is clocked by the m rail of the ring's last stage, which rises
// once per full ring period (every second lap, because the ring inverts the
// edge on each lap). It counts only while the ring is closed (en = SW), so the
// period in which the catch-up is detected, and after which the ring is
// broken, is not counted. Count = number of complete periods before the final
// one, as the output equation expects. The published design says only that the
// slow counter is triggered from S12; the enable and the m-rail trigger are
// this design's choice. The counter wraps modulo 2^W; the evaluation logic
// uses only the difference N_S - N_F and N_F, which stay correct as long as
// N_F itself does not wrap.
//
// Timing: the count changes on the rising edge of clk; rst clears it
// asynchronously.
`timescale 1ps/100fs
module lap_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,   // last ring stage, m rail
  input  logic         en,    // ring closed
  input  logic         rst,   // global reset, active high
  output logic [W-1:0] count
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
