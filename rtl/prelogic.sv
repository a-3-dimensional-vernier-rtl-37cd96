// Behavioural model (not synthesizable logic): pre-logic unit.
//
// The reference and feedback signals are tapped after two buffers into a
// comparator, which decides which rising edge came first, while the main paths
// run through a longer buffer chain (T_BUF) so that the decision is made
// before the edges reach the crossing MUX pair. The MUXes send the leading
// edge to the slow ring and the lagging edge to the fast ring; the sign bit is
// the comparator's decision. When both routed outputs are high the comparator
// is re-armed for the next pair of edges.
//
// The structure follows the published pre-logic. The delays (T_TAP = 2 x 15 ps
// taps, T_BUF = 120 ps chain, T_OUT = 30 ps output buffers), the
// first-edge-wins arbiter, holding the sign bit after re-arming so that it can
// be read out with the conversion result, and the extra re-arm by the global
// reset are this model's choices.
//
// sign = 0: the reference led (positive interval); sign = 1: the feedback led.
`timescale 1ps/100fs
module prelogic #(
  parameter realtime T_TAP = 30.0,
  parameter realtime T_BUF = 120.0,
  parameter realtime T_OUT = 30.0
) (
  input  logic ref_sig,
  input  logic fb_sig,
  input  logic rst,
  output logic slow_out,   // lead signal
  output logic fast_out,   // lag signal
  output logic sign
);

  logic ref_t, fb_t, ref_d, fb_d, slow_mux, fast_mux;
  logic first, decided, rearm;

  assign #(T_TAP) ref_t = ref_sig;
  assign #(T_TAP) fb_t  = fb_sig;
  assign #(T_BUF) ref_d = ref_t;
  assign #(T_BUF) fb_d  = fb_t;

  // First-edge-wins comparator.
  assign rearm = rst | (slow_out & fast_out);

  assign first = ref_t | fb_t;      // rises with the earlier of the two edges

  always @(posedge first or posedge rearm) begin
    if (rearm) decided <= 1'b0;
    else       decided <= 1'b1;
  end

  always @(posedge first or posedge rst) begin
    if (rst)           sign <= 1'b0;
    else if (!decided) sign <= ~ref_t;
  end

  assign slow_mux = sign ? fb_d  : ref_d;
  assign fast_mux = sign ? ref_d : fb_d;
  assign #(T_OUT) slow_out = slow_mux;
  assign #(T_OUT) fast_out = fast_mux;

endmodule
