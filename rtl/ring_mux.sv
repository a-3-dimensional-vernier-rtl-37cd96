// Behavioural model (not synthesizable logic): the 2:1 differential MUX at the
// head of each Vernier ring.
//
// With sel low the ring is open and the MUX passes the input DFF's output into
// stage 1; with sel high (SW_S or SW_F set by the ring switch control) it passes
// the ring's feedback, which closes the ring. The ring's inversion per lap is
// made by wiring the feedback with its rails crossed (see delay_ring).
//
// Timing: the output follows either input or sel after T_SW, the MUX delay tSW
// of the published timing equation. Its value is not published; 49.5 ps (3R)
// is this model's choice.
`timescale 1ps/100fs
module ring_mux #(
  parameter realtime T_SW = 49.5
) (
  input  logic sel,
  input  logic in_p,   // from the input DFF
  input  logic in_m,
  input  logic fb_p,   // from the ring's last stage
  input  logic fb_m,
  output logic yp,
  output logic ym
);

  assign #(T_SW) yp = sel ? fb_p : in_p;
  assign #(T_SW) ym = sel ? fb_m : in_m;

endmodule
