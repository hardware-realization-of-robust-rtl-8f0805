// robust_controller_top: complete FPGA controller for the DC motor speed loop.
//
// The speed reference passes through the feed-forward controller G_FF = 2
// (a one-bit left shift) to become the set-point w of the feedback
// controller G_FB = (q1 + q2 z^-1)/(1 + p1 z^-1 + p2 z^-2), realised by
// control_algorithm with one sample of computational delay. The loop is
// closed outside the chip: u drives the motor (through a DAC/power stage)
// and the measured speed comes back as y.
//
// Interface: clk is the sampling clock (1 ms in the reference application),
// reset is synchronous and active high; ref_in and y are 12-bit signed rpm;
// u is 12-bit signed volts with 7 fraction bits, within [-12, 12]; w is the
// set-point after feed-forward, brought out for observation; at_max,
// at_min and ref_sat flag the output limiter and the feed-forward saturation.
//
// Timing: y and ref_in are sampled at each rising edge of clk; u changes just
// after the edge and holds for the rest of the period.
//
// The blocks, the feed-forward gain and the coefficients (rounded to 16
// fraction bits) follow the source publication; see the sub-modules for the choices
// made where it is silent.
module robust_controller_top
  import rc_pkg::*;
#(
  parameter coef_t Q1    = Q1_DEFAULT,
  parameter coef_t Q2    = Q2_DEFAULT,
  parameter coef_t P1    = P1_DEFAULT,
  parameter coef_t P2    = P2_DEFAULT,
  parameter u_t    U_MAX = U_MAX_DEFAULT,
  parameter u_t    U_MIN = U_MIN_DEFAULT
) (
  input  logic clk,
  input  logic reset,
  input  in_t  ref_in,  // speed reference, rpm
  input  in_t  y,       // measured speed, rpm
  output in_t  w,       // set-point after feed-forward, rpm
  output u_t   u,       // control voltage, 7 fraction bits
  output logic at_max,  // u limited at U_MAX
  output logic at_min,  // u limited at U_MIN
  output logic ref_sat  // reference outside -1024..1023, w saturated
);

  feedforward_shift u_ff (.ref_in(ref_in), .w(w), .sat(ref_sat));

  control_algorithm #(
    .Q1(Q1), .Q2(Q2), .P1(P1), .P2(P2), .U_MAX(U_MAX), .U_MIN(U_MIN)
  ) u_ctrl (
    .clk(clk), .reset(reset), .w(w), .y(y),
    .u(u), .at_max(at_max), .at_min(at_min)
  );

endmodule
