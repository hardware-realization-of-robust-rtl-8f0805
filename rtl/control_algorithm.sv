// control_algorithm: parallel fixed-point realisation of the robust
// second-order feedback controller
//
//   u(k) = q1*e(k-1) + q2*e(k-2) - p1*u(k-1) - p2*u(k-2),  e = w - y,
//
// with u limited to [-12 V, +12 V].
//
// Every operation has its own unit: a subtractor forms e = w - y; REG1/REG2
// hold e(k-1), e(k-2) and REG3/REG4 hold u(k-1), u(k-2); four multipliers
// and two adders form s1 = q1*e(k-1) + q2*e(k-2) and s2 = p1*u(k-1) +
// p2*u(k-2); a subtractor forms the 40-bit s3 = s1 - s2; the bounder limits
// s3 and produces u(k). REG3 stores the bounded u, so the recursion never
// winds up beyond the limits.
//
// Timing: clk is the sampling clock (period T = 1 ms in the reference
// application). At each rising edge REG1 takes w - y and REG3 takes the
// current u. u is a combinational function of the four registers only, so it
// changes just after the edge and is steady for the whole period; w and y
// only need to be valid at the edge. The response of u to a change of the
// error appears one sampling period later, as the e(k-1) term requires.
//
// Interface: w, y are 12-bit signed integers in rpm; u is 12-bit signed with
// 7 fraction bits (volts). at_max/at_min flag that the bounder is limiting.
//
// The structure, the equation, the 12-bit widths, the output format and the
// limits follow the source publication. The coefficient format (18 bits, 16 fraction
// bits; see rc_pkg), the synchronous active-high reset that clears all four
// registers, and truncation of s3 to the output format are this design's
// choices. Coefficients are parameters because they are fixed constants of a
// given controller design.
module control_algorithm
  import rc_pkg::*;
#(
  parameter coef_t Q1    = Q1_DEFAULT,
  parameter coef_t Q2    = Q2_DEFAULT,
  parameter coef_t P1    = P1_DEFAULT,
  parameter coef_t P2    = P2_DEFAULT,
  parameter u_t    U_MAX = U_MAX_DEFAULT,
  parameter u_t    U_MIN = U_MIN_DEFAULT
) (
  input  logic clk,     // sampling clock
  input  logic reset,   // synchronous, active high
  input  in_t  w,       // set-point, rpm
  input  in_t  y,       // measured speed, rpm
  output u_t   u,       // control voltage, 7 fraction bits
  output logic at_max,  // output limited at U_MAX this period
  output logic at_min   // output limited at U_MIN this period
);

  err_t e, e_1, e_2;          // e(k), e(k-1), e(k-2)
  u_t   u_1, u_2;             // u(k-1), u(k-2)
  logic signed [S1_W-1:0] s1; // (15, 16)
  logic signed [S2_W-1:0] s2; // (7, 23)
  s3_t  s3;                   // (16, 23)

  error_subtractor u_err (.w(w), .y(y), .e(e));

  // REG1, REG2
  delay_pair #(.W(ERR_W)) u_reg_e (
    .clk(clk), .reset(reset), .din(e), .d1(e_1), .d2(e_2)
  );

  // REG3, REG4: latch the bounded output.
  delay_pair #(.W(U_W)) u_reg_u (
    .clk(clk), .reset(reset), .din(u), .d1(u_1), .d2(u_2)
  );

  product_sum #(.C_W(COEF_W), .X_W(ERR_W)) u_s1 (
    .c1(Q1), .x1(e_1), .c2(Q2), .x2(e_2), .s(s1)
  );

  product_sum #(.C_W(COEF_W), .X_W(U_W)) u_s2 (
    .c1(P1), .x1(u_1), .c2(P2), .x2(u_2), .s(s2)
  );

  // s3 = s1 - s2 with s1 moved to 23 fraction bits (U_F more than it has).
  always_comb s3 = (s3_t'(s1) <<< U_F) - s3_t'(s2);

  bounder #(.U_MAX(U_MAX), .U_MIN(U_MIN)) u_bound (
    .s3(s3), .u(u), .at_max(at_max), .at_min(at_min)
  );

  // The two limits are exclusive.
  always_ff @(posedge clk)
    assert (!(at_max && at_min)) else $error("control_algorithm: both limits active");

endmodule
