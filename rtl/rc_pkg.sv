// rc_pkg: shared widths, fixed-point formats and constants of the robust
// discrete-time controller.
//
// All arithmetic is two's-complement fixed point. A format is written here as
// (integer MSB index, fraction bits). The widths follow the range rules of
// the design: A+B and A-B grow one integer bit over the wider operand and keep
// the finer fraction; A*B has integer MSB index A'left+B'left+1 and the sum of
// both fractions. None of the operations below can overflow.
//
//   w, y      12-bit signed integer, rpm               (11, 0)
//   e = w-y   13-bit                                   (12, 0)
//   q1,q2,p1,p2  18-bit coefficients                   (1, 16)  [own choice]
//   q*e       31-bit                                   (14, 16)
//   u         12-bit control voltage: sign, 4 integer, 7 fraction bits (4, 7)
//   p*u       30-bit                                   (6, 23)
//   s1        32-bit                                   (15, 16)
//   s2        31-bit                                   (7, 23)
//   s3        40-bit                                   (16, 23)
//
// The 12-bit input/output widths, the 1-4-7 output format, the 40-bit width
// of s3 and the +/-12 V output range follow the source publication. The 18-bit
// coefficient format with 16 fraction bits is this design's choice (it is
// the multiplier width of common FPGA DSP slices and reproduces the 40-bit
// sum exactly under the range rules).
package rc_pkg;

  localparam int unsigned IN_W   = 12;  // w, y
  localparam int unsigned ERR_W  = 13;  // e
  localparam int unsigned COEF_W = 18;  // q1, q2, p1, p2
  localparam int unsigned COEF_F = 16;  // fraction bits of the coefficients
  localparam int unsigned U_W    = 12;  // u
  localparam int unsigned U_F    = 7;   // fraction bits of u

  // Product and sum widths (range rules above).
  localparam int unsigned QE_W   = COEF_W + ERR_W;    // 31
  localparam int unsigned PU_W   = COEF_W + U_W;      // 30
  localparam int unsigned S1_W   = QE_W + 1;          // 32, COEF_F fraction bits
  localparam int unsigned S2_W   = PU_W + 1;          // 31, COEF_F+U_F fraction bits
  localparam int unsigned S3_F   = COEF_F + U_F;      // 23 fraction bits of s3
  localparam int unsigned S3_W   = 40;                // (16, 23)

  typedef logic signed [IN_W-1:0]   in_t;
  typedef logic signed [ERR_W-1:0]  err_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [U_W-1:0]    u_t;
  typedef logic signed [S3_W-1:0]   s3_t;

  // Coefficients of the feedback controller
  //   G_FB = (0.025 + 0.0231 z^-1) / (1 + 0.0159 z^-1 + 0.013 z^-2)
  // rounded to 16 fraction bits: round(c * 65536).
  localparam coef_t Q1_DEFAULT = 18'sd1638;  // 0.025  -> 0.0249939
  localparam coef_t Q2_DEFAULT = 18'sd1514;  // 0.0231 -> 0.0231018
  localparam coef_t P1_DEFAULT = 18'sd1042;  // 0.0159 -> 0.0158997
  localparam coef_t P2_DEFAULT = 18'sd852;   // 0.013  -> 0.0130005

  // Output limits, +/-12 V in the 1-4-7 format: 12 * 2^7 = 1536.
  localparam u_t U_MAX_DEFAULT =  12'sd1536;  // 0_1100.0000000
  localparam u_t U_MIN_DEFAULT = -12'sd1536;  // 1_0100.0000000

endpackage
