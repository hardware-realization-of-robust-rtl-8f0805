// bounder: limits the controller sum s3 to [U_MIN, U_MAX] and returns it as a
// 12-bit control voltage.
//
// s3 is 40 bits with 23 fraction bits. Two comparators test s3 < U_MIN and
// s3 > U_MAX, with both limits aligned to the 23-bit fraction. A first
// multiplexer passes U_MIN when s3 is below it and s3 otherwise; a second
// passes U_MAX when s3 is above it and the first one's output otherwise.
// The in-range value keeps 7 fraction bits: the 16 lowest bits of s3 are
// dropped, i.e. rounding toward minus infinity. The output format (sign, 4
// integer, 7 fraction bits), the +/-12 V limits and the comparator/
// multiplexer structure follow the source publication; truncation as the rounding is
// this design's choice. Combinational; the limited value is what the
// controller stores as u(k-1), which is what gives the anti-windup.
module bounder
  import rc_pkg::*;
#(
  parameter u_t U_MAX = U_MAX_DEFAULT,  // +12 V
  parameter u_t U_MIN = U_MIN_DEFAULT   // -12 V
) (
  input  s3_t s3,      // 40-bit sum, 23 fraction bits
  output u_t  u,       // bounded output, 7 fraction bits
  output logic at_max, // s3 > U_MAX: output held at U_MAX
  output logic at_min  // s3 < U_MIN: output held at U_MIN
);

  localparam int unsigned SHIFT = S3_F - U_F;  // 16
  localparam s3_t MAX_EXT = s3_t'(U_MAX) <<< SHIFT;
  localparam s3_t MIN_EXT = s3_t'(U_MIN) <<< SHIFT;

  u_t in_range;
  u_t mux_lo;

  always_comb begin
    at_min   = s3 < MIN_EXT;
    at_max   = s3 > MAX_EXT;
    in_range = s3[SHIFT +: U_W];
    mux_lo   = at_min ? U_MIN : in_range;
    u        = at_max ? U_MAX : mux_lo;
  end

  initial assert (U_MIN <= U_MAX)
    else $error("bounder: U_MIN must not exceed U_MAX");

endmodule
