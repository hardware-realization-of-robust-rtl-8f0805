// error_subtractor: control error e(k) = w(k) - y(k).
//
// Combinational. w (reference) and y (measured motor speed) are 12-bit signed
// integers in rpm, range -2048..2047. The difference is returned one bit
// wider (13 bits), so it cannot overflow, as the fixed-point range rule for
// a subtraction requires. Widths follow the source publication; there is no state.
module error_subtractor
  import rc_pkg::*;
(
  input  in_t  w,  // reference, rpm
  input  in_t  y,  // plant output, rpm
  output err_t e   // w - y, rpm
);

  always_comb e = err_t'(w) - err_t'(y);

endmodule
