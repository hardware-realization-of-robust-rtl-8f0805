// feedforward_shift: feed-forward controller G_FF = 2, realised as a left
// shift of the reference by one bit.
//
// Combinational. The input is the speed reference in rpm, the output the
// set-point w fed to the feedback controller, both 12-bit signed. For
// references within -1024..1023 rpm, w is exactly 2*ref_in. Outside that
// range the doubled value does not fit 12 bits and w saturates at -2048 or
// 2047 instead of wrapping; sat flags this.
//
// The gain of 2 and its realisation as a one-bit shift follow the source publication.
// Keeping the 12-bit width of w and saturating instead of wrapping are this
// design's choices.
module feedforward_shift
  import rc_pkg::*;
(
  input  in_t  ref_in,  // speed reference, rpm
  output in_t  w,       // 2 * ref_in, saturated to 12 bits
  output logic sat      // ref_in outside -1024..1023
);

  localparam in_t W_MAX = in_t'({1'b0, {(IN_W-1){1'b1}}});
  localparam in_t W_MIN = in_t'({1'b1, {(IN_W-1){1'b0}}});

  always_comb begin
    // the two top bits differ exactly when the shift would change the sign
    sat = ref_in[IN_W-1] != ref_in[IN_W-2];
    if (!sat)                w = ref_in <<< 1;
    else if (ref_in[IN_W-1]) w = W_MIN;
    else                     w = W_MAX;
  end

endmodule
