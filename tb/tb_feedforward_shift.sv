// tb_feedforward_shift: checks w = 2 * ref over the whole 12-bit reference
// range: exact inside -1024..1023 rpm, saturated at -2048/2047 outside, with
// the saturation flag.
module tb_feedforward_shift;
  import rc_pkg::*;

  in_t  ref_in, w;
  logic sat;
  int   checks = 0, failures = 0;

  feedforward_shift dut (.ref_in(ref_in), .w(w), .sat(sat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   exp_w;
    logic exp_sat;
    for (int r = -2048; r <= 2047; r++) begin
      ref_in  = in_t'(r);
      exp_w   = 2 * r;
      exp_sat = 0;
      if (exp_w > 2047)  begin exp_w = 2047;  exp_sat = 1; end
      if (exp_w < -2048) begin exp_w = -2048; exp_sat = 1; end
      #1;
      checks++;
      if (int'(w) != exp_w || sat != exp_sat) begin
        failures++;
        $display("FAIL ref=%0d w=%0d sat=%b expected %0d %b", r, w, sat, exp_w, exp_sat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
