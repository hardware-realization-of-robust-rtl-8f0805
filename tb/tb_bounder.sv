// tb_bounder: checks the output limiter. The expected output is worked out
// with real arithmetic: the value s3 / 2^23 volts is clamped to [-12, 12]
// and, inside the range, rounded down to a multiple of 2^-7 V. Sums just
// around both limits, at the 40-bit extremes and random values are applied;
// the limit flags are checked too.
module tb_bounder;
  import rc_pkg::*;

  s3_t  s3;
  u_t   u;
  logic at_max, at_min;
  int   checks = 0, failures = 0;
  int   n_max = 0, n_min = 0, n_in = 0;

  bounder dut (.s3(s3), .u(u), .at_max(at_max), .at_min(at_min));

  task automatic apply(input longint v);
    real    volts, lim;
    longint exp_u;
    logic   exp_max, exp_min;
    s3    = s3_t'(v);
    #1;
    volts   = real'(v) / 8388608.0;  // 2^23
    exp_max = volts > 12.0;
    exp_min = volts < -12.0;
    if (exp_max)      lim = 12.0;
    else if (exp_min) lim = -12.0;
    else              lim = volts;
    exp_u = longint'($floor(lim * 128.0));
    checks++;
    if (longint'(u) != exp_u || at_max != exp_max || at_min != exp_min) begin
      failures++;
      $display("FAIL s3=%0d u=%0d max=%b min=%b expected %0d %b %b", v, u, at_max, at_min,
               exp_u, exp_max, exp_min);
    end
    if (exp_max) n_max++;
    else if (exp_min) n_min++;
    else n_in++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lim_hi, lim_lo;
    lim_hi = 64'sd12 <<< 23;
    lim_lo = -(64'sd12 <<< 23);
    for (longint d = -3; d <= 3; d++) begin
      apply(lim_hi + d);
      apply(lim_lo + d);
      apply(d);
      apply((64'sd5 <<< 23) + d);
    end
    apply(-(64'sd1 <<< 39));
    apply((64'sd1 <<< 39) - 1);
    apply(64'sd2875 <<< 20);  // 2.875 V = 00010.1110000
    repeat (3000) begin
      // mostly within +/-16 V, sometimes anywhere in 40 bits
      if ($urandom_range(3) == 0)
        apply(longint'({$urandom, $urandom}) >>> 24);
      else
        apply(longint'($urandom_range(32'd268435455)) - 64'sd134217728);  // +/-16 V
    end
    if (n_max == 0 || n_min == 0 || n_in == 0) begin
      failures++;
      $display("FAIL coverage max=%0d min=%0d in=%0d", n_max, n_min, n_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
