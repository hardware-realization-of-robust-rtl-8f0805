// tb_control_algorithm: checks the parallel controller sample by sample
// against a floating-point model of
//   u(k) = q1 e(k-1) + q2 e(k-2) - p1 u(k-1) - p2 u(k-2),  e = w - y,
// clamped to [-12, 12] V and rounded down to 2^-7 V. With coefficients that
// are multiples of 2^-16 and integer errors every term is exact in double
// precision, so the model must match the hardware bit for bit.
//
// Phases: a one-sample latency test (an error step must move u exactly one
// clock edge after it is applied, and not before), random small errors
// (output inside the limits), large positive and negative errors (output
// held at +12 V and -12 V), and a reset in the middle of operation. Each of
// the mechanisms (in-range output, upper limit, lower limit, reset) must be
// seen at least once.
module tb_control_algorithm;
  import rc_pkg::*;

  logic clk = 0, reset;
  in_t  w, y;
  u_t   u;
  logic at_max, at_min;
  int   checks = 0, failures = 0;
  int   n_in = 0, n_max = 0, n_min = 0, n_reset = 0;

  // model state: e(k-1), e(k-2) in rpm, u(k-1), u(k-2) in volts
  real  me1, me2, mu1, mu2;
  real  mu;  // model output for this period, volts

  control_algorithm dut (
    .clk(clk), .reset(reset), .w(w), .y(y), .u(u), .at_max(at_max), .at_min(at_min)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real model_u(output logic lim_hi, output logic lim_lo);
    real v;
    v = (1638.0 * me1 + 1514.0 * me2) / 65536.0
        - (1042.0 * mu1 + 852.0 * mu2) / 65536.0;
    lim_hi = v > 12.0;
    lim_lo = v < -12.0;
    if (lim_hi) v = 12.0;
    if (lim_lo) v = -12.0;
    return $floor(v * 128.0) / 128.0;
  endfunction

  task automatic model_reset();
    me1 = 0; me2 = 0; mu1 = 0; mu2 = 0; mu = 0;
  endtask

  // One sampling period: apply w, y before the edge, clock, then compare.
  task automatic step(input int wi, input int yi);
    logic hi, lo;
    w = in_t'(wi);
    y = in_t'(yi);
    @(posedge clk);
    me2 = me1; me1 = real'(wi - yi);
    mu2 = mu1; mu1 = mu;
    mu  = model_u(hi, lo);
    @(negedge clk);
    checks++;
    if (real'(u) / 128.0 != mu || at_max != hi || at_min != lo) begin
      failures++;
      $display("FAIL t=%0t w=%0d y=%0d u=%0d (%f V) max=%b min=%b expected %f V %b %b",
               $time, wi, yi, u, real'(u) / 128.0, at_max, at_min, mu, hi, lo);
    end
    if (hi) n_max++;
    else if (lo) n_min++;
    else n_in++;
  endtask

  initial begin
    reset = 1;
    w = '0;
    y = '0;
    model_reset();
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 0;

    // Latency: error applied in this period reaches u after exactly one edge.
    w = in_t'(100);
    y = in_t'(0);
    #1;
    checks++;
    if (u !== '0) begin
      failures++;
      $display("FAIL latency: u moved before the sampling edge (u=%0d)", u);
    end
    step(100, 0);
    checks++;
    // q1 * 100 = 1638*100/2^16 V = 2.4994 V -> floor(*128) = 319
    if (int'(u) != 319) begin
      failures++;
      $display("FAIL latency: u=%0d one edge after the error step, expected 319", u);
    end
    step(100, 0);
    step(100, 0);

    // small random errors
    for (int k = 0; k < 2000; k++)
      step(int'($urandom_range(800)) - 400, int'($urandom_range(800)) - 400);
    // large errors: drive into the upper and lower limits
    for (int k = 0; k < 20; k++) step(2047, -2048);
    for (int k = 0; k < 20; k++) step(-2048, 2047);
    // full-range random
    for (int k = 0; k < 2000; k++)
      step(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);

    // reset in operation clears all four registers
    w = in_t'(500);
    y = in_t'(0);
    reset = 1;
    @(posedge clk);
    model_reset();
    @(negedge clk);
    reset = 0;
    checks++;
    if (u !== '0) begin
      failures++;
      $display("FAIL reset: u=%0d after reset, expected 0", u);
    end else n_reset++;
    for (int k = 0; k < 200; k++)
      step(int'($urandom_range(800)) - 400, int'($urandom_range(800)) - 400);

    $display("mechanisms: in_range=%0d upper_limit=%0d lower_limit=%0d reset=%0d",
             n_in, n_max, n_min, n_reset);
    if (n_in == 0 || n_max == 0 || n_min == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
