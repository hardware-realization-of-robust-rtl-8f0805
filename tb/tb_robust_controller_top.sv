// tb_robust_controller_top: closed-loop test of the complete controller with
// a model of the DC motor in the testbench.
//
// The motor is the first-order plant with dead time
//   G(s) = K / (T1 s + 1) * exp(-0.001 s),  nominal K = 25.28, T1 = 4.856 ms,
// sampled with T = 1 ms:
//   y(k) = a y(k-1) + b1 u(k-1) + b2 u(k-2),  a = 0.8139, b1 = 0.4228, b2 = 4.282.
// One clock period stands for one sampling period. The controller output
// held during a period is taken by the plant model at the falling edge; the
// speed, rounded to whole rpm, is presented to the controller for the next
// rising edge.
//
// Runs, all with the top's default parameters:
//  1. Reference step of 100 rpm at t = 10 ms, observed to 50 ms. The output
//     must stay at 0 until after the step and settle within 3 rpm of the
//     closed-loop static value 2*ref*L/(1+L), L = K*(q1+q2)/(1+p1+p2).
//  2. The same step for the four corner plants of the uncertainty box
//     K in [25, 25.5], T1 in [4.5, 5.2] ms; each must settle the same way.
//     (The split of the plant numerator into b1 and b2 is kept in the
//     nominal ratio.)
//  3. Large steps that drive u into +12 V and -12 V, a reference beyond
//     +/-1023 rpm that saturates the feed-forward, and a reset in operation.
// In every period u is also compared bit for bit with a floating-point
// model of the control law, and w with 2*ref. Each mechanism (feed-forward
// doubling and saturation, in-range output, both limits, reset, settling)
// is counted and must occur at least once.
module tb_robust_controller_top;
  import rc_pkg::*;

  logic clk = 0, reset;
  in_t  ref_in, y, w;
  u_t   u;
  logic at_max, at_min, ref_sat;

  int checks = 0, failures = 0;
  int n_ff = 0, n_ffsat = 0, n_in = 0, n_max = 0, n_min = 0, n_reset = 0, n_settled = 0;

  // plant model
  real pa, pb1, pb2, py, puh1, puh2;
  // controller model: e(k-1), e(k-2) rpm; u(k-1), u(k-2), u volts
  real me1, me2, mu1, mu2, mu;

  robust_controller_top dut (
    .clk(clk), .reset(reset), .ref_in(ref_in), .y(y), .w(w), .u(u),
    .at_max(at_max), .at_min(at_min), .ref_sat(ref_sat)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic set_plant(input real k_gain, input real t1);
    real btot;
    pa   = $exp(-0.001 / t1);
    btot = k_gain * (1.0 - pa);
    pb1  = btot * 0.4228 / (0.4228 + 4.282);
    pb2  = btot - pb1;
  endtask

  task automatic restart();
    reset = 1;
    ref_in = '0;
    y = '0;
    py = 0; puh1 = 0; puh2 = 0;
    me1 = 0; me2 = 0; mu1 = 0; mu2 = 0; mu = 0;
    @(posedge clk);
    @(negedge clk);
    reset = 0;
  endtask

  function automatic int sat12(input int v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  // One sampling period with reference r. Returns the speed seen this period.
  task automatic period(input int r, output int y_seen);
    real  v;
    logic hi, lo;
    int   wexp;
    ref_in = in_t'(r);
    #1;
    wexp = sat12(2 * r);
    checks++;
    if (int'(w) != wexp || ref_sat != (wexp != 2 * r)) fail($sformatf("w=%0d expected %0d", w, wexp));
    if (ref_sat) n_ffsat++;
    else if (r != 0) n_ff++;
    y_seen = int'(y);
    @(posedge clk);
    // controller model
    me2 = me1; me1 = real'(wexp - y_seen);
    mu2 = mu1; mu1 = mu;
    v  = (1638.0 * me1 + 1514.0 * me2) / 65536.0 - (1042.0 * mu1 + 852.0 * mu2) / 65536.0;
    hi = v > 12.0;
    lo = v < -12.0;
    if (hi) v = 12.0;
    if (lo) v = -12.0;
    mu = $floor(v * 128.0) / 128.0;
    @(negedge clk);
    checks++;
    if (real'(u) / 128.0 != mu || at_max != hi || at_min != lo)
      fail($sformatf("u=%f V max=%b min=%b expected %f V %b %b", real'(u) / 128.0,
                     at_max, at_min, mu, hi, lo));
    if (hi) n_max++;
    else if (lo) n_min++;
    else n_in++;
    // plant: advance one sample with the output held during this period
    py   = pa * py + pb1 * puh1 + pb2 * puh2;
    puh2 = puh1;
    puh1 = real'(u) / 128.0;
    y    = in_t'(sat12(int'($rtoi(py >= 0 ? py + 0.5 : py - 0.5))));
  endtask

  // Step response: 0 until sample 10, then ref_step; 50 samples in all.
  task automatic step_response(input real k_gain, input real t1, input int ref_step,
                               input string name);
    int   ys;
    real  lgain, yss;
    int   first_move;
    real  max_dev, dev;
    set_plant(k_gain, t1);
    restart();
    lgain = k_gain * (1638.0 + 1514.0) / 65536.0 / (1.0 + (1042.0 + 852.0) / 65536.0);
    yss   = 2.0 * ref_step * lgain / (1.0 + lgain);
    first_move = -1;
    max_dev = 0;
    for (int k = 0; k < 50; k++) begin
      period(k >= 10 ? ref_step : 0, ys);
      if (ys != 0 && first_move < 0) first_move = k;
      dev = real'(ys) - yss;
      if (dev < 0) dev = -dev;
      if (k >= 40 && dev > max_dev) max_dev = dev;
      if (k == 49) $display("%s: K=%0.2f T1=%0.4f  y moves at %0d ms, y(49 ms)=%0d, static value %0.1f",
                            name, k_gain, t1, first_move, ys, yss);
    end
    checks++;
    // step applied in period 10; controller reacts one edge later and the
    // plant adds at least one more sample, so y cannot move before 12 ms
    if (first_move < 12 || first_move > 15) fail($sformatf("%s: y first moved at %0d ms", name, first_move));
    checks++;
    if (max_dev > 3.0) fail($sformatf("%s: y not settled within 3 rpm of %0.1f (max dev %0.1f)", name, yss, max_dev));
    else n_settled++;
  endtask

  initial begin
    int ys;
    // 1. nominal step response of 100 rpm
    step_response(25.28, 0.004856, 100, "nominal");
    // 2. corners of the uncertainty box
    step_response(25.0, 0.0045, 100, "corner 1");
    step_response(25.0, 0.0052, 100, "corner 2");
    step_response(25.5, 0.0045, 100, "corner 3");
    step_response(25.5, 0.0052, 100, "corner 4");
    // 3. limits: large steps up and down, feed-forward saturation
    set_plant(25.28, 0.004856);
    restart();
    for (int k = 0; k < 30; k++) period(600, ys);
    for (int k = 0; k < 30; k++) period(-600, ys);
    for (int k = 0; k < 10; k++) period(1500, ys);
    for (int k = 0; k < 10; k++) period(-1500, ys);
    // reset in operation
    reset = 1;
    @(posedge clk);
    @(negedge clk);
    reset = 0;
    checks++;
    if (u !== '0) fail($sformatf("u=%0d after reset", u));
    else n_reset++;

    $display("mechanisms: ff_double=%0d ff_saturate=%0d in_range=%0d upper_limit=%0d lower_limit=%0d reset=%0d settled=%0d",
             n_ff, n_ffsat, n_in, n_max, n_min, n_reset, n_settled);
    if (n_ff == 0 || n_ffsat == 0 || n_in == 0 || n_max == 0 || n_min == 0 || n_reset == 0 || n_settled == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
