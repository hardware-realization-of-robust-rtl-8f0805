// tb_product_sum: checks s = c1*x1 + c2*x2 at full precision for the two
// configurations of the controller (13-bit error and 12-bit output data with
// 18-bit coefficients), with extreme and random operands, against 64-bit
// integer arithmetic.
module tb_product_sum;
  logic signed [17:0] c1, c2;
  logic signed [12:0] xe1, xe2;
  logic signed [11:0] xu1, xu2;
  logic signed [31:0] se;
  logic signed [30:0] su;
  int checks = 0, failures = 0;

  product_sum #(.C_W(18), .X_W(13)) dut_e (.c1(c1), .x1(xe1), .c2(c2), .x2(xe2), .s(se));
  product_sum #(.C_W(18), .X_W(12)) dut_u (.c1(c1), .x1(xu1), .c2(c2), .x2(xu2), .s(su));

  task automatic apply(input longint a1, input longint b1, input longint a2, input longint b2);
    longint exp_e, exp_u;
    c1  = 18'(a1);
    c2  = 18'(a2);
    xe1 = 13'(b1);
    xe2 = 13'(b2);
    xu1 = 12'(b1 >>> 1);
    xu2 = 12'(b2 >>> 1);
    #1;
    exp_e = longint'(c1) * longint'(xe1) + longint'(c2) * longint'(xe2);
    exp_u = longint'(c1) * longint'(xu1) + longint'(c2) * longint'(xu2);
    checks += 2;
    if (longint'(se) != exp_e) begin
      failures++;
      $display("FAIL e-branch %0d*%0d+%0d*%0d = %0d expected %0d", c1, xe1, c2, xe2, se, exp_e);
    end
    if (longint'(su) != exp_u) begin
      failures++;
      $display("FAIL u-branch %0d*%0d+%0d*%0d = %0d expected %0d", c1, xu1, c2, xu2, su, exp_u);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // extremes: most negative operands everywhere give the largest sum
    apply(-131072, -4096, -131072, -4096);
    apply(131071, 4095, 131071, 4095);
    apply(131071, -4096, 131071, -4096);
    apply(1638, 200, 1514, 0);
    apply(1042, 640, 852, -640);
    repeat (3000)
      apply(longint'($urandom_range(262143)) - 131072, longint'($urandom_range(8191)) - 4096,
            longint'($urandom_range(262143)) - 131072, longint'($urandom_range(8191)) - 4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
