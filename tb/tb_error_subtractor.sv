// tb_error_subtractor: checks e = w - y over the corners of the 12-bit input
// range and random inputs, against integer arithmetic.
module tb_error_subtractor;
  import rc_pkg::*;

  in_t  w, y;
  err_t e;
  int   checks = 0, failures = 0;

  error_subtractor dut (.w(w), .y(y), .e(e));

  task automatic check(input int wi, input int yi);
    w = in_t'(wi);
    y = in_t'(yi);
    #1;
    checks++;
    if (int'(e) != wi - yi) begin
      failures++;
      $display("FAIL w=%0d y=%0d e=%0d expected %0d", wi, yi, e, wi - yi);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corners[5] = '{-2048, -1, 0, 1, 2047};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    repeat (2000) check(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
