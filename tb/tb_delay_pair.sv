// tb_delay_pair: drives a random stream through the two-stage delay and
// checks that d1 and d2 equal the input one and two clock edges earlier,
// and that the synchronous reset clears both stages.
module tb_delay_pair;
  localparam int unsigned W = 13;

  logic                clk = 0, reset;
  logic signed [W-1:0] din, d1, d2;
  logic signed [W-1:0] h1, h2;  // model history
  int                  checks = 0, failures = 0;

  delay_pair #(.W(W)) dut (.clk(clk), .reset(reset), .din(din), .d1(d1), .d2(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic signed [W-1:0] e1, input logic signed [W-1:0] e2);
    checks++;
    if (d1 !== e1 || d2 !== e2) begin
      failures++;
      $display("FAIL t=%0t d1=%0d d2=%0d expected %0d %0d", $time, d1, d2, e1, e2);
    end
  endtask

  initial begin
    reset = 1;
    din   = '0;
    @(negedge clk);
    @(negedge clk);
    expect_out('0, '0);
    reset = 0;
    h1 = '0;
    h2 = '0;
    for (int k = 0; k < 1000; k++) begin
      din = W'($urandom);
      @(negedge clk);
      h2 = h1;
      h1 = din;
      expect_out(h1, h2);
      if (k == 500) begin
        // reset in the middle of a stream
        reset = 1;
        @(negedge clk);
        expect_out('0, '0);
        reset = 0;
        h1 = '0;
        h2 = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
