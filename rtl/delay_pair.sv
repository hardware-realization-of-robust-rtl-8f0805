// delay_pair: two-stage sample delay, used as REG1/REG2 (e(k-1), e(k-2)) and
// as REG3/REG4 (u(k-1), u(k-2)) of the controller.
//
// On every rising edge of the sampling clock, d1 takes din and d2 takes the
// old d1, so after the edge of sample k, d1 holds the sample taken at that
// edge and d2 the one before. The chain of two registers per signal follows
// the source publication. The synchronous, active-high reset that clears both stages
// to zero is this design's choice.
module delay_pair #(
  parameter int unsigned W = 13  // data width
) (
  input  logic                clk,    // sampling clock, one edge per period
  input  logic                reset,  // synchronous, active high
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] d1,     // din delayed by one sample
  output logic signed [W-1:0] d2      // din delayed by two samples
);

  always_ff @(posedge clk) begin
    if (reset) begin
      d1 <= '0;
      d2 <= '0;
    end else begin
      d1 <= din;
      d2 <= d1;
    end
  end

endmodule
