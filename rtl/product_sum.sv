// product_sum: one branch of the parallel controller, s = c1*x1 + c2*x2.
//
// Two signed multipliers (one DSP multiplier each on an FPGA) feed one adder,
// all combinational. Widths are full precision: each product is C_W+X_W bits
// and the sum one bit more, so nothing overflows or is rounded. The binary
// point of s is at C_F+X_F, the sum of the operands' fraction bits; the
// module does not need to know it. Used for s1 = q1*e(k-1) + q2*e(k-2) and
// for s2 = p1*u(k-1) + p2*u(k-2). The structure follows the source publication.
module product_sum #(
  parameter int unsigned C_W = 18,  // coefficient width
  parameter int unsigned X_W = 13   // data width
) (
  input  logic signed [C_W-1:0]     c1,
  input  logic signed [X_W-1:0]     x1,
  input  logic signed [C_W-1:0]     c2,
  input  logic signed [X_W-1:0]     x2,
  output logic signed [C_W+X_W:0]   s
);

  logic signed [C_W+X_W-1:0] m1, m2;

  always_comb begin
    m1 = c1 * x1;
    m2 = c2 * x2;
    s  = (C_W+X_W+1)'(m1) + (C_W+X_W+1)'(m2);
  end

endmodule
