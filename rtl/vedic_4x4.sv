// 4x4 Vedic multiplier: four 2x2 multipliers and three ripple carry adders.
//
// Computes m = a * b for 4-bit unsigned a and b by splitting each operand in
// 2-bit halves (a = aH*4 + aL, b = bH*4 + bL):
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (2x2 multipliers)
//   m[1:0] = q0[1:0]
//   t[4:0] = q1 + {2'b00, q0[3:2]}                   (4-bit adder)
//   x[5:0] = {1'b0, q2} + t                          (5-bit adder)
//   m[3:2] = x[1:0]
//   y[4:0] = q3 + x[5:2]                             (4-bit adder)
//   m[7:4] = y[3:0]
// This is the vertical-and-crosswise rule applied to 2-bit digits: q0 is the
// vertical low term, q1 + q2 the crosswise middle term and q3 the vertical
// high term, each added with the carry of the stage below. y[4] is always 0
// because the product fits in 8 bits.
//
// The wiring and the net names (q0..q3, t, x, y) follow the 4x4 block
// diagram. All three adders are all-HNG with carry in 0. The second operand
// of the last adder is not labelled in the drawing; x[5:2] is the choice that
// reproduces the reference waveform (15*15: t=01011, x=010100, y=01110).
//
// Purely combinational, no clock.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] m
);
  logic [3:0] q0, q1, q2, q3;
  logic [4:0] t;
  logic [5:0] x;
  logic [4:0] y;

  // Garbage outputs of the reversible gates carry no result and are left open.
  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(q0), .g());
  vedic_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(q1), .g());
  vedic_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(q2), .g());
  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(q3), .g());

  ripple_carry_adder #(.WIDTH(4)) u_rca_t (
    .a(q1), .b({2'b00, q0[3:2]}), .cin(1'b0), .sum(t), .g()
  );
  ripple_carry_adder #(.WIDTH(5)) u_rca_x (
    .a({1'b0, q2}), .b(t), .cin(1'b0), .sum(x), .g()
  );
  ripple_carry_adder #(.WIDTH(4)) u_rca_y (
    .a(q3), .b(x[5:2]), .cin(1'b0), .sum(y), .g()
  );

  assign m = {y[3:0], x[1:0], q0[1:0]};
endmodule
