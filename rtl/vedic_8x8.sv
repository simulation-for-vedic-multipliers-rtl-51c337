// 8x8 Vedic (Urdhva Tiryagbhyam, "vertically and crosswise") multiplier
// built from reversible gates. Top of the design.
//
// Computes m = a * b for 8-bit unsigned a and b by splitting each operand in
// 4-bit halves (a = aH*16 + aL, b = bH*16 + bL):
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (4x4 multipliers)
//   m[3:0]  = q0[3:0]
//   t[8:0]  = q2 + q1                                (8-bit adder)
//   p[9:0]  = t + {5'b00000, q0[7:4]}                (9-bit adder)
//   m[7:4]  = p[3:0]
//   y[8:0]  = q3 + {2'b00, p[9:4]}                   (8-bit adder)
//   m[15:8] = y[7:0]
// The 4x4 multipliers are built the same way from 2x2 multipliers, which are
// built from Peres and Feynman gates; every adder bit is an HNG gate, except
// bit 0 of the two 8-bit adders, which is a Peres half adder. y[8] is always
// 0 because the product fits in 16 bits.
//
// The block structure, widths and net names (q0..q3, t, p, y) follow the
// 8x8 block diagram and the reference waveform (255*255: q=11100001,
// t=111000010, p=0111010000, y=011111110, m=65025). The operands are taken as
// unsigned. The design has no register: a and b in, m out after the ripple
// delay of the adders.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] m
);
  logic [7:0] q0, q1, q2, q3;
  logic [8:0] t;
  logic [9:0] p;
  logic [8:0] y;

  vedic_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .m(q0));
  vedic_4x4 u_m1 (.a(a[7:4]), .b(b[3:0]), .m(q1));
  vedic_4x4 u_m2 (.a(a[3:0]), .b(b[7:4]), .m(q2));
  vedic_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .m(q3));

  // Garbage outputs of the reversible gates carry no result and are left open.
  ripple_carry_adder #(.WIDTH(8), .PERES_LSB(1'b1)) u_rca_t (
    .a(q2), .b(q1), .cin(1'b0), .sum(t), .g()
  );
  ripple_carry_adder #(.WIDTH(9)) u_rca_p (
    .a(t), .b({5'b00000, q0[7:4]}), .cin(1'b0), .sum(p), .g()
  );
  ripple_carry_adder #(.WIDTH(8), .PERES_LSB(1'b1)) u_rca_y (
    .a(q3), .b({2'b00, p[9:4]}), .cin(1'b0), .sum(y), .g()
  );

  assign m = {y[7:0], p[3:0], q0[3:0]};
endmodule
