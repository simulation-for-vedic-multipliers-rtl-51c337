// 2x2 Urdhva Tiryagbhyam ("vertically and crosswise") multiplier built from
// reversible gates.
//
// Computes q = a * b for 2-bit unsigned a and b. Five Peres gates and one
// Feynman gate do the work:
//   - three Peres gates with c = 0 form the partial products a0b0, a1b1
//     and a1b0 (vertical and one crosswise term);
//   - a fourth Peres gate takes a0, b1 and the a1b0 product, so its r output
//     is a0b1 ^ a1b0 = q[1], the sum bit of the crosswise step;
//   - a fifth Peres gate takes a0b0, a1b1 and 0: p = a0b0 = q[0] and
//     r = a0b0 & a1b1;
//   - the Feynman gate takes that AND as control and a1b1 as target:
//     p = a0b0&a1b1 = q[3], q = a1b1 & ~a0b0 = q[2].
// The crosswise carry a0b1&a1b0 equals a0a1b0b1, which is exactly the case
// where a0b0 and a1b1 are both 1, so routing it through the fifth Peres gate
// and the Feynman gate gives the correct high bits.
//
// The gate count and the connections follow the 2x2 multiplier drawing. The
// nine garbage outputs are brought out on g: g[1:0], g[3:2], g[5:4] and
// g[7:6] are {q, p} of the a0b0, a1b1, a1b0 and q[1] Peres gates, and g[8]
// is the q output of the combining Peres gate. With this order a = 2'b11,
// b = 2'b01 gives g = 9'b111011101, the value the reference simulation of
// the 2x2 multiplier shows for those inputs.
//
// Purely combinational, no clock.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q,
  output logic [8:0] g
);
  logic a0b0, a1b1, a1b0, hi_and;

  // Vertical product of the low bits.
  peres_gate u_pg_a0b0 (.a(a[0]), .b(b[0]), .c(1'b0), .p(g[0]), .q(g[1]), .r(a0b0));
  // Vertical product of the high bits.
  peres_gate u_pg_a1b1 (.a(a[1]), .b(b[1]), .c(1'b0), .p(g[2]), .q(g[3]), .r(a1b1));
  // First crosswise product.
  peres_gate u_pg_a1b0 (.a(a[1]), .b(b[0]), .c(1'b0), .p(g[4]), .q(g[5]), .r(a1b0));
  // Second crosswise product, XORed onto the first: q[1].
  peres_gate u_pg_q1   (.a(a[0]), .b(b[1]), .c(a1b0), .p(g[6]), .q(g[7]), .r(q[1]));
  // Combines the two vertical products: q[0] and their AND.
  peres_gate u_pg_comb (.a(a0b0), .b(a1b1), .c(1'b0), .p(q[0]), .q(g[8]), .r(hi_and));
  // Splits the high term into q[3] and q[2].
  feynman_gate u_fg     (.a(hi_and), .b(a1b1), .p(q[3]), .q(q[2]));
endmodule
