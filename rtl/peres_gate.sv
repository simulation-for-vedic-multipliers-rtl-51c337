// Peres gate: a 3-input, 3-output reversible gate.
//
// Outputs: p = a, q = a ^ b, r = (a & b) ^ c. The mapping is a bijection on
// the three bits, so no information is lost. With c tied to 0 the gate is
// used in two ways in this multiplier: r alone is a 1-bit AND (a partial
// product), and {r, q} is a half adder (carry, sum).
//
// The gate function is the standard Peres definition; the multiplier only
// names the gate and shows where it is used.
//
// Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
