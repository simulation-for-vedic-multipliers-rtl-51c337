// HNG gate: a 4-input, 4-output reversible gate that works as a full adder.
//
// Outputs: p = a, q = b, r = a ^ b ^ c, s = ((a ^ b) & c) ^ (a & b) ^ d.
// With d tied to 0, r is the full-adder sum of a, b, c and s is its carry
// out; p and q are garbage outputs kept for reversibility. One HNG gate
// forms each bit of the ripple carry adders.
//
// The gate function is the standard HNG definition; the adder drawings only
// name the gate and tie its fourth input to 0.
//
// Purely combinational, no clock.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ (a & b) ^ d;
  end
endmodule
