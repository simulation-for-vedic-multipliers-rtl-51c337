// Feynman (CNOT) gate: a 2-input, 2-output reversible gate.
//
// Outputs: p = a (control passes through), q = a ^ b (target is inverted
// when the control is 1). In the 2x2 multiplier it splits the high
// partial-product term into the two top product bits.
//
// The gate function is the standard Feynman/CNOT definition.
//
// Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
