// Ripple carry adder built from reversible gates.
//
// Adds two WIDTH-bit unsigned operands and returns the WIDTH+1 bit result
// {carry out, sum}. Bit i is one HNG gate (fourth input tied to 0) whose
// carry output feeds the carry input of bit i+1, so the carry ripples from
// the least to the most significant bit.
//
// Two variants appear in the multiplier. With PERES_LSB = 0 every bit is an
// HNG gate and bit 0 takes cin (the 4- and 5-bit adders of the 4x4
// multiplier). With PERES_LSB = 1 bit 0 is a Peres gate used as a half adder
// and cin is ignored (the 8-bit adders of the 8x8 multiplier). The 9-bit
// adder is all HNG. The choice of PERES_LSB as a parameter is this design's
// own way of covering both drawings with one module.
//
// Garbage outputs g[2i+1:2i] are the two pass-through outputs of bit i's gate
// (with PERES_LSB = 1, g[0] is the Peres gate's single garbage output and
// g[1] is 0). They carry no result; they exist because the gates are
// reversible.
//
// Purely combinational; the delay grows linearly with WIDTH.
module ripple_carry_adder #(
  parameter int unsigned WIDTH     = 8,
  parameter bit          PERES_LSB = 1'b0
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH:0]     sum,
  output logic [2*WIDTH-1:0] g
);
  logic [WIDTH:0] carry;

  if (PERES_LSB) begin : g_lsb_peres
    // Half adder: q = a ^ b is the sum, r = a & b the carry.
    peres_gate u_bit0 (
      .a (a[0]), .b (b[0]), .c (1'b0),
      .p (g[0]), .q (sum[0]), .r (carry[1])
    );
    assign g[1]     = 1'b0;  // a Peres half adder has only one garbage output
    assign carry[0] = cin;
  end else begin : g_lsb_hng
    assign carry[0] = cin;
    hng_gate u_bit0 (
      .a (a[0]), .b (b[0]), .c (carry[0]), .d (1'b0),
      .p (g[0]), .q (g[1]), .r (sum[0]), .s (carry[1])
    );
  end

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    hng_gate u_hng (
      .a (a[i]), .b (b[i]), .c (carry[i]), .d (1'b0),
      .p (g[2*i]), .q (g[2*i+1]), .r (sum[i]), .s (carry[i+1])
    );
  end

  assign sum[WIDTH] = carry[WIDTH];
endmodule
