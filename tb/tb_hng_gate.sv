// Self-checking testbench for hng_gate.
//
// Applies all sixteen input combinations. With d = 0, {s, r} must be the
// 2-bit sum a + b + c (full adder); with d = 1, s must be inverted. p and q
// must pass a and b through, and the sixteen output words must all differ
// (reversibility).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;
  int total;

  hng_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = v[3:0];
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (r !== total[0] || s !== (total[1] ^ d)) begin
        failures++; $display("FAIL abcd=%b%b%b%b r=%b s=%b", a, b, c, d, r, s);
      end
      checks++;
      if (p !== a || q !== b) begin failures++; $display("FAIL pass-through abcd=%b%b%b%b", a, b, c, d); end
      checks++;
      if (seen[{p, q, r, s}]) begin failures++; $display("FAIL not reversible at %b%b%b%b", a, b, c, d); end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
