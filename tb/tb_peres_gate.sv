// Self-checking testbench for peres_gate.
//
// Applies all eight input combinations. Expected values come from the gate's
// use, not from its equations: with c = 0, {r, q} must be the 2-bit sum
// a + b and r the AND; with c = 1, r must be the inverse of the AND; p must
// equal a. It also checks that the eight output words are all different,
// i.e. that the gate is reversible.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  peres_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1;
      checks++;
      if (p !== a) begin failures++; $display("FAIL p: a=%b b=%b c=%b p=%b", a, b, c, p); end
      checks++;
      if (c == 1'b0 && {r, q} !== 2'(int'(a) + int'(b))) begin
        failures++; $display("FAIL half add: a=%b b=%b {r,q}=%b%b", a, b, r, q);
      end
      if (c == 1'b1 && (r !== !(a && b) || q !== (a != b))) begin
        failures++; $display("FAIL c=1: a=%b b=%b q=%b r=%b", a, b, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin failures++; $display("FAIL not reversible at %b%b%b", a, b, c); end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
