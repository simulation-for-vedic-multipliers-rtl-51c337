// Self-checking testbench for feynman_gate.
//
// Applies all four input combinations: p must equal the control a, and q
// must be b when a is 0 and the inverse of b when a is 1.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a, .b, .p, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== a || q !== (a ? !b : b)) begin
        failures++; $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
