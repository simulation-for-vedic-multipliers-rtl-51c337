// Self-checking testbench for vedic_2x2.
//
// Applies all sixteen operand pairs and compares q with the integer product.
// For a = 2'b11, b = 2'b01 it also checks the garbage bus against the value
// 9'b111011101 given by the reference simulation of the 2x2 multiplier.
// It counts how often the crosswise carry (a0b1 & a1b0, product 9) was
// exercised and fails if never.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  logic [8:0] g;
  int checks = 0, failures = 0;
  int cross_carry = 0;

  vedic_2x2 dut (.a, .b, .q, .g);

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        a = 2'(x); b = 2'(y);
        #1; checks++;
        if (int'(q) != x * y) begin failures++; $display("FAIL %0d*%0d = %0d", x, y, q); end
        if (a[0] & b[1] & a[1] & b[0]) cross_carry++;
      end
    a = 2'b11; b = 2'b01;
    #1; checks++;
    if (q !== 4'b0011 || g !== 9'b111011101) begin
      failures++; $display("FAIL reference vector: q=%b g=%b", q, g);
    end
    checks++;
    if (cross_carry == 0) begin failures++; $display("FAIL crosswise carry never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
