// Self-checking testbench for ripple_carry_adder.
//
// Checks the four adders the multiplier uses: 4 and 5 bits all-HNG with a
// carry in (exhaustive, both cin values), 8 bits with a Peres half adder in
// bit 0 (exhaustive) and 9 bits all-HNG (exhaustive, cin = 0, plus random
// operands with cin = 1). Expected results are integer sums. It also counts
// how often the carry ripples through every bit of each adder (a + b =
// all ones with cin = 1, or an all-ones operand plus 1) and fails if that
// never happened.
module tb_ripple_carry_adder;
  logic [3:0] a4, b4;  logic [4:0] s4;  logic c4;
  logic [4:0] a5, b5;  logic [5:0] s5;  logic c5;
  logic [7:0] a8, b8;  logic [8:0] s8;
  logic [8:0] a9, b9;  logic [9:0] s9;  logic c9;
  int checks = 0, failures = 0;
  int full_ripple = 0;

  ripple_carry_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .g());
  ripple_carry_adder #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .g());
  ripple_carry_adder #(.WIDTH(8), .PERES_LSB(1'b1)) dut8 (.a(a8), .b(b8), .cin(1'b0), .sum(s8), .g());
  ripple_carry_adder #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .cin(c9), .sum(s9), .g());

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a9 = '0; b9 = '0; c9 = 1'b0;
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          a4 = 4'(x); b4 = 4'(y); c4 = ci[0];
          #1; checks++;
          if (int'(s4) != x + y + ci) begin failures++; $display("FAIL w4 %0d+%0d+%0d=%0d", x, y, ci, s4); end
          if (x + y == 15 && ci == 1) full_ripple++;
        end
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 32; x++)
        for (int y = 0; y < 32; y++) begin
          a5 = 5'(x); b5 = 5'(y); c5 = ci[0];
          #1; checks++;
          if (int'(s5) != x + y + ci) begin failures++; $display("FAIL w5 %0d+%0d+%0d=%0d", x, y, ci, s5); end
          if (x + y == 31 && ci == 1) full_ripple++;
        end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1; checks++;
        if (int'(s8) != x + y) begin failures++; $display("FAIL w8 %0d+%0d=%0d", x, y, s8); end
        if ((x == 255 && y == 1) || (x == 1 && y == 255)) full_ripple++;
      end
    for (int x = 0; x < 512; x++)
      for (int y = 0; y < 512; y += 3) begin
        a9 = 9'(x); b9 = 9'(y); c9 = 1'b0;
        #1; checks++;
        if (int'(s9) != x + y) begin failures++; $display("FAIL w9 %0d+%0d=%0d", x, y, s9); end
      end
    for (int k = 0; k < 20000; k++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); c9 = 1'b1;
      if (k == 0) begin a9 = 9'h1ff; b9 = 9'h000; end
      #1; checks++;
      if (int'(s9) != int'(a9) + int'(b9) + 1) begin
        failures++; $display("FAIL w9 %0d+%0d+1=%0d", a9, b9, s9);
      end
      if (int'(a9) + int'(b9) == 511) full_ripple++;
    end
    checks++;
    if (full_ripple < 4) begin failures++; $display("FAIL full carry ripple seen only %0d times", full_ripple); end
    $display("full-width carry ripples exercised: %0d", full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
