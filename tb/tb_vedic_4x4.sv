// Self-checking testbench for vedic_4x4.
//
// Applies all 256 operand pairs and compares m with the integer product.
// For 15*15 it also checks the internal nets against the reference
// waveform of the 4x4 multiplier: q0..q3 = 1001, t = 01011, x = 010100,
// y = 01110. It counts carries of the 5-bit adder into its bit 4 (x[4]; the
// first adder cannot carry out, since 9 + 3 < 16) and transfers of the
// middle sum into the high adder (x[5:2] != 0) and fails if either never
// happened.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] m;
  int checks = 0, failures = 0;
  int x_carry = 0, x_to_high = 0;

  vedic_4x4 dut (.a, .b, .m);

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1; checks++;
        if (int'(m) != x * y) begin failures++; $display("FAIL %0d*%0d = %0d", x, y, m); end
        if (dut.x[4]) x_carry++;
        if (dut.x[5:2] != 0) x_to_high++;
      end
    a = 4'd15; b = 4'd15;
    #1; checks++;
    if (m !== 8'd225 || dut.q0 !== 4'b1001 || dut.q1 !== 4'b1001 || dut.q2 !== 4'b1001 ||
        dut.q3 !== 4'b1001 || dut.t !== 5'b01011 || dut.x !== 6'b010100 || dut.y !== 5'b01110) begin
      failures++;
      $display("FAIL 15*15 internals: q0=%b t=%b x=%b y=%b m=%0d", dut.q0, dut.t, dut.x, dut.y, m);
    end
    checks++;
    if (x_carry == 0) begin failures++; $display("FAIL 5-bit adder never carried into bit 4"); end
    checks++;
    if (x_to_high == 0) begin failures++; $display("FAIL middle sum never reached the high adder"); end
    $display("x[4] carries: %0d, middle-to-high transfers: %0d", x_carry, x_to_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
