// End-to-end self-checking testbench for the 8x8 multiplier (the top, at
// its only configuration).
//
// 1. Reference vectors: the four operand pairs of the reference waveform
//    (213*253, 255*255, 253*255, 252*124), and for 255*255 every internal
//    net (q0..q3, t, p, y).
// 2. All 65536 operand pairs against the integer product.
// 3. Mechanism counts, each of which must be non-zero: carry out of the
//    cross-term adder (t[8]), carry of the 9-bit adder into bit 8 (p[8]),
//    middle sum reaching the high adder (p[9:4] != 0), a carry into bit 4
//    of the 5-bit adder inside a 4x4 multiplier, and a carry out of bit 3
//    of the high 8-bit adder (a carry out of its bit 7 cannot happen, the
//    product fits in 16 bits).
module tb_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] m;
  int checks = 0, failures = 0;
  int t_carry = 0, p_bit8 = 0, mid_to_high = 0, inner_carry = 0, high_ripple = 0;

  vedic_8x8 dut (.a, .b, .m);

  task automatic check_ref(input int x, input int y, input int expected);
    a = 8'(x); b = 8'(y);
    #1; checks++;
    if (int'(m) != expected) begin
      failures++; $display("FAIL reference %0d*%0d: got %0d, expected %0d", x, y, m, expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_ref(213, 253, 53889);
    check_ref(253, 255, 64515);
    check_ref(252, 124, 31248);
    check_ref(255, 255, 65025);
    checks++;
    if (dut.q0 !== 8'b11100001 || dut.q1 !== 8'b11100001 || dut.q2 !== 8'b11100001 ||
        dut.q3 !== 8'b11100001 || dut.t !== 9'b111000010 || dut.p !== 10'b0111010000 ||
        dut.y !== 9'b011111110) begin
      failures++;
      $display("FAIL 255*255 internals: q0=%b t=%b p=%b y=%b", dut.q0, dut.t, dut.p, dut.y);
    end

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1; checks++;
        if (int'(m) != x * y) begin
          failures++;
          if (failures < 20) $display("FAIL %0d*%0d = %0d", x, y, m);
        end
        if (dut.t[8]) t_carry++;
        if (dut.p[8]) p_bit8++;
        if (dut.p[9:4] != 0) mid_to_high++;
        if (dut.u_m3.x[4]) inner_carry++;
        if (int'(dut.q3[3:0]) + int'(dut.p[7:4]) > 15) high_ripple++;
      end

    checks++; if (t_carry == 0)     begin failures++; $display("FAIL t[8] never set"); end
    checks++; if (p_bit8 == 0)      begin failures++; $display("FAIL p[8] never set"); end
    checks++; if (mid_to_high == 0) begin failures++; $display("FAIL middle sum never reached the high adder"); end
    checks++; if (inner_carry == 0) begin failures++; $display("FAIL 4x4 inner 5-bit adder never carried into bit 4"); end
    checks++; if (high_ripple == 0) begin failures++; $display("FAIL high adder never carried past bit 3"); end
    $display("counts: t[8]=%0d p[8]=%0d mid->high=%0d 4x4 carry=%0d high carry=%0d",
             t_carry, p_bit8, mid_to_high, inner_carry, high_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
