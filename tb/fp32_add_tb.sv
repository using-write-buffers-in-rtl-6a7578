// fp32_add_tb: checks fp32_add against double-precision arithmetic rounded
// to single precision. Operand exponents are kept within 20 of each other so
// the double sum is exact and the single rounding is the only one. Special
// operands (zeros, infinities, NaN, cancellation, overflow) are checked by
// their IEEE-754 results.
module fp32_add_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(input fp32_t ea, input fp32_t eb, input fp32_t exp_y);
    a = ea; b = eb;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", ea, eb, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t ra, rb;
    // Figure-style values: 1.5 + 2 + 3 + 4 = 10.5
    check(32'h3FC00000, 32'h40000000, 32'h40600000);   // 1.5 + 2 = 3.5
    check(32'h40600000, 32'h40E00000, 32'h41280000);   // 3.5 + 7 = 10.5
    check(32'h00000000, 32'h80000000, 32'h00000000);   // +0 + -0
    check(32'h80000000, 32'h80000000, 32'h80000000);   // -0 + -0
    check(32'h3F800000, 32'hBF800000, 32'h00000000);   // 1 - 1 = +0
    check(32'h7F800000, 32'h3F800000, 32'h7F800000);   // inf + 1
    check(32'h7F800000, 32'hFF800000, FP32_QNAN);      // inf - inf
    check(32'h7FC00000, 32'h3F800000, FP32_QNAN);      // NaN + 1
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 32'h7F800000);   // overflow
    check(32'h3F800000, 32'h33800000, 32'h3F800000);   // 1 + 2^-24: tie to even
    check(32'h3F800001, 32'h33800000, 32'h3F800002);   // tie rounds up to even
    for (int i = 0; i < 20000; i++) begin
      int base;
      base = 20 + int'($urandom_range(200));
      ra = rand_fp32(base, base + 20);
      rb = rand_fp32(base, base + 20);
      check(ra, rb, to_fp32(from_fp32(ra) + from_fp32(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
