// fp32_mul_tb: checks fp32_mul against double-precision multiplication
// (exact for two FP32 operands) rounded to single precision, plus the
// IEEE-754 special cases.
module fp32_mul_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input fp32_t ea, input fp32_t eb, input fp32_t exp_y);
    a = ea; b = eb;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", ea, eb, y, exp_y);
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
    check(32'h3FC00000, 32'h40000000, 32'h40400000);   // 1.5 * 2 = 3
    check(32'h00000000, 32'hBF800000, 32'h80000000);   // 0 * -1 = -0
    check(32'h7F800000, 32'h00000000, FP32_QNAN);      // inf * 0
    check(32'hFF800000, 32'h40000000, 32'hFF800000);   // -inf * 2
    check(32'h7F000000, 32'h7F000000, 32'h7F800000);   // overflow
    check(32'h00800000, 32'h3F000000, 32'h00000000);   // underflow flushes
    for (int i = 0; i < 20000; i++) begin
      ra = rand_fp32(64, 190);
      rb = rand_fp32(64, 190);
      check(ra, rb, to_fp32(from_fp32(ra) * from_fp32(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
