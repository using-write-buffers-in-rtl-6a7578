// pe_tb: drives one processing element with random operand streams (with
// gaps, holds and accumulation restarts) and compares Reg O and the
// forwarded operands, cycle by cycle, with a reference model that computes
// in double precision and rounds to FP32 after each operation.
module pe_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 0, rst_n = 0, en = 1, clr = 0, a_wr = 0, b_wr = 0;
  fp32_t a_in = '0, b_in = '0;
  fp32_t a_out, b_out, o;
  logic  a_v_out, b_v_out;
  int    checks = 0, failures = 0;

  // reference state
  fp32_t m_a = '0, m_b = '0, m_o = '0;
  logic  m_av = 0, m_bv = 0;

  pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input fp32_t got, input fp32_t exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      a_wr = ($urandom_range(3) != 0);
      b_wr = ($urandom_range(3) != 0);
      a_in = to_fp32(real'(int'($urandom_range(16)) - 8) / 4.0);
      b_in = to_fp32(real'(int'($urandom_range(16)) - 8) / 2.0);
      en   = ($urandom_range(7) != 0);
      clr  = ($urandom_range(15) == 0);
      @(posedge clk);
      if (en) begin
        fp32_t base;
        base = clr ? 32'd0 : m_o;
        if (m_av && m_bv)
          m_o = to_fp32(from_fp32(base) + from_fp32(to_fp32(from_fp32(m_a) * from_fp32(m_b))));
        else
          m_o = base;
        m_a = a_wr ? a_in : '0;  m_av = a_wr;
        m_b = b_wr ? b_in : '0;  m_bv = b_wr;
      end
      #1;
      chk(o, m_o, "Reg O");
      chk(a_out, m_a, "RegA out");
      chk(b_out, m_b, "RegB out");
      chk({31'd0, a_v_out}, {31'd0, m_av}, "a valid");
      chk({31'd0, b_v_out}, {31'd0, m_bv}, "b valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
