// systolic_array_tb: multiplies random small-integer matrices A (R x K) and
// B (K x C) on a 3 x 4 array. Operands are skewed by the testbench (row i
// and column j delayed by i and j cycles). Checks that PE(i,j) holds
// sum_k A[i][k]*B[k][j], that the last PE finishes exactly K+R+C-1 cycles
// after the first operands are presented, that a stall (en low, inputs
// held) changes nothing but the timing, and that clr restarts the sums.
module systolic_array_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  localparam int R = 3, C = 4, K = 5;
  logic  clk = 0, rst_n = 0, en = 1, clr = 0;
  fp32_t a_in [R], b_in [C];
  logic  a_v [R], b_v [C];
  fp32_t o [R][C];
  int    A [R][K], B [K][C];
  int    checks = 0, failures = 0;

  systolic_array #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int t);
    for (int i = 0; i < R; i++) begin
      a_v[i]  = (t - i >= 0) && (t - i < K);
      a_in[i] = a_v[i] ? to_fp32(real'(A[i][t-i])) : '0;
    end
    for (int j = 0; j < C; j++) begin
      b_v[j]  = (t - j >= 0) && (t - j < K);
      b_in[j] = b_v[j] ? to_fp32(real'(B[t-j][j])) : '0;
    end
  endtask

  task automatic check_all(input string what);
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) begin
        int s = 0;
        for (int k = 0; k < K; k++) s += A[i][k] * B[k][j];
        checks++;
        if (o[i][j] !== to_fp32(real'(s))) begin
          failures++;
          if (failures < 10) $display("FAIL %s PE(%0d,%0d): got %h expected %h", what, i, j, o[i][j], to_fp32(real'(s)));
        end
      end
  endtask

  task automatic run(input bit with_stall, input string what);
    int t;
    fp32_t last;
    t = 0;
    // The first operand pair is presented together with clr, so the
    // previous sums are dropped in the same cycle.
    for (int cyc = 0; cyc < K + R + C + 2; cyc++) begin
      @(negedge clk);
      clr = (cyc == 0);
      if (with_stall && (cyc == 3 || cyc == 4)) begin
        en = 0;                  // hold: inputs stay as they are
      end else begin
        en = 1;
        drive(t);
        t++;
      end
      @(posedge clk);
      #1;
      // Latency: the last PE's sum is final after exactly K+R+C-1 enabled
      // edges and not one edge before.
      if (t == K + R + C - 2) last = o[R-1][C-1];
      if (t == K + R + C - 1) begin
        int s = 0;
        for (int k = 0; k < K; k++) s += A[R-1][k] * B[k][C-1];
        checks++;
        if (o[R-1][C-1] !== to_fp32(real'(s)) || (last === o[R-1][C-1] && A[R-1][K-1]*B[K-1][C-1] != 0)) begin
          failures++;
          $display("FAIL %s: last PE not final exactly at cycle K+R+C-1", what);
        end
      end
    end
    check_all(what);
  endtask

  initial begin
    for (int i = 0; i < R; i++) begin a_in[i] = '0; a_v[i] = 0; end
    for (int j = 0; j < C; j++) begin b_in[j] = '0; b_v[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < R; i++) for (int k = 0; k < K; k++) A[i][k] = int'($urandom_range(8)) - 4;
      for (int k = 0; k < K; k++) for (int j = 0; j < C; j++) B[k][j] = int'($urandom_range(8)) - 4;
      A[R-1][K-1] = 3;  B[K-1][C-1] = -2;   // last product non-zero for the latency check
      run(rep % 2 == 1, rep % 2 == 1 ? "stalled run" : "run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
