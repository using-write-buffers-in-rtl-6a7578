// wb_accel_top_tb: end-to-end test of the accelerator on a 4 x 4 array with
// 2-input adder trees (half the array height), one-batch write buffers and
// a 4-entry output buffer, so that every mechanism of the design occurs.
//
// Each tile multiplies random small-integer matrices A (R x K) and B (K x C)
// in the array, then emits every PE's partial sum with a destination
// address. Rows are grouped (1, 2 or 4 rows per address) so that a column
// batch holds runs of equal addresses, and some PEs are emitted as invalid.
// A second emit follows at once (sums of zero to new addresses), which
// cannot fit and must stall the array. The memory model answers the write
// port with a random ready and adds each written value into its word.
// At the end every memory word must equal the sum of all partial sums sent
// to its address (exact, since all values are small integers), and there
// must be fewer memory writes than values emitted.
// Counted mechanisms, each required at least once: array stall on buffer
// capacity, accumulator stall on output-buffer back-pressure, merging of
// adjacent equal addresses, folding of a run longer than the tree, zero
// padding of a partly filled padded register.
module wb_accel_top_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  localparam int R = 4, C = 4, TI = 2, BM = 1, OBD = 4;   // configuration under test
  localparam int K = 4, TILES = 12, CHECK_MECH = 1;

  logic  clk = 0, rst_n = 0, emit = 0, mem_ready = 0;
  fp32_t a_in [R], b_in [C];
  logic  a_wr [R], b_wr [C];
  logic  emit_valid [R][C];
  addr_t emit_addr  [R][C];
  logic  sa_stall, mem_valid, acc_stall, busy;
  addr_t mem_addr;
  fp32_t mem_value;

  wb_accel_top #(.ROWS(R), .COLS(C), .TREE_IN(TI), .BUF_MULT(BM), .OB_DEPTH(OBD)) dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  n_stall = 0, n_acc_stall = 0, n_merge = 0, n_fold = 0, n_pad = 0;
  int  n_emitted = 0, n_writes = 0;
  real mem_exp [addr_t];
  real mem_act [addr_t];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory model: random ready, read-modify-write add. Inputs change and
  // the handshake is sampled between the rising edges.
  always @(negedge clk) begin
    if (rst_n) begin
      mem_ready = ($urandom_range(2) != 0);
      #2;
      if (mem_valid && mem_ready) begin
        mem_act[mem_addr] = (mem_act.exists(mem_addr) ? mem_act[mem_addr] : 0.0) + from_fp32(mem_value);
        n_writes++;
      end
    end
  end

  // Mechanism counters, observed in column 0 of the accumulator.
  localparam int BD = BM * R;
  always @(negedge clk) begin
    #3;
    if (rst_n) begin
      if (sa_stall) n_stall++;
      if (acc_stall && busy) n_acc_stall++;
      if (!acc_stall && dut.g_col[0].run_len >= 2) n_merge++;
      if (!acc_stall && int'(dut.g_col[0].run_len) == TI && int'(dut.g_col[0].count) > TI &&
          dut.g_col[0].u_buf.mem[(int'(dut.g_col[0].u_buf.rptr) + TI) % BD].addr ==
          dut.g_col[0].u_buf.mem[dut.g_col[0].u_buf.rptr].addr)
        n_fold++;
      if (dut.g_col[0].pad_valid && dut.g_col[0].pad_vals[TI-1] == 32'd0 &&
          dut.g_col[0].u_pad.valid) n_pad++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Hold emit until the edge that accepts it.
  task automatic do_emit(input real val [R][C], input int tile, input int grp, input int base);
    emit = 1;
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) begin
        emit_valid[i][j] = ($urandom_range(7) != 0);
        emit_addr[i][j]  = addr_t'(base + tile * 1024 + j * 64 + i / grp);
      end
    forever begin
      #1;
      if (!sa_stall) break;
      @(negedge clk);
    end
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++)
        if (emit_valid[i][j]) begin
          addr_t a;
          a = emit_addr[i][j];
          mem_exp[a] = (mem_exp.exists(a) ? mem_exp[a] : 0.0) + val[i][j];
          n_emitted++;
        end
    @(negedge clk);
    emit = 0;
  endtask

  initial begin
    int  A [R][K], B [K][C];
    real cv [R][C], zv [R][C];
    for (int i = 0; i < R; i++) begin a_in[i] = '0; a_wr[i] = 0; end
    for (int j = 0; j < C; j++) begin b_in[j] = '0; b_wr[j] = 0; end
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) begin
        emit_valid[i][j] = 0; emit_addr[i][j] = '0; zv[i][j] = 0.0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int tile = 0; tile < TILES; tile++) begin
      int grp;
      grp = (tile % 3 == 0) ? 1 : (tile % 3 == 1) ? 2 : 4;
      if (grp > R) grp = R;
      for (int i = 0; i < R; i++) for (int k = 0; k < K; k++) A[i][k] = int'($urandom_range(6)) - 3;
      for (int k = 0; k < K; k++) for (int j = 0; j < C; j++) B[k][j] = int'($urandom_range(6)) - 3;
      for (int i = 0; i < R; i++)
        for (int j = 0; j < C; j++) begin
          int s;
          s = 0;
          for (int k = 0; k < K; k++) s += A[i][k] * B[k][j];
          cv[i][j] = real'(s);
        end
      // Feed the operands, one vector per cycle; the feeding registers skew them.
      for (int t = 0; t < K; t++) begin
        for (int i = 0; i < R; i++) begin a_in[i] = to_fp32(real'(A[i][t])); a_wr[i] = 1; end
        for (int j = 0; j < C; j++) begin b_in[j] = to_fp32(real'(B[t][j])); b_wr[j] = 1; end
        @(negedge clk);
      end
      for (int i = 0; i < R; i++) begin a_in[i] = '0; a_wr[i] = 0; end
      for (int j = 0; j < C; j++) begin b_in[j] = '0; b_wr[j] = 0; end
      repeat (R + C + 2) @(negedge clk);
      do_emit(cv, tile, grp, 0);
      do_emit(zv, tile, 1, 512);       // back-to-back emit: forces a capacity stall
    end
    // Wait for the accumulator and the output buffer to drain.
    for (int w = 0; w < 100000 && (busy || mem_valid); w++) @(negedge clk);
    repeat (4) @(negedge clk);
    chk(!busy && !mem_valid, "accelerator drained");
    foreach (mem_exp[a]) begin
      chk(mem_act.exists(a) && mem_act[a] == mem_exp[a],
          $sformatf("memory word %h: got %f expected %f", a, mem_act.exists(a) ? mem_act[a] : -1.0, mem_exp[a]));
    end
    foreach (mem_act[a]) chk(mem_exp.exists(a), $sformatf("unexpected write to %h", a));
    chk(n_writes < n_emitted, "fewer memory writes than emitted values");
    $display("emitted=%0d writes=%0d stall=%0d acc_stall=%0d merge=%0d fold=%0d pad=%0d",
             n_emitted, n_writes, n_stall, n_acc_stall, n_merge, n_fold, n_pad);
    if (CHECK_MECH != 0) begin
      chk(n_stall > 0, "array stall on buffer capacity occurred");
      chk(n_acc_stall > 0, "accumulator stall on output back-pressure occurred");
      chk(n_merge > 0, "merge of adjacent equal addresses occurred");
      chk(n_fold > 0, "fold of a run longer than the tree occurred");
      chk(n_pad > 0, "zero padding occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
