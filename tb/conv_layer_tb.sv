// conv_layer_tb: runs two small convolution layers end to end through the
// accelerator (8 x 8 array, 4-input adder trees) and checks the output map
// written to memory.
//   layer 1: 8 filters of 1x1x16 on a 7x7x16 input (49 x 8 outputs)
//   layer 2: 8 filters of 3x3x4  on a 5x5x4  input (9 x 8 outputs)
// These are scaled-down versions of the layers 1x1x1024 on 7x7x1024 and
// 3x3x1024 on 9x9x1024 used to evaluate the design.
//
// Mapping: columns are filters. Each output pixel occupies G = 2 adjacent
// rows; row g of a pixel computes the dot product over the g-th half of the
// filter's elements (the other half of its A stream is zero), so the two
// rows of a pixel hold partial sums of the same output word. Both are
// emitted to the address pixel*F + filter and must be merged by the column's
// adder tree: the memory must receive exactly one write per output, holding
// the exact convolution result (all values are small integers).
module conv_layer_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  localparam int R = 8, C = 8, TI = 4, G = 2, PPT = R / G;

  logic  clk = 0, rst_n = 0, emit = 0, mem_ready = 0;
  fp32_t a_in [R], b_in [C];
  logic  a_wr [R], b_wr [C];
  logic  emit_valid [R][C];
  addr_t emit_addr  [R][C];
  logic  sa_stall, mem_valid, acc_stall, busy;
  addr_t mem_addr;
  fp32_t mem_value;

  wb_accel_top #(.ROWS(R), .COLS(C), .TREE_IN(TI), .BUF_MULT(2), .OB_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0, n_writes = 0;
  real mem_act [addr_t];
  int  wr_cnt [addr_t];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      mem_ready = ($urandom_range(3) != 0);
      #2;
      if (mem_valid && mem_ready) begin
        mem_act[mem_addr] = (mem_act.exists(mem_addr) ? mem_act[mem_addr] : 0.0) + from_fp32(mem_value);
        wr_cnt[mem_addr]  = (wr_cnt.exists(mem_addr) ? wr_cnt[mem_addr] : 0) + 1;
        n_writes++;
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // H x H x CH input, F filters of FS x FS x CH, stride 1, no padding.
  task automatic run_layer(input int H, input int CH, input int FS, input int F, input int base);
    int OW, P, L, K, writes0;
    int inp [];       // [y][x][c] flattened
    int wgt [];       // [f][e] flattened, e = c*FS*FS + r*FS + s
    OW = H - FS + 1;
    P  = OW * OW;
    L  = CH * FS * FS;
    K  = L / G;
    inp = new[H * H * CH];
    wgt = new[F * L];
    foreach (inp[n]) inp[n] = int'($urandom_range(4)) - 2;
    foreach (wgt[n]) wgt[n] = int'($urandom_range(4)) - 2;
    mem_act.delete();
    wr_cnt.delete();
    writes0 = n_writes;
    for (int p0 = 0; p0 < P; p0 += PPT) begin
      // Feed L operand vectors: row i = (pixel p0 + i/G, half i%G).
      for (int e = 0; e < L; e++) begin
        for (int i = 0; i < R; i++) begin
          int p, y, x, c, r, s;
          p = p0 + i / G;
          c = e / (FS * FS);  r = (e / FS) % FS;  s = e % FS;
          y = p / OW;  x = p % OW;
          a_wr[i] = 1;
          a_in[i] = (p < P && e / K == i % G) ? to_fp32(real'(inp[((y + r) * H + (x + s)) * CH + c])) : 32'd0;
        end
        for (int j = 0; j < C; j++) begin
          b_wr[j] = 1;
          b_in[j] = (j < F) ? to_fp32(real'(wgt[j * L + e])) : 32'd0;
        end
        @(negedge clk);
      end
      for (int i = 0; i < R; i++) begin a_wr[i] = 0; a_in[i] = '0; end
      for (int j = 0; j < C; j++) begin b_wr[j] = 0; b_in[j] = '0; end
      repeat (R + C + 2) @(negedge clk);
      emit = 1;
      for (int i = 0; i < R; i++)
        for (int j = 0; j < C; j++) begin
          emit_valid[i][j] = (p0 + i / G < P) && (j < F);
          emit_addr[i][j]  = addr_t'(base + (p0 + i / G) * F + j);
        end
      forever begin
        #1;
        if (!sa_stall) break;
        @(negedge clk);
      end
      @(negedge clk);
      emit = 0;
    end
    for (int w = 0; w < 10000 && (busy || mem_valid); w++) @(negedge clk);
    repeat (4) @(negedge clk);
    // Reference output map.
    for (int p = 0; p < P; p++)
      for (int f = 0; f < F; f++) begin
        int acc, y, x;
        addr_t a;
        y = p / OW;  x = p % OW;
        acc = 0;
        for (int e = 0; e < L; e++)
          acc += inp[((y + (e / FS) % FS) * H + (x + e % FS)) * CH + e / (FS * FS)] * wgt[f * L + e];
        a = addr_t'(base + p * F + f);
        chk(mem_act.exists(a) && mem_act[a] == real'(acc),
            $sformatf("output pixel %0d filter %0d: got %f expected %0d", p, f, mem_act.exists(a) ? mem_act[a] : -1.0, acc));
        chk(wr_cnt.exists(a) && wr_cnt[a] == 1, $sformatf("one memory write for pixel %0d filter %0d", p, f));
      end
    chk(n_writes - writes0 == P * F, "writes equal outputs");
    $display("layer %0dx%0dx%0d, %0d filters %0dx%0d: %0d partial sums, %0d memory writes",
             H, H, CH, F, FS, FS, P * F * G, n_writes - writes0);
  endtask

  initial begin
    for (int i = 0; i < R; i++) begin a_in[i] = '0; a_wr[i] = 0; end
    for (int j = 0; j < C; j++) begin b_in[j] = '0; b_wr[j] = 0; end
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) begin emit_valid[i][j] = 0; emit_addr[i][j] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_layer(7, 16, 1, 8, 0);
    run_layer(5, 4, 3, 8, 4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
