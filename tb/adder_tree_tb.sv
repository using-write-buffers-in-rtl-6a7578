// adder_tree_tb: first replays the 4-input example of the published
// half-size test: the padded register holds (1.5 2 3 4 -> 1), (4 3 2 0 -> 1),
// (1 2 3 4 -> 2), (4 3 2 0 -> 2), (1.5 2 3 4 -> 1), (4 3 2 0 -> 1) in six
// consecutive cycles and the tree must output 10.5, 9, 10, 9, 10.5, 9 with
// those addresses, each exactly two cycles after its input. Then an 8-input
// tree is fed random batches with random stalls and bubbles; each result is
// compared with the pairwise sum computed in double precision and rounded
// per addition, after exactly log2(N) enabled edges. The busy flag is
// checked against the number of batches in flight.
module adder_tree_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 4-input tree, example sequence
  logic  en4 = 1, iv4 = 0;
  fp32_t in4 [4];
  addr_t ia4 = '1;
  fp32_t ov4;
  addr_t oa4;
  logic  ovl4, busy4;

  adder_tree #(.N(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .en(en4), .in_vals(in4), .in_addr(ia4), .in_valid(iv4),
    .out_val(ov4), .out_addr(oa4), .out_valid(ovl4), .busy(busy4)
  );

  // ---------------- 8-input tree, random
  localparam int N = 8, LV = 3;
  logic  en8 = 1, iv8 = 0;
  fp32_t in8 [N];
  addr_t ia8 = '1;
  fp32_t ov8;
  addr_t oa8;
  logic  ovl8, busy8;

  adder_tree #(.N(N)) dut8 (
    .clk(clk), .rst_n(rst_n), .en(en8), .in_vals(in8), .in_addr(ia8), .in_valid(iv8),
    .out_val(ov8), .out_addr(oa8), .out_valid(ovl8), .busy(busy8)
  );

  function automatic fp32_t ref_sum(input fp32_t v [N]);
    fp32_t l [N];
    l = v;
    for (int w = N / 2; w >= 1; w /= 2)
      for (int k = 0; k < w; k++) l[k] = to_fp32(from_fp32(l[2*k]) + from_fp32(l[2*k+1]));
    return l[0];
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  real   ex_v [6][4] = '{'{1.5, 2, 3, 4}, '{4, 3, 2, 0}, '{1, 2, 3, 4},
                         '{4, 3, 2, 0}, '{1.5, 2, 3, 4}, '{4, 3, 2, 0}};
  int    ex_a [6]    = '{1, 1, 2, 2, 1, 1};
  real   ex_o [6]    = '{10.5, 9, 10, 9, 10.5, 9};

  initial begin
    // pipeline model of the 8-input tree: one slot per level
    fp32_t pv [LV];
    addr_t pa [LV];
    logic  pvd [LV];
    for (int j = 0; j < 4; j++) in4[j] = '0;
    for (int j = 0; j < N; j++) in8[j] = '0;
    for (int l = 0; l < LV; l++) begin pv[l] = '0; pa[l] = '1; pvd[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!busy4 && !ovl4 && oa4 == NULL_ADDR, "tree idle after reset");

    // Example sequence: input in cycle c, output visible after edge c+2.
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      if (c < 6) begin
        for (int j = 0; j < 4; j++) in4[j] = to_fp32(ex_v[c][j]);
        ia4 = addr_t'(ex_a[c]);
        iv4 = 1;
      end else begin
        for (int j = 0; j < 4; j++) in4[j] = '0;
        ia4 = '1;
        iv4 = 0;
      end
      // Output of this cycle belongs to input c-2.
      if (c >= 2) begin
        chk(ovl4 && ov4 == to_fp32(ex_o[c-2]) && oa4 == addr_t'(ex_a[c-2]),
            $sformatf("example output %0d (got %h @%0d)", c - 2, ov4, oa4));
      end else begin
        chk(!ovl4, "no output before two cycles");
      end
    end
    @(negedge clk);
    chk(!ovl4 && !busy4, "tree drained after example");

    // Random 8-input batches.
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int inflight;
      @(negedge clk);
      en8 = ($urandom_range(4) != 0);
      iv8 = ($urandom_range(2) != 0);
      for (int j = 0; j < N; j++)
        in8[j] = iv8 ? rand_fp32(120, 135) : 32'd0;
      ia8 = iv8 ? addr_t'($urandom) : '1;
      #1;
      inflight = 0;
      for (int l = 0; l < LV; l++) if (pvd[l]) inflight++;
      chk(busy8 == (iv8 || inflight > 0), "busy flag");
      @(posedge clk);
      if (en8) begin
        for (int l = LV - 1; l > 0; l--) begin pv[l] = pv[l-1]; pa[l] = pa[l-1]; pvd[l] = pvd[l-1]; end
        pv[0] = ref_sum(in8); pa[0] = ia8; pvd[0] = iv8;
      end
      #1;
      chk(ovl8 == pvd[LV-1] && oa8 == pa[LV-1], "8-input valid/address");
      if (pvd[LV-1]) chk(ov8 == pv[LV-1], $sformatf("8-input sum got %h expected %h", ov8, pv[LV-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
