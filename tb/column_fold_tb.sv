// column_fold_tb: one column of the accumulator (write-out buffer, padded
// register, adder tree) in the half-size configuration: 8-row batches into
// a 4-input tree. Three batches of seven values arrive in consecutive
// cycles: 1.5 2 3 4 4 3 2 for address 1, 1 2 3 4 4 3 2 for address 2 and
// again 1.5 2 3 4 4 3 2 for address 1. Each run of seven is folded into a
// full padded register and a zero-padded one, so the padded register must
// hold, in six consecutive cycles,
//   1.5 2 3 4 ->1 | 4 3 2 0 ->1 | 1 2 3 4 ->2 | 4 3 2 0 ->2 | 1.5 2 3 4 ->1 | 4 3 2 0 ->1
// and the tree must deliver 10.5, 9, 10, 9, 10.5, 9 with those addresses,
// each two cycles after its padded-register cycle, then fall idle with the
// null address.
module column_fold_tb;
  import sa_pkg::*;
  import fp_ref_pkg::*;

  localparam int BATCH = 8, DEPTH = 32, W = 4;
  logic   clk = 0, rst_n = 0, push = 0;
  entry_t in_entry [BATCH];
  logic   in_valid [BATCH];
  logic   can_accept, stall_req;
  entry_t win [W];
  logic [$clog2(W+1)-1:0] run_len;
  logic [$clog2(DEPTH+1)-1:0] count;
  fp32_t  pvals [W];
  addr_t  paddr;
  logic   pvalid;
  fp32_t  oval;
  addr_t  oaddr;
  logic   ovalid, busy;
  int     checks = 0, failures = 0;

  write_out_buffer #(.BATCH(BATCH), .DEPTH(DEPTH), .WIN(W)) u_buf (
    .clk(clk), .rst_n(rst_n), .in_entry(in_entry), .in_valid(in_valid), .push(push),
    .can_accept(can_accept), .stall_req(stall_req), .win(win), .run_len(run_len),
    .pop(1'b1), .count(count));
  padded_register #(.WIN(W)) u_pad (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .win(win), .len(run_len),
    .vals(pvals), .addr(paddr), .valid(pvalid));
  adder_tree #(.N(W)) u_tree (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .in_vals(pvals), .in_addr(paddr), .in_valid(pvalid),
    .out_val(oval), .out_addr(oaddr), .out_valid(ovalid), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  real batch_v [3][7] = '{'{1.5, 2, 3, 4, 4, 3, 2}, '{1, 2, 3, 4, 4, 3, 2}, '{1.5, 2, 3, 4, 4, 3, 2}};
  int  batch_a [3]    = '{1, 2, 1};
  real pad_v [6][4]   = '{'{1.5, 2, 3, 4}, '{4, 3, 2, 0}, '{1, 2, 3, 4},
                          '{4, 3, 2, 0}, '{1.5, 2, 3, 4}, '{4, 3, 2, 0}};
  int  pad_a [6]      = '{1, 1, 2, 2, 1, 1};
  real out_v [6]      = '{10.5, 9, 10, 9, 10.5, 9};

  initial begin
    for (int i = 0; i < BATCH; i++) begin in_entry[i] = '0; in_valid[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Cycle numbering: the edge that takes batch 0 ends cycle 0; the padded
    // register shows its first content in clock cycle 1 (after edge 1).
    for (int c = 0; c < 12; c++) begin
      if (c < 3) begin
        for (int i = 0; i < BATCH; i++) begin
          in_valid[i] = (i < 7);
          in_entry[i] = '{value: (i < 7) ? to_fp32(batch_v[c][i]) : 32'd0, addr: addr_t'(batch_a[c])};
        end
        push = 1;
        #1 chk(can_accept, $sformatf("batch %0d fits", c));
      end else begin
        for (int i = 0; i < BATCH; i++) in_valid[i] = 0;
        push = 0;
      end
      @(posedge clk);
      #1;
      // After edge c (c >= 1) the padded register holds entry c-1.
      if (c >= 1 && c <= 6) begin
        bit ok;
        ok = pvalid && paddr == addr_t'(pad_a[c-1]);
        for (int j = 0; j < W; j++) ok &= (pvals[j] == to_fp32(pad_v[c-1][j]));
        chk(ok, $sformatf("padded register in clock cycle %0d", c));
      end
      if (c > 6) chk(!pvalid && paddr == NULL_ADDR, $sformatf("padded register empty, null address, cycle %0d", c));
      // The tree output in clock cycle c belongs to padded cycle c-2.
      if (c >= 3 && c <= 8)
        chk(ovalid && oval == to_fp32(out_v[c-3]) && oaddr == addr_t'(pad_a[c-3]),
            $sformatf("output in clock cycle %0d: %h @%0d", c, oval, oaddr));
      else if (c < 3 || c > 8)
        chk(!ovalid, $sformatf("no output in clock cycle %0d", c));
      @(negedge clk);
    end
    chk(!busy && count == 0, "column idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
