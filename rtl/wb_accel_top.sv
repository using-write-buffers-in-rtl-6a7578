// wb_accel_top: systolic-array accelerator with per-column write buffers and
// pipelined adder trees that add up, before they reach memory, the partial
// sums that are bound for the same output address.
//
// Data path (left to right):
//   memory -> feed_regs (RFA, one lane per row; RFB, one lane per column)
//          -> systolic_array (ROWS x COLS PEs, each accumulating a partial sum)
//          -> per column: write_out_buffer -> padded_register -> adder_tree
//          -> output_buffer -> memory write port (read-modify-write add)
//
// Operation: the feeder presents operand vectors on a_in/b_in with their
// valid bits; the feeding registers skew them into the array. To write the
// PEs' partial sums out, the controller raises `emit` together with a valid
// bit and a destination address for every PE. Each column's ROWS values form
// one batch for that column's write-out buffer. The batches are accepted in
// the same cycle only if every column's buffer has room for its batch;
// otherwise `sa_stall` is raised, the feeding registers and the array hold
// every register, and the controller keeps `emit` (and its operand inputs)
// unchanged until the stall clears. An accepted emit restarts every PE's
// accumulation in the same cycle.
//
// Each buffer ejects, per cycle, the run of neighbouring entries that share
// the oldest entry's address (at most TREE_IN of them) into the column's
// padded register, which zero-fills the unused tree inputs. The tree adds
// them in log2(TREE_IN) pipelined levels. The column results enter the
// output buffer, which writes one (address, value) pair per cycle to memory.
// When the output buffer cannot take a full row of column results, every
// tree, padded register and buffer ejection is held (`acc_stall`).
// `busy` is high while any buffer, register or tree level holds data.
//
// The structure (RFA/RFB, array, BUFn, Pad Reg n, adder tree with RFCn,
// output buffer, DRAM), the 32 x 64 array and the stall-on-capacity rule
// follow the published design; the emit interface, the output buffer depth,
// the one-write-per-cycle memory port and TREE_IN = ROWS are this design's
// choices.
module wb_accel_top
  import sa_pkg::*;
#(
  parameter int unsigned ROWS     = 32,
  parameter int unsigned COLS     = 64,
  parameter int unsigned TREE_IN  = ROWS,          // adder-tree inputs per column
  parameter int unsigned BUF_MULT = 2,             // write-out buffer capacity in batches
  parameter int unsigned OB_DEPTH = 2 * COLS       // output buffer entries
) (
  input  logic  clk,
  input  logic  rst_n,
  // operand feed from memory
  input  fp32_t a_in      [ROWS],
  input  logic  a_wr      [ROWS],
  input  fp32_t b_in      [COLS],
  input  logic  b_wr      [COLS],
  // partial-sum write-out request
  input  logic  emit,
  input  logic  emit_valid [ROWS][COLS],
  input  addr_t emit_addr  [ROWS][COLS],
  output logic  sa_stall,
  // memory write port (value is added into the word at addr)
  output addr_t mem_addr,
  output fp32_t mem_value,
  output logic  mem_valid,
  input  logic  mem_ready,
  // status
  output logic  acc_stall,
  output logic  busy
);

  localparam int unsigned BUF_DEPTH = BUF_MULT * ROWS;
  localparam int unsigned LW        = $clog2(TREE_IN + 1);
  localparam int unsigned BCW       = $clog2(BUF_DEPTH + 1);
  localparam int unsigned OCW       = $clog2(OB_DEPTH + 1);

  // ---------------------------------------------------------------- array
  fp32_t ra_d [ROWS];
  logic  ra_v [ROWS];
  fp32_t rb_d [COLS];
  logic  rb_v [COLS];
  fp32_t pe_o [ROWS][COLS];
  logic  sa_en, accept;
  logic  col_ok [COLS];
  logic  all_ok;

  always_comb begin
    all_ok = 1'b1;
    for (int j = 0; j < COLS; j++) all_ok &= col_ok[j];
  end

  assign accept   = emit && all_ok;
  assign sa_stall = emit && !all_ok;
  assign sa_en    = !sa_stall;

  feed_regs #(.LANES(ROWS)) u_rfa (
    .clk(clk), .rst_n(rst_n), .en(sa_en),
    .d_in(a_in), .v_in(a_wr), .d_out(ra_d), .v_out(ra_v)
  );

  feed_regs #(.LANES(COLS)) u_rfb (
    .clk(clk), .rst_n(rst_n), .en(sa_en),
    .d_in(b_in), .v_in(b_wr), .d_out(rb_d), .v_out(rb_v)
  );

  systolic_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk(clk), .rst_n(rst_n), .en(sa_en), .clr(accept),
    .a_in(ra_d), .a_v(ra_v), .b_in(rb_d), .b_v(rb_v), .o(pe_o)
  );

  // ---------------------------------------------------- column accumulators
  logic   adv;
  entry_t col_res   [COLS];
  logic   col_res_v [COLS];
  logic   col_busy  [COLS];
  logic   ob_ok;

  assign adv       = ob_ok;
  assign acc_stall = !ob_ok;

  for (genvar j = 0; j < COLS; j++) begin : g_col
    entry_t          batch   [ROWS];
    logic            batch_v [ROWS];
    entry_t          win     [TREE_IN];
    logic [LW-1:0]   run_len;
    logic [BCW-1:0]  count;
    fp32_t           pad_vals [TREE_IN];
    addr_t           pad_addr;
    logic            pad_valid;
    logic            tree_busy;
    logic            unused_stall;

    for (genvar i = 0; i < ROWS; i++) begin : g_b
      assign batch[i]   = '{value: pe_o[i][j], addr: emit_addr[i][j]};
      assign batch_v[i] = emit_valid[i][j];
    end

    write_out_buffer #(.BATCH(ROWS), .DEPTH(BUF_DEPTH), .WIN(TREE_IN)) u_buf (
      .clk(clk), .rst_n(rst_n),
      .in_entry(batch), .in_valid(batch_v), .push(accept),
      .can_accept(col_ok[j]), .stall_req(unused_stall),
      .win(win), .run_len(run_len), .pop(adv), .count(count)
    );

    padded_register #(.WIN(TREE_IN)) u_pad (
      .clk(clk), .rst_n(rst_n), .load(adv),
      .win(win), .len(run_len),
      .vals(pad_vals), .addr(pad_addr), .valid(pad_valid)
    );

    adder_tree #(.N(TREE_IN)) u_tree (
      .clk(clk), .rst_n(rst_n), .en(adv),
      .in_vals(pad_vals), .in_addr(pad_addr), .in_valid(pad_valid),
      .out_val(col_res[j].value), .out_addr(col_res[j].addr),
      .out_valid(col_res_v[j]), .busy(tree_busy)
    );

    assign col_busy[j] = tree_busy || (count != '0);
  end

  // --------------------------------------------------------- output buffer
  entry_t         ob_head;
  logic [OCW-1:0] ob_count;
  logic           ob_in_v [COLS];

  // Results are taken only in cycles in which the trees advance.
  for (genvar j = 0; j < COLS; j++) begin : g_obv
    assign ob_in_v[j] = col_res_v[j] && adv;
  end

  output_buffer #(.N_IN(COLS), .DEPTH(OB_DEPTH)) u_obuf (
    .clk(clk), .rst_n(rst_n),
    .in_entry(col_res), .in_valid(ob_in_v), .can_accept(ob_ok),
    .mem_entry(ob_head), .mem_valid(mem_valid), .mem_ready(mem_ready),
    .count(ob_count)
  );

  assign mem_addr  = ob_head.addr;
  assign mem_value = ob_head.value;

  always_comb begin
    busy = (ob_count != '0);
    for (int j = 0; j < COLS; j++) busy |= col_busy[j];
  end

endmodule
