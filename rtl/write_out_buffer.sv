// write_out_buffer: per-column first-in first-out buffer of (value, address)
// pairs between the systolic array and the column's adder tree.
//
// Push side: a whole column batch of up to BATCH values, each with its
// destination address and a valid bit, is offered at once. The number of
// valid entries is compared with the free space; `can_accept` says whether
// the batch fits, and `stall_req` raises the flag that makes the control
// logic stall the array while it does not. When `push` is given, the valid
// entries are written in order, packed into consecutive slots, in one cycle.
//
// Eject side: starting from the oldest entry, neighbouring entries are
// compared with it until an address differs (only adjacent entries are
// compared, never the whole buffer). Up to WIN entries of that run are
// offered in `win` with their count `run_len`; `pop` removes them. A run
// longer than WIN is therefore folded over several ejections. Capacity,
// batch-wise overflow check and adjacent-address ejection follow the
// published design; pushing a batch in a single cycle and the window size
// equal to the adder-tree input are this design's choices.
//
// DEPTH must be a power of two. Reset empties the buffer.
module write_out_buffer
  import sa_pkg::*;
#(
  parameter int unsigned BATCH = 32,          // values per column batch (array rows)
  parameter int unsigned DEPTH = 64,          // capacity, a multiple of BATCH
  parameter int unsigned WIN   = 32,          // max entries ejected at once (tree inputs)
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned LW   = $clog2(WIN + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  // push side
  input  entry_t       in_entry [BATCH],
  input  logic         in_valid [BATCH],
  input  logic         push,
  output logic         can_accept,
  output logic         stall_req,
  // eject side
  output entry_t       win [WIN],
  output logic [LW-1:0] run_len,
  input  logic         pop,
  // status
  output logic [CW-1:0] count
);

  entry_t        mem [DEPTH];
  logic [PW-1:0] wptr, rptr;
  logic [CW-1:0] n_in;
  logic [PW-1:0] slot [BATCH];    // packed write offset of each input entry

  initial begin
    if ((DEPTH & (DEPTH - 1)) != 0) $error("DEPTH must be a power of two");
  end

  // Count valid inputs and the packed position of each.
  always_comb begin
    logic [CW-1:0] acc;
    acc = '0;
    for (int i = 0; i < BATCH; i++) begin
      slot[i] = PW'(acc);
      if (in_valid[i]) acc = acc + CW'(1);
    end
    n_in = acc;
  end

  assign can_accept = (CW'(DEPTH) - count) >= n_in;
  assign stall_req  = !can_accept;

  // Adjacent-address run at the head of the buffer.
  always_comb begin
    logic same;
    same    = 1'b1;
    run_len = '0;
    for (int j = 0; j < WIN; j++) begin
      win[j] = mem[PW'(rptr + PW'(j))];
      if (same && (CW'(j) < count) && (win[j].addr == win[0].addr))
        run_len = run_len + LW'(1);
      else
        same = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) begin
        for (int i = 0; i < BATCH; i++)
          if (in_valid[i]) mem[PW'(wptr + slot[i])] <= in_entry[i];
        wptr <= PW'(wptr + PW'(n_in));
      end
      if (pop) rptr <= PW'(rptr + PW'(run_len));
      count <= count + (push ? n_in : '0) - (pop ? CW'(run_len) : '0);
    end
  end

  // A batch is pushed only when it fits.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> can_accept)
    else $error("write_out_buffer: push of a batch that does not fit");

endmodule
