// output_buffer: collects the reduced results of all column adder trees and
// writes them to memory one per cycle.
//
// Every cycle up to N_IN (value, address) results, one per column, may
// arrive; the valid ones are packed in column order and written into a
// first-in first-out store in one cycle. `can_accept` is true while at least
// N_IN slots are free, so the trees may advance without losing a result.
// The head entry is presented on the memory write port and removed when the
// memory takes it (mem_valid && mem_ready); the memory adds the value into
// the word at its address. The published design names this buffer between
// the adder trees and DRAM; its depth, the one-write-per-cycle memory port
// and the read-modify-write memory are this design's choices. DEPTH must
// be a power of two of at least N_IN.
module output_buffer
  import sa_pkg::*;
#(
  parameter int unsigned N_IN  = 64,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  entry_t        in_entry [N_IN],
  input  logic          in_valid [N_IN],
  output logic          can_accept,
  output entry_t        mem_entry,
  output logic          mem_valid,
  input  logic          mem_ready,
  output logic [CW-1:0] count
);

  entry_t        mem [DEPTH];
  logic [PW-1:0] wptr, rptr;
  logic [CW-1:0] n_in;
  logic [PW-1:0] slot [N_IN];
  logic          do_pop;

  initial begin
    if ((DEPTH & (DEPTH - 1)) != 0 || DEPTH < N_IN)
      $error("DEPTH must be a power of two, at least N_IN");
  end

  always_comb begin
    logic [CW-1:0] acc;
    acc = '0;
    for (int i = 0; i < N_IN; i++) begin
      slot[i] = PW'(acc);
      if (in_valid[i]) acc = acc + CW'(1);
    end
    n_in = acc;
  end

  assign can_accept = (CW'(DEPTH) - count) >= CW'(N_IN);
  assign mem_entry  = mem[rptr];
  assign mem_valid  = (count != '0);
  assign do_pop     = mem_valid && mem_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      for (int i = 0; i < N_IN; i++)
        if (in_valid[i]) mem[PW'(wptr + slot[i])] <= in_entry[i];
      wptr  <= PW'(wptr + PW'(n_in));
      if (do_pop) rptr <= PW'(rptr + PW'(1));
      count <= count + n_in - (do_pop ? CW'(1) : '0);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (n_in != '0) |-> (CW'(DEPTH) - count) >= n_in)
    else $error("output_buffer: overflow");

endmodule
