// adder_tree: pipelined binary tree of FP32 adders that reduces N values to
// one, with the destination address and a valid bit forwarded level by
// level beside the data.
//
// Level 0 is the input (the padded register). Each further level holds half
// as many registers as the one above, each loaded with the sum of two
// neighbours of the level above; the last level, a single register, is the
// tree's output register. A new input can enter every cycle, so the tree
// reduces one batch per cycle with a latency of log2(N) cycles. `busy` says
// that some level, input included, holds valid data; when it falls the
// tree has drained. `out_valid` says the result must be written to memory;
// invalid results are discarded. `en` low freezes every level (stall).
// The binary structure, per-level address forwarding, valid flag and busy
// flag follow the published design; N must be a power of two of at least 2.
module adder_tree
  import sa_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned LEVELS = $clog2(N)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  fp32_t in_vals [N],
  input  addr_t in_addr,
  input  logic  in_valid,
  output fp32_t out_val,
  output addr_t out_addr,
  output logic  out_valid,
  output logic  busy
);

  initial begin
    if (N < 2 || (N & (N - 1)) != 0) $error("N must be a power of two, at least 2");
  end

  logic [LEVELS:0] lvl_valid;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned W = N >> l;
    fp32_t v [W];
    addr_t a;
    logic  vd;

    if (l == 0) begin : g_in
      assign v  = in_vals;
      assign a  = in_addr;
      assign vd = in_valid;
    end else begin : g_stage
      fp32_t s [W];
      for (genvar k = 0; k < W; k++) begin : g_add
        fp32_add u_add (.a(g_lvl[l-1].v[2*k]), .b(g_lvl[l-1].v[2*k+1]), .y(s[k]));
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < W; k++) v[k] <= '0;
          a  <= NULL_ADDR;
          vd <= 1'b0;
        end else if (en) begin
          v  <= s;
          a  <= g_lvl[l-1].a;
          vd <= g_lvl[l-1].vd;
        end
      end
    end
    assign lvl_valid[l] = vd;
  end

  assign out_val   = g_lvl[LEVELS].v[0];
  assign out_addr  = g_lvl[LEVELS].a;
  assign out_valid = g_lvl[LEVELS].vd;
  assign busy      = |lvl_valid;

endmodule
