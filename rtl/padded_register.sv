// padded_register: register of adder-tree input width plus an address
// register, between a write-out buffer and its adder tree.
//
// On `load` it takes the first `len` values of the ejected window, fills the
// remaining slots with zero and stores the run's address, so the tree always
// sees a full-width input whatever the number of values ejected. With no
// data (len = 0) it holds zeros, the null address (all ones, read as -1) and
// a cleared valid bit. Zero padding, the separate address register and the
// null address follow the published design. `load` low holds the contents
// (adder tree stalled). The register delays the data by one cycle.
module padded_register
  import sa_pkg::*;
#(
  parameter int unsigned WIN = 32,
  localparam int unsigned LW = $clog2(WIN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  entry_t        win [WIN],
  input  logic [LW-1:0] len,
  output fp32_t         vals [WIN],
  output addr_t         addr,
  output logic          valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < WIN; j++) vals[j] <= '0;
      addr  <= NULL_ADDR;
      valid <= 1'b0;
    end else if (load) begin
      for (int j = 0; j < WIN; j++)
        vals[j] <= (LW'(j) < len) ? win[j].value : '0;
      addr  <= (len != '0) ? win[0].addr : NULL_ADDR;
      valid <= (len != '0);
    end
  end

endmodule
