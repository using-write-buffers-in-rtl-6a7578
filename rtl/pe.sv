// pe: processing element of the systolic array.
//
// Reg A and Reg B latch the operands arriving on bus A (from the left) and
// bus B (from above) and pass them on unchanged to the right-hand and lower
// neighbours one cycle later. A multiplier and an adder fold RegA * RegB into
// the output register Reg O every cycle in which both operands are valid, so
// a PE accumulates one output partial sum over time. This register set,
// multiplier, adder and feedback loop are the element's published structure;
// the valid bits that travel with the operands, the hold input and the way
// Reg O restarts are this design's own choices.
//
// Timing: an operand written with a_wr/b_wr in cycle t is in RegA/RegB after
// edge t+1, reaches the neighbour's register after edge t+2, and its product
// is in Reg O after edge t+2. `clr` restarts the accumulation: Reg O is loaded
// with only this cycle's product (or zero), so a read-out of Reg O in the
// same cycle loses nothing. `en` low freezes every register (array stall).
// Reset (active low, asynchronous) clears all registers to +0 / invalid.
module pe
  import sa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,        // 0: hold all registers (systolic array stall)
  input  logic  clr,       // restart the accumulation in Reg O
  input  fp32_t a_in,      // bus A
  input  logic  a_wr,      // bus A carries a valid operand
  input  fp32_t b_in,      // bus B
  input  logic  b_wr,      // bus B carries a valid operand
  output fp32_t a_out,     // RegA, to the right-hand neighbour
  output logic  a_v_out,
  output fp32_t b_out,     // RegB, to the lower neighbour
  output logic  b_v_out,
  output fp32_t o          // Reg O
);

  fp32_t reg_a, reg_b, reg_o;
  logic  a_v, b_v;
  fp32_t prod, acc_base, acc_sum;

  fp32_mul u_mul (.a(reg_a), .b(reg_b), .y(prod));
  fp32_add u_add (.a(acc_base), .b(prod), .y(acc_sum));

  assign acc_base = clr ? '0 : reg_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_b <= '0;
      reg_o <= '0;
      a_v   <= 1'b0;
      b_v   <= 1'b0;
    end else if (en) begin
      reg_a <= a_wr ? a_in : '0;
      a_v   <= a_wr;
      reg_b <= b_wr ? b_in : '0;
      b_v   <= b_wr;
      reg_o <= (a_v && b_v) ? acc_sum : acc_base;
    end
  end

  assign a_out   = reg_a;
  assign a_v_out = a_v;
  assign b_out   = reg_b;
  assign b_v_out = b_v;
  assign o       = reg_o;

endmodule
