// feed_regs: feeding registers between memory and one edge of the systolic
// array (the RFA bank on the rows, the RFB bank on the columns).
//
// Each lane registers the operand word read from memory together with a
// valid bit. Lane i passes its word through i+1 register stages, so a
// vector presented in one cycle reaches the array edge as a diagonal
// wavefront: lane 0 one cycle later, lane i i+1 cycles later. That skew is
// what lets the operands of one dot product meet in the right PE. The
// published design names these registers and shows one per row or column;
// the skewing depth is this design's choice. `en` low holds every stage.
module feed_regs
  import sa_pkg::*;
#(
  parameter int unsigned LANES = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  fp32_t d_in  [LANES],
  input  logic  v_in  [LANES],
  output fp32_t d_out [LANES],
  output logic  v_out [LANES]
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    fp32_t d_q [i+1];
    logic  v_q [i+1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s <= i; s++) begin
          d_q[s] <= '0;
          v_q[s] <= 1'b0;
        end
      end else if (en) begin
        d_q[0] <= v_in[i] ? d_in[i] : '0;
        v_q[0] <= v_in[i];
        for (int s = 1; s <= i; s++) begin
          d_q[s] <= d_q[s-1];
          v_q[s] <= v_q[s-1];
        end
      end
    end

    assign d_out[i] = d_q[i];
    assign v_out[i] = v_q[i];
  end

endmodule
