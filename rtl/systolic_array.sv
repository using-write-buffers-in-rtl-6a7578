// systolic_array: ROWS x COLS grid of processing elements (pe).
//
// Operands of bus A enter at the left edge, one per row, and move one PE to
// the right per cycle; operands of bus B enter at the top edge, one per
// column, and move one PE down per cycle. Every PE accumulates its own
// partial sum, and all partial sums are visible at once on `o`, column by
// column, for the write-out buffers below the array. The published design
// gives the grid, its PEs and its size (32 rows by 64 columns); the
// direction of the two operand streams is this design's choice.
//
// With operand skew applied by the feeding registers, PE(i,j) receives
// A[i][k] and B[k][j] together and after K operand pairs holds
// sum_k A[i][k] * B[k][j]. `en` low freezes the whole array (stall), `clr`
// restarts every PE's accumulation in the same cycle its old sum is read.
module systolic_array
  import sa_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  clr,
  input  fp32_t a_in [ROWS],     // left edge, one per row
  input  logic  a_v  [ROWS],
  input  fp32_t b_in [COLS],     // top edge, one per column
  input  logic  b_v  [COLS],
  output fp32_t o    [ROWS][COLS]
);

  // Operand wires between neighbours: a_w[i][j] enters PE(i,j) from the left,
  // b_w[i][j] enters PE(i,j) from above.
  fp32_t a_w  [ROWS][COLS+1];
  logic  av_w [ROWS][COLS+1];
  fp32_t b_w  [ROWS+1][COLS];
  logic  bv_w [ROWS+1][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_row_in
    assign a_w[i][0]  = a_in[i];
    assign av_w[i][0] = a_v[i];
  end
  for (genvar j = 0; j < COLS; j++) begin : g_col_in
    assign b_w[0][j]  = b_in[j];
    assign bv_w[0][j] = b_v[j];
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_r
    for (genvar j = 0; j < COLS; j++) begin : g_c
      pe u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .en      (en),
        .clr     (clr),
        .a_in    (a_w[i][j]),
        .a_wr    (av_w[i][j]),
        .b_in    (b_w[i][j]),
        .b_wr    (bv_w[i][j]),
        .a_out   (a_w[i][j+1]),
        .a_v_out (av_w[i][j+1]),
        .b_out   (b_w[i+1][j]),
        .b_v_out (bv_w[i+1][j]),
        .o       (o[i][j])
      );
    end
  end

endmodule
