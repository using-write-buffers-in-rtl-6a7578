// fp32_add: combinational IEEE-754 single-precision adder, the two-input
// "full adder" node from which the column adder trees are built (and the
// accumulating adder of each processing element).
//
// How it works: the operand with the larger magnitude is kept, the smaller
// one is shifted right by the exponent difference into a 27-bit field
// (24-bit significand plus guard, round and sticky bits), the two are added
// or subtracted, the result is normalised and rounded to nearest, ties to
// even. Infinities and NaNs follow IEEE-754 (inf - inf gives a quiet NaN).
// Subnormal inputs read as zero and results below the normal range flush
// to a signed zero; this simplification is the design's own choice.
//
// Interface: a, b in, y = a + b out, no clock. The surrounding registers
// (adder_tree, pe) provide the "update" (latch the inputs) and "evaluate"
// (present the sum) steps of an adder node.
module fp32_add
  import sa_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ma, mb, ml, ms;
  logic        a_big;
  logic [7:0]  d;
  logic [26:0] larger, aligned;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [9:0]  e;        // signed working exponent
  logic [4:0]  lz;
  logic [24:0] rnd;
  logic        up;

  always_comb begin
    sa = a[31]; ea = a[30:23]; ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    sb = b[31]; eb = b[30:23]; mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    // Order by magnitude (exponent, then significand).
    a_big = {ea, ma} >= {eb, mb};
    sl = a_big ? sa : sb;  el = a_big ? ea : eb;  ml = a_big ? ma : mb;
    ss = a_big ? sb : sa;  es = a_big ? eb : ea;  ms = a_big ? mb : ma;
    d  = el - es;

    larger   = {ml, 3'b000};
    aligned = {ms, 3'b000};
    if (d >= 8'd27) begin
      aligned = {26'd0, |ms};
    end else if (d != 8'd0) begin
      // Sticky: OR of every bit shifted out of the field.
      aligned = ({ms, 3'b000} >> d) | {26'd0, |({ms, 3'b000} & ((27'd1 << d) - 27'd1))};
    end

    e    = {2'b00, el};
    norm = '0;
    lz   = '0;
    if (sl == ss) begin
      sum = {1'b0, larger} + {1'b0, aligned};
      if (sum[27]) begin
        norm = sum[27:1] | {26'd0, sum[0]};
        e    = e + 10'd1;
      end else begin
        norm = sum[26:0];
      end
    end else begin
      sum = {1'b0, larger} - {1'b0, aligned};
      // Count leading zeros of the 27-bit difference.
      lz = 5'd27;
      for (int i = 0; i <= 26; i++) begin
        if (sum[i]) lz = 5'(26 - i);
      end
      norm = sum[26:0] << lz;
      e    = e - {5'd0, lz};
    end

    // Round to nearest, ties to even.
    up  = norm[2] & (norm[1] | norm[0] | norm[3]);
    rnd = {1'b0, norm[26:3]} + {24'd0, up};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'd1;
    end

    // Result selection, special operands first.
    if (ea == 8'hFF || eb == 8'hFF) begin
      if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0) ||
          (ea == 8'hFF && eb == 8'hFF && sa != sb))
        y = FP32_QNAN;
      else
        y = (ea == 8'hFF) ? {sa, 8'hFF, 23'd0} : {sb, 8'hFF, 23'd0};
    end else if (ml == 24'd0) begin
      // Both operands zero: -0 only when both are -0.
      y = {sa & sb, 31'd0};
    end else if (sum == 28'd0) begin
      y = 32'd0;                                   // exact cancellation gives +0
    end else if (e[9] || e == 10'd0) begin
      y = {sl, 31'd0};                             // underflow: flush to zero
    end else if (e >= 10'd255) begin
      y = {sl, 8'hFF, 23'd0};                      // overflow: infinity
    end else begin
      y = {sl, e[7:0], rnd[22:0]};
    end
  end

endmodule
