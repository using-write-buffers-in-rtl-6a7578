// fp32_mul: combinational IEEE-754 single-precision multiplier, the "Mult"
// unit of the processing element.
//
// How it works: the 24-bit significands are multiplied into a 48-bit product
// in [1, 4); the product is normalised by at most one place, rounded to
// nearest, ties to even, and the exponents are added. NaN, infinity and
// 0 x inf follow IEEE-754. As in fp32_add, subnormal inputs read as zero and
// results below the normal range flush to a signed zero (this design's
// simplification).
//
// Interface: a, b in, y = a * b out, no clock.
module fp32_mul
  import sa_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] p;
  logic [9:0]  e;          // signed working exponent
  logic [23:0] m;
  logic        g, st, up;
  logic [24:0] rnd;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];  eb = b[30:23];
    ma = {1'b1, a[22:0]};  mb = {1'b1, b[22:0]};
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);

    p = ma * mb;
    e = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 10'd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    up  = g & (st | m[0]);
    rnd = {1'b0, m} + {24'd0, up};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP32_QNAN;
    else if (a_inf || b_inf)
      y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      y = {s, 31'd0};
    else if (e[9] || e == 10'd0)
      y = {s, 31'd0};                              // underflow: flush to zero
    else if (e >= 10'd255)
      y = {s, 8'hFF, 23'd0};                       // overflow: infinity
    else
      y = {s, e[7:0], rnd[22:0]};
  end

endmodule
