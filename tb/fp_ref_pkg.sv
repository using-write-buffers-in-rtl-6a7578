// fp_ref_pkg: reference conversions between FP32 bit patterns and the
// simulator's double-precision `real`, used by the testbenches to compute
// expected results independently of the RTL arithmetic.
// to_fp32 rounds a double to single precision (nearest, ties to even) and,
// like the RTL, flushes results below the normal range to a signed zero.
package fp_ref_pkg;

  function automatic real from_fp32(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0)
      d = {f[31], 63'd0};
    else if (f[30:23] == 8'hFF)
      d = {f[31], 11'h7FF, f[22:0], 29'd0};
    else
      d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_fp32(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;       // 1.23 significand plus carry
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return {d[63], 8'hFF, (d[51:0] != 0) ? 23'h400000 : 23'd0};
    if (d[62:52] == 11'd0)   return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random normal FP32 number with its exponent in [emin, emax].
  function automatic logic [31:0] rand_fp32(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
