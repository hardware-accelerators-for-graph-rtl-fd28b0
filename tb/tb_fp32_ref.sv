// tb_fp32_ref: reference IEEE-754 single-precision arithmetic for the testbenches.
//
// Computes a + b for finite normal operands through double precision, then rounds
// the double to single precision, nearest-even, by explicit scaling (every scaling
// step by two is exact). Double rounding cannot change a sum of two singles, since
// double has more than 2 x 24 + 2 significand bits. Subnormal inputs count as
// zero and results below the normal range flush to zero, the convention of the
// accumulator.
package tb_fp32_ref;

  function automatic real f2r(logic [31:0] f);
    real v;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    v = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    return f[31] ? -v : v;
  endfunction

  function automatic logic [31:0] r2f(real x);
    logic        s;
    real         ax, m, frac;
    int          e;
    longint      mi;
    if (x == 0.0) return 32'd0;
    s  = (x < 0.0);
    ax = s ? -x : x;
    e  = 127;
    while (ax >= 2.0) begin ax = ax / 2.0; e++; end
    while (ax < 1.0)  begin ax = ax * 2.0; e--; end
    m    = ax * 8388608.0;
    mi   = longint'($floor(m));
    frac = m - real'(mi);
    if (frac > 0.5 || (frac == 0.5 && mi[0])) mi++;
    if (mi == 64'd16777216) begin mi = 64'd8388608; e++; end
    if (e >= 255) return {s, 8'hff, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], mi[22:0]};
  endfunction

  function automatic logic [31:0] add(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 0 && b[30:23] == 0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 0) return b;
    if (b[30:23] == 0) return a;
    return r2f(f2r(a) + f2r(b));
  endfunction

  // A random normal single with exponent in [lo, hi].
  function automatic logic [31:0] rand_f(int lo, int hi);
    logic [7:0] e;
    e = 8'($urandom_range(hi, lo));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
