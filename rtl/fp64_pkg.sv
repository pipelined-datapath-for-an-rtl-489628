// fp64_pkg: IEEE-754 binary64 types and the arithmetic shared by the
// floating-point units of the Jacobi datapath.
//
// The three functions below (multiply, add, reciprocal) are the combinational
// cores of fp64_mul, fp64_add and fp64_recip; those modules wrap them in a
// fixed-latency pipeline. All three round to nearest, ties to even.
// Subnormal inputs are read as zero and results that would be subnormal are
// flushed to a signed zero (a choice of this design; the units are only said
// to be IEEE-754 64-bit). NaN results are the canonical quiet NaN
// 0x7FF8_0000_0000_0000; infinities and signed zeros follow IEEE-754.
package fp64_pkg;

  typedef logic [63:0] fp64_t;

  typedef struct packed {
    logic        sign;
    logic [10:0] exp;
    logic [51:0] frac;
  } fp64_fields_t;

  localparam fp64_t FP64_QNAN = 64'h7FF8_0000_0000_0000;
  localparam fp64_t FP64_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP64_ONE  = 64'h3FF0_0000_0000_0000;

  function automatic logic is_nan(input fp64_t v);
    return (v[62:52] == 11'h7FF) && (v[51:0] != '0);
  endfunction

  function automatic logic is_inf(input fp64_t v);
    return (v[62:52] == 11'h7FF) && (v[51:0] == '0);
  endfunction

  // zero or subnormal (subnormals are read as zero)
  function automatic logic is_zero(input fp64_t v);
    return v[62:52] == 11'h000;
  endfunction

  function automatic fp64_t inf_of(input logic s);
    return {s, 11'h7FF, 52'h0};
  endfunction

  function automatic fp64_t zero_of(input logic s);
    return {s, 63'h0};
  endfunction

  // Round a 53-bit significand (hidden bit at [52]) with guard and sticky bits,
  // then pack with biased exponent e (13-bit signed). Handles the carry out of
  // rounding, overflow to infinity and flush to zero.
  function automatic fp64_t round_pack(input logic s, input logic signed [13:0] e,
                                       input logic [52:0] m, input logic g,
                                       input logic st);
    logic [53:0] mr;
    logic signed [13:0] er;
    mr = {1'b0, m} + 54'((g && (st || m[0])) ? 1 : 0);
    er = e;
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 14'sd1;
    end
    if (er >= 14'sd2047) return inf_of(s);
    if (er <= 14'sd0) return zero_of(s);
    return {s, er[10:0], mr[51:0]};
  endfunction

  function automatic fp64_t fmul(input fp64_t a, input fp64_t b);
    logic s;
    logic [105:0] p;
    logic signed [13:0] e;
    s = a[63] ^ b[63];
    if (is_nan(a) || is_nan(b)) return FP64_QNAN;
    if (is_inf(a) || is_inf(b)) begin
      if (is_zero(a) || is_zero(b)) return FP64_QNAN;
      return inf_of(s);
    end
    if (is_zero(a) || is_zero(b)) return zero_of(s);
    p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e = 14'(a[62:52]) + 14'(b[62:52]) - 14'sd1023;
    if (p[105])
      return round_pack(s, e + 14'sd1, p[105:53], p[52], |p[51:0]);
    return round_pack(s, e, p[104:52], p[51], |p[50:0]);
  endfunction

  function automatic fp64_t fadd(input fp64_t a, input fp64_t b);
    fp64_t x, y;                 // |x| >= |y|
    logic [55:0] mx, my, sh;     // hidden bit, 52 fraction bits, guard, round, sticky
    logic [56:0] sum;
    logic [55:0] dif;
    logic [11:0] d;
    logic signed [13:0] e;
    logic st;
    int lz;
    if (is_nan(a) || is_nan(b)) return FP64_QNAN;
    if (is_inf(a) && is_inf(b)) return (a[63] == b[63]) ? a : FP64_QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return zero_of(a[63] & b[63]);
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    if (a[62:0] >= b[62:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    d  = 12'(x[62:52]) - 12'(y[62:52]);
    mx = {1'b1, x[51:0], 3'b000};
    my = {1'b1, y[51:0], 3'b000};
    if (d >= 12'd56) begin
      sh = 56'd1;                // everything shifted out: sticky only
    end else begin
      sh = my >> d;
      st = |(my & ~(56'hFF_FFFF_FFFF_FFFF << d));
      sh[0] = sh[0] | st;
    end
    e = 14'(x[62:52]);
    if (x[63] == y[63]) begin
      sum = {1'b0, mx} + {1'b0, sh};
      if (sum[56]) begin
        e = e + 14'sd1;
        return round_pack(x[63], e, sum[56:4], sum[3], |sum[2:0]);
      end
      return round_pack(x[63], e, sum[55:3], sum[2], |sum[1:0]);
    end
    dif = mx - sh;
    if (dif == '0) return FP64_ZERO;
    lz = 0;
    for (int i = 55; i >= 0; i--) begin
      if (dif[i]) break;
      lz++;
    end
    dif = dif << lz;
    e = e - 14'(lz);
    return round_pack(x[63], e, dif[55:3], dif[2], |dif[1:0]);
  endfunction

  // 1/a by restoring division of 2^107 by the 53-bit significand.
  function automatic fp64_t frecip(input fp64_t a);
    logic [53:0] r;
    logic [52:0] m;
    logic [54:0] q;
    logic signed [13:0] e;
    if (is_nan(a)) return FP64_QNAN;
    if (is_inf(a)) return zero_of(a[63]);
    if (is_zero(a)) return inf_of(a[63]);
    if (a[51:0] == '0)         // power of two: exact
      return round_pack(a[63], 14'sd2046 - 14'(a[62:52]), 53'h10_0000_0000_0000, 1'b0, 1'b0);
    m = {1'b1, a[51:0]};
    r = 54'h10_0000_0000_0000; // 2^52 < m
    q = '0;
    for (int i = 54; i >= 0; i--) begin
      r = r << 1;
      if (r >= {1'b0, m}) begin
        r = r - {1'b0, m};
        q[i] = 1'b1;
      end
    end
    // q = floor(2^107/m) lies in (2^54, 2^55): value 1/m = 0.1xxx, exponent 2045-e
    e = 14'sd2045 - 14'(a[62:52]);
    return round_pack(a[63], e, q[54:2], q[1], q[0] | (r != '0));
  endfunction

endpackage
