// fp64_pkg -- shared types and IEEE-754 binary64 arithmetic for the
// quantum-circuit emulation kernels.
//
// The kernels work on complex amplitudes whose real and imaginary parts are
// 64-bit IEEE-754 doubles (the emulator's stated precision). This package
// holds the complex type and the two arithmetic functions every datapath is
// built from:
//   fp_add : a + b, round-to-nearest-even
//   fp_mul : a * b, round-to-nearest-even
// Both are plain combinational functions. Design choices of this
// implementation (not fixed by the emulator description): subnormal inputs are
// read as zero and subnormal results are flushed to a signed zero; any NaN
// operand yields the canonical quiet NaN; overflow gives a signed infinity.
// For normal operands and normal results the functions are bit-exact with
// IEEE-754 double arithmetic.
package fp64_pkg;

  typedef logic [63:0] fp64_t;

  // One complex amplitude or matrix element.
  typedef struct packed {
    fp64_t re;
    fp64_t im;
  } cplx_t;

  localparam fp64_t FP_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_ONE  = 64'h3FF0_0000_0000_0000;
  localparam fp64_t FP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam fp64_t FP_INF  = 64'h7FF0_0000_0000_0000;
  localparam cplx_t CPLX_ZERO = '{re: FP_ZERO, im: FP_ZERO};

  // Round a 53-bit significand with guard bit g and sticky bit s to nearest
  // even, then pack. e is the biased exponent of the significand's leading
  // one (which must be set); it may be out of range here.
  function automatic fp64_t fp_round_pack(input logic sign, input int e,
                                          input logic [52:0] m,
                                          input logic g, input logic s);
    logic [53:0] mr;
    int          er;
    mr = {1'b0, m};
    er = e;
    if (g && (s || m[0])) mr = mr + 54'd1;
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 2047)    return {sign, FP_INF[62:0]};
    else if (er <= 0)  return {sign, 63'd0};
    else               return {sign, er[10:0], mr[51:0]};
  endfunction

  function automatic fp64_t fp_add(input fp64_t a, input fp64_t b);
    logic        sa, sb, sx, sy, s_res;
    logic [10:0] ea, eb;
    logic [62:0] mag_a, mag_b;
    logic [55:0] mx, my;    // 53-bit significand followed by 3 extra bits
    logic [56:0] sum;
    logic        sticky;
    int          ex, ey, d, lz;
    fp64_t       x, y;

    sa = a[63];  ea = a[62:52];
    sb = b[63];  eb = b[62:52];
    // special operands
    if ((ea == 11'h7FF && a[51:0] != 0) || (eb == 11'h7FF && b[51:0] != 0))
      return FP_QNAN;
    if (ea == 11'h7FF && eb == 11'h7FF)
      return (sa == sb) ? a : FP_QNAN;
    if (ea == 11'h7FF) return a;
    if (eb == 11'h7FF) return b;
    // zeros (subnormals read as zero)
    if (ea == 0 && eb == 0) return {sa & sb, 63'd0};
    if (ea == 0) return b;
    if (eb == 0) return a;

    // order by magnitude: x is the larger
    mag_a = a[62:0];
    mag_b = b[62:0];
    if (mag_a >= mag_b) begin x = a; y = b; end
    else                begin x = b; y = a; end
    sx = x[63];  sy = y[63];
    ex = int'(x[62:52]);
    ey = int'(y[62:52]);
    mx = {1'b1, x[51:0], 3'b000};
    my = {1'b1, y[51:0], 3'b000};
    d  = ex - ey;
    // align y, keeping everything shifted out in the sticky bit
    if (d >= 56) begin
      my = 56'd1;
    end else if (d > 0) begin
      sticky = |(my & ~({56{1'b1}} << d));
      my = (my >> d) | {55'd0, sticky};
    end

    s_res = sx;
    if (sx == sy) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[56]) begin
        sum = {1'b0, sum[56:2], sum[1] | sum[0]};
        ex = ex + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == 0) return FP_ZERO;   // exact cancellation gives +0
      lz = 0;
      for (int i = 0; i < 56; i++)       // position of the leading one
        if (sum[i]) lz = 55 - i;
      sum = sum << lz;
      ex = ex - lz;
    end
    // sum[55] is now the leading one
    return fp_round_pack(s_res, ex, sum[55:3], sum[2], sum[1] | sum[0]);
  endfunction

  function automatic fp64_t fp_sub(input fp64_t a, input fp64_t b);
    return fp_add(a, {~b[63], b[62:0]});
  endfunction

  function automatic fp64_t fp_mul(input fp64_t a, input fp64_t b);
    logic         s;
    logic [10:0]  ea, eb;
    logic [105:0] p;
    logic         a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    int           e;

    s  = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    a_nan  = (ea == 11'h7FF) && (a[51:0] != 0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != 0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == 0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == 0);
    a_zero = (ea == 0);
    b_zero = (eb == 0);
    if (a_nan || b_nan) return FP_QNAN;
    if ((a_inf && b_zero) || (b_inf && a_zero)) return FP_QNAN;
    if (a_inf || b_inf) return {s, FP_INF[62:0]};
    if (a_zero || b_zero) return {s, 63'd0};

    p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e = int'(ea) + int'(eb) - 1023;
    if (p[105])
      return fp_round_pack(s, e + 1, p[105:53], p[52], |p[51:0]);
    else
      return fp_round_pack(s, e, p[104:52], p[51], |p[50:0]);
  endfunction

endpackage
