// Shared types, constants and floating-point arithmetic of the batched
// tridiagonal solver and the 2D ADI heat-diffusion data path built on it.
//
// Number format: IEEE-754 binary floating point with EW exponent bits and MW
// fraction bits; the defaults (8, 23) give FP32, the precision of the main
// configuration. Setting EW=11, MW=52 gives FP64. The functions below are
// combinational; the modules that use them add the pipeline registers.
// Arithmetic rounds to nearest, ties to even. Subnormal inputs and results
// are flushed to signed zero; infinities are produced on overflow and by
// division by zero; NaN inputs are not treated specially (the solver never
// creates them from finite, non-singular systems). These simplifications are
// this implementation's choice.
//
// V is the number of points per data beat (the vectorisation factor v = 8 of
// the 256-bit data path), fixed here because it shapes every stream type.
package tridsolv_pkg;

  localparam int unsigned EW   = 8;
  localparam int unsigned MW   = 23;
  localparam int unsigned W    = 1 + EW + MW;
  localparam int unsigned BIAS = (1 << (EW - 1)) - 1;
  localparam int unsigned V    = 8;

  typedef logic [W-1:0] fp_t;
  // One beat of the data path: V consecutive points, point 0 in lane 0.
  typedef fp_t [V-1:0] beat_t;

  // The four coefficients of one row of a tridiagonal system.
  typedef struct packed {
    fp_t a;
    fp_t b;
    fp_t c;
    fp_t d;
  } coef_t;

  // Forward-pass result of one row (c*, d*).
  typedef struct packed {
    fp_t c;
    fp_t d;
  } cd_t;

  localparam fp_t FP_ZERO = '0;
  localparam fp_t FP_ONE  = fp_t'(BIAS) << MW;
  localparam fp_t FP_FOUR = fp_t'(BIAS + 2) << MW;

  // Signed working exponent, wide enough for products and quotients.
  typedef logic signed [EW+2:0] sexp_t;

  // Round a normalised mantissa (hidden bit at MW) with guard bit g and
  // sticky bit s to nearest even and pack it; handles exponent overflow
  // (to infinity) and underflow (to zero).
  function automatic fp_t fp_pack(input logic sgn, input sexp_t e_in,
                                  input logic [MW:0] m_in,
                                  input logic g, input logic s);
    logic [MW+1:0] m;
    sexp_t e;
    m = {1'b0, m_in};
    e = e_in;
    if (g && (s || m_in[0])) m = m + 1'b1;
    if (m[MW+1]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {sgn, {(W-1){1'b0}}};
    if (e >= sexp_t'((1 << EW) - 1)) return {sgn, {EW{1'b1}}, {MW{1'b0}}};
    return {sgn, e[EW-1:0], m[MW-1:0]};
  endfunction

  function automatic logic fp_is_zero(input fp_t x);
    return x[W-2:MW] == '0;
  endfunction

  function automatic logic fp_is_inf(input fp_t x);
    return x[W-2:MW] == '1;
  endfunction

  // x + y
  function automatic fp_t fp_add(input fp_t x, input fp_t y);
    localparam int unsigned WP = MW + 4;   // hidden + fraction + G,R,S
    fp_t big, sml;
    logic [WP-1:0] mb, ms, shifted, mask;
    logic [WP:0] sum;
    logic sticky;
    int unsigned d, lz;
    sexp_t e;
    if (fp_is_zero(y)) return fp_is_zero(x) ? {x[W-1] & y[W-1], {(W-1){1'b0}}} : x;
    if (fp_is_zero(x)) return y;
    if (fp_is_inf(x)) return x;
    if (fp_is_inf(y)) return y;
    if (x[W-2:0] >= y[W-2:0]) begin
      big = x; sml = y;
    end else begin
      big = y; sml = x;
    end
    mb = {1'b1, big[MW-1:0], 3'b000};
    ms = {1'b1, sml[MW-1:0], 3'b000};
    d  = int'(big[W-2:MW]) - int'(sml[W-2:MW]);
    if (d >= WP) begin
      shifted = '0;
      sticky  = 1'b1;
    end else begin
      mask    = (WP'(1) << d) - 1'b1;
      shifted = ms >> d;
      sticky  = |(ms & mask);
    end
    shifted[0] = shifted[0] | sticky;
    e = sexp_t'(big[W-2:MW]);
    if (big[W-1] == sml[W-1]) begin
      sum = {1'b0, mb} + {1'b0, shifted};
      if (sum[WP]) begin
        sum = {1'b0, sum[WP:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, shifted};
      if (sum == '0) return FP_ZERO;
      lz = 0;
      for (int k = WP - 1; k >= 0; k--) begin
        if (sum[k]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - sexp_t'(lz);
    end
    return fp_pack(big[W-1], e, sum[WP-1:3], sum[2], sum[1] | sum[0]);
  endfunction

  function automatic fp_t fp_neg(input fp_t x);
    return {~x[W-1], x[W-2:0]};
  endfunction

  // x - y
  function automatic fp_t fp_sub(input fp_t x, input fp_t y);
    return fp_add(x, fp_neg(y));
  endfunction

  // x * y
  function automatic fp_t fp_mul(input fp_t x, input fp_t y);
    logic sgn;
    logic [2*MW+1:0] p;
    sexp_t e;
    sgn = x[W-1] ^ y[W-1];
    if (fp_is_inf(x) || fp_is_inf(y)) return {sgn, {EW{1'b1}}, {MW{1'b0}}};
    if (fp_is_zero(x) || fp_is_zero(y)) return {sgn, {(W-1){1'b0}}};
    p = {1'b1, x[MW-1:0]} * {1'b1, y[MW-1:0]};
    e = sexp_t'(x[W-2:MW]) + sexp_t'(y[W-2:MW]) - sexp_t'(BIAS);
    if (p[2*MW+1])
      return fp_pack(sgn, e + 1, p[2*MW+1:MW+1], p[MW], |p[MW-1:0]);
    return fp_pack(sgn, e, p[2*MW:MW], p[MW-1], |p[MW-2:0]);
  endfunction

  // x / y
  function automatic fp_t fp_div(input fp_t x, input fp_t y);
    logic sgn;
    logic [2*MW+3:0] num, q, r;
    logic [2*MW+3:0] den;
    sexp_t e;
    sgn = x[W-1] ^ y[W-1];
    if (fp_is_zero(y) || fp_is_inf(x)) return {sgn, {EW{1'b1}}, {MW{1'b0}}};
    if (fp_is_zero(x) || fp_is_inf(y)) return {sgn, {(W-1){1'b0}}};
    num = {1'b1, x[MW-1:0], {(MW+3){1'b0}}};
    den = (2*MW+4)'({1'b1, y[MW-1:0]});
    q = num / den;
    r = num % den;
    e = sexp_t'(x[W-2:MW]) - sexp_t'(y[W-2:MW]) + sexp_t'(BIAS);
    if (q[MW+3])
      return fp_pack(sgn, e, q[MW+3:3], q[2], (|q[1:0]) || (r != '0));
    return fp_pack(sgn, e - 1, q[MW+2:2], q[1], q[0] || (r != '0));
  endfunction

endpackage
