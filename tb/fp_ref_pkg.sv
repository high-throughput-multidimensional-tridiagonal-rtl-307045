// Reference arithmetic for the testbenches: converts between the solver's
// floating-point words (format set in tridsolv_pkg) and SystemVerilog real,
// rounding to nearest even and flushing subnormals to zero like the hardware.
// An operation computed in real on two converted operands and rounded back is
// correctly rounded for formats up to 24 fraction bits, which gives an
// independent bit-exact model of each hardware operation for FP32.
//
// Own choice: the reference arithmetic uses the simulator's double
// precision, rounded to the design's format after every operation, so it is
// independent of the RTL's bit-level functions.
package fp_ref_pkg;
  import tridsolv_pkg::*;

  function automatic real to_real(input fp_t x);
    logic [63:0] b;
    if (x[W-2:MW] == '0) return 0.0;
    b = '0;
    b[63] = x[W-1];
    b[62:52] = 11'(int'(x[W-2:MW]) - int'(BIAS) + 1023);
    b[51 -: MW] = x[MW-1:0];
    return $bitstoreal(b);
  endfunction

  function automatic fp_t from_real(input real r);
    logic [63:0] b;
    int e;
    logic [MW:0] m;
    logic g, s;
    b = $realtobits(r);
    if (b[62:0] == '0) return {b[63], {(W-1){1'b0}}};
    e = int'(b[62:52]) - 1023 + int'(BIAS);
    m = {1'b0, b[51 -: MW]};
    g = b[51-MW];
    s = |(b[50-MW:0]);
    if (g && (s || m[0])) m = m + 1'b1;
    if (m[MW]) e = e + 1;
    if (e <= 0) return {b[63], {(W-1){1'b0}}};
    if (e >= (1 << EW) - 1) return {b[63], {EW{1'b1}}, {MW{1'b0}}};
    return {b[63], EW'(e), m[MW-1:0]};
  endfunction

  function automatic fp_t r_add(input fp_t x, input fp_t y);
    return from_real(to_real(x) + to_real(y));
  endfunction
  function automatic fp_t r_sub(input fp_t x, input fp_t y);
    return from_real(to_real(x) - to_real(y));
  endfunction
  function automatic fp_t r_mul(input fp_t x, input fp_t y);
    return from_real(to_real(x) * to_real(y));
  endfunction
  function automatic fp_t r_div(input fp_t x, input fp_t y);
    return from_real(to_real(x) / to_real(y));
  endfunction

  // Random finite value with exponent in [BIAS-span, BIAS+span].
  function automatic fp_t rand_fp(input int span);
    fp_t x;
    x = fp_t'({$urandom, $urandom});
    x[W-2:MW] = EW'(int'(BIAS) - span + int'($urandom_range(2 * span, 0)));
    return x;
  endfunction
endpackage
