// Reference Thomas algorithm for the testbenches, using the same operation
// order and rounding as the hardware (r = 1/(b - a c*), d* = r (d - a d*),
// c* = r c, u_i = d*_i - c*_i u_{i+1}), computed with real arithmetic rounded
// to the solver's format after every operation.
//
// Own choice: the reference arithmetic uses the simulator's double
// precision, rounded to the design's format after every operation, so it is
// independent of the RTL's bit-level functions.
package thomas_ref_pkg;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;

  function automatic void thomas_ref(input coef_t rows [], output fp_t u []);
    int n = rows.size();
    fp_t cs [], ds [];
    fp_t r, a;
    cs = new[n];
    ds = new[n];
    u  = new[n];
    for (int i = 0; i < n; i++) begin
      a = (i == 0) ? FP_ZERO : rows[i].a;
      r = r_div(FP_ONE, r_sub(rows[i].b, r_mul(a, (i == 0) ? FP_ZERO : cs[i-1])));
      ds[i] = r_mul(r, r_sub(rows[i].d, r_mul(a, (i == 0) ? FP_ZERO : ds[i-1])));
      cs[i] = r_mul(r, rows[i].c);
    end
    u[n-1] = ds[n-1];
    for (int i = n - 2; i >= 0; i--) u[i] = r_sub(ds[i], r_mul(cs[i], u[i+1]));
  endfunction

  // Random diagonally dominant row.
  function automatic coef_t rand_row();
    coef_t c;
    real a, b, cc;
    a  = real'($urandom_range(2000, 0)) / 1000.0 - 1.0;
    cc = real'($urandom_range(2000, 0)) / 1000.0 - 1.0;
    b  = 2.5 + real'($urandom_range(1000, 0)) / 1000.0;
    c.a = from_real(a);
    c.b = from_real(($urandom_range(1, 0) == 1) ? b : -b);
    c.c = from_real(cc);
    c.d = from_real(real'($urandom_range(20000, 0)) / 1000.0 - 10.0);
    return c;
  endfunction
endpackage
