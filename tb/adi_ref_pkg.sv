// Reference model of one 2D ADI heat iteration for the testbenches, with the
// same operation order and rounding as the hardware: 5-point RHS stencil,
// Thomas solve along every x-line, then along every y-line, with interior
// coefficients (A, B, C) and boundary rows (0, 1, 0), and u = u + d.
// A mesh is a flat array, point (x, y) at index y*X + x.
//
// Own choice: the reference arithmetic uses the simulator's double
// precision, rounded to the design's format after every operation, so it is
// independent of the RTL's bit-level functions.
package adi_ref_pkg;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  import thomas_ref_pkg::*;

  function automatic void rhs(input int X, input int Y, input fp_t lambda,
                              input fp_t u [], output fp_t d []);
    d = new[X * Y];
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++) begin
        if (x == 0 || y == 0 || x == X - 1 || y == Y - 1) d[y*X+x] = FP_ZERO;
        else d[y*X+x] = r_mul(lambda, r_sub(r_add(r_add(u[y*X+x-1], u[y*X+x+1]),
                                                  r_add(u[(y-1)*X+x], u[(y+1)*X+x])),
                                            r_mul(FP_FOUR, u[y*X+x])));
      end
  endfunction

  function automatic void solve_lines(input int X, input int Y, input bit along_x,
                                      input fp_t ca, input fp_t cb, input fp_t cc,
                                      inout fp_t d []);
    int n = along_x ? X : Y;
    int m = along_x ? Y : X;
    coef_t rows [];
    fp_t u [];
    rows = new[n];
    for (int l = 0; l < m; l++) begin
      for (int i = 0; i < n; i++) begin
        bit bnd = (i == 0) || (i == n - 1);
        rows[i].a = bnd ? FP_ZERO : ca;
        rows[i].b = bnd ? FP_ONE : cb;
        rows[i].c = bnd ? FP_ZERO : cc;
        rows[i].d = along_x ? d[l*X+i] : d[i*X+l];
      end
      thomas_ref(rows, u);
      for (int i = 0; i < n; i++)
        if (along_x) d[l*X+i] = u[i];
        else d[i*X+l] = u[i];
    end
  endfunction

  function automatic void step(input int X, input int Y, input fp_t lambda,
                               input fp_t ca, input fp_t cb, input fp_t cc,
                               inout fp_t u []);
    fp_t d [];
    rhs(X, Y, lambda, u, d);
    solve_lines(X, Y, 1, ca, cb, cc, d);
    solve_lines(X, Y, 0, ca, cb, cc, d);
    foreach (u[k]) u[k] = r_add(u[k], d[k]);
  endfunction
endpackage
