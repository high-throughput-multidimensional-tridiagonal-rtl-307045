// Self-checking test of the floating-point functions of tridsolv_pkg against
// real arithmetic rounded to the same format: random operands over a wide
// exponent range, cancellation cases and exact cases.
//
// The expected results follow the method's equations and are computed
// independently of the RTL. Own choice: the reduced sizes, random stimulus,
// back-pressure pattern and watchdog length.
module fp_pkg_tb;
  import tridsolv_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(string op, fp_t x, fp_t y, fp_t got, fp_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h %h got %h exp %h", op, x, y, got, exp);
    end
  endtask

  initial begin
    fp_t x, y;
    for (int n = 0; n < 20000; n++) begin
      x = rand_fp(20);
      y = (n % 4 == 0) ? {~x[W-1], x[W-2:0]} ^ fp_t'($urandom_range(3, 0)) : rand_fp(20);
      chk("add", x, y, fp_add(x, y), r_add(x, y));
      chk("sub", x, y, fp_sub(x, y), r_sub(x, y));
      chk("mul", x, y, fp_mul(x, y), r_mul(x, y));
      chk("div", x, y, fp_div(x, y), r_div(x, y));
    end
    chk("one", FP_ONE, FP_ONE, fp_add(FP_ONE, FP_ONE), from_real(2.0));
    chk("four", FP_FOUR, FP_ONE, fp_mul(FP_FOUR, FP_ONE), from_real(4.0));
    chk("zero", FP_ONE, FP_ONE, fp_sub(FP_ONE, FP_ONE), FP_ZERO);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
