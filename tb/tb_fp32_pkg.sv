// tb_fp32_pkg - self-checking test of the binary32 arithmetic in fp32_pkg.
// Random operands (and a few edge cases) go through fp_add, fp_sub, fp_mul, fp_div, fp_exp,
// fp_log, fp_from_uint and fp_gt; each result is compared with the same operation done in
// double precision and rounded to binary32.
module tb_fp32_pkg;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;

  task automatic chk(string what, real got, real expv, real rel, real abs_tol);
    checks++;
    if (!close(got, expv, rel, abs_tol)) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %g expected %g", what, got, expv);
    end
  endtask

  function automatic real rnd(real scale);
    return (real'($urandom) / 4294967296.0 * 2.0 - 1.0) * scale;
  endfunction

  initial begin
    real a, b, e;
    logic [31:0] fa, fb;
    for (int i = 0; i < 4000; i++) begin
      a = rnd(1000.0) * ((i % 3 == 0) ? 1.0e-3 : 1.0);
      b = rnd(1000.0) * ((i % 5 == 0) ? 1.0e3 : 1.0);
      fa = r2f(a);
      fb = r2f(b);
      a = f2r(fa);
      b = f2r(fb);
      chk("add", f2r(fp_add(fa, fb)), f2r(r2f(a + b)), 0.0, 1.0e-30 + 1.2e-7 * (rabs(a) + rabs(b)));
      chk("sub", f2r(fp_sub(fa, fb)), f2r(r2f(a - b)), 0.0, 1.0e-30 + 1.2e-7 * (rabs(a) + rabs(b)));
      chk("mul", f2r(fp_mul(fa, fb)), a * b, 1.2e-7, 0.0);
      chk("div", f2r(fp_div(fa, fb)), a / b, 1.2e-7, 0.0);
      chk("log", f2r(fp_log(fp_abs(fa))), $ln(rabs(a)), 0.0, 4.0e-7 + 2.0e-7 * rabs($ln(rabs(a))));
      e = rnd(80.0);
      chk("exp", f2r(fp_exp(r2f(e))), $exp(f2r(r2f(e))), 1.0e-5, 0.0);
      checks++;
      if (fp_gt(fa, fb) != (a > b)) begin
        failures++;
        $display("FAIL gt %g %g", a, b);
      end
    end
    // exact cases
    chk("exp0", f2r(fp_exp(FP_ZERO)), 1.0, 0.0, 0.0);
    chk("log1", f2r(fp_log(FP_ONE)), 0.0, 0.0, 0.0);
    chk("1+1", f2r(fp_add(FP_ONE, FP_ONE)), 2.0, 0.0, 0.0);
    chk("x-x", f2r(fp_sub(r2f(3.25), r2f(3.25))), 0.0, 0.0, 0.0);
    chk("u2f", f2r(fp_from_uint(32'd1048576)), 1048576.0, 0.0, 0.0);
    chk("u2f3", f2r(fp_from_uint(32'd3)), 3.0, 0.0, 0.0);
    chk("expneg", f2r(fp_exp(r2f(-200.0))), 0.0, 0.0, 0.0);
    checks++;
    if (fp_log(FP_ZERO) != FP_NEGINF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
