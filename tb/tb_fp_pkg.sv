// tb_fp_pkg - helpers shared by the testbenches: conversion between binary32 bit patterns
// and real numbers, and a tolerance comparison. Reference values in the testbenches are
// computed in double precision with these helpers, independently of the RTL arithmetic.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    // re-bias: double exponent = float exponent - 127 + 1023
    d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [10:0] e;
    logic [52:0] mant;
    logic [24:0] m;
    int fe;
    d = $realtobits(r);
    e = d[62:52];
    if (e == 11'd0) return {d[63], 31'd0};
    fe = int'(e) - 1023 + 127;
    mant = {1'b1, d[51:0]};
    m = {1'b0, mant[52:29]} + {24'd0, mant[28]};
    if (m[24]) begin
      m = m >> 1;
      fe = fe + 1;
    end
    if (fe >= 255) return {d[63], 8'hff, 23'd0};
    if (fe <= 0) return {d[63], 31'd0};
    return {d[63], 8'(fe), m[22:0]};
  endfunction

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // |got - exp| <= rel*|exp| + abs_tol
  function automatic bit close(real got, real expv, real rel, real abs_tol);
    return rabs(got - expv) <= rel * rabs(expv) + abs_tol;
  endfunction

endpackage
