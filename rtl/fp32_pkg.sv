// fp32_pkg - single-precision floating-point arithmetic used by every EM kernel.
//
// The EM-GMM datapath works on IEEE-754 binary32 values, the same 32-bit float the
// accelerator's kernels use for samples, memberships and all Gaussian parameters. This
// package provides the operators as pure combinational functions so that each kernel can
// evaluate one (or several, in parallel) operations per clock:
//   fp_add / fp_sub / fp_mul / fp_div  - round to nearest, ties to even on the kept bits
//   fp_exp / fp_log                    - natural exponential and logarithm
//   fp_from_uint, fp_gt, fp_abs, fp_neg
// Design choices (not taken from any specification of the algorithm):
//   * subnormal inputs and results are flushed to zero;
//   * infinities are propagated, NaNs are never produced (x/0 gives infinity, log of a
//     non-positive value gives minus infinity);
//   * fp_add folds bits shifted out beyond 26 guard positions into one sticky bit, so a
//     result can differ from IEEE rounding by one unit in the last place in rare cases;
//   * fp_exp computes 2^(x*log2 e) by splitting the exponent into an integer and a 24-bit
//     fraction and multiplying 24 constants 2^(2^-i) selected by the fraction bits;
//   * fp_log computes (e + log2 m) * ln 2 with log2 m obtained bit by bit by repeated
//     squaring of the mantissa (24 fraction bits).
// The relative error of fp_exp is about 1e-6 for |x| < 88; fp_log has an absolute error
// of about 1e-7.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3f80_0000;
  localparam fp32_t FP_HALF    = 32'h3f00_0000;
  localparam fp32_t FP_NEGHALF = 32'hbf00_0000;
  localparam fp32_t FP_INF     = 32'h7f80_0000;
  localparam fp32_t FP_NEGINF  = 32'hff80_0000;
  localparam fp32_t FP_LOG2E   = 32'h3fb8_aa3b;  // 1/ln(2)
  localparam fp32_t FP_LN2     = 32'h3f31_7218;  // ln(2)
  localparam fp32_t FP_HALF_LN_2PI = 32'h3f6b_3f8e;  // 0.5*ln(2*pi)

  // round(2^(2^-i) * 2^30) for i = 1..24, index 0 unused
  localparam logic [31:0] EXP2_FRAC_TBL [25] = '{
    32'h4000_0000,
    32'h5a82_799a, 32'h4c1b_f829, 32'h45ca_e0f2, 32'h42d5_61b4, 32'h4166_c34c, 32'h40b2_68fa,
    32'h4058_f6a8, 32'h402c_6be9, 32'h4016_321b, 32'h400b_1818, 32'h4005_8bce, 32'h4002_c5d8,
    32'h4001_62e8, 32'h4000_b173, 32'h4000_58b9, 32'h4000_2c5d, 32'h4000_162e, 32'h4000_0b17,
    32'h4000_058c, 32'h4000_02c6, 32'h4000_0163, 32'h4000_00b1, 32'h4000_0059, 32'h4000_002c
  };

  function automatic logic is_zero(fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic logic is_inf(fp32_t a);
    return a[30:23] == 8'hff;
  endfunction

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_abs(fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  // Round and pack. sig[26] is the leading one, sig[25:3] the fraction, sig[2] guard,
  // sig[1] round, sig[0] sticky. e is the biased exponent of sig[26].
  function automatic fp32_t round_pack(logic s, logic signed [11:0] e, logic [26:0] sig);
    logic [23:0] fr;
    logic signed [11:0] ee;
    logic up;
    ee = e;
    up = sig[2] && (sig[1] || sig[0] || sig[3]);
    fr = {1'b0, sig[25:3]} + {23'd0, up};
    if (fr[23]) ee = ee + 12'sd1;
    if (ee >= 12'sd255) return {s, 8'hff, 23'd0};
    if (ee <= 12'sd0) return {s, 31'd0};
    return {s, ee[7:0], fr[22:0]};
  endfunction

  function automatic logic [5:0] clz64(logic [63:0] v);
    logic [5:0] n;
    logic found;
    n = 6'd0;
    found = 1'b0;
    for (int i = 63; i >= 0; i--) begin
      if (!found && v[i]) found = 1'b1;
      else if (!found) n = n + 6'd1;
    end
    return n;
  endfunction

  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic s;
    logic [47:0] p;
    logic signed [11:0] e;
    logic [26:0] sig;
    s = a[31] ^ b[31];
    if (is_inf(a) || is_inf(b)) return {s, 8'hff, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({4'd0, a[30:23]}) + $signed({4'd0, b[30:23]}) - 12'sd127;
    if (p[47]) begin
      sig = {p[47:22], |p[21:0]};
      e = e + 12'sd1;
    end else begin
      sig = {p[46:21], |p[20:0]};
    end
    return round_pack(s, e, sig);
  endfunction

  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    fp32_t x, y;
    logic [7:0] diff;
    logic [49:0] mx, my, shifted;
    logic sticky;
    logic [50:0] sum;
    logic [63:0] norm;
    logic [5:0] lz;
    logic signed [11:0] e;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a)) return is_zero(b) ? FP_ZERO : b;
    if (is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin
      x = a; y = b;
    end else begin
      x = b; y = a;
    end
    diff = x[30:23] - y[30:23];
    mx = {1'b1, x[22:0], 26'd0};
    my = {1'b1, y[22:0], 26'd0};
    if (diff > 8'd49) begin
      shifted = 50'd0;
      sticky  = 1'b1;
    end else begin
      shifted = my >> diff;
      sticky  = (my & ((50'd1 << diff) - 50'd1)) != 50'd0;
    end
    if (x[31] == y[31]) sum = {1'b0, mx} + {1'b0, shifted};
    else                sum = {1'b0, mx} - {1'b0, shifted};
    if (sum == 51'd0 && !sticky) return FP_ZERO;
    norm = {sum, 13'd0};
    lz = clz64(norm);
    norm = norm << lz;
    e = $signed({4'd0, x[30:23]}) + 12'sd1 - $signed({6'd0, lz});
    return round_pack(x[31], e, {norm[63:38], (|norm[37:0]) | sticky});
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_div(fp32_t a, fp32_t b);
    logic s;
    logic [49:0] num, q, r;
    logic signed [11:0] e;
    logic [26:0] sig;
    s = a[31] ^ b[31];
    if (is_inf(a) || is_zero(b)) return {s, 8'hff, 23'd0};
    if (is_zero(a) || is_inf(b)) return {s, 31'd0};
    num = {1'b1, a[22:0], 26'd0};
    q = num / {26'd0, 1'b1, b[22:0]};
    r = num % {26'd0, 1'b1, b[22:0]};
    e = $signed({4'd0, a[30:23]}) - $signed({4'd0, b[30:23]}) + 12'sd127;
    if (q[26]) begin
      sig = {q[26:1], q[0] | (r != 50'd0)};
    end else begin
      sig = {q[25:0], r != 50'd0};
      e = e - 12'sd1;
    end
    return round_pack(s, e, sig);
  endfunction

  function automatic fp32_t fp_from_uint(logic [31:0] v);
    logic [63:0] norm;
    logic [5:0] lz;
    if (v == 32'd0) return FP_ZERO;
    norm = {v, 32'd0};
    lz = clz64(norm);
    norm = norm << lz;
    return round_pack(1'b0, 12'sd158 - $signed({6'd0, lz}), {norm[63:38], |norm[37:0]});
  endfunction

  // signed fixed-point value with 24 fraction bits to float
  function automatic fp32_t fp_from_fix24(logic signed [39:0] v);
    logic s;
    logic [39:0] mag;
    logic [63:0] norm;
    logic [5:0] lz;
    if (v == 40'sd0) return FP_ZERO;
    s = v[39];
    mag = s ? 40'(-v) : 40'(v);
    norm = {mag, 24'd0};
    lz = clz64(norm);
    norm = norm << lz;
    // bit 63 of norm has weight 2^(39-24) before the shift
    return round_pack(s, 12'sd127 + 12'sd15 - $signed({6'd0, lz}), {norm[63:38], |norm[37:0]});
  endfunction

  // a > b
  function automatic logic fp_gt(fp32_t a, fp32_t b);
    logic az, bz;
    az = is_zero(a);
    bz = is_zero(b);
    if (az && bz) return 1'b0;
    if (az) return b[31];
    if (bz) return !a[31];
    if (a[31] != b[31]) return b[31];
    if (!a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

  function automatic fp32_t fp_exp(fp32_t x);
    fp32_t y;
    logic signed [12:0] sh;
    logic [39:0] mag;
    logic signed [39:0] fx;
    logic signed [15:0] k;
    logic [23:0] fr;
    logic [31:0] p;
    logic [63:0] prod;
    if (is_zero(x)) return FP_ONE;
    if (is_inf(x)) return x[31] ? FP_ZERO : FP_INF;
    y = fp_mul(x, FP_LOG2E);
    if (y[30:23] >= 8'd134) return y[31] ? FP_ZERO : FP_INF;  // |y| >= 128
    sh = $signed({5'd0, y[30:23]}) - 13'sd126;
    if (sh >= 0) mag = {16'd0, 1'b1, y[22:0]} << sh;
    else if (sh < -13'sd24) mag = 40'd0;
    else mag = {16'd0, 1'b1, y[22:0]} >> (-sh);
    fx = y[31] ? -$signed(mag) : $signed(mag);
    k  = 16'(fx >>> 24);
    fr = fx[23:0];
    p = 32'h4000_0000;
    for (int i = 1; i <= 24; i++) begin
      if (fr[24-i]) begin
        prod = {32'd0, p} * {32'd0, EXP2_FRAC_TBL[i]};
        p = prod[61:30];
      end
    end
    return round_pack(1'b0, 12'(k) + 12'sd127, {p[30:5], |p[4:0]});
  endfunction

  function automatic fp32_t fp_log(fp32_t x);
    logic [31:0] m;
    logic [63:0] sq;
    logic [23:0] l2;
    logic signed [39:0] t;
    if (is_zero(x) || x[31]) return FP_NEGINF;
    if (is_inf(x)) return FP_INF;
    m = {1'b0, 1'b1, x[22:0], 7'd0};  // value in [1,2) with 30 fraction bits
    for (int i = 23; i >= 0; i--) begin
      sq = {32'd0, m} * {32'd0, m};
      m = sq[61:30];
      if (m[31]) begin
        l2[i] = 1'b1;
        m = m >> 1;
      end else begin
        l2[i] = 1'b0;
      end
    end
    t = ($signed({32'd0, x[30:23]}) - 40'sd127) * 40'sd16777216 + $signed({16'd0, l2});
    return fp_mul(fp_from_fix24(t), FP_LN2);
  endfunction

endpackage
