// tb_em_k3_inv - self-checking test of kernel 3 (inverse covariance and constant).
// The testbench offers M random symmetric positive-definite matrices (B*B^T plus a diagonal
// load, entries up to about 1e5 like covariances of samples in [-1000, 1000]) and drains the
// inverse and constant channels with random back-pressure. The reference inverse and
// determinant come from Gauss-Jordan elimination with partial pivoting in double precision.
// The constant must equal -(D/2)ln(2*pi) - ln(det)/2.
module tb_em_k3_inv;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int D = 4, M = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic cov_valid, cov_ready, inv_valid, inv_ready, const_valid, const_ready;
  fp32_t [D*D-1:0] cov_data, inv_data;
  fp32_t const_data;
  fp32_t covs [M][D*D];
  real ref_inv [M][D*D], ref_const [M];
  int checks = 0, failures = 0, sent = 0, got_inv = 0, got_const = 0;

  em_k3_inv #(.D(D), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int k = 0; k < D*D; k++) cov_data[k] = (sent < M) ? covs[sent][k] : FP_ZERO;

  always @(posedge clk) if (rst_n) begin
    if (cov_valid && cov_ready) begin
      sent <= sent + 1;
      cov_valid <= 1'b0;
    end else if (rst_n && sent < M && $urandom % 4 == 0) cov_valid <= 1'b1;
    inv_ready <= $urandom % 2 == 0;
    const_ready <= $urandom % 2 == 0;
    if (inv_valid && inv_ready) begin
      real mx;
      mx = 0.0;
      for (int k = 0; k < D*D; k++) if (rabs(ref_inv[got_inv][k]) > mx) mx = rabs(ref_inv[got_inv][k]);
      for (int k = 0; k < D*D; k++) begin
        checks++;
        if (!close(f2r(inv_data[k]), ref_inv[got_inv][k], 0.0, 1.0e-4 * mx)) begin
          failures++;
          $display("FAIL inv m%0d k%0d got %g expected %g", got_inv, k, f2r(inv_data[k]), ref_inv[got_inv][k]);
        end
      end
      got_inv <= got_inv + 1;
    end
    if (const_valid && const_ready) begin
      checks++;
      if (!close(f2r(const_data), ref_const[got_const], 1.0e-5, 1.0e-4)) begin
        failures++;
        $display("FAIL const got %g expected %g", f2r(const_data), ref_const[got_const]);
      end
      got_const <= got_const + 1;
    end
  end

  task automatic make_ref(int m);
    real a [D][2*D];
    real b [D][D];
    real det, t, p;
    int piv;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) b[i][j] = (real'($urandom % 2001) - 1000.0) / 10.0;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) begin
        t = (i == j) ? 5000.0 : 0.0;
        for (int k = 0; k < D; k++) t += b[i][k] * b[j][k];
        covs[m][i*D+j] = r2f(t);
      end
    for (int i = 0; i < D; i++)
      for (int j = 0; j < 2*D; j++) a[i][j] = (j < D) ? f2r(covs[m][i*D+j]) : ((j - D == i) ? 1.0 : 0.0);
    det = 1.0;
    for (int c = 0; c < D; c++) begin
      piv = c;
      for (int r = c + 1; r < D; r++) if (rabs(a[r][c]) > rabs(a[piv][c])) piv = r;
      if (piv != c) begin
        det = -det;
        for (int j = 0; j < 2*D; j++) begin t = a[c][j]; a[c][j] = a[piv][j]; a[piv][j] = t; end
      end
      p = a[c][c];
      det *= p;
      for (int j = 0; j < 2*D; j++) a[c][j] /= p;
      for (int r = 0; r < D; r++)
        if (r != c) begin
          t = a[r][c];
          for (int j = 0; j < 2*D; j++) a[r][j] -= t * a[c][j];
        end
    end
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) ref_inv[m][i*D+j] = a[i][D+j];
    ref_const[m] = -(D / 2.0) * $ln(2.0 * 3.14159265358979) - 0.5 * $ln(det);
  endtask

  initial begin
    int cycles;
    cov_valid = 0; inv_ready = 0; const_ready = 0;
    for (int m = 0; m < M; m++) make_ref(m);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (got_inv != M || got_const != M) begin failures++; $display("FAIL counts %0d %0d", got_inv, got_const); end
    $display("kernel 3: %0d cycles for %0d clusters of %0dx%0d", cycles, M, D, D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
