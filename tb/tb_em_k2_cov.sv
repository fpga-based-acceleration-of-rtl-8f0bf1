// tb_em_k2_cov - self-checking test of kernel 2 (full covariance matrices).
// The testbench plays kernel 1 (it offers each cluster's mean vector and N_SUM on the input
// channels) and drains the covariance and mean outputs. Every covariance entry is compared
// with a double-precision reference, and the forwarded mean must equal the mean that came in.
// First run: inputs ready at once and outputs always ready, so the kernel must take exactly
// M*(N+3) cycles. Second run: random input delays and random back-pressure.
module tb_em_k2_cov;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 64, D = 3, M = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [$clog2(N)-1:0] x_addr;
  fp32_t [D-1:0] x_rdata;
  logic [$clog2(M*N)-1:0] phi_addr;
  fp32_t phi_rdata;
  logic mean_in_valid, mean_in_ready, nsum_valid, nsum_ready;
  fp32_t [D-1:0] mean_in_data;
  fp32_t nsum_data;
  logic cov_valid, cov_ready, mean_out_valid, mean_out_ready;
  fp32_t [D*D-1:0] cov_data;
  fp32_t [D-1:0] mean_out_data;
  fp32_t xs [N][D];
  fp32_t phis [M*N];
  fp32_t mus [M][D];
  fp32_t nsums [M];
  real ref_cov [M][D*D];
  int checks = 0, failures = 0;
  bit random_mode = 0;
  int sent_in = 0, got_cov = 0, got_mean = 0;

  em_k2_cov #(.N(N), .D(D), .M(M)) dut (.*);

  always #5 clk = ~clk;
  always_comb begin
    for (int d = 0; d < D; d++) x_rdata[d] = xs[x_addr][d];
    phi_rdata = phis[phi_addr];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer of the input channels (mean and N_SUM offered together)
  always @(posedge clk) if (rst_n) begin
    if (mean_in_valid && mean_in_ready) begin
      checks++;
      if (!(nsum_valid && nsum_ready)) begin failures++; $display("FAIL mean/nsum not read together"); end
      sent_in <= sent_in + 1;
      mean_in_valid <= 1'b0;
      nsum_valid <= 1'b0;
    end else if (sent_in < M && (!random_mode || $urandom % 4 == 0)) begin
      mean_in_valid <= 1'b1;
      nsum_valid <= 1'b1;
    end
    cov_ready <= random_mode ? ($urandom % 3 == 0) : 1'b1;
    mean_out_ready <= random_mode ? ($urandom % 3 == 0) : 1'b1;
    if (cov_valid && cov_ready) begin
      for (int k = 0; k < D*D; k++) begin
        checks++;
        if (!close(f2r(cov_data[k]), ref_cov[got_cov][k], 3.0e-5, 1.0e-2)) begin
          failures++;
          $display("FAIL cov m%0d k%0d got %g expected %g", got_cov, k, f2r(cov_data[k]), ref_cov[got_cov][k]);
        end
      end
      got_cov <= got_cov + 1;
    end
    if (mean_out_valid && mean_out_ready) begin
      checks++;
      if (mean_out_data != {mus[got_mean][2], mus[got_mean][1], mus[got_mean][0]}) begin
        failures++;
        $display("FAIL forwarded mean");
      end
      got_mean <= got_mean + 1;
    end
  end
  assign mean_in_data = (sent_in < M) ? {mus[sent_in][2], mus[sent_in][1], mus[sent_in][0]} : '0;
  assign nsum_data = (sent_in < M) ? nsums[sent_in] : FP_ZERO;

  task automatic run(output int cycles);
    real s, mu_r [D];
    for (int n = 0; n < N; n++)
      for (int d = 0; d < D; d++) xs[n][d] = r2f((real'($urandom % 2000001) - 1000000.0) / 1000.0);
    for (int m = 0; m < M; m++) begin
      s = 0.0;
      for (int d = 0; d < D; d++) mu_r[d] = 0.0;
      for (int n = 0; n < N; n++) begin
        phis[m*N+n] = r2f(real'($urandom % 1000 + 1) / 1000.0);
        s += f2r(phis[m*N+n]);
        for (int d = 0; d < D; d++) mu_r[d] += f2r(phis[m*N+n]) * f2r(xs[n][d]);
      end
      nsums[m] = r2f(s);
      for (int d = 0; d < D; d++) mus[m][d] = r2f(mu_r[d] / s);
      for (int i = 0; i < D; i++)
        for (int j = 0; j < D; j++) begin
          ref_cov[m][i*D+j] = 0.0;
          for (int n = 0; n < N; n++)
            ref_cov[m][i*D+j] += f2r(phis[m*N+n]) * (f2r(xs[n][i]) - f2r(mus[m][i])) * (f2r(xs[n][j]) - f2r(mus[m][j]));
          ref_cov[m][i*D+j] /= f2r(nsums[m]);
        end
    end
    @(negedge clk);
    sent_in = 0; got_cov = 0; got_mean = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (got_cov != M || got_mean != M) begin failures++; $display("FAIL counts %0d %0d", got_cov, got_mean); end
  endtask

  initial begin
    int cycles;
    mean_in_valid = 0; nsum_valid = 0; cov_ready = 1; mean_out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(cycles);
    checks++;
    if (cycles != M * (N + 3)) begin failures++; $display("FAIL cycles %0d", cycles); end
    random_mode = 1;
    run(cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
