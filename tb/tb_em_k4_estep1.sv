// tb_em_k4_estep1 - self-checking test of kernel 4 (log numerators of the E-step).
// The testbench plays kernels 1-3: for each cluster it offers an inverse covariance (inverse
// of a random positive-definite matrix), a constant, a mean and a weight on the four input
// channels. It records the buffer writes and compares every num_mn with
// -h/2 + ln(w) + const computed in double precision, checks that every address is written
// once, and that the start token for kernel 5 arrives only after the last write. With inputs
// available at once the kernel must take M*(N+2)+1 cycles.
module tb_em_k4_estep1;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 64, D = 3, M = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [$clog2(N)-1:0] x_addr;
  fp32_t [D-1:0] x_rdata;
  logic inv_valid, inv_ready, const_valid, const_ready, mean_valid, mean_ready, w_valid, w_ready;
  fp32_t [D*D-1:0] inv_data;
  fp32_t const_data, w_data;
  fp32_t [D-1:0] mean_data;
  logic num_we;
  logic [$clog2(M*N)-1:0] num_addr;
  fp32_t num_data;
  logic flag_valid, flag_ready;
  fp32_t xs [N][D];
  fp32_t invs [M][D*D];
  fp32_t mus [M][D];
  fp32_t csts [M], ws [M];
  fp32_t nums [M*N];
  int writes [M*N];
  int checks = 0, failures = 0, sent = 0, total_writes = 0, flags = 0;

  em_k4_estep1 #(.N(N), .D(D), .M(M)) dut (.*);

  always #5 clk = ~clk;
  always_comb for (int d = 0; d < D; d++) x_rdata[d] = xs[x_addr][d];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    for (int k = 0; k < D*D; k++) inv_data[k] = (sent < M) ? invs[sent][k] : FP_ZERO;
    for (int d = 0; d < D; d++) mean_data[d] = (sent < M) ? mus[sent][d] : FP_ZERO;
    const_data = (sent < M) ? csts[sent] : FP_ZERO;
    w_data = (sent < M) ? ws[sent] : FP_ZERO;
  end
  assign inv_valid = rst_n && sent < M;
  assign const_valid = rst_n && sent < M;
  assign mean_valid = rst_n && sent < M;
  assign w_valid = rst_n && sent < M;
  assign flag_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (inv_valid && inv_ready) sent <= sent + 1;
    if (num_we) begin
      nums[num_addr] <= num_data;
      writes[num_addr] <= writes[num_addr] + 1;
      total_writes <= total_writes + 1;
    end
    if (flag_valid && flag_ready) begin
      flags <= flags + 1;
      checks++;
      if (total_writes != M*N || num_we) begin failures++; $display("FAIL token before last write"); end
    end
  end

  initial begin
    int cycles;
    real h, diff [D], expv, t;
    for (int n = 0; n < N; n++)
      for (int d = 0; d < D; d++) xs[n][d] = r2f((real'($urandom % 2000001) - 1000000.0) / 1000.0);
    for (int m = 0; m < M; m++) begin
      // inverse covariance: symmetric, diagonally dominant, around 1/(3e5)
      for (int i = 0; i < D; i++)
        for (int j = i; j < D; j++) begin
          t = (i == j) ? (3.0 + real'($urandom % 100) / 100.0) : (real'($urandom % 100) / 100.0 - 0.5);
          invs[m][i*D+j] = r2f(t * 1.0e-6);
          invs[m][j*D+i] = invs[m][i*D+j];
        end
      for (int d = 0; d < D; d++) mus[m][d] = r2f((real'($urandom % 2001) - 1000.0) / 4.0);
      csts[m] = r2f(-10.0 - real'($urandom % 100) / 10.0);
      ws[m] = r2f(real'($urandom % 999 + 1) / 1000.0);
    end
    for (int a = 0; a < M*N; a++) writes[a] = 0;
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
    if (cycles != M * (N + 2) + 1) begin failures++; $display("FAIL cycles %0d", cycles); end
    checks++;
    if (flags != 1) begin failures++; $display("FAIL flags %0d", flags); end
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++) begin
        for (int d = 0; d < D; d++) diff[d] = f2r(xs[n][d]) - f2r(mus[m][d]);
        h = 0.0;
        for (int i = 0; i < D; i++)
          for (int j = 0; j < D; j++) h += diff[i] * diff[j] * f2r(invs[m][i*D+j]);
        expv = -0.5 * h + $ln(f2r(ws[m])) + f2r(csts[m]);
        checks++;
        if (writes[m*N+n] != 1 || !close(f2r(nums[m*N+n]), expv, 1.0e-5, 1.0e-4)) begin
          failures++;
          if (failures < 10) $display("FAIL num m%0d n%0d got %g expected %g (writes %0d)", m, n, f2r(nums[m*N+n]), expv, writes[m*N+n]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
