// tb_em_k1_mstep - self-checking test of kernel 1 (N_SUM, means, weights).
// Random samples in [-1000, 1000] and random memberships feed the kernel from testbench
// arrays. The three output channels are drained by the testbench, first always ready and then
// with random back-pressure. Every N_SUM, mean and weight is compared with a double-precision
// reference; with no back-pressure the kernel must finish in exactly M*(N+2) cycles.
module tb_em_k1_mstep;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 64, D = 3, M = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [$clog2(N)-1:0] x_addr;
  fp32_t [D-1:0] x_rdata;
  logic [$clog2(M*N)-1:0] phi_addr;
  fp32_t phi_rdata;
  logic mean_valid, mean_ready, nsum_valid, nsum_ready, w_valid, w_ready;
  fp32_t [D-1:0] mean_data;
  fp32_t nsum_data, w_data;
  fp32_t xs [N][D];
  fp32_t phis [M*N];
  int checks = 0, failures = 0;
  bit random_ready = 0;
  int got_mean = 0, got_nsum = 0, got_w = 0;
  real ref_nsum [M], ref_w [M], ref_mean [M][D];

  em_k1_mstep #(.N(N), .D(D), .M(M)) dut (.*);

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

  task automatic chk(string what, fp32_t got, real expv);
    checks++;
    if (!close(f2r(got), expv, 2.0e-5, 1.0e-3)) begin
      failures++;
      $display("FAIL %s got %g expected %g", what, f2r(got), expv);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    mean_ready <= random_ready ? ($urandom % 3 == 0) : 1'b1;
    nsum_ready <= random_ready ? ($urandom % 3 == 0) : 1'b1;
    w_ready    <= random_ready ? ($urandom % 3 == 0) : 1'b1;
    if (mean_valid && mean_ready) begin
      for (int d = 0; d < D; d++) chk("mean", mean_data[d], ref_mean[got_mean][d]);
      got_mean++;
    end
    if (nsum_valid && nsum_ready) begin chk("nsum", nsum_data, ref_nsum[got_nsum]); got_nsum++; end
    if (w_valid && w_ready) begin chk("w", w_data, ref_w[got_w]); got_w++; end
  end

  task automatic run(output int cycles);
    got_mean = 0; got_nsum = 0; got_w = 0;
    for (int n = 0; n < N; n++)
      for (int d = 0; d < D; d++) xs[n][d] = r2f((real'($urandom % 2000001) - 1000000.0) / 1000.0);
    for (int m = 0; m < M; m++) begin
      ref_nsum[m] = 0.0;
      for (int d = 0; d < D; d++) ref_mean[m][d] = 0.0;
      for (int n = 0; n < N; n++) begin
        phis[m*N+n] = r2f(real'($urandom % 1000) / 1000.0);
        ref_nsum[m] += f2r(phis[m*N+n]);
        for (int d = 0; d < D; d++) ref_mean[m][d] += f2r(phis[m*N+n]) * f2r(xs[n][d]);
      end
      for (int d = 0; d < D; d++) ref_mean[m][d] /= ref_nsum[m];
      ref_w[m] = ref_nsum[m] / N;
    end
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
    if (got_mean != M || got_nsum != M || got_w != M) begin
      failures++;
      $display("FAIL count %0d %0d %0d", got_mean, got_nsum, got_w);
    end
  endtask

  initial begin
    int cycles;
    mean_ready = 1; nsum_ready = 1; w_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(cycles);
    checks++;
    if (cycles != M * (N + 2)) begin failures++; $display("FAIL cycles %0d", cycles); end
    random_ready = 1;
    run(cycles);
    checks++;
    if (cycles <= M * (N + 2)) begin failures++; $display("FAIL no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
