// tb_em_gmm_top - end-to-end test of the EM accelerator at reduced size (N=512, D=3, M=4).
// The testbench acts as the host: it writes a dataset of four noisy clusters in
// [-1000, 1000] and random initial memberships (normalised per sample), runs one EM iteration,
// reads all memberships back and compares them with a double-precision model of the same
// iteration; then it runs three iterations in one call and compares again with three chained
// model iterations. It counts how often the mechanisms of the design occur: a kernel waiting
// on an empty input channel (kernels 2, 3 and 4), kernel 5 waiting for its start token,
// kernels relaunched for a further iteration without host involvement, and a channel filled
// to its depth. Each of these except the last must occur at least once.
module tb_em_gmm_top;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  import tb_em_ref_pkg::*;
  localparam int N = 512, D = 3, M = 4;
  localparam int NW = $clog2(N), PW = $clog2(M*N);

  logic clk = 0, rst_n = 0;
  logic host_x_we = 0, host_phi_we = 0, start = 0;
  logic [NW-1:0] host_x_addr = '0;
  fp32_t [D-1:0] host_x_wdata = '0;
  logic [PW-1:0] host_phi_addr = '0, host_phi_raddr = '0;
  fp32_t host_phi_wdata = '0, host_phi_rdata;
  logic [15:0] iterations = 16'd1, iter_count;
  logic busy, done;

  em_gmm_top #(.N(N), .D(D), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int k2_wait = 0, k3_wait = 0, k4_wait = 0, k5_wait = 0, relaunch = 0, chan_full = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_k2.state == 3'd1 && !dut.c_mean1_rv) k2_wait++;
    if (dut.u_k3.state == 4'd1 && !dut.c_cov_rv) k3_wait++;
    if (dut.u_k4.state == 3'd1 && !dut.u_k4.all_valid) k4_wait++;
    if (dut.u_k5.state == 3'd1 && !dut.c_flag_rv) k5_wait++;
    if (dut.kstart && iter_count != 0) relaunch++;
    if (!dut.c_w_wr || !dut.c_mean1_wr || !dut.c_cov_wr || !dut.c_inv_wr) chan_full++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x [], phi [];

  task automatic run_and_compare(int iters, real tol);
    real ref_phi [];
    real err, maxerr;
    int cycles;
    ref_phi = new[M*N];
    foreach (phi[i]) ref_phi[i] = phi[i];
    for (int it = 0; it < iters; it++) em_ref_iter(N, D, M, x, ref_phi);
    @(negedge clk);
    iterations = 16'(iters);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    checks++;
    if (busy || iter_count != 16'(iters)) begin failures++; $display("FAIL busy/iter_count %0d", iter_count); end
    maxerr = 0.0;
    for (int a = 0; a < M*N; a++) begin
      host_phi_raddr = PW'(a);
      #1;
      phi[a] = f2r(host_phi_rdata);
      err = rabs(phi[a] - ref_phi[a]);
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 10) $display("FAIL phi[%0d] got %g expected %g", a, phi[a], ref_phi[a]);
      end
    end
    $display("%0d iteration(s): %0d cycles, max |phi - model| = %g", iters, cycles, maxerr);
  endtask

  initial begin
    real c [M][D];
    real s;
    x = new[N*D];
    phi = new[M*N];
    for (int m = 0; m < M; m++)
      for (int d = 0; d < D; d++) c[m][d] = real'($urandom % 1601) - 800.0;
    for (int n = 0; n < N; n++)
      for (int d = 0; d < D; d++)
        x[n*D+d] = f2r(r2f(c[n % M][d] + (real'($urandom % 30001) - 15000.0) / 100.0));
    for (int n = 0; n < N; n++) begin
      s = 0.0;
      for (int m = 0; m < M; m++) begin phi[m*N+n] = real'($urandom % 1000 + 1); s += phi[m*N+n]; end
      for (int m = 0; m < M; m++) phi[m*N+n] = f2r(r2f(phi[m*N+n] / s));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      host_x_we = 1; host_x_addr = NW'(n);
      for (int d = 0; d < D; d++) host_x_wdata[d] = r2f(x[n*D+d]);
      @(negedge clk);
    end
    host_x_we = 0;
    for (int a = 0; a < M*N; a++) begin
      host_phi_we = 1; host_phi_addr = PW'(a); host_phi_wdata = r2f(phi[a]);
      @(negedge clk);
    end
    host_phi_we = 0;
    run_and_compare(1, 2.0e-3);
    run_and_compare(3, 1.0e-2);
    $display("mechanisms: k2 channel wait %0d, k3 channel wait %0d, k4 channel wait %0d, k5 token wait %0d, relaunch %0d, channel full %0d",
             k2_wait, k3_wait, k4_wait, k5_wait, relaunch, chan_full);
    checks++; if (k2_wait == 0) begin failures++; $display("FAIL kernel 2 never waited on a channel"); end
    checks++; if (k3_wait == 0) begin failures++; $display("FAIL kernel 3 never waited on a channel"); end
    checks++; if (k4_wait == 0) begin failures++; $display("FAIL kernel 4 never waited on a channel"); end
    checks++; if (k5_wait == 0) begin failures++; $display("FAIL kernel 5 never waited for its token"); end
    checks++; if (relaunch == 0) begin failures++; $display("FAIL no relaunch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
