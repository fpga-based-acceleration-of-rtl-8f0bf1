// tb_em_case - one EM-iteration test case of the accelerator at a chosen size, used by
// tb_em_workloads. It writes a dataset of M noisy clusters in [-1000, 1000] and random
// initial memberships through the host ports, runs one iteration, reads every membership back
// and compares it with the double-precision model. Its results appear on its ports when
// `finished` rises.
module tb_em_case #(
  parameter int N = 256,
  parameter int D = 2,
  parameter int M = 2
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  import tb_em_ref_pkg::*;
  localparam int NW = $clog2(N), PW = $clog2(M*N);

  logic rst_n = 0;
  logic host_x_we = 0, host_phi_we = 0, start = 0;
  logic [NW-1:0] host_x_addr = '0;
  fp32_t [D-1:0] host_x_wdata = '0;
  logic [PW-1:0] host_phi_addr = '0, host_phi_raddr = '0;
  fp32_t host_phi_wdata = '0, host_phi_rdata;
  logic [15:0] iterations = 16'd1, iter_count;
  logic busy, done;

  em_gmm_top #(.N(N), .D(D), .M(M)) dut (.*);

  real x [], phi [];

  initial begin
    real c [M][D];
    real s, err, maxerr;
    finished = 0; checks = 0; failures = 0; cycles = 0;
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
    em_ref_iter(N, D, M, x, phi);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    maxerr = 0.0;
    for (int a = 0; a < M*N; a++) begin
      host_phi_raddr = PW'(a);
      #1;
      err = rabs(f2r(host_phi_rdata) - phi[a]);
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 2.0e-3) begin
        failures++;
        if (failures < 5) $display("FAIL D=%0d M=%0d phi[%0d] got %g expected %g", D, M, a, f2r(host_phi_rdata), phi[a]);
      end
    end
    $display("D=%0d M=%0d N=%0d: %0d cycles, max |phi - model| = %g", D, M, N, cycles, maxerr);
    finished = 1;
  end
endmodule
