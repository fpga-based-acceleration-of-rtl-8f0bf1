// tb_em_gmm_full - one complete EM iteration of the accelerator at its default size:
// N = 2^20 samples, D = 2 dimensions, M = 2 clusters. As in the evaluation of the
// accelerator, the samples are uniform random values in [-1000, 1000]. The testbench writes
// the dataset and random initial memberships through the host ports, runs one iteration,
// reads back all 2^21 memberships and compares them with a double-precision model of the
// same iteration. It prints the cycle count of the iteration.
module tb_em_gmm_full;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  import tb_em_ref_pkg::*;
  localparam int N = 1048576, D = 2, M = 2;
  localparam int NW = $clog2(N), PW = $clog2(M*N);

  logic clk = 0, rst_n = 0;
  logic host_x_we = 0, host_phi_we = 0, start = 0;
  logic [NW-1:0] host_x_addr = '0;
  fp32_t [D-1:0] host_x_wdata = '0;
  logic [PW-1:0] host_phi_addr = '0, host_phi_raddr = '0;
  fp32_t host_phi_wdata = '0, host_phi_rdata;
  logic [15:0] iterations = 16'd1, iter_count;
  logic busy, done;

  em_gmm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x [], phi [], ref_phi [];

  initial begin
    real s, err, maxerr, sumerr;
    int cycles;
    x = new[N*D];
    phi = new[M*N];
    ref_phi = new[M*N];
    for (int i = 0; i < N*D; i++) x[i] = f2r(r2f((real'($urandom % 2000001) - 1000000.0) / 1000.0));
    for (int n = 0; n < N; n++) begin
      s = 0.0;
      for (int m = 0; m < M; m++) begin phi[m*N+n] = real'($urandom % 1000 + 1); s += phi[m*N+n]; end
      for (int m = 0; m < M; m++) phi[m*N+n] = f2r(r2f(phi[m*N+n] / s));
    end
    foreach (phi[i]) ref_phi[i] = phi[i];
    em_ref_iter(N, D, M, x, ref_phi);
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
    if (busy || iter_count != 16'd1) begin failures++; $display("FAIL busy/iter_count"); end
    maxerr = 0.0;
    sumerr = 0.0;
    for (int a = 0; a < M*N; a++) begin
      host_phi_raddr = PW'(a);
      #1;
      err = rabs(f2r(host_phi_rdata) - ref_phi[a]);
      sumerr += err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 1.0e-2) begin
        failures++;
        if (failures < 10) $display("FAIL phi[%0d] got %g expected %g", a, f2r(host_phi_rdata), ref_phi[a]);
      end
    end
    $display("one iteration, N=%0d D=%0d M=%0d: %0d cycles, max |phi - model| = %g, mean %g",
             N, D, M, cycles, maxerr, sumerr / (M*N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
