// tb_em_k5_estep2 - self-checking test of kernel 5 (membership normalisation).
// The E-step buffer is filled with log numerators far below zero (-900 to -100, where a
// plain exp() underflows binary32), so only the max-subtracted log-sum-exp gives usable
// memberships. The start token is offered only after a delay: the kernel must write nothing
// before it, then take exactly N*(3M+1) cycles. Every membership is compared with a
// double-precision reference, and the memberships of each sample must sum to one.
module tb_em_k5_estep2;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 64, M = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic flag_valid, flag_ready;
  logic [$clog2(M*N)-1:0] num_addr, phi_addr;
  fp32_t num_rdata, phi_data;
  logic phi_we;
  fp32_t nums [M*N];
  fp32_t phis [M*N];
  int checks = 0, failures = 0, early_writes = 0;
  bit token_sent = 0;

  em_k5_estep2 #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;
  assign num_rdata = nums[num_addr];
  assign flag_valid = token_sent;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (phi_we) phis[phi_addr] <= phi_data;
    if (phi_we && !token_sent) early_writes <= early_writes + 1;
    if (flag_valid && flag_ready) token_sent <= 0;
  end

  initial begin
    int cycles;
    real mx, s, expv, tot;
    for (int a = 0; a < M*N; a++) nums[a] = r2f(-100.0 - real'($urandom % 80000) / 100.0);
    // a few samples with one dominant cluster and ties
    nums[0*N+1] = r2f(-150.0); nums[1*N+1] = r2f(-150.0);
    nums[2*N+1] = r2f(-150.0); nums[3*N+1] = r2f(-150.0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (!busy || early_writes != 0) begin failures++; $display("FAIL did not wait for token"); end
    token_sent = 1;
    cycles = 0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != N * (3 * M + 1) + 1) begin failures++; $display("FAIL cycles %0d", cycles); end
    for (int n = 0; n < N; n++) begin
      mx = f2r(nums[n]);
      for (int m = 1; m < M; m++) if (f2r(nums[m*N+n]) > mx) mx = f2r(nums[m*N+n]);
      s = 0.0;
      for (int m = 0; m < M; m++) s += $exp(f2r(nums[m*N+n]) - mx);
      tot = 0.0;
      for (int m = 0; m < M; m++) begin
        expv = $exp(f2r(nums[m*N+n]) - mx - $ln(s));
        tot += f2r(phis[m*N+n]);
        checks++;
        if (!close(f2r(phis[m*N+n]), expv, 1.0e-4, 1.0e-6)) begin
          failures++;
          $display("FAIL phi m%0d n%0d got %g expected %g", m, n, f2r(phis[m*N+n]), expv);
        end
      end
      checks++;
      if (!close(tot, 1.0, 0.0, 1.0e-4)) begin failures++; $display("FAIL sum %g", tot); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
