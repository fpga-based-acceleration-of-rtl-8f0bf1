// em_k2_cov - kernel 2 of the EM accelerator: full covariance matrices (second M-step kernel).
//
// For every cluster m the kernel takes the mean vector mu_m and N_SUM_m from kernel 1's
// channels, then streams the N samples and their memberships phi_mn, one sample per clock,
// accumulating all D*D entries of sum_n phi_mn (x_n - mu_m)(x_n - mu_m)^T in parallel. Each
// entry is divided by N_SUM_m, giving the full (non-diagonal) covariance matrix, which goes into
// the channel to kernel 3. The mean vector it used is passed on, unchanged, into the channel to
// kernel 4, so kernel 1 needs only one mean channel.
// Interface: start pulse, busy level, done pulse on the cycle the last cluster's results are
// accepted. x_addr/phi_addr read the sample and membership arrays combinationally. Channels are
// valid/ready; the covariance word holds D*D floats, entry (d1,d2) at index d1*D+d2.
// Timing: per cluster, a wait until mean and N_SUM are available, N accumulation cycles, one
// division cycle and at least one cycle of channel writes.
// Computing the matrix entries in parallel at one sample per clock is this design's choice;
// the arithmetic and the channel connections follow the kernel description.
module em_k2_cov
  import fp32_pkg::*;
#(
  parameter int N = 1024,
  parameter int D = 2,
  parameter int M = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  output logic [$clog2(N)-1:0]       x_addr,
  input  fp32_t [D-1:0]              x_rdata,
  output logic [$clog2(M*N)-1:0]     phi_addr,
  input  fp32_t                      phi_rdata,
  input  logic                       mean_in_valid,
  output logic                       mean_in_ready,
  input  fp32_t [D-1:0]              mean_in_data,
  input  logic                       nsum_valid,
  output logic                       nsum_ready,
  input  fp32_t                      nsum_data,
  output logic                       cov_valid,
  input  logic                       cov_ready,
  output fp32_t [D*D-1:0]            cov_data,
  output logic                       mean_out_valid,
  input  logic                       mean_out_ready,
  output fp32_t [D-1:0]              mean_out_data
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_ACC, S_DIV, S_SEND} state_t;
  state_t state;

  logic [31:0] n, m;
  fp32_t nsum;
  fp32_t [D-1:0] mu;
  fp32_t [D*D-1:0] acc;
  fp32_t [D-1:0] diff;
  logic sent_cov, sent_mean, send_all;

  assign busy     = state != S_IDLE;
  assign x_addr   = $clog2(N)'(n);
  assign phi_addr = $clog2(M*N)'(m * N + n);

  assign mean_in_ready = state == S_READ && nsum_valid;
  assign nsum_ready    = state == S_READ && mean_in_valid;

  assign cov_valid      = state == S_SEND && !sent_cov;
  assign mean_out_valid = state == S_SEND && !sent_mean;
  assign mean_out_data  = mu;
  assign send_all = (sent_cov || cov_ready) && (sent_mean || mean_out_ready);
  assign done     = state == S_SEND && send_all && m == 32'(M - 1);

  always_comb begin
    for (int d = 0; d < D; d++) diff[d] = fp_sub(x_rdata[d], mu[d]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n <= '0;
      m <= '0;
      nsum <= FP_ZERO;
      mu <= '0;
      acc <= '0;
      cov_data <= '0;
      sent_cov <= 1'b0;
      sent_mean <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_READ;
          m <= '0;
        end
        S_READ: if (mean_in_valid && nsum_valid) begin
          mu <= mean_in_data;
          nsum <= nsum_data;
          acc <= '0;
          n <= '0;
          state <= S_ACC;
        end
        S_ACC: begin
          for (int i = 0; i < D; i++)
            for (int j = 0; j < D; j++)
              acc[i*D+j] <= fp_add(acc[i*D+j], fp_mul(phi_rdata, fp_mul(diff[i], diff[j])));
          if (n == 32'(N - 1)) state <= S_DIV;
          else n <= n + 1;
        end
        S_DIV: begin
          for (int k = 0; k < D*D; k++) cov_data[k] <= fp_div(acc[k], nsum);
          sent_cov <= 1'b0;
          sent_mean <= 1'b0;
          state <= S_SEND;
        end
        S_SEND: begin
          if (cov_valid && cov_ready) sent_cov <= 1'b1;
          if (mean_out_valid && mean_out_ready) sent_mean <= 1'b1;
          if (send_all) begin
            if (m == 32'(M - 1)) state <= S_IDLE;
            else begin
              m <= m + 1;
              state <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
