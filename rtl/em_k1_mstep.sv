// em_k1_mstep - kernel 1 of the EM accelerator: M-step sums, means and weights.
//
// For every cluster m in turn the kernel streams all N samples x_n and their membership
// values phi_mn out of the global memory, one sample per clock, and accumulates
//   N_SUM_m = sum_n phi_mn              and   S_md = sum_n phi_mn * x_nd (all D dimensions
//   in parallel).
// It then divides, mu_md = S_md / N_SUM_m and w_m = N_SUM_m / N, and writes the mean vector and
// N_SUM_m into the channels to kernel 2 and the weight into the channel to kernel 4.
// All arithmetic is binary32 (fp32_pkg).
// Interface: a start pulse begins one M-step over all clusters; busy is high until the last
// cluster's results are in the channels, and done pulses in that last cycle. x_addr/phi_addr
// address the sample array (one D-vector per word) and the membership array (word m*N + n);
// both are read combinationally. Each output channel is valid/ready.
// Timing: N cycles of accumulation, one cycle of division and at least one cycle of channel
// writes per cluster, i.e. about M*(N+2) cycles when no channel is full.
// The algorithm follows the kernel description. Accumulating N_SUM and the weighted sample sum
// in the same pass over the data, rather than in two passes, is this design's choice.
module em_k1_mstep
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
  output logic                       mean_valid,
  input  logic                       mean_ready,
  output fp32_t [D-1:0]              mean_data,
  output logic                       nsum_valid,
  input  logic                       nsum_ready,
  output fp32_t                      nsum_data,
  output logic                       w_valid,
  input  logic                       w_ready,
  output fp32_t                      w_data
);
  typedef enum logic [1:0] {S_IDLE, S_ACC, S_DIV, S_SEND} state_t;
  state_t state;

  logic [31:0] n, m;
  fp32_t nsum;
  fp32_t [D-1:0] acc;
  logic sent_mean, sent_nsum, sent_w;
  logic send_all;

  localparam fp32_t N_FP = fp_from_uint(32'(N));

  assign busy     = state != S_IDLE;
  assign x_addr   = $clog2(N)'(n);
  assign phi_addr = $clog2(M*N)'(m * N + n);

  assign mean_valid = state == S_SEND && !sent_mean;
  assign nsum_valid = state == S_SEND && !sent_nsum;
  assign w_valid    = state == S_SEND && !sent_w;
  assign send_all   = (sent_mean || mean_ready) && (sent_nsum || nsum_ready) && (sent_w || w_ready);
  assign done       = state == S_SEND && send_all && m == 32'(M - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n <= '0;
      m <= '0;
      nsum <= FP_ZERO;
      acc <= '0;
      mean_data <= '0;
      nsum_data <= FP_ZERO;
      w_data <= FP_ZERO;
      sent_mean <= 1'b0;
      sent_nsum <= 1'b0;
      sent_w <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_ACC;
          n <= '0;
          m <= '0;
          nsum <= FP_ZERO;
          acc <= '0;
        end
        S_ACC: begin
          nsum <= fp_add(nsum, phi_rdata);
          for (int d = 0; d < D; d++) acc[d] <= fp_add(acc[d], fp_mul(x_rdata[d], phi_rdata));
          if (n == 32'(N - 1)) state <= S_DIV;
          else n <= n + 1;
        end
        S_DIV: begin
          for (int d = 0; d < D; d++) mean_data[d] <= fp_div(acc[d], nsum);
          nsum_data <= nsum;
          w_data <= fp_div(nsum, N_FP);
          sent_mean <= 1'b0;
          sent_nsum <= 1'b0;
          sent_w <= 1'b0;
          state <= S_SEND;
        end
        S_SEND: begin
          if (mean_valid && mean_ready) sent_mean <= 1'b1;
          if (nsum_valid && nsum_ready) sent_nsum <= 1'b1;
          if (w_valid && w_ready) sent_w <= 1'b1;
          if (send_all) begin
            if (m == 32'(M - 1)) begin
              state <= S_IDLE;
            end else begin
              m <= m + 1;
              n <= '0;
              nsum <= FP_ZERO;
              acc <= '0;
              state <= S_ACC;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
