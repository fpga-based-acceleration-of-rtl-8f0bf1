// em_k4_estep1 - kernel 4 of the EM accelerator: E-step numerators in the log domain.
//
// For every cluster m the kernel collects the cluster's parameters from four channels: the
// inverse covariance matrix and the constant from kernel 3, the mean from kernel 2 and the
// weight from kernel 1. It then streams all N samples, one per clock, and computes for each
//   h_mn   = sum_{d1,d2} (x_nd1 - mu_md1)(x_nd2 - mu_md2) * Theta^-1_m[d1][d2]
//   num_mn = -h_mn/2 + log(w_m) + const_m
// i.e. the logarithm of w_m times the Gaussian density, which is written to the E-step buffer
// in global memory at address m*N + n. Working with logarithms avoids the overflow and
// underflow of exp() in binary32. After the last sample of the last cluster the kernel writes
// a start token into the channel that releases kernel 5.
// Interface: start pulse, busy level, done pulse on the cycle the start token is accepted.
// x_addr reads the sample array combinationally; num_we/num_addr/num_data write the buffer.
// Timing: per cluster, a wait for all four channels, one cycle for log(w_m), then N cycles,
// one sample per clock; one more cycle for the start token.
// Formula and channel connections follow the kernel description; the parallel evaluation of
// all D*D terms within one clock is this design's choice.
module em_k4_estep1
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
  input  logic                       inv_valid,
  output logic                       inv_ready,
  input  fp32_t [D*D-1:0]            inv_data,
  input  logic                       const_valid,
  output logic                       const_ready,
  input  fp32_t                      const_data,
  input  logic                       mean_valid,
  output logic                       mean_ready,
  input  fp32_t [D-1:0]              mean_data,
  input  logic                       w_valid,
  output logic                       w_ready,
  input  fp32_t                      w_data,
  output logic                       num_we,
  output logic [$clog2(M*N)-1:0]     num_addr,
  output fp32_t                      num_data,
  output logic                       flag_valid,
  input  logic                       flag_ready
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_LOGW, S_RUN, S_FLAG} state_t;
  state_t state;

  logic [31:0] n, m;
  fp32_t [D*D-1:0] inv;
  fp32_t [D-1:0] mu;
  fp32_t cst, w, logw;
  fp32_t [D-1:0] diff;
  fp32_t h;
  logic all_valid;

  assign busy       = state != S_IDLE;
  assign x_addr     = $clog2(N)'(n);
  assign all_valid  = inv_valid && const_valid && mean_valid && w_valid;
  assign inv_ready   = state == S_READ && all_valid;
  assign const_ready = state == S_READ && all_valid;
  assign mean_ready  = state == S_READ && all_valid;
  assign w_ready     = state == S_READ && all_valid;
  assign flag_valid  = state == S_FLAG;
  assign done        = state == S_FLAG && flag_ready;

  always_comb begin
    for (int d = 0; d < D; d++) diff[d] = fp_sub(x_rdata[d], mu[d]);
    h = FP_ZERO;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++)
        h = fp_add(h, fp_mul(fp_mul(diff[i], diff[j]), inv[i*D+j]));
  end

  assign num_we   = state == S_RUN;
  assign num_addr = $clog2(M*N)'(m * N + n);
  assign num_data = fp_add(fp_add(fp_mul(FP_NEGHALF, h), logw), cst);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n <= '0;
      m <= '0;
      inv <= '0;
      mu <= '0;
      cst <= FP_ZERO;
      w <= FP_ZERO;
      logw <= FP_ZERO;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          m <= '0;
          state <= S_READ;
        end
        S_READ: if (all_valid) begin
          inv <= inv_data;
          mu <= mean_data;
          cst <= const_data;
          w <= w_data;
          state <= S_LOGW;
        end
        S_LOGW: begin
          logw <= fp_log(w);
          n <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (n == 32'(N - 1)) begin
            if (m == 32'(M - 1)) state <= S_FLAG;
            else begin
              m <= m + 1;
              state <= S_READ;
            end
          end else begin
            n <= n + 1;
          end
        end
        S_FLAG: if (flag_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
