// em_k5_estep2 - kernel 5 of the EM accelerator: normalisation of the memberships.
//
// The kernel waits for the start token from kernel 4, which means the whole E-step buffer of
// log numerators num_mn is written. Then, for every sample n, it makes three passes over the
// M clusters: the first finds max_n = max_m num_mn, the second sums exp(num_mn - max_n), after
// which the log denominator is L_n = max_n + log(sum), and the third writes the membership
//   phi_mn = exp(num_mn - L_n)
// into the membership array at m*N + n. Subtracting the maximum (the log-sum-exp identity)
// keeps exp() within binary32 range.
// Interface: start pulse arms the kernel; busy is high from start until the last membership is
// written, and done pulses with that write. num_addr reads the E-step buffer combinationally;
// phi_we/phi_addr/phi_data write the membership array.
// Timing: after the token, 3*M + 1 cycles per sample, N*(3*M+1) cycles in all.
// The max/log-sum-exp/exp computation follows the kernel description. The kernel description
// starts the running maximum at zero; this design starts it at the first cluster's value, so
// that samples whose numerators are all far below zero do not underflow to 0/0.
module em_k5_estep2
  import fp32_pkg::*;
#(
  parameter int N = 1024,
  parameter int M = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  input  logic                       flag_valid,
  output logic                       flag_ready,
  output logic [$clog2(M*N)-1:0]     num_addr,
  input  fp32_t                      num_rdata,
  output logic                       phi_we,
  output logic [$clog2(M*N)-1:0]     phi_addr,
  output fp32_t                      phi_data
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_MAX, S_SUM, S_DEN, S_WR} state_t;
  state_t state;

  logic [31:0] n, m;
  fp32_t mx, sum, den;

  assign busy       = state != S_IDLE;
  assign flag_ready = state == S_WAIT;
  assign num_addr   = $clog2(M*N)'(m * N + n);
  assign phi_addr   = num_addr;
  assign phi_we     = state == S_WR;
  assign phi_data   = fp_exp(fp_sub(num_rdata, den));
  assign done       = state == S_WR && m == 32'(M - 1) && n == 32'(N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n <= '0;
      m <= '0;
      mx <= FP_ZERO;
      sum <= FP_ZERO;
      den <= FP_ZERO;
    end else begin
      case (state)
        S_IDLE: if (start) state <= S_WAIT;
        S_WAIT: if (flag_valid) begin
          n <= '0;
          m <= '0;
          state <= S_MAX;
        end
        S_MAX: begin
          if (m == '0 || fp_gt(num_rdata, mx)) mx <= num_rdata;
          if (m == 32'(M - 1)) begin
            m <= '0;
            sum <= FP_ZERO;
            state <= S_SUM;
          end else m <= m + 1;
        end
        S_SUM: begin
          sum <= fp_add(sum, fp_exp(fp_sub(num_rdata, mx)));
          if (m == 32'(M - 1)) state <= S_DEN;
          else m <= m + 1;
        end
        S_DEN: begin
          den <= fp_add(mx, fp_log(sum));
          m <= '0;
          state <= S_WR;
        end
        S_WR: begin
          if (m == 32'(M - 1)) begin
            m <= '0;
            if (n == 32'(N - 1)) state <= S_IDLE;
            else begin
              n <= n + 1;
              state <= S_MAX;
            end
          end else m <= m + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
