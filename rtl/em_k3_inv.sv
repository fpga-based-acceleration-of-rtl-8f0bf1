// em_k3_inv - kernel 3 of the EM accelerator: inverse covariance and Gaussian constant.
//
// For every cluster the kernel reads one D*D covariance matrix from kernel 2's channel,
// factors it in place into L*U (Doolittle form, unit diagonal in L, no pivoting), sums
// log|U_ii| to get the log determinant, and solves L*U*v = e_c column by column (forward then
// backward substitution) to build the inverse. It then forms the Gaussian normalising constant
//   const_m = log( 1 / ((2*pi)^(D/2) * |Theta_m|^(1/2)) ) = -(D/2)*ln(2*pi) - logdet/2
// and writes the inverse matrix and const_m into the channels to kernel 4.
// The datapath is sequential: one floating-point multiply-subtract (or divide, or log-add) per
// clock, on a register copy of the matrix.
// Interface: start pulse, busy level, done pulse when the last cluster's results are accepted.
// Channels are valid/ready; matrix entry (d1,d2) is word index d1*D+d2.
// Timing: per cluster about D^3/3 cycles of factorisation, D cycles of log determinant,
// about D^3 cycles of substitution, one constant cycle and one or more output cycles.
// Using LU decomposition and the log determinant follows the kernel description; the
// Doolittle form, the omission of pivoting (a covariance matrix is symmetric positive
// definite) and the one-operation-per-clock schedule are this design's choices.
module em_k3_inv
  import fp32_pkg::*;
#(
  parameter int D = 2,
  parameter int M = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic              cov_valid,
  output logic              cov_ready,
  input  fp32_t [D*D-1:0]   cov_data,
  output logic              inv_valid,
  input  logic              inv_ready,
  output fp32_t [D*D-1:0]   inv_data,
  output logic              const_valid,
  input  logic              const_ready,
  output fp32_t             const_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_READ, S_LU_K, S_LU_I, S_LU_J, S_LOGDET, S_FWD, S_BWD, S_CONST, S_SEND
  } state_t;
  state_t state;

  localparam int IW = $clog2(D + 1) + 1;
  localparam logic [IW-1:0] DM1 = IW'(D - 1);
  localparam fp32_t D_FP = fp_from_uint(32'(D));

  logic [31:0] m;
  fp32_t a [D][D];
  fp32_t v [D];
  fp32_t acc, logdet;
  logic [IW-1:0] i, j, k, c;
  logic sent_inv, sent_const, send_all;

  assign busy        = state != S_IDLE;
  assign cov_ready   = state == S_READ;
  assign inv_valid   = state == S_SEND && !sent_inv;
  assign const_valid = state == S_SEND && !sent_const;
  assign send_all    = (sent_inv || inv_ready) && (sent_const || const_ready);
  assign done        = state == S_SEND && send_all && m == 32'(M - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      m <= '0;
      i <= '0;
      j <= '0;
      k <= '0;
      c <= '0;
      acc <= FP_ZERO;
      logdet <= FP_ZERO;
      inv_data <= '0;
      const_data <= FP_ZERO;
      sent_inv <= 1'b0;
      sent_const <= 1'b0;
      for (int r = 0; r < D; r++) begin
        v[r] <= FP_ZERO;
        for (int q = 0; q < D; q++) a[r][q] <= FP_ZERO;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          m <= '0;
          state <= S_READ;
        end
        S_READ: if (cov_valid) begin
          for (int r = 0; r < D; r++)
            for (int q = 0; q < D; q++) a[r][q] <= cov_data[r*D+q];
          k <= '0;
          state <= S_LU_K;
        end
        // pivot column k: eliminate rows k+1..D-1
        S_LU_K: begin
          if (k == DM1) begin
            i <= '0;
            logdet <= FP_ZERO;
            state <= S_LOGDET;
          end else begin
            i <= k + 1;
            state <= S_LU_I;
          end
        end
        S_LU_I: begin
          a[i][k] <= fp_div(a[i][k], a[k][k]);
          j <= k + 1;
          state <= S_LU_J;
        end
        S_LU_J: begin
          a[i][j] <= fp_sub(a[i][j], fp_mul(a[i][k], a[k][j]));
          if (j == DM1) begin
            if (i == DM1) begin
              k <= k + 1;
              state <= S_LU_K;
            end else begin
              i <= i + 1;
              state <= S_LU_I;
            end
          end else begin
            j <= j + 1;
          end
        end
        S_LOGDET: begin
          logdet <= fp_add(logdet, fp_log(fp_abs(a[i][i])));
          if (i == DM1) begin
            c <= '0;
            i <= '0;
            j <= '0;
            acc <= FP_ONE;
            state <= S_FWD;
          end else begin
            i <= i + 1;
          end
        end
        // forward substitution, unit lower triangle: v_i = e_c(i) - sum_{j<i} L_ij v_j
        S_FWD: begin
          if (j < i) begin
            acc <= fp_sub(acc, fp_mul(a[i][j], v[j]));
            j <= j + 1;
          end else begin
            v[i] <= acc;
            if (i == DM1) begin
              j <= IW'(D);
              state <= S_BWD;
            end else begin
              i <= i + 1;
              j <= '0;
              acc <= (i + 1 == c) ? FP_ONE : FP_ZERO;
            end
          end
        end
        // backward substitution: v_i = (v_i - sum_{j>i} U_ij v_j) / U_ii
        S_BWD: begin
          if (j <= DM1) begin
            acc <= fp_sub(acc, fp_mul(a[i][j], v[j]));
            j <= j + 1;
          end else begin
            v[i] <= fp_div(acc, a[i][i]);
            inv_data[i*D+c] <= fp_div(acc, a[i][i]);
            if (i == '0) begin
              if (c == DM1) begin
                state <= S_CONST;
              end else begin
                c <= c + 1;
                i <= '0;
                j <= '0;
                acc <= FP_ZERO;  // row 0 of e_(c+1) is zero
                state <= S_FWD;
              end
            end else begin
              i <= i - 1;
              j <= i;
              acc <= v[i-1];
            end
          end
        end
        S_CONST: begin
          const_data <= fp_neg(fp_add(fp_mul(D_FP, FP_HALF_LN_2PI), fp_mul(FP_HALF, logdet)));
          sent_inv <= 1'b0;
          sent_const <= 1'b0;
          state <= S_SEND;
        end
        S_SEND: begin
          if (inv_valid && inv_ready) sent_inv <= 1'b1;
          if (const_valid && const_ready) sent_const <= 1'b1;
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
