// em_gmm_top - Expectation-Maximisation accelerator for Gaussian mixture models.
//
// One EM iteration for N samples of dimension D and M Gaussian clusters with full covariance
// matrices. The iteration starts with the M-step, using the memberships left by the previous
// E-step (or written by the host before the first iteration), and ends with a new set of
// memberships:
//   kernel 1 (em_k1_mstep)   N_SUM_m, means and weights
//   kernel 2 (em_k2_cov)     covariance matrices
//   kernel 3 (em_k3_inv)     inverse covariances and Gaussian constants (LU decomposition)
//   kernel 4 (em_k4_estep1)  log numerators of the memberships -> E-step buffer
//   kernel 5 (em_k5_estep2)  log-sum-exp normalisation -> membership array
// Kernels 1-4 run concurrently and hand their per-cluster results on through FIFO channels
// (em_channel), each as deep as there are clusters; a kernel stalls on an empty input channel
// or a full output channel. Kernel 4 writes the log numerators to memory, because kernel 5
// needs all clusters of a sample at once, and releases kernel 5 with a token on a one-entry
// channel. Three em_ram arrays stand for the global memory: samples (one D-vector per word),
// memberships and the E-step buffer (one float per word, cluster-major: address m*N + n).
// Host side: while idle the host writes samples (host_x_*) and initial memberships
// (host_phi_*) and reads memberships back (host_phi_raddr/rdata, combinational). A start pulse
// runs `iterations` EM iterations back to back (the host normally checks convergence between
// calls); busy stays high until then, done pulses at the end, iter_count counts finished
// iterations.
// The kernel split, the channel set and the memory arrays follow the accelerator's description.
// The iteration counter, the host ports and single-cycle memories are this design's choices.
module em_gmm_top
  import fp32_pkg::*;
#(
  parameter int N = 1048576,
  parameter int D = 2,
  parameter int M = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       host_x_we,
  input  logic [$clog2(N)-1:0]       host_x_addr,
  input  fp32_t [D-1:0]              host_x_wdata,
  input  logic                       host_phi_we,
  input  logic [$clog2(M*N)-1:0]     host_phi_addr,
  input  fp32_t                      host_phi_wdata,
  input  logic [$clog2(M*N)-1:0]     host_phi_raddr,
  output fp32_t                      host_phi_rdata,
  input  logic                       start,
  input  logic [15:0]                iterations,
  output logic                       busy,
  output logic                       done,
  output logic [15:0]                iter_count
);
  localparam int NW = $clog2(N);
  localparam int PW = $clog2(M*N);

  // ---------------- iteration control ----------------
  typedef enum logic [1:0] {T_IDLE, T_LAUNCH, T_RUN} tstate_t;
  tstate_t tstate;
  logic [15:0] iter_target;
  logic kstart;
  logic [4:0] kbusy, kdone;

  assign kstart = tstate == T_LAUNCH;
  assign busy   = tstate != T_IDLE;
  assign done   = tstate == T_RUN && kbusy == '0 && iter_count + 16'd1 >= iter_target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate <= T_IDLE;
      iter_target <= '0;
      iter_count <= '0;
    end else begin
      case (tstate)
        T_IDLE: if (start) begin
          iter_target <= (iterations == '0) ? 16'd1 : iterations;
          iter_count <= '0;
          tstate <= T_LAUNCH;
        end
        T_LAUNCH: tstate <= T_RUN;
        T_RUN: if (kbusy == '0) begin
          iter_count <= iter_count + 16'd1;
          tstate <= (iter_count + 16'd1 >= iter_target) ? T_IDLE : T_LAUNCH;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  // ---------------- global memory ----------------
  logic [NW-1:0] k1_x_addr, k2_x_addr, k4_x_addr;
  fp32_t [D-1:0] k1_x, k2_x, k4_x;
  logic [PW-1:0] k1_phi_addr, k2_phi_addr;
  fp32_t k1_phi, k2_phi;
  logic k5_phi_we;
  logic [PW-1:0] k5_phi_addr;
  fp32_t k5_phi_data;
  logic k4_num_we;
  logic [PW-1:0] k4_num_addr, k5_num_addr;
  fp32_t k4_num_data, k5_num;

  logic [NW-1:0] x_raddr [3];
  logic [D*32-1:0] x_rdata [3];
  logic [PW-1:0] phi_raddr [3];
  logic [31:0] phi_rdata [3];
  logic [PW-1:0] num_raddr [1];
  logic [31:0] num_rdata [1];

  assign x_raddr = '{k1_x_addr, k2_x_addr, k4_x_addr};
  assign k1_x = x_rdata[0];
  assign k2_x = x_rdata[1];
  assign k4_x = x_rdata[2];
  assign phi_raddr = '{k1_phi_addr, k2_phi_addr, host_phi_raddr};
  assign k1_phi = phi_rdata[0];
  assign k2_phi = phi_rdata[1];
  assign host_phi_rdata = phi_rdata[2];
  assign num_raddr[0] = k5_num_addr;
  assign k5_num = num_rdata[0];

  em_ram #(.WIDTH(D*32), .DEPTH(N), .NR(3)) u_x_mem (
    .clk, .we(host_x_we && !busy), .waddr(host_x_addr), .wdata(host_x_wdata),
    .raddr(x_raddr), .rdata(x_rdata)
  );

  em_ram #(.WIDTH(32), .DEPTH(M*N), .NR(3)) u_phi_mem (
    .clk,
    .we(busy ? k5_phi_we : host_phi_we),
    .waddr(busy ? k5_phi_addr : host_phi_addr),
    .wdata(busy ? k5_phi_data : host_phi_wdata),
    .raddr(phi_raddr), .rdata(phi_rdata)
  );

  em_ram #(.WIDTH(32), .DEPTH(M*N), .NR(1)) u_num_mem (
    .clk, .we(k4_num_we), .waddr(k4_num_addr), .wdata(k4_num_data),
    .raddr(num_raddr), .rdata(num_rdata)
  );

  // ---------------- channels ----------------
  logic c_mean1_wv, c_mean1_wr, c_mean1_rv, c_mean1_rr;
  fp32_t [D-1:0] c_mean1_wd, c_mean1_rd;
  logic c_nsum_wv, c_nsum_wr, c_nsum_rv, c_nsum_rr;
  fp32_t c_nsum_wd, c_nsum_rd;
  logic c_w_wv, c_w_wr, c_w_rv, c_w_rr;
  fp32_t c_w_wd, c_w_rd;
  logic c_cov_wv, c_cov_wr, c_cov_rv, c_cov_rr;
  fp32_t [D*D-1:0] c_cov_wd, c_cov_rd;
  logic c_mean2_wv, c_mean2_wr, c_mean2_rv, c_mean2_rr;
  fp32_t [D-1:0] c_mean2_wd, c_mean2_rd;
  logic c_inv_wv, c_inv_wr, c_inv_rv, c_inv_rr;
  fp32_t [D*D-1:0] c_inv_wd, c_inv_rd;
  logic c_const_wv, c_const_wr, c_const_rv, c_const_rr;
  fp32_t c_const_wd, c_const_rd;
  logic c_flag_wv, c_flag_wr, c_flag_rv, c_flag_rr;
  logic c_flag_rd;

  em_channel #(.WIDTH(D*32), .DEPTH(M)) u_ch_mean1 (.clk, .rst_n,
    .wr_valid(c_mean1_wv), .wr_ready(c_mean1_wr), .wr_data(c_mean1_wd),
    .rd_valid(c_mean1_rv), .rd_ready(c_mean1_rr), .rd_data(c_mean1_rd));
  em_channel #(.WIDTH(32), .DEPTH(M)) u_ch_nsum (.clk, .rst_n,
    .wr_valid(c_nsum_wv), .wr_ready(c_nsum_wr), .wr_data(c_nsum_wd),
    .rd_valid(c_nsum_rv), .rd_ready(c_nsum_rr), .rd_data(c_nsum_rd));
  em_channel #(.WIDTH(32), .DEPTH(M)) u_ch_w (.clk, .rst_n,
    .wr_valid(c_w_wv), .wr_ready(c_w_wr), .wr_data(c_w_wd),
    .rd_valid(c_w_rv), .rd_ready(c_w_rr), .rd_data(c_w_rd));
  em_channel #(.WIDTH(D*D*32), .DEPTH(M)) u_ch_cov (.clk, .rst_n,
    .wr_valid(c_cov_wv), .wr_ready(c_cov_wr), .wr_data(c_cov_wd),
    .rd_valid(c_cov_rv), .rd_ready(c_cov_rr), .rd_data(c_cov_rd));
  em_channel #(.WIDTH(D*32), .DEPTH(M)) u_ch_mean2 (.clk, .rst_n,
    .wr_valid(c_mean2_wv), .wr_ready(c_mean2_wr), .wr_data(c_mean2_wd),
    .rd_valid(c_mean2_rv), .rd_ready(c_mean2_rr), .rd_data(c_mean2_rd));
  em_channel #(.WIDTH(D*D*32), .DEPTH(M)) u_ch_inv (.clk, .rst_n,
    .wr_valid(c_inv_wv), .wr_ready(c_inv_wr), .wr_data(c_inv_wd),
    .rd_valid(c_inv_rv), .rd_ready(c_inv_rr), .rd_data(c_inv_rd));
  em_channel #(.WIDTH(32), .DEPTH(M)) u_ch_const (.clk, .rst_n,
    .wr_valid(c_const_wv), .wr_ready(c_const_wr), .wr_data(c_const_wd),
    .rd_valid(c_const_rv), .rd_ready(c_const_rr), .rd_data(c_const_rd));
  em_channel #(.WIDTH(1), .DEPTH(1)) u_ch_flag (.clk, .rst_n,
    .wr_valid(c_flag_wv), .wr_ready(c_flag_wr), .wr_data(1'b1),
    .rd_valid(c_flag_rv), .rd_ready(c_flag_rr), .rd_data(c_flag_rd));

  // ---------------- kernels ----------------
  em_k1_mstep #(.N(N), .D(D), .M(M)) u_k1 (
    .clk, .rst_n, .start(kstart), .busy(kbusy[0]), .done(kdone[0]),
    .x_addr(k1_x_addr), .x_rdata(k1_x), .phi_addr(k1_phi_addr), .phi_rdata(k1_phi),
    .mean_valid(c_mean1_wv), .mean_ready(c_mean1_wr), .mean_data(c_mean1_wd),
    .nsum_valid(c_nsum_wv), .nsum_ready(c_nsum_wr), .nsum_data(c_nsum_wd),
    .w_valid(c_w_wv), .w_ready(c_w_wr), .w_data(c_w_wd));

  em_k2_cov #(.N(N), .D(D), .M(M)) u_k2 (
    .clk, .rst_n, .start(kstart), .busy(kbusy[1]), .done(kdone[1]),
    .x_addr(k2_x_addr), .x_rdata(k2_x), .phi_addr(k2_phi_addr), .phi_rdata(k2_phi),
    .mean_in_valid(c_mean1_rv), .mean_in_ready(c_mean1_rr), .mean_in_data(c_mean1_rd),
    .nsum_valid(c_nsum_rv), .nsum_ready(c_nsum_rr), .nsum_data(c_nsum_rd),
    .cov_valid(c_cov_wv), .cov_ready(c_cov_wr), .cov_data(c_cov_wd),
    .mean_out_valid(c_mean2_wv), .mean_out_ready(c_mean2_wr), .mean_out_data(c_mean2_wd));

  em_k3_inv #(.D(D), .M(M)) u_k3 (
    .clk, .rst_n, .start(kstart), .busy(kbusy[2]), .done(kdone[2]),
    .cov_valid(c_cov_rv), .cov_ready(c_cov_rr), .cov_data(c_cov_rd),
    .inv_valid(c_inv_wv), .inv_ready(c_inv_wr), .inv_data(c_inv_wd),
    .const_valid(c_const_wv), .const_ready(c_const_wr), .const_data(c_const_wd));

  em_k4_estep1 #(.N(N), .D(D), .M(M)) u_k4 (
    .clk, .rst_n, .start(kstart), .busy(kbusy[3]), .done(kdone[3]),
    .x_addr(k4_x_addr), .x_rdata(k4_x),
    .inv_valid(c_inv_rv), .inv_ready(c_inv_rr), .inv_data(c_inv_rd),
    .const_valid(c_const_rv), .const_ready(c_const_rr), .const_data(c_const_rd),
    .mean_valid(c_mean2_rv), .mean_ready(c_mean2_rr), .mean_data(c_mean2_rd),
    .w_valid(c_w_rv), .w_ready(c_w_rr), .w_data(c_w_rd),
    .num_we(k4_num_we), .num_addr(k4_num_addr), .num_data(k4_num_data),
    .flag_valid(c_flag_wv), .flag_ready(c_flag_wr));

  em_k5_estep2 #(.N(N), .M(M)) u_k5 (
    .clk, .rst_n, .start(kstart), .busy(kbusy[4]), .done(kdone[4]),
    .flag_valid(c_flag_rv), .flag_ready(c_flag_rr),
    .num_addr(k5_num_addr), .num_rdata(k5_num),
    .phi_we(k5_phi_we), .phi_addr(k5_phi_addr), .phi_data(k5_phi_data));

  // the start token carries no value: only its arrival matters
  logic unused_flag;
  assign unused_flag = c_flag_rd ^ ^kdone;
endmodule
