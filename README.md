# Streaming EM accelerator for Gaussian mixture models

This is synthesizable SystemVerilog for an accelerator that fits a Gaussian mixture model
(GMM) to a dataset with the Expectation-Maximisation (EM) algorithm. It uses full, not
diagonal, covariance matrices. The design renders in RTL the five-kernel OpenCL accelerator
described in the 2017 master's thesis *FPGA-Based Acceleration of Expectation Maximization
Algorithm using High Level Synthesis* (M. A. Momen, University of Windsor). This is an
independent implementation. Where it departs from that design, the section
"Departures from the OpenCL design" says so.

The main idea: one EM iteration is split into five hardware kernels. The first four pass
per-cluster results to each other through small FIFO channels, not through memory, so they
run at the same time. Only two kinds of data live in memory: the dataset and the
per-sample memberships. A third memory region holds the per-sample log-likelihoods. The
E-step works entirely with logarithms, so the Gaussian densities never overflow or underflow
32-bit floating point.

## What one iteration computes

The inputs are N samples x_n of dimension D and M clusters. Each sample has a membership
phi_mn ≥ 0 in each cluster, and its memberships sum to 1. The iteration begins with the
M-step and ends with the E-step, so its input is the memberships of the previous iteration.
Before the first iteration the host supplies an initial set.

M-step, for each cluster m:

    N_SUM_m  = Σ_n phi_mn
    mu_m     = Σ_n phi_mn x_n / N_SUM_m
    w_m      = N_SUM_m / N
    Theta_m  = Σ_n phi_mn (x_n - mu_m)(x_n - mu_m)^T / N_SUM_m        (full D×D matrix)

Preparation for the E-step: the inverse Theta_m^-1, and the constant
`const_m = -(D/2) ln(2π) - ½ ln det Theta_m`.

E-step, in the log domain:

    num_mn = -½ (x_n - mu_m)^T Theta_m^-1 (x_n - mu_m) + ln w_m + const_m   (= ln(w_m · N(x_n; mu_m, Theta_m)))
    L_n    = max_m num_mn + ln Σ_m exp(num_mn - max_m num_mn)             (log-sum-exp)
    phi_mn = exp(num_mn - L_n)

The host decides when to stop (convergence of the likelihood). The hardware runs a requested
number of iterations back to back.

## Dataflow: five kernels and eight channels

```
             samples x ───────────┬──────────────┬─────────────────────┐
             memberships phi ──┬──┼──────────┐   │                     │
                               v  v          v   v                     v
                          ┌──────────┐ mean ┌──────────┐  cov   ┌──────────┐
                          │ K1 M-step├─────>│ K2 cov.  ├───────>│ K3 LU inv│
                          │ sums     ├─────>│          │        │ + const  │
                          └────┬─────┘ NSUM └────┬─────┘        └────┬─────┘
                               │ weight          │ mean (forwarded)  │ inverse, const
                               v                 v                   v
                          ┌─────────────────────────────────────────────────┐
                          │ K4 E-step 1: log numerators num_mn               │──> E-step buffer
                          └───────────────────────┬─────────────────────────┘        │
                                                  │ start token                       │
                                                  v                                   v
                          ┌─────────────────────────────────────────────────┐
                          │ K5 E-step 2: log-sum-exp, phi_mn = exp(num - L)  │──> memberships
                          └─────────────────────────────────────────────────┘
```

| kernel | module | consumes | produces |
|---|---|---|---|
| K1 | `em_k1_mstep` | samples and memberships from memory | mean vector and N_SUM → K2, weight → K4 |
| K2 | `em_k2_cov` | mean and N_SUM; samples and memberships from memory | covariance → K3, the same mean → K4 |
| K3 | `em_k3_inv` | covariance | inverse covariance and constant → K4 |
| K4 | `em_k4_estep1` | inverse, constant, mean, weight; samples from memory | num_mn → E-step buffer, start token → K5 |
| K5 | `em_k5_estep2` | start token; E-step buffer | memberships → memory |

All kernels work cluster by cluster, in cluster order. A channel (`em_channel`) is a
valid/ready FIFO. Its depth equals the number of clusters, and one FIFO word carries a whole
vector or matrix. A kernel stalls when its input channel is empty or its output channel is
full. This is the only synchronisation among K1 to K4. K2 cannot start cluster m until K1
has summed that cluster, K3 waits for K2, and K4 waits until all four of its inputs for the
cluster are there. K2 forwards the mean to K4 itself, so K1 needs only one mean channel.

K4 and K5 are not coupled by a data channel. K5 needs the numerators of *all* clusters of
one sample at once, but K4 produces them cluster by cluster. So K4 writes them to a buffer
in memory, and when it has finished it sends a single token that starts K5. Once started, K5
overwrites the membership array. By then K1 and K2 have finished reading it, because K4
cannot finish its last cluster before K2 has finished its own.

### Memory layout

Three `em_ram` instances stand for the accelerator's global memory:

| array | words | word | address |
|---|---|---|---|
| samples | N | D floats (dimension d in bits 32d+31:32d) | n |
| memberships | M·N | one float | m·N + n |
| E-step buffer | M·N | one float | m·N + n |

All reads are combinational and the write port is synchronous. The sample array has three
read ports (K1, K2, K4). The membership array also has three (K1, K2 and the host). The buffer
has one (K5).

## The log-domain E-step

This is the part that most needs explaining.

A direct E-step would compute w_m·N(x; mu, Theta) and divide by the sum over clusters. With
samples spread over ±1000, the exponent ½·(Mahalanobis distance) easily exceeds 88, and
exp() of that overflows or underflows binary32. Both E-step kernels therefore stay with
logarithms:

* K4 adds three terms: -h/2, the log weight (computed once per cluster, in a cycle of its own)
  and const_m, which K3 has already computed from the log determinant. No exponential appears.
* K5 makes three passes over the clusters for each sample. The first finds the maximum
  numerator. The second accumulates exp(num - max); every term is ≤ 1 and one term equals 1,
  so the sum lies in [1, M]. The third writes exp(num - L_n). The running maximum starts at
  the first cluster's value. Starting it at zero would lose samples whose numerators are all
  far below zero (−100 or less is common): every exp() would underflow to 0, and the log
  denominator would be −∞.

K3 builds the constant from the LU factors: ln det Theta = Σ_i ln|U_ii|. The determinant
itself would overflow binary32 for D ≥ 7 with covariances around 10^5.

## Kernel 3: inverting a covariance matrix

K3 copies the D×D matrix into registers and runs a one-operation-per-clock schedule:

1. Doolittle LU factorisation in place: for each pivot k, divide column k below the diagonal
   by U_kk, then update the trailing submatrix with one multiply-subtract per clock. There is
   no pivoting, because a covariance matrix is symmetric positive definite.
2. Log determinant: D cycles of `logdet += ln|U_ii|`.
3. Inverse, column c at a time: forward substitution with the unit lower triangle against
   e_c, then backward substitution with U. Each result is written into column c of the
   inverse.
4. `const = -(D·½ln 2π + ½·logdet)` in one cycle.

A 4×4 matrix takes about 110 cycles. This is negligible next to the N-cycle passes of the
other kernels.

## Arithmetic

All data is IEEE-754 binary32. `fp32_pkg` implements the operators as combinational
functions: add/sub, mul, div, exp, ln, int→float and compare. Each kernel calls them inside
its clocked process, so every operator finishes in the cycle it starts.

* add, mul and div round to nearest-even. Subnormals are flushed to zero. Infinities
  propagate and NaN is never produced.
* exp computes 2^(x·log2 e). The integer part becomes the exponent. The 24-bit fraction
  selects constants 2^(2^-i), which are multiplied in Q2.30 fixed point. The relative error is
  about 1e-6.
* ln computes (e + log2 m)·ln 2. log2 m comes bit by bit from 24 repeated squarings of the
  mantissa. The absolute error is about 1e-7.

The operators are unpipelined, so every kernel does a whole floating-point expression per
clock. This is correct in simulation and synthesizable, but an FPGA build at a useful clock
rate would need the operators pipelined. See "Departures" below.

## Timing

With no stalls, per EM iteration:

| kernel | cycles |
|---|---|
| K1 | M·(N+2) |
| K2 | M·(N+3), starting one cluster behind K1 |
| K3 | about D³ per cluster |
| K4 | M·(N+2)+1, one cluster behind K2/K3 |
| K5 | N·(3M+1)+1 after the token |

K1 to K4 overlap. K5 runs after them, and for small M it dominates. One iteration with
N = 2^20, D = 2, M = 2 takes 11,534,371 cycles in simulation.

## Top level: `em_gmm_top`

Parameters: `N` (default 2^20), `D` (default 2), `M` (default 2). Clock `clk`, asynchronous
active-low reset `rst_n`.

| port | dir | width | use |
|---|---|---|---|
| host_x_we / host_x_addr / host_x_wdata | in | 1 / log2 N / 32·D | write one sample (ignored while busy) |
| host_phi_we / host_phi_addr / host_phi_wdata | in | 1 / log2(M·N) / 32 | write an initial membership (ignored while busy) |
| host_phi_raddr / host_phi_rdata | in / out | log2(M·N) / 32 | read a membership (combinational) |
| start, iterations | in | 1, 16 | start `iterations` EM iterations (0 counts as 1) |
| busy, done, iter_count | out | 1, 1, 16 | running; one-cycle pulse at the end; iterations finished |

Usage: write all samples and initial memberships, pulse `start`, wait for `done`, read the
memberships. Only the memberships leave the chip. The means, weights and covariances exist
only inside the channels. A host that wants them computes them from the final memberships
with one more M-step.

`D` and `M` are elaboration-time parameters, and the datapaths are sized for them. The
thesis that this design follows builds one bitstream per (D, M). On Stratix V it fitted up to
D=4 with M=2 and up to M=8 with D=2. On Arria 10 it fitted up to D=8 with M=2 and up to M=32
with D=2, always with N = 2^20. The RTL accepts any of those sizes. The default build is
D = 2, M = 2.

## Departures from the OpenCL design

* **Memory.** The original keeps the three arrays in the board's DDR3 behind the OpenCL
  memory system. Here they are plain arrays with single-cycle reads and several ports.
  Because of that, one copy of the samples serves all kernels. The original kept a
  transposed copy for burst-friendly access.
* **Parallelism.** The original pipelines each kernel's loops with tool-chosen unroll
  factors. Here each kernel processes one sample per clock, with all D (K1) or D² (K2, K4)
  terms computed in parallel. K3 and K5 are sequential, one operation per clock.
* **K1** accumulates N_SUM and the weighted sample sum in one pass over the data, not two.
* **K5** starts its running maximum at the first cluster's value, not at zero (see above).
* **Unpipelined floating point.** Each operator is combinational. The synthesised clock would
  therefore be slow, even though the cycle counts above are per clock.
* **Host side.** Initialisation, the initial E-step and the convergence test are host
  software and are not part of the RTL. The host interface here is a simple memory port plus
  start/done; the original uses PCIe and the OpenCL runtime.

## Verification

Every module has a self-checking testbench in `tb/`. Reference values come from
double-precision models written in the testbenches (`tb_em_ref_pkg` models a whole EM
iteration). Each testbench prints `TB_RESULT checks=… failures=…`.

| testbench | what it shows |
|---|---|
| `tb_fp32_pkg` | 28,000 random operations of every operator against double precision |
| `tb_em_channel` | order, full/empty stalls, next-cycle visibility |
| `tb_em_ram` | three read ports, write/read ordering |
| `tb_em_k1_mstep` … `tb_em_k5_estep2` | each kernel against the formulas, with exact cycle counts and random back-pressure |
| `tb_em_gmm_top` | N=512, D=3, M=4: one iteration, then three back-to-back iterations, against the model; also counts channel stalls, the K5 token wait and kernel relaunches |
| `tb_em_workloads` (with `tb_em_case`) | N=256, one iteration each at D=2 with M=8, 16, 32; D=3 with M=16; D=4 with M=4; D=8 with M=2 |
| `tb_em_gmm_full` | default size (N=2^20, D=2, M=2), one iteration on uniform random data in [−1000, 1000] |

The memberships agree with the double-precision model to within 2e-5 at full size and 4e-6
at the reduced size.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/fp32_pkg.sv rtl/em_*.sv \
    tb/tb_fp_pkg.sv tb/tb_em_ref_pkg.sv tb/tb_em_gmm_top.sv --top-module tb_em_gmm_top
./obj_dir/Vtb_em_gmm_top
```

For a kernel testbench, list `rtl/fp32_pkg.sv`, the kernel's file, `tb/tb_fp_pkg.sv` and its
testbench. The full-size test needs about 30 s of simulation and about 200 MB of memory.

## Files

* `rtl/fp32_pkg.sv` – binary32 operators
* `rtl/em_channel.sv` – inter-kernel FIFO
* `rtl/em_ram.sv` – multi-port array for the memory regions
* `rtl/em_k1_mstep.sv`, `em_k2_cov.sv`, `em_k3_inv.sv`, `em_k4_estep1.sv`, `em_k5_estep2.sv` – the kernels
* `rtl/em_gmm_top.sv` – kernels, channels, memories and iteration control
* `tb/` – testbenches and the reference model
