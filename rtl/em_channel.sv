// em_channel - FIFO channel that carries values from one EM kernel to the next.
//
// The kernels of the accelerator do not exchange intermediate results through memory: a
// producer kernel writes each value into a first-in first-out channel and the consumer reads
// it as soon as it is there. A producer that finds the channel full stalls, and so does a
// consumer that finds it empty, which is all the synchronisation the kernels need.
// Interface: a valid/ready write side and a valid/ready read side. A word moves on a side in
// every cycle in which both valid and ready are high. rd_data shows the oldest word whenever
// rd_valid is high (first-word fall-through). The default DEPTH of 2 is for a two-cluster
// build: each channel of the accelerator is as deep as there are clusters, so the top-level
// module overrides DEPTH with its cluster count. The word width is free; a vector channel (a mean
// vector, a covariance matrix) moves a whole cluster's vector in one word.
// Timing: a written word is readable in the next cycle; a read frees its slot for a write in
// the next cycle. Storage is a register array with wrap-around pointers and an occupancy
// counter (this implementation's choice).
module em_channel #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0] count;
  logic do_wr, do_rd;

  assign wr_ready = count < (AW+1)'(DEPTH);
  assign rd_valid = count != '0;
  assign rd_data  = mem[rp];
  assign do_wr = wr_valid && wr_ready;
  assign do_rd = rd_valid && rd_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= next_ptr(wp);
      if (do_rd) rp <= next_ptr(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  // a channel never holds more than DEPTH words
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
