// em_ram - word-addressed buffer standing in for the accelerator's global memory regions.
//
// The EM accelerator keeps three arrays outside its kernels: the sample dataset, the
// membership values and the output of the first E-step kernel (the per-cluster log
// numerators). Each array is one instance of this module. Several kernels read one array at
// the same time, so the module has NR independent read ports; one write port serves the
// kernel or host that fills the array.
// Interface: raddr[i] -> rdata[i] is combinational (the word is available in the same cycle);
// a write with we high lands at the clock edge. Reads of the address being written return the
// old word. Contents are not reset.
// Modelling the board's DRAM as single-cycle arrays with several ports is this design's
// choice; it removes the burst and arbitration logic a real memory controller needs.
module em_ram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1024,
  parameter int NR    = 2
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr [NR],
  output logic [WIDTH-1:0]         rdata [NR]
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NR; i++) rdata[i] = mem[raddr[i]];
  end
endmodule
