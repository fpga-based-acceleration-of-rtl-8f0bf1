// tb_em_ram - self-checking test of the multi-port global-memory array.
// Writes random words to random addresses, keeps a reference copy, and reads them back on
// all three read ports at once, including a read of the address being written (old data).
module tb_em_ram;
  localparam int W = 32, DEPTH = 64, NR = 3, AW = 6;
  logic clk = 0;
  logic we;
  logic [AW-1:0] waddr;
  logic [W-1:0] wdata;
  logic [AW-1:0] raddr [NR];
  logic [W-1:0] rdata [NR];
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  em_ram #(.WIDTH(W), .DEPTH(DEPTH), .NR(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int i = 0; i < NR; i++) raddr[i] = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = $urandom; ref_mem[a] = wdata;
      @(negedge clk);
    end
    for (int t = 0; t < 2000; t++) begin
      we = $urandom % 2;
      waddr = AW'($urandom);
      wdata = $urandom;
      for (int i = 0; i < NR; i++) raddr[i] = (i == 0) ? waddr : AW'($urandom);
      #1;
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (rdata[i] != ref_mem[raddr[i]]) begin
          failures++;
          $display("FAIL port %0d addr %0d", i, raddr[i]);
        end
      end
      @(negedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
