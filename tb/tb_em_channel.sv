// tb_em_channel - self-checking test of the inter-kernel FIFO channel.
// A random producer and a random consumer exchange 2000 words through a 4-deep channel; the
// consumer compares every word with a reference queue. The test also checks that the channel
// refuses writes when it holds DEPTH words (producer stall), reports empty (consumer stall),
// and that a written word is readable in the next cycle.
module tb_em_channel;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  int full_stalls = 0, empty_stalls = 0, occupancy = 0;
  logic [W-1:0] ref_q [$];

  em_channel #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0, got = 0;
    wr_valid = 0; rd_ready = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // empty after reset
    checks++; if (rd_valid || !wr_ready) failures++;
    // fill to DEPTH without reading: ready must drop exactly at DEPTH
    for (int i = 0; i < DEPTH + 1; i++) begin
      wr_valid = 1; wr_data = W'(i + 100);
      checks++;
      if (wr_ready != (i < DEPTH)) begin failures++; $display("FAIL ready at fill %0d", i); end
      if (wr_ready) ref_q.push_back(wr_data);
      @(negedge clk);
    end
    wr_valid = 0;
    // drain
    while (ref_q.size() > 0) begin
      rd_ready = 1;
      checks++;
      if (!rd_valid || rd_data != ref_q[0]) begin failures++; $display("FAIL drain"); end
      void'(ref_q.pop_front());
      @(negedge clk);
    end
    rd_ready = 0;
    checks++; if (rd_valid) failures++;
    // write then read next cycle
    wr_valid = 1; wr_data = 16'hbeef; @(negedge clk); wr_valid = 0;
    checks++; if (!rd_valid || rd_data != 16'hbeef) failures++;
    rd_ready = 1; @(negedge clk); rd_ready = 0;
    // random traffic
    while (got < 2000) begin
      wr_valid = (sent < 2000) && ($urandom % 3 != 0);
      wr_data = W'($urandom);
      rd_ready = ($urandom % 2) == 0;
      if (wr_valid && !wr_ready) full_stalls++;
      if (rd_ready && !rd_valid) empty_stalls++;
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_data != ref_q[0]) begin failures++; $display("FAIL data %h vs %h", rd_data, ref_q[0]); end
        void'(ref_q.pop_front());
        got++;
      end
      if (wr_valid && wr_ready) begin ref_q.push_back(wr_data); sent++; end
      @(negedge clk);
    end
    checks++; if (full_stalls == 0) begin failures++; $display("FAIL no full stall"); end
    checks++; if (empty_stalls == 0) begin failures++; $display("FAIL no empty stall"); end
    $display("full stalls %0d empty stalls %0d", full_stalls, empty_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
