// tb_em_workloads - the dimension/cluster combinations at the edge of what the original
// accelerator fitted on its FPGAs, each run for one EM iteration with N reduced to 256:
// D=2 with M=8, 16 and 32; D=3 with M=16; D=4 with M=4; D=8 with M=2. Each case is an
// independent accelerator instance checked against the double-precision model.
module tb_em_workloads;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NC = 6;
  logic fin [NC];
  int ck [NC], fl [NC], cy [NC];

  tb_em_case #(.N(256), .D(2), .M(8))  c0 (.clk, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .cycles(cy[0]));
  tb_em_case #(.N(256), .D(2), .M(16)) c1 (.clk, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .cycles(cy[1]));
  tb_em_case #(.N(256), .D(2), .M(32)) c2 (.clk, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .cycles(cy[2]));
  tb_em_case #(.N(256), .D(3), .M(16)) c3 (.clk, .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .cycles(cy[3]));
  tb_em_case #(.N(256), .D(4), .M(4))  c4 (.clk, .finished(fin[4]), .checks(ck[4]), .failures(fl[4]), .cycles(cy[4]));
  tb_em_case #(.N(256), .D(8), .M(2))  c5 (.clk, .finished(fin[5]), .checks(ck[5]), .failures(fl[5]), .cycles(cy[5]));

  int checks = 0, failures = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NC; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NC; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
