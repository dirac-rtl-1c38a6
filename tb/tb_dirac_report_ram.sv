// tb_dirac_report_ram: random writes and reads on the two ports against a
// reference array, including a read of the word being written (old data),
// and the one-clock read latency.
module tb_dirac_report_ram;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] model [64];
  logic [63:0] expd;
  int checks = 0, failures = 0;

  dirac_report_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 6'($urandom);
      wdata = {$urandom, $urandom};
      re    = 1;
      raddr = (k % 5 == 0) ? waddr : 6'($urandom);
      expd  = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata != expd) begin failures++; $display("read %0d got %h exp %h", raddr, rdata, expd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
