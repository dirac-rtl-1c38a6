// tb_dirac_nci: integrates random magnitude columns of a small tile over
// several integrations through the external memory model and checks, against
// sums kept by the testbench, every value written back, the sums passed on
// for detection, 128 full-scale integrations, and capture mode (write without add).
module tb_dirac_nci;
  import dirac_pkg::*;
  localparam int COLS = 5;
  logic clk = 0, rst_n = 0, capture = 0;
  logic in_valid = 0;
  logic [2:0] in_pair = 0, out_pair;
  col_tag_t in_tag = '0, out_tag;
  logic [1:0][MAGW-1:0] in_mag = '0;
  logic mem_rd_en, mem_wr_en, out_valid;
  logic [18:0] mem_rd_addr, mem_wr_addr;
  logic [35:0] mem_rd_data, mem_wr_data;
  logic [1:0][ACCW-1:0] out_sum;
  int checks = 0, failures = 0;
  int expv [COLS*8][2];
  int nread = 0;

  dirac_nci dut (.*);
  tb_qdr_model #(.DEPTH(1024)) u_mem (
    .clk, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data)
  );
  always #5 clk = ~clk;
  always @(posedge clk) if (mem_rd_en) nread++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check every write against the expected running sum.
  always @(posedge clk) if (rst_n && mem_wr_en) begin
    int a;
    a = int'(mem_wr_addr[18:3]) * 8 + int'(mem_wr_addr[2:0]);
    checks++;
    if (out_valid !== 1'b1 || int'(mem_wr_data[17:0]) != expv[a][0] || int'(mem_wr_data[35:18]) != expv[a][1]
        || out_sum[0] != mem_wr_data[17:0] || out_sum[1] != mem_wr_data[35:18]) begin
      failures++;
      $display("addr %0d wrote %0d,%0d exp %0d,%0d", a, mem_wr_data[17:0], mem_wr_data[35:18], expv[a][0], expv[a][1]);
    end
  end

  task automatic run_integration(int n, int nmax, bit cap, bit big);
    for (int t = 0; t < COLS; t++)
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        capture  = cap;
        in_valid = 1;
        in_pair  = 3'(p);
        in_tag   = '{act: 1'b1, t: 16'(t), n: 7'(n), first: n == 0, last: n == nmax, col_last: t == COLS - 1};
        for (int h = 0; h < 2; h++) begin
          int v, s;
          v = big ? 2047 : int'($urandom_range(2047));
          in_mag[h] = MAGW'(v);
          s = (n == 0 || cap) ? v : expv[t*8+p][h] + v;
          if (s > 262143) s = 262143;
          expv[t*8+p][h] = s;
        end
      end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) run_integration(n, 3, 0, 0);
    checks++;
    if (nread != 3 * COLS * 8) begin failures++; $display("reads %0d", nread); end
    // 128 full-scale integrations reach 128 * 2047 without overflow.
    for (int n = 0; n < 128; n++) run_integration(n, 127, 0, 1);
    for (int a = 0; a < COLS * 8; a++) begin
      checks++;
      if (expv[a][0] != 128 * 2047) begin failures++; $display("full-scale sum wrong in model"); end
    end
    // Capture mode: written as is, no reads.
    nread = 0;
    run_integration(5, 7, 1, 0);
    checks++;
    if (nread != 0) begin failures++; $display("reads in capture mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
