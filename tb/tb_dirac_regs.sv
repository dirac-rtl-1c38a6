// tb_dirac_regs: writes every configuration register and reads it back
// through the bus, checks the decoded outputs, the one-clock read latency,
// the report-ready flag (set by report_done, cleared by writing 1) and the
// read-out of 64-bit report RAM words in two 32-bit halves from a RAM model.
module tb_dirac_regs;
  import dirac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_wr = 0, bus_rd = 0;
  logic [7:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid;
  logic run, mode_5ms, thr_mode, standby;
  logic [1:0] test_sel;
  logic [3:0] mag_shift;
  logic [7:0] n_nci, thr_mult;
  logic [15:0] cmf_pd;
  logic [ACCW-1:0] thr_abs;
  logic [NBIN-1:0][15:0] rate;
  logic busy = 0, report_done = 0, report_bank = 0;
  logic [15:0] tile_count = 16'h1234;
  logic ram_re;
  logic [5:0] ram_raddr;
  logic [63:0] ram_rdata;
  logic [63:0] ram [64];
  int checks = 0, failures = 0;

  dirac_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (ram_re) ram_rdata <= ram[ram_raddr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk);
    bus_wr = 1; bus_addr = 8'(a); bus_wdata = 32'(d);
    @(negedge clk);
    bus_wr = 0;
  endtask

  task automatic rd_check(int a, logic [31:0] e, string what);
    @(negedge clk);
    bus_rd = 1; bus_addr = 8'(a);
    @(negedge clk);
    bus_rd = 0;
    checks++;
    if (!bus_rvalid || bus_rdata != e) begin
      failures++;
      $display("%s: read %h exp %h (rvalid %0d)", what, bus_rdata, e, bus_rvalid);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) ram[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(8'h00, 32'h0000_0A3F);
    checks++;
    if (!run || !mode_5ms || test_sel != 2'd3 || !thr_mode || !standby || mag_shift != 4'hA) begin
      failures++; $display("CTRL decode wrong");
    end
    rd_check(8'h00, 32'h0000_0A3F, "CTRL");
    wr(8'h01, 100);        rd_check(8'h01, 100, "NNCI");
    wr(8'h02, 32'hF0F0);   rd_check(8'h02, 32'hF0F0, "CMF_PD");
    wr(8'h03, 32'h2_3456); rd_check(8'h03, 32'h2_3456, "THR_ABS");
    wr(8'h04, 8'h55);      rd_check(8'h04, 8'h55, "THR_MULT");
    checks++;
    if (n_nci != 100 || cmf_pd != 16'hF0F0 || thr_abs != 18'h2_3456 || thr_mult != 8'h55) begin
      failures++; $display("outputs wrong");
    end
    for (int b = 0; b < 16; b++) wr(8'h10 + b, 1000 * b - 7000);
    for (int b = 0; b < 16; b++) begin
      rd_check(8'h10 + b, {16'd0, 16'(1000 * b - 7000)}, "RATE");
      checks++;
      if (rate[b] != 16'(1000 * b - 7000)) begin failures++; $display("rate %0d", b); end
    end
    rd_check(8'h05, {16'h1234, 13'd0, 1'b0, 1'b0, 1'b0}, "STATUS idle");
    @(negedge clk);
    report_done = 1; report_bank = 1; busy = 1;
    @(negedge clk);
    report_done = 0;
    rd_check(8'h05, {16'h1234, 13'd0, 1'b1, 1'b1, 1'b1}, "STATUS ready");
    wr(8'h05, 1);
    rd_check(8'h05, {16'h1234, 13'd0, 1'b1, 1'b1, 1'b0}, "STATUS cleared");
    for (int w = 0; w < 64; w++) begin
      rd_check(8'h80 + 2 * w, ram[w][31:0], "RAM low");
      rd_check(8'h81 + 2 * w, ram[w][63:32], "RAM high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
