// tb_dirac_detector: streams small tiles of known cells and checks the
// reports written to the report RAM against an independent evaluation:
// every cell above threshold with its time offset, bin, value and neighbour
// flags, the entry count, the noise floor (mean of all cells), the peak and
// the tile number. Tile 0 and 1 follow back to back (flush overlapping the
// next tile), tile 2 uses the relative threshold, tile 3 overflows the
// 30-entry report. Banks must alternate.
module tb_dirac_detector;
  import dirac_pkg::*;
  localparam int COLS = 6, NT = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [2:0] in_pair = 0;
  col_tag_t in_tag = '0;
  logic [1:0][ACCW-1:0] in_sum = '0;
  logic thr_mode = 0;
  logic [ACCW-1:0] thr_abs = 1000;
  logic [7:0] thr_mult = 8'd48;
  logic rep_we, report_done, report_bank;
  logic [5:0] rep_addr;
  logic [63:0] rep_wdata;
  logic [15:0] tile_count;
  int checks = 0, failures = 0;
  int tv [NT][COLS][16];
  int thr_t [NT];
  logic [63:0] ram [64];
  int reports = 0;
  int noise_t [NT];

  dirac_detector dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rep_we) ram[rep_addr] <= rep_wdata;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_tile(int k);
    for (int t = 0; t < COLS; t++)
      for (int b = 0; b < 16; b++)
        tv[k][t][b] = 100 + int'($urandom_range(100));
    if (k == 3) begin
      for (int t = 0; t < COLS; t++)
        for (int b = 0; b < 16; b++) tv[k][t][b] = 2000 + t * 16 + b;
    end else begin
      tv[k][2][7] = 5000; tv[k][2][8] = 4000; tv[k][3][7] = 4500; tv[k][3][8] = 1500 + k;
      tv[k][0][0] = 3000; tv[k][COLS-1][15] = 2500;
    end
  endtask

  task automatic send_tile(int k);
    for (int t = 0; t < COLS; t++)
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        in_valid = 1;
        in_pair  = 3'(p);
        in_tag   = '{act: 1'b1, t: 16'(t), n: 7'd0, first: 1'b1, last: 1'b1, col_last: t == COLS - 1};
        in_sum[0] = ACCW'(tv[k][t][2*p]);
        in_sum[1] = ACCW'(tv[k][t][2*p+1]);
      end
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic bit ex(int k, int t, int b);
    if (t < 0 || t >= COLS || b < 0 || b > 15) return 0;
    return tv[k][t][b] > thr_t[k];
  endfunction

  task automatic check_report(int k, logic bank);
    int n, total, pv, pt, pb, noise;
    logic [63:0] e;
    n = 0; total = 0; pv = -1; pt = 0; pb = 0;
    for (int t = 0; t < COLS; t++)
      for (int b = 0; b < 16; b++) begin
        total += tv[k][t][b];
        if (tv[k][t][b] > pv) begin pv = tv[k][t][b]; pt = t; pb = b; end
        if (ex(k, t, b)) begin
          if (n < 30) begin
            e = ram[{bank, 5'(n + 2)}];
            checks++;
            if (e[17:0] != 18'(tv[k][t][b]) || e[55:40] != 16'(t) || e[59:56] != 4'(b) ||
                e[63:60] != {ex(k, t - 1, b), ex(k, t + 1, b), ex(k, t, b - 1), ex(k, t, b + 1)}) begin
              failures++;
              $display("tile %0d entry %0d: %h (t=%0d b=%0d v=%0d)", k, n, e, t, b, tv[k][t][b]);
            end
          end
          n++;
        end
      end
    noise = total / (COLS * 16);
    noise_t[k] = noise;
    e = ram[{bank, 5'd0}];
    checks++;
    if (e[63:58] != 6'((n > 30) ? 30 : n) || e[57] != (n > 30) || e[56:39] != 18'(thr_t[k]) ||
        e[38:21] != 18'(noise)) begin
      failures++;
      $display("tile %0d header0 %h: count %0d ovf %0d thr %0d noise %0d", k, e, n, n > 30, thr_t[k], noise);
    end
    e = ram[{bank, 5'd1}];
    checks++;
    if (e[63:46] != 18'(pv) || e[45:30] != 16'(pt) || e[29:26] != 4'(pb) || e[15:0] != 16'(k)) begin
      failures++;
      $display("tile %0d header1 %h: peak %0d at %0d/%0d", k, e, pv, pt, pb);
    end
  endtask

  // Each completed report is checked against its tile.
  always @(posedge clk) if (rst_n && report_done) begin
    automatic int k = reports;
    checks++;
    if (report_bank != 1'(k)) begin failures++; $display("bank %0d for report %0d", report_bank, k); end
    #1;
    check_report(k, report_bank);
    reports++;
  end

  initial begin
    for (int k = 0; k < NT; k++) make_tile(k);
    repeat (2) @(negedge clk);
    rst_n = 1;
    thr_t[0] = 1000; thr_t[1] = 1000;
    send_tile(0);
    send_tile(1);
    repeat (100) @(negedge clk);
    thr_mode = 1;
    thr_t[2] = noise_t[1] * 48 / 16;
    send_tile(2);
    repeat (100) @(negedge clk);
    thr_mode = 0;
    thr_abs = 2030;
    thr_t[3] = 2030;
    send_tile(3);
    repeat (100) @(negedge clk);
    checks++;
    if (reports != NT) begin failures++; $display("reports %0d", reports); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
