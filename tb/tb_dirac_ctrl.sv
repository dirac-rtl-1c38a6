// tb_dirac_ctrl: runs the sequencer with samp_valid every 8 clocks and
// checks, instant by instant, the tag (time offset, integration index,
// first/last flags, last column), that code_swap/code_req pulse exactly at
// time offset 0 two clocks after samp_valid, tile_done, the 5 ms mode with
// half the offsets, and stopping at a tile end once run is cleared.
module tb_dirac_ctrl;
  import dirac_pkg::*;
  localparam int COLS = 6;
  logic clk = 0, rst_n = 0, run = 0, mode_5ms = 0, samp_valid = 0;
  logic [7:0] n_nci = 3;
  logic code_swap, code_req, busy, tile_done;
  col_tag_t tag;
  int checks = 0, failures = 0;
  int swaps = 0, dones = 0;

  dirac_ctrl #(.TILE_COLS(COLS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && code_swap) swaps++;
    if (rst_n && tile_done) dones++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic instant(int t, int n, int nmax, int cols, bit act);
    @(negedge clk);
    samp_valid = 1;
    @(negedge clk);
    samp_valid = 0;
    @(negedge clk);   // two clocks after samp_valid
    checks++;
    if (act) begin
      if (tag != '{act: 1'b1, t: 16'(t), n: 7'(n), first: n == 0, last: n == nmax, col_last: t == cols - 1}
          || code_swap != (t == 0) || code_req != (t == 0)) begin
        failures++;
        $display("t=%0d n=%0d: tag %p swap %0d", t, n, tag, code_swap);
      end
    end else if (tag.act || code_swap) begin
      failures++;
      $display("active while stopped");
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    instant(0, 0, 2, COLS, 0);
    run = 1;
    for (int tile = 0; tile < 2; tile++)
      for (int n = 0; n < 3; n++)
        for (int t = 0; t < COLS; t++) instant(t, n, 2, COLS, 1);
    checks++;
    if (swaps != 6 || dones != 2) begin failures++; $display("swaps %0d dones %0d", swaps, dones); end
    // Clear run mid-tile: the tile completes, then the controller stops.
    mode_5ms = 1;
    n_nci = 1;
    instant(0, 0, 0, COLS / 2, 1);
    run = 0;
    for (int t = 1; t < COLS / 2; t++) instant(t, 0, 0, COLS / 2, 1);
    instant(0, 0, 0, COLS / 2, 0);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
