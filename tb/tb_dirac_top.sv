// tb_dirac_top: end-to-end acquisition on a reduced engine: 16 CMFs of 32 taps
// and 512 time offsets per 10 ms tile, so that, as in the full-size design,
// the correlation window (16 x 32 samples) is as long as the tile.
// The testbench generates a random spreading sequence, a received signal in
// both sidebands (code delayed by TAU samples, carrier offset placed on FFT
// bin +3, noise, 2-bit quantisation) and feeds the code segments the engine
// asks for (code_req) through the serial code port. A behavioural model of
// the external memory holds the noncoherent integration; the host side is
// driven through the register bus only. Phases:
//   A  10 ms mode, 4 integrations, the code delay growing by one sample per
//      integration, compensated by a code Doppler rate of -1 sample per
//      integration in every bin: the report's peak must be at bin +3 and at
//      offset TAU + 16 (16 = the compensation's fixed bias), with entries;
//      the memory must see 3 tiles of read-add-write.
//   B  same drift without compensation: the peak must be lower than in A.
//   C  5 ms mode (CMFs 8..15 powered down, half the offsets), 2 integrations,
//      relative threshold: threshold = previous noise floor x 40/16, peak at
//      bin +3, TAU + 16.
//   D  capture after compensation, 4 integrations with drift: the memory holds
//      the last integration, whose peak must be at TAU + 16.
//   E  capture before compensation, 1 integration: peak at TAU itself.
//   Capture runs must produce no report.
// Counted mechanisms (each must occur, observed on internal signals): code
// swaps, memory reads, compensated columns with a nonzero rate, 5 ms tiles,
// CMF power-down, relative threshold, report entries with neighbour flags,
// both report banks, capture writes. Interleaver overrun must never occur.
module tb_dirac_top;
  import dirac_pkg::*;
  localparam int NT = 32, COLS = 16 * NT, M = 16 * NT, TAU = 40, BIN = 11;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic samp_valid = 0;
  logic [1:0] i_usb = 0, q_usb = 0, i_lsb = 0, q_lsb = 0;
  logic overrun, code_shift = 0, code_in = 0, code_out, code_req;
  logic mem_rd_en, mem_wr_en;
  logic [18:0] mem_rd_addr, mem_wr_addr;
  logic [35:0] mem_rd_data, mem_wr_data;
  logic bus_wr = 0, bus_rd = 0;
  logic [7:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid, irq, tile_done;

  int checks = 0, failures = 0;
  int inst = 0;               // sample instant counter
  int drift = 0;              // extra code delay per integration
  int swap_inst [$];          // instants at which code swaps happened
  bit code_p [];              // spreading sequence, one chip per sample
  int n_swaps = 0, n_rmw = 0, n_cdc = 0, n_5ms = 0, n_pd = 0, n_rel = 0, n_flags = 0, n_cap = 0;
  bit banks_seen [2];
  int sref = 0;               // first instant of the current search

  dirac_top #(.NTAPS(NT), .TILE_COLS(COLS)) dut (.*);
  tb_qdr_model #(.DEPTH(8192)) u_mem (
    .clk, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- signal source ----------------
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += (real'($urandom_range(20000)) / 10000.0 - 1.0);
    return s * 0.866;   // unit variance
  endfunction

  function automatic logic [1:0] quant(real v);
    logic s = (v < 0.0);
    real a = s ? -v : v;
    return {s, a > 1.0};
  endfunction

  // Samples of instant m. The code delay grows by `drift` samples per
  // integration. Integration n correlates the window of the M samples ending
  // at each of its instants, i.e. mostly instants of integration n-1 (the
  // window length equals the tile length, as in the full-size design), so the
  // delay belonging to integration n is given to the instants of
  // integration n-1.
  task automatic make_samples(int m, output logic [1:0] iu, qu, il, ql);
    int d;
    real c, ph, nsig;
    d  = (m - sref + 4 * COLS) / COLS - 3;
    d  = TAU + drift * (d < 0 ? 0 : d);
    c  = code_p[m - d + 1024] ? 1.0 : -1.0;
    ph = 2.0 * PI * real'(BIN - 8) * real'(m) / real'(32 * NT);
    nsig = 0.5;
    iu = quant(c * $cos(ph) + nsig * gauss());
    qu = quant(c * $sin(ph) + nsig * gauss());
    il = quant(c * $cos(ph + 1.0) + nsig * gauss());
    ql = quant(c * $sin(ph + 1.0) + nsig * gauss());
  endtask

  // Sample instants every 8 clocks.
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      make_samples(inst, i_usb, q_usb, i_lsb, q_lsb);
      samp_valid = 1;
      @(negedge clk);
      samp_valid = 0;
      inst++;
      repeat (6) @(negedge clk);
    end
  end

  // ---------------- reference code port ----------------
  // The segment for a swap at instant s is chips s-M+1 .. s, oldest first,
  // so that tap j (j = 0 newest) holds chip s-j.
  task automatic load_segment(int s);
    for (int i = 0; i < M; i++) begin
      @(negedge clk);
      code_shift = 1;
      code_in    = code_p[s - M + 1 + i + 1024];
    end
    @(negedge clk);
    code_shift = 0;
  endtask

  int next_swap = -1;
  always @(posedge clk) if (rst_n && code_req) begin
    n_swaps++;
    swap_inst.push_back(inst - 1);
  end

  // ---------------- host bus ----------------
  task automatic wr(int a, int d);
    @(negedge clk);
    bus_wr = 1; bus_addr = 8'(a); bus_wdata = 32'(d);
    @(negedge clk);
    bus_wr = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk);
    bus_rd = 1; bus_addr = 8'(a);
    @(negedge clk);
    bus_rd = 0;
    d = bus_rdata;
  endtask

  task automatic read_word(int bank, int w, output logic [63:0] v);
    logic [31:0] lo, hi;
    rd(8'h80 + 2 * (32 * bank + w), lo);
    rd(8'h81 + 2 * (32 * bank + w), hi);
    v = {hi, lo};
  endtask

  // Run one search of nint integrations in the given mode; returns the peak.
  task automatic search(int nint, bit m5, int ctrl_extra, output int pk_v, pk_t, pk_b, cnt);
    int cols, s0;
    logic [31:0] st;
    logic [63:0] h0, h1, e;
    int bank;
    cols = m5 ? COLS / 2 : COLS;
    wr(8'h01, nint);
    // Start at a known instant: preload the segment for instant s0, then
    // raise run between instants s0-1 and s0.
    s0 = inst + M + 20;
    sref = s0;
    load_segment(s0);
    while (inst != s0) @(negedge clk);
    // inst == s0 means instant s0-1 was just issued
    wr(8'h00, 1 | (m5 << 1) | ctrl_extra);
    while (inst != s0 + 1) @(negedge clk);
    wr(8'h00, (m5 << 1) | ctrl_extra);   // run low: stop after this tile
    fork
      begin
        // supply the following segments and track the integration index
        for (int n = 0; n < nint; n++) begin
          if (n + 1 < nint) load_segment(s0 + (n + 1) * cols);
          while (inst <= s0 + (n + 1) * cols) @(negedge clk);
        end
      end
    join
    // wait for the report
    do rd(8'h05, st); while (!st[0]);
    wr(8'h05, 1);
    bank = st[1];
    banks_seen[bank] = 1;
    read_word(bank, 0, h0);
    read_word(bank, 1, h1);
    rep_thr   = int'(h0[56:39]);
    rep_noise = int'(h0[38:21]);
    pk_v = int'(h1[63:46]);
    pk_t = int'(h1[45:30]);
    pk_b = int'(h1[29:26]);
    cnt  = int'(h0[63:58]);
    $display("search nint=%0d 5ms=%0d: peak %0d at t=%0d bin=%0d, %0d entries, thr %0d, noise %0d",
             nint, m5, pk_v, pk_t, pk_b, cnt, h0[56:39], h0[38:21]);
    for (int k = 0; k < cnt && k < 30; k++) begin
      read_word(bank, 2 + k, e);
      if (e[63:60] != 0) n_flags++;
    end
    checks++;
    if (swap_inst.size() < nint || swap_inst[swap_inst.size() - nint] != s0) begin
      failures++;
      $display("first swap not at instant %0d: %p", s0, swap_inst);
    end
    // let the pipeline drain
    repeat (400) @(negedge clk);
  endtask

  // One capture-mode search (test_sel = sel); returns the largest memory cell.
  task automatic capture_run(int sel, int nint, output int best, bt, bb);
    int s0, v, best_a;
    logic [31:0] st;
    wr(8'h01, nint);
    s0 = inst + M + 20;
    sref = s0;
    load_segment(s0);
    while (inst != s0) @(negedge clk);
    wr(8'h00, 1 | (sel << 2));
    while (inst != s0 + 1) @(negedge clk);
    wr(8'h00, (sel << 2));
    for (int n = 0; n < nint; n++) begin
      if (n + 1 < nint) load_segment(s0 + (n + 1) * COLS);
      while (inst <= s0 + (n + 1) * COLS) @(negedge clk);
    end
    repeat (400) @(negedge clk);
    best = -1; best_a = 0;
    for (int a = 0; a < COLS * 8; a++)
      for (int h = 0; h < 2; h++) begin
        v = int'(u_mem.mem[a][18*h +: 18]);
        if (v > best) begin best = v; best_a = 2 * a + h; end
      end
    bt = best_a / 16;
    bb = best_a % 16;
    $display("capture test_sel=%0d nint=%0d: largest cell %0d at t=%0d bin=%0d", sel, nint, best, bt, bb);
    rd(8'h05, st);
    checks++;
    if (st[0]) begin failures++; $display("capture produced a report"); end
    wr(8'h00, 0);
  endtask

  // Mechanism counters observed on the engine's internal signals.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_nci.mem_wr_en && dut.capture) n_cap++;
    if (dut.cd_valid && dut.cd_tag.n != 0 && dut.rate[0] != 0) n_cdc++;
    if (dut.u_ctrl.busy && dut.mode_5ms && dut.tag.col_last && dut.tag.t == TOFW'(COLS / 2 - 1)) n_5ms++;
    if (dut.u_ctrl.busy && !dut.cmf_en[15] && dut.cmf_en[0]) n_pd++;
  end

  int rep_thr, rep_noise, prev_noise;
  int pa_v, pa_t, pa_b, pa_c, pb_v, pb_t, pb_b, pb_c;
  int rd_before;

  always @(posedge clk) if (rst_n && mem_rd_en) n_rmw++;

  initial begin
    code_p = new[200000];
    foreach (code_p[i]) code_p[i] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);

    // ---- A: drift compensated ----
    drift = 1;
    for (int b = 0; b < 16; b++) wr(8'h10 + b, -4096);
    wr(8'h03, 3000);
    rd_before = n_rmw;
    search(4, 0, 0, pa_v, pa_t, pa_b, pa_c);
    checks++;
    if (pa_t != TAU + 16 || pa_b != BIN) begin
      failures++; $display("A: peak at t=%0d bin=%0d, expected t=%0d bin=%0d", pa_t, pa_b, TAU + 16, BIN);
    end
    checks++;
    if (pa_c == 0) begin failures++; $display("A: no detection"); end
    checks++;
    if (n_rmw - rd_before != 3 * COLS * 8) begin
      failures++; $display("A: %0d memory reads, expected %0d", n_rmw - rd_before, 3 * COLS * 8);
    end

    // ---- B: same drift, no compensation ----
    for (int b = 0; b < 16; b++) wr(8'h10 + b, 0);
    search(4, 0, 0, pb_v, pb_t, pb_b, pb_c);
    checks++;
    if (pb_v >= pa_v) begin failures++; $display("B: uncompensated peak %0d not below %0d", pb_v, pa_v); end

    // ---- C: 5 ms mode, relative threshold ----
    drift = 0;
    prev_noise = rep_noise;
    wr(8'h04, 8'd40);     // 2.5 x noise floor of the previous report
    search(2, 1, 16, pb_v, pb_t, pb_b, pb_c);
    checks++;
    // relative threshold: 40/16 of the noise floor of the previous report
    if (rep_thr == (prev_noise * 40) / 16) n_rel++;
    else begin failures++; $display("C: threshold %0d, expected %0d", rep_thr, (prev_noise * 40) / 16); end
    checks++;
    if (pb_t != TAU + 16 || pb_b != BIN || pb_c == 0) begin
      failures++; $display("C: peak at t=%0d bin=%0d (%0d entries)", pb_t, pb_b, pb_c);
    end

    // ---- D: capture after compensation, 4 integrations with drift: the
    // memory holds the last integration only, aligned at TAU + 16 ----
    drift = 1;
    for (int b = 0; b < 16; b++) wr(8'h10 + b, -4096);
    capture_run(2, 4, pb_v, pb_t, pb_b);
    checks++;
    if (pb_t != TAU + 16 || pb_b != BIN) begin
      failures++; $display("D: captured peak at t=%0d bin=%0d", pb_t, pb_b);
    end
    // ---- E: capture before compensation, one integration, no drift: the
    // raw peak is at TAU ----
    drift = 0;
    capture_run(1, 1, pb_v, pb_t, pb_b);
    checks++;
    if (pb_t != TAU || pb_b != BIN) begin
      failures++; $display("E: captured peak at t=%0d bin=%0d", pb_t, pb_b);
    end

    // ---- mechanism coverage ----
    $display("swaps %0d rmw %0d cdc %0d 5ms %0d pd %0d rel %0d flags %0d banks %0d%0d capture %0d",
             n_swaps, n_rmw, n_cdc, n_5ms, n_pd, n_rel, n_flags, banks_seen[0], banks_seen[1], n_cap);
    checks++;
    if (n_swaps == 0 || n_rmw == 0 || n_cdc == 0 || n_5ms == 0 || n_pd == 0 || n_rel == 0 ||
        n_flags == 0 || !banks_seen[0] || !banks_seen[1] || n_cap == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    checks++;
    if (overrun) begin failures++; $display("interleaver overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
