// dirac_detector: detection processing of the integrated tile.
//
// During the last noncoherent integration the integrated cells stream in as
// bin pairs (8 pairs per time-offset column). Every cell is compared with a
// threshold fixed at the start of the pass: thr_abs in absolute mode, or the
// previous tile's noise floor times thr_mult/16 in relative mode. Each cell
// above the threshold becomes one 64-bit report entry, together with four
// flags telling which neighbours (earlier and later time offset, lower and
// higher bin) also exceed it, so a peak spread over several cells is reported
// with its adjacent cells. To know the later-time neighbour, a column is
// judged while the next one arrives; the last column of a tile is judged in
// an 8-clock flush pass that may overlap the first column of the next tile,
// so tiles can follow each other back to back (one integration per tile).
// The detector also finds the largest cell of the tile and the noise floor
// (mean of all cells, by a serial restoring division). Once the last entry
// is queued it writes two header entries and pulses report_done, about 45
// clocks after the tile's last cell; reports alternate between two banks of
// the report RAM. Entries leave a queue at one per clock.
// Report bank layout (32 entries of 64 bits):
//   entry 0: [63:58] entry count, [57] overflow, [56:39] threshold, [38:21] noise floor
//   entry 1: [63:46] peak value, [45:30] peak time offset, [29:26] peak bin, [15:0] tile number
//   entry 2+k: [63:60] flags {t-1, t+1, bin-1, bin+1}, [59:56] bin, [55:40] time offset, [17:0] value
// Bin i means frequency (i-8) x 50 Hz. At most NENT entries are kept; more
// set the overflow flag.
// Reporting every cell above threshold with its time, frequency and value,
// adjacent cells included, the noise floor, threshold and peak data, and two
// reports in a 4 Kbit RAM follow the design. Threshold modes, the entry
// layout and the neighbour flags are choices of this implementation.
module dirac_detector
  import dirac_pkg::*;
#(
  parameter int unsigned NENT = 30
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,   // bin pairs of the last integration
  input  logic [2:0]              in_pair,
  input  col_tag_t                in_tag,
  input  logic [1:0][ACCW-1:0]    in_sum,
  input  logic                    thr_mode,   // 0 absolute, 1 relative to noise floor
  input  logic [ACCW-1:0]         thr_abs,
  input  logic [7:0]              thr_mult,
  output logic                    rep_we,
  output logic [5:0]              rep_addr,
  output logic [63:0]             rep_wdata,
  output logic                    report_done,
  output logic                    report_bank, // bank of the report just completed
  output logic [15:0]             tile_count
);
  localparam int unsigned TOTW = ACCW + 22;

  typedef enum logic [2:0] {F_IDLE, F_DIV, F_HDR0, F_HDR1, F_DONE} fstate_e;

  typedef struct packed {
    logic [5:0]  addr;
    logic [63:0] data;
  } qent_t;

  // Accumulation context: the tile whose cells are arriving.
  logic [ACCW-1:0]           thr, noise_prev;
  logic [NBIN-1:0][ACCW-1:0] cur_v, prv_v;
  logic [NBIN-1:0]           cur_ex, prv_ex, pp_ex;
  logic [TOFW-1:0]           prv_t;
  logic                      have_prv;
  logic [ACCW-1:0]           peak_v;
  logic [TOFW-1:0]           peak_t;
  logic [3:0]                peak_b;
  logic [TOTW-1:0]           total, ncells;
  // Judging context: the tile whose columns are being judged.
  logic [5:0]                count;
  logic                      ovf, bank;
  logic                      flushing;
  logic [2:0]                fl_pair;
  // Finishing context: header of the tile just judged.
  fstate_e                   fst;
  logic [ACCW-1:0]           f_thr, f_peak_v, quo;
  logic [TOFW-1:0]           f_peak_t;
  logic [3:0]                f_peak_b;
  logic [TOTW-1:0]           f_total, f_ncells, rem;
  logic [5:0]                f_count, div_i;
  logic                      f_ovf, f_bank;
  logic [ACCW-1:0]           l_thr, l_peak_v;   // latched at the last cell
  logic [TOFW-1:0]           l_peak_t;
  logic [3:0]                l_peak_b;
  logic [TOTW-1:0]           l_total, l_ncells;

  // Entry queue.
  qent_t       q [64];
  logic [5:0]  q_wp, q_rp;
  logic [6:0]  q_cnt;

  // Threshold for a new pass.
  logic [ACCW-1:0] thr_new;
  always_comb begin
    automatic logic [ACCW+7:0] r = ((ACCW+8)'(noise_prev) * (ACCW+8)'(thr_mult)) >> 4;
    if (!thr_mode)               thr_new = thr_abs;
    else if (|r[ACCW+7:ACCW])    thr_new = '1;
    else                         thr_new = r[ACCW-1:0];
  end

  logic start_pass;
  assign start_pass = in_valid && in_pair == 3'd0 && in_tag.t == '0;
  logic [ACCW-1:0] thr_now;
  assign thr_now = start_pass ? thr_new : thr;

  // Judge pair jp of the previous column; nxt_ex = exceed bits of the next column.
  logic             judge;
  logic [2:0]       jp;
  logic [1:0]       nxt_ex, hit;
  logic [1:0][63:0] ent;
  always_comb begin
    judge  = flushing || (in_valid && have_prv && !start_pass);
    jp     = flushing ? fl_pair : in_pair;
    nxt_ex = '0;
    if (!flushing && in_valid)
      for (int h = 0; h < 2; h++) nxt_ex[h] = in_sum[h] > thr_now;
    for (int h = 0; h < 2; h++) begin
      automatic int b = 2 * int'(jp) + h;
      automatic logic lo = (b > 0)  ? prv_ex[(b > 0) ? b - 1 : 0] : 1'b0;
      automatic logic hi = (b < 15) ? prv_ex[(b < 15) ? b + 1 : 15] : 1'b0;
      hit[h] = judge && prv_ex[b];
      ent[h] = {pp_ex[b], nxt_ex[h], lo, hi, 4'(b), prv_t, 22'd0, prv_v[b]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr <= '0; noise_prev <= '0;
      cur_v <= '0; prv_v <= '0; cur_ex <= '0; prv_ex <= '0; pp_ex <= '0;
      prv_t <= '0; have_prv <= 1'b0; peak_v <= '0; peak_t <= '0; peak_b <= '0;
      total <= '0; ncells <= '0;
      count <= '0; ovf <= 1'b0; bank <= 1'b0; flushing <= 1'b0; fl_pair <= '0;
      fst <= F_IDLE; f_thr <= '0; f_peak_v <= '0; f_peak_t <= '0; f_peak_b <= '0;
      f_total <= '0; f_ncells <= '0; rem <= '0; quo <= '0; f_count <= '0; div_i <= '0;
      f_ovf <= 1'b0; f_bank <= 1'b0;
      l_thr <= '0; l_peak_v <= '0; l_peak_t <= '0; l_peak_b <= '0; l_total <= '0; l_ncells <= '0;
      q_wp <= '0; q_rp <= '0; q_cnt <= '0;
      rep_we <= 1'b0; rep_addr <= '0; rep_wdata <= '0;
      report_done <= 1'b0; report_bank <= 1'b0; tile_count <= '0;
      for (int i = 0; i < 64; i++) q[i] <= '0;
    end else begin
      automatic logic [5:0] wp_n  = q_wp;
      automatic logic [5:0] cnt_n = count;
      automatic logic       ovf_n = ovf;
      automatic logic [6:0] qc_n  = q_cnt;
      rep_we      <= 1'b0;
      report_done <= 1'b0;

      // ---- judging: queue entries of the judged pair ----
      for (int h = 0; h < 2; h++) begin
        if (hit[h]) begin
          if (cnt_n < 6'(NENT)) begin
            q[wp_n] <= '{addr: {bank, 5'(cnt_n + 6'd2)}, data: ent[h]};
            wp_n  = wp_n + 6'd1;
            cnt_n = cnt_n + 6'd1;
            qc_n  = qc_n + 7'd1;
          end else begin
            ovf_n = 1'b1;
          end
        end
      end
      if (flushing) begin
        fl_pair <= fl_pair + 3'd1;
        if (fl_pair == 3'd7) begin
          // Tile judged: hand it to the finishing side, start a new report.
          flushing <= 1'b0;
          f_count  <= cnt_n;
          f_ovf    <= ovf_n;
          f_bank   <= bank;
          f_thr    <= l_thr;
          f_peak_v <= l_peak_v;
          f_peak_t <= l_peak_t;
          f_peak_b <= l_peak_b;
          f_total  <= l_total;
          f_ncells <= l_ncells;
          fst      <= F_DIV;
          div_i    <= 6'(TOTW);
          rem      <= '0;
          quo      <= '0;
          bank     <= ~bank;
          cnt_n     = '0;
          ovf_n     = 1'b0;
        end
      end
      count <= cnt_n;
      ovf   <= ovf_n;

      // ---- report RAM port: headers first, else drain the queue ----
      if (fst == F_HDR0) begin
        rep_we    <= 1'b1;
        rep_addr  <= {f_bank, 5'd0};
        rep_wdata <= {f_count, f_ovf, f_thr, quo, 21'd0};
      end else if (fst == F_HDR1) begin
        rep_we    <= 1'b1;
        rep_addr  <= {f_bank, 5'd1};
        rep_wdata <= {f_peak_v, f_peak_t, f_peak_b, 10'd0, tile_count};
      end else if (q_cnt != '0) begin
        rep_we    <= 1'b1;
        rep_addr  <= q[q_rp].addr;
        rep_wdata <= q[q_rp].data;
        q_rp      <= q_rp + 6'd1;
        qc_n       = qc_n - 7'd1;
      end
      q_wp  <= wp_n;
      q_cnt <= qc_n;

      // ---- finishing: noise floor, headers ----
      unique case (fst)
        F_DIV: begin
          // Restoring division f_total / f_ncells, one quotient bit per clock.
          if (div_i != '0) begin
            automatic logic [TOTW:0] r2 = {rem, f_total[div_i-1]};
            if (r2 >= (TOTW+1)'(f_ncells)) begin
              rem <= TOTW'(r2 - (TOTW+1)'(f_ncells));
              quo <= {quo[ACCW-2:0], 1'b1};
            end else begin
              rem <= TOTW'(r2);
              quo <= {quo[ACCW-2:0], 1'b0};
            end
            div_i <= div_i - 6'd1;
          end else begin
            fst <= F_HDR0;
          end
        end
        F_HDR0: fst <= F_HDR1;
        F_HDR1: fst <= F_DONE;
        F_DONE: begin
          report_done <= 1'b1;
          report_bank <= f_bank;
          noise_prev  <= quo;
          tile_count  <= tile_count + 16'd1;
          fst         <= F_IDLE;
        end
        default: ;
      endcase

      // ---- accumulation of the arriving tile ----
      if (in_valid) begin
        automatic int              b0  = 2 * int'(in_pair);
        automatic logic [TOTW-1:0] tot = start_pass ? '0 : total;
        automatic logic [TOTW-1:0] nc  = (start_pass ? '0 : ncells) + TOTW'(2);
        automatic logic [ACCW-1:0] pv  = start_pass ? '0 : peak_v;
        automatic logic [TOFW-1:0] pt  = peak_t;
        automatic logic [3:0]      pb  = peak_b;
        if (start_pass) thr <= thr_new;
        for (int h = 0; h < 2; h++) begin
          cur_v[b0+h]  <= in_sum[h];
          cur_ex[b0+h] <= in_sum[h] > thr_now;
          tot = tot + TOTW'(in_sum[h]);
          if (in_sum[h] > pv || (start_pass && h == 0)) begin
            pv = in_sum[h];
            pt = in_tag.t;
            pb = 4'(b0 + h);
          end
        end
        total  <= tot;
        ncells <= nc;
        peak_v <= pv;
        peak_t <= pt;
        peak_b <= pb;
        if (in_pair == 3'd7) begin
          // Column complete: it becomes the column to judge next.
          pp_ex    <= (have_prv && !start_pass) ? prv_ex : '0;
          prv_ex   <= {in_sum[1] > thr_now, in_sum[0] > thr_now, cur_ex[13:0]};
          prv_v    <= {in_sum[1], in_sum[0], cur_v[13:0]};
          prv_t    <= in_tag.t;
          have_prv <= !in_tag.col_last;
          if (in_tag.col_last) begin
            flushing <= 1'b1;
            fl_pair  <= '0;
            l_thr    <= thr_now;
            l_peak_v <= pv;
            l_peak_t <= pt;
            l_peak_b <= pb;
            l_total  <= tot;
            l_ncells <= nc;
          end
        end
      end
    end
  end
endmodule
