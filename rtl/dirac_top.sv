// dirac_top: DirAc direct-acquisition engine for the M-code signal.
//
// Data path, one 40.92 MHz clock:
//   four 2-bit sideband streams at 5.115 MHz (samp_valid every 8 clocks)
//   -> dirac_interleaver: one stream of 20.46 MHz slots
//   -> dirac_cmf_bank: 16 chained short-time CMFs of NTAPS taps, odd/even sums
//   -> dirac_translator: complex USB/LSB, odd/even sets of 16 partial sums
//   -> dirac_mag_comb: four 32-point FFTs per instant through one dirac_fft32,
//      magnitudes of the 16 centre bins summed into one column
//   -> dirac_cdc: per-bin code Doppler delay (integer + Lagrange fraction)
//   -> dirac_test_mux -> dirac_nci: integration over the external memory
//   -> dirac_detector -> dirac_report_ram, read through dirac_regs.
// dirac_ctrl sequences tiles, integrations and code swaps. One column of the
// time-frequency tile (16 bins of one time offset) is produced per sample
// instant, so a 10 ms tile of 51150 offsets takes 409,200 clocks per
// integration once the pipeline runs.
// External interfaces: the reference code enters serially on code_in /
// code_shift (one bit per clock, NCMF*NTAPS bits per segment, oldest chip
// first) and code_req asks for the next segment; the external memory has one
// read port with RD_LAT clocks latency and one write port; the host uses the
// register bus of dirac_regs; irq pulses when a report is complete.
// The FFT is built for 16 CMFs, so the bank size is fixed at 16.
module dirac_top
  import dirac_pkg::*;
#(
  parameter int unsigned NTAPS     = 3197,
  parameter int unsigned TILE_COLS = 51150,
  parameter int unsigned RD_LAT    = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // sideband samples
  input  logic               samp_valid,
  input  logic [SW-1:0]      i_usb,
  input  logic [SW-1:0]      q_usb,
  input  logic [SW-1:0]      i_lsb,
  input  logic [SW-1:0]      q_lsb,
  output logic               overrun,
  // reference code
  input  logic               code_shift,
  input  logic               code_in,
  output logic               code_out,
  output logic               code_req,
  // external noncoherent integration memory
  output logic               mem_rd_en,
  output logic [18:0]        mem_rd_addr,
  input  logic [2*ACCW-1:0]  mem_rd_data,
  output logic               mem_wr_en,
  output logic [18:0]        mem_wr_addr,
  output logic [2*ACCW-1:0]  mem_wr_data,
  // host
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [7:0]         bus_addr,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               bus_rvalid,
  output logic               irq,
  output logic               tile_done
);
  localparam int unsigned NCMF = 16;

  // configuration
  logic                  run, mode_5ms, thr_mode, standby;
  logic [1:0]            test_sel;
  logic [3:0]            mag_shift;
  logic [7:0]            n_nci, thr_mult;
  logic [15:0]           cmf_pd;
  logic [ACCW-1:0]       thr_abs;
  logic [NBIN-1:0][15:0] rate;
  logic [NCMF-1:0]       cmf_en;

  // interleaver -> CMF bank
  logic                  slot_valid;
  stream_e               slot_idx;
  logic [SW-1:0]         slot_data;
  // controller
  logic                  code_swap, busy;
  col_tag_t              tag;
  // CMF bank -> translator
  logic                  cmf_valid;
  stream_e               cmf_idx;
  logic [NCMF-1:0][CW-1:0] cmf_odd, cmf_even;
  // translator -> magnitude
  logic                  tr_valid;
  col_tag_t              tr_tag;
  cplx_c_t [NCMF-1:0]    usb_odd, usb_even, lsb_odd, lsb_even;
  // magnitude -> CDC
  logic                  mg_valid;
  logic [2:0]            mg_pair;
  col_tag_t              mg_tag;
  logic [1:0][MAGW-1:0]  mg_mag;
  logic                  mg_col_done;
  logic [NBIN-1:0][MAGW-1:0] mg_col;
  // CDC -> test mux
  logic                  cd_valid;
  logic [2:0]            cd_pair;
  col_tag_t              cd_tag;
  logic [1:0][MAGW-1:0]  cd_mag;
  // test mux -> NCI
  logic                  capture, tm_valid;
  logic [2:0]            tm_pair;
  col_tag_t              tm_tag;
  logic [1:0][MAGW-1:0]  tm_mag;
  // NCI -> detector
  logic                  nc_valid;
  logic [2:0]            nc_pair;
  col_tag_t              nc_tag;
  logic [1:0][ACCW-1:0]  nc_sum;
  // detector -> RAM
  logic                  rep_we, report_done, report_bank;
  logic [5:0]            rep_addr, ram_raddr;
  logic [63:0]           rep_wdata, ram_rdata;
  logic                  ram_re;
  logic [15:0]           tile_count;

  // Power management: standby stops every CMF; 5 ms mode uses the first half.
  always_comb begin
    for (int k = 0; k < int'(NCMF); k++)
      cmf_en[k] = !standby && !cmf_pd[k] && (!mode_5ms || k < int'(NCMF / 2));
  end

  dirac_interleaver u_il (
    .clk, .rst_n, .samp_valid, .i_usb, .q_usb, .i_lsb, .q_lsb,
    .slot_valid, .slot_idx, .slot_data, .overrun
  );

  dirac_ctrl #(.TILE_COLS(TILE_COLS)) u_ctrl (
    .clk, .rst_n, .run, .mode_5ms, .n_nci, .samp_valid,
    .code_swap, .code_req, .tag, .busy, .tile_done
  );

  dirac_cmf_bank #(.NCMF(NCMF), .NTAPS(NTAPS)) u_bank (
    .clk, .rst_n, .cmf_en, .slot_valid, .slot_idx, .din(slot_data),
    .code_shift, .code_in, .code_swap, .code_out,
    .out_valid(cmf_valid), .out_idx(cmf_idx), .sum_odd(cmf_odd), .sum_even(cmf_even)
  );

  dirac_translator #(.NCMF(NCMF)) u_tr (
    .clk, .rst_n, .in_valid(cmf_valid), .in_idx(cmf_idx), .in_odd(cmf_odd),
    .in_even(cmf_even), .tag_in(tag), .col_valid(tr_valid), .tag_out(tr_tag),
    .usb_odd, .usb_even, .lsb_odd, .lsb_even
  );

  dirac_mag_comb u_mag (
    .clk, .rst_n, .col_valid(tr_valid && tr_tag.act), .tag_in(tr_tag),
    .usb_odd, .usb_even, .lsb_odd, .lsb_even, .mag_shift,
    .out_valid(mg_valid), .out_pair(mg_pair), .out_tag(mg_tag), .out_mag(mg_mag),
    .col_done(mg_col_done), .col_mag(mg_col)
  );

  dirac_cdc u_cdc (
    .clk, .rst_n, .rate,
    .in_valid(mg_valid), .in_pair(mg_pair), .in_tag(mg_tag), .in_mag(mg_mag),
    .out_valid(cd_valid), .out_pair(cd_pair), .out_tag(cd_tag), .out_mag(cd_mag)
  );

  dirac_test_mux u_tm (
    .test_sel,
    .a_valid(mg_valid), .a_pair(mg_pair), .a_tag(mg_tag), .a_mag(mg_mag),
    .b_valid(cd_valid), .b_pair(cd_pair), .b_tag(cd_tag), .b_mag(cd_mag),
    .capture, .o_valid(tm_valid), .o_pair(tm_pair), .o_tag(tm_tag), .o_mag(tm_mag)
  );

  dirac_nci #(.AW(19), .RD_LAT(RD_LAT)) u_nci (
    .clk, .rst_n, .capture,
    .in_valid(tm_valid), .in_pair(tm_pair), .in_tag(tm_tag), .in_mag(tm_mag),
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .out_valid(nc_valid), .out_pair(nc_pair), .out_tag(nc_tag), .out_sum(nc_sum)
  );

  dirac_detector u_det (
    .clk, .rst_n,
    .in_valid(nc_valid && nc_tag.last && !capture), .in_pair(nc_pair), .in_tag(nc_tag),
    .in_sum(nc_sum), .thr_mode, .thr_abs, .thr_mult,
    .rep_we, .rep_addr, .rep_wdata, .report_done, .report_bank, .tile_count
  );

  dirac_report_ram u_ram (
    .clk, .we(rep_we), .waddr(rep_addr), .wdata(rep_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  dirac_regs u_regs (
    .clk, .rst_n, .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .run, .mode_5ms, .test_sel, .thr_mode, .standby, .mag_shift, .n_nci, .cmf_pd,
    .thr_abs, .thr_mult, .rate, .busy, .report_done, .report_bank, .tile_count,
    .ram_re, .ram_raddr, .ram_rdata
  );

  assign irq = report_done;
endmodule
