// dirac_regs: memory-mapped host interface.
//
// A simple synchronous 32-bit register bus (word addresses, 8 bits). Writes
// take effect at the clock edge; a read returns bus_rdata with bus_rvalid one
// clock after bus_rd. Register map:
//   0x00 CTRL     [0] run, [1] 5 ms mode, [3:2] test_sel, [4] threshold mode
//                 (1 = relative), [5] standby, [11:8] magnitude shift
//   0x01 NNCI     [7:0] noncoherent integrations per tile (1..128)
//   0x02 CMF_PD   [15:0] power down individual CMFs (1 = off)
//   0x03 THR_ABS  [17:0] absolute threshold
//   0x04 THR_MULT [7:0]  relative threshold factor, in 1/16
//   0x05 STATUS   [0] report ready (write 1 to clear), [1] bank of the last
//                 report, [2] busy, [31:16] tiles reported (read only)
//   0x10-0x1F     code Doppler rate of bins 0..15, [15:0] signed, 12 fraction bits
//   0x80-0xFF     detection report RAM: address 0x80 + 2*word + half, half 0
//                 is bits 31:0 and half 1 bits 63:32 of the 64-bit word
// Making the reports available through a simple memory map follows the
// design; the register map and bus protocol are this implementation's.
module dirac_regs
  import dirac_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bus_wr,
  input  logic                  bus_rd,
  input  logic [7:0]            bus_addr,
  input  logic [31:0]           bus_wdata,
  output logic [31:0]           bus_rdata,
  output logic                  bus_rvalid,
  // configuration
  output logic                  run,
  output logic                  mode_5ms,
  output logic [1:0]            test_sel,
  output logic                  thr_mode,
  output logic                  standby,
  output logic [3:0]            mag_shift,
  output logic [7:0]            n_nci,
  output logic [15:0]           cmf_pd,
  output logic [ACCW-1:0]       thr_abs,
  output logic [7:0]            thr_mult,
  output logic [NBIN-1:0][15:0] rate,
  // status
  input  logic                  busy,
  input  logic                  report_done,
  input  logic                  report_bank,
  input  logic [15:0]           tile_count,
  // report RAM read port
  output logic                  ram_re,
  output logic [5:0]            ram_raddr,
  input  logic [63:0]           ram_rdata
);
  logic       ready, last_bank;
  logic [7:0] addr_q;

  assign ram_re    = bus_rd && bus_addr[7];
  assign ram_raddr = bus_addr[6:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; mode_5ms <= 1'b0; test_sel <= '0; thr_mode <= 1'b0; standby <= 1'b0;
      mag_shift <= '0; n_nci <= 8'd1; cmf_pd <= '0; thr_abs <= '1; thr_mult <= 8'd64;
      rate <= '0; ready <= 1'b0; last_bank <= 1'b0; addr_q <= '0; bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_rd;
      if (bus_rd) addr_q <= bus_addr;
      if (report_done) begin
        ready     <= 1'b1;
        last_bank <= report_bank;
      end
      if (bus_wr) begin
        unique casez (bus_addr)
          8'h00: begin
            run       <= bus_wdata[0];
            mode_5ms  <= bus_wdata[1];
            test_sel  <= bus_wdata[3:2];
            thr_mode  <= bus_wdata[4];
            standby   <= bus_wdata[5];
            mag_shift <= bus_wdata[11:8];
          end
          8'h01: n_nci    <= bus_wdata[7:0];
          8'h02: cmf_pd   <= bus_wdata[15:0];
          8'h03: thr_abs  <= bus_wdata[ACCW-1:0];
          8'h04: thr_mult <= bus_wdata[7:0];
          8'h05: if (bus_wdata[0] && !report_done) ready <= 1'b0;
          8'b0001_????: rate[bus_addr[3:0]] <= bus_wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (addr_q[7]) begin
      bus_rdata = addr_q[0] ? ram_rdata[63:32] : ram_rdata[31:0];
    end else begin
      unique casez (addr_q)
        8'h00: bus_rdata = {20'd0, mag_shift, 2'd0, standby, thr_mode, test_sel, mode_5ms, run};
        8'h01: bus_rdata = {24'd0, n_nci};
        8'h02: bus_rdata = {16'd0, cmf_pd};
        8'h03: bus_rdata = 32'(thr_abs);
        8'h04: bus_rdata = {24'd0, thr_mult};
        8'h05: bus_rdata = {tile_count, 13'd0, busy, last_bank, ready};
        8'b0001_????: bus_rdata = {16'd0, rate[addr_q[3:0]]};
        default: bus_rdata = '0;
      endcase
    end
  end
endmodule
