// dirac_nci: noncoherent integration over the external memory.
//
// The external memory holds one partially integrated tile: 18 bits per cell,
// two bins per 36-bit word, address = time offset * 8 + bin pair, so a 10 ms
// tile (51150 x 16 cells) uses 409,200 words of a 512K x 36 part.
// For every incoming bin pair the block issues a read of the stored pair;
// RD_LAT clocks later it adds the new magnitudes to the stored sums
// (saturating at 2^18-1) and writes the result back to the same address.
// In the first integration (tag.n == 0), and in capture mode, nothing is
// read and the new values are written as they are. Every written pair also
// leaves on out_* with its tag, so the detector can take the sums of the last
// integration. One read and one write per clock; out_* and the write appear
// RD_LAT clocks after the input.
// The read-add-write scheme over external memory follows the design; the
// word packing, addressing and read latency are choices of this implementation.
module dirac_nci
  import dirac_pkg::*;
#(
  parameter int unsigned AW     = 19,
  parameter int unsigned RD_LAT = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      capture,
  input  logic                      in_valid,
  input  logic [2:0]                in_pair,
  input  col_tag_t                  in_tag,
  input  logic [1:0][MAGW-1:0]      in_mag,
  // external memory
  output logic                      mem_rd_en,
  output logic [AW-1:0]             mem_rd_addr,
  input  logic [2*ACCW-1:0]         mem_rd_data,
  output logic                      mem_wr_en,
  output logic [AW-1:0]             mem_wr_addr,
  output logic [2*ACCW-1:0]         mem_wr_data,
  // integrated output
  output logic                      out_valid,
  output logic [2:0]                out_pair,
  output col_tag_t                  out_tag,
  output logic [1:0][ACCW-1:0]      out_sum
);
  typedef struct packed {
    logic                 valid;
    logic                 add;
    logic [2:0]           pair;
    col_tag_t             tag;
    logic [AW-1:0]        addr;
    logic [1:0][MAGW-1:0] mag;
  } stage_t;

  stage_t               pipe [RD_LAT];
  stage_t               cur, last;
  logic [AW-1:0]        addr;
  logic [1:0][ACCW-1:0] old, sum;

  assign addr = AW'({in_tag.t, in_pair});

  always_comb begin
    cur.valid = in_valid;
    cur.add   = in_valid && (in_tag.n != '0) && !capture;
    cur.pair  = in_pair;
    cur.tag   = in_tag;
    cur.addr  = addr;
    cur.mag   = in_mag;
    mem_rd_en   = cur.add;
    mem_rd_addr = addr;
  end

  assign last = pipe[RD_LAT-1];
  assign old  = mem_rd_data;

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      automatic logic [ACCW:0] s = (ACCW+1)'(last.mag[h]) + (last.add ? (ACCW+1)'(old[h]) : '0);
      sum[h] = s[ACCW] ? '1 : s[ACCW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RD_LAT); i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= cur;
      for (int i = 1; i < int'(RD_LAT); i++) pipe[i] <= pipe[i-1];
    end
  end

  always_comb begin
    mem_wr_en   = last.valid;
    mem_wr_addr = last.addr;
    mem_wr_data = sum;
    out_valid   = last.valid;
    out_pair    = last.pair;
    out_tag     = last.tag;
    out_sum     = sum;
  end
endmodule
