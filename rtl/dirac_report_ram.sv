// dirac_report_ram: 4 Kbit dual-port RAM for two detection reports.
//
// 64 words of 64 bits: words 0-31 are report bank 0, words 32-63 bank 1.
// The detector writes through port A while the host reads the other bank
// through port B. Port B is synchronous: rdata holds word raddr one clock
// after re. The capacity (4 Kbit, two reports, dual port) follows the design;
// the 64 x 64 organisation is this implementation's choice.
module dirac_report_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
