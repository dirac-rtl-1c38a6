// tb_qdr_model: behavioural model of the external 512K x 36 noncoherent
// integration memory (a QDR SRAM in the real system), for simulation only.
// Separate read and write ports as on a QDR part; a read returns the word two
// clocks after the clock edge that takes rd_en. Only the low DEPTH words are
// stored; the model is initialised to zero.
module tb_qdr_model #(
  parameter int AW    = 19,
  parameter int DW    = 36,
  parameter int DEPTH = 4096
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] a_q;
  logic          r_q;
  int            reads = 0, writes = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    rd_data = '0;
    a_q = '0;
    r_q = 1'b0;
  end

  always @(posedge clk) begin
    r_q <= rd_en;
    a_q <= rd_addr;
    if (r_q) begin
      rd_data <= mem[int'(a_q) % DEPTH];
      reads++;
    end
    if (wr_en) begin
      mem[int'(wr_addr) % DEPTH] <= wr_data;
      writes++;
    end
  end
endmodule
