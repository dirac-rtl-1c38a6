// dirac_cmf_bank: the systolic chain of short-time CMFs.
//
// NCMF identical CMFs are connected head to tail: the interleaved samples
// leaving the last tap of CMF k enter CMF k+1, and so does the serial shadow
// code chain. At any instant CMF k therefore correlates the k-th 0.625 ms
// segment of the reference code with the matching segment of the input, and
// all NCMF partial correlations of one 10 ms coherent interval are available
// in the same clock (out_valid, two clocks after the slot entered), which is
// what lets the FFT work without storing partial sums.
// cmf_en powers CMFs down individually; a code_swap changes the reference of
// all CMFs at once. Chain order and serial code loading are as described in
// dirac_cmf_taps.
module dirac_cmf_bank
  import dirac_pkg::*;
#(
  parameter int unsigned NCMF  = 16,
  parameter int unsigned NTAPS = 3197
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NCMF-1:0]               cmf_en,
  input  logic                          slot_valid,
  input  stream_e                       slot_idx,
  input  logic [SW-1:0]                 din,
  input  logic                          code_shift,
  input  logic                          code_in,
  input  logic                          code_swap,
  output logic                          code_out,
  output logic                          out_valid,
  output stream_e                       out_idx,
  output logic [NCMF-1:0][CW-1:0]       sum_odd,
  output logic [NCMF-1:0][CW-1:0]       sum_even
);
  logic [NCMF:0][SW-1:0] s_chain;
  logic [NCMF:0]         c_chain;
  logic [NCMF-1:0]       v;
  stream_e               idx [NCMF];

  assign s_chain[0] = din;
  assign c_chain[0] = code_in;

  for (genvar k = 0; k < NCMF; k++) begin : g_cmf
    dirac_cmf #(.NTAPS(NTAPS)) u_cmf (
      .clk, .rst_n,
      .en        (cmf_en[k]),
      .slot_valid,
      .slot_idx,
      .din       (s_chain[k]),
      .dout      (s_chain[k+1]),
      .code_shift,
      .code_in   (c_chain[k]),
      .code_out  (c_chain[k+1]),
      .code_swap,
      .out_valid (v[k]),
      .out_idx   (idx[k]),
      .sum_odd   (sum_odd[k]),
      .sum_even  (sum_even[k])
    );
  end

  assign out_valid = v[0];
  assign out_idx   = idx[0];
  assign code_out  = c_chain[NCMF];
endmodule
