// dirac_cmf: one short-time code matched filter (0.625 ms at 5.115 MHz).
//
// NTAPS tap structures (dirac_cmf_taps) feed a dual adder tree: one tree sums
// the products of the odd-numbered taps, the other those of the even-numbered
// taps (taps numbered from 1 at the newest sample, so array positions 0,2,4..
// are the odd taps). The two sums are kept apart for the later noncoherent
// combination of odd and even spreading symbols. Both sums are registered:
// sum_odd/sum_even and out_idx are valid in the clock where out_valid is high,
// one clock after the slot that produced them was shifted in.
// With en low (power-down) the CMF's registers hold and its outputs are zero.
// The tap count, the dual tree and the odd/even split follow the design; the
// single output register and the numbering of odd taps are choices made here.
module dirac_cmf
  import dirac_pkg::*;
#(
  parameter int unsigned NTAPS = 3197
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                slot_valid,
  input  stream_e             slot_idx,
  input  logic [SW-1:0]       din,
  output logic [SW-1:0]       dout,
  input  logic                code_shift,
  input  logic                code_in,
  output logic                code_out,
  input  logic                code_swap,
  output logic                out_valid,
  output stream_e             out_idx,
  output logic signed [CW-1:0] sum_odd,
  output logic signed [CW-1:0] sum_even
);
  localparam int unsigned NODD  = (NTAPS + 1) / 2;
  localparam int unsigned NEVEN = (NTAPS > 1) ? NTAPS / 2 : 1;

  logic [NTAPS-1:0][PW-1:0] prod;
  logic [NODD-1:0][PW-1:0]  prod_odd;
  logic [NEVEN-1:0][PW-1:0] prod_even;
  logic signed [CW-1:0]     s_odd, s_even;
  logic                     valid_q;
  stream_e                  idx_q;

  dirac_cmf_taps #(.NTAPS(NTAPS)) u_taps (
    .clk, .rst_n, .en, .slot_valid, .din, .dout,
    .code_shift, .code_in, .code_out, .code_swap, .prod
  );

  always_comb begin
    prod_odd  = '0;
    prod_even = '0;
    for (int j = 0; j < int'(NTAPS); j++) begin
      if (j % 2 == 0) prod_odd[j/2]  = prod[j];
      else            prod_even[j/2] = prod[j];
    end
  end

  dirac_adder_tree #(.N(NODD),  .IW(PW), .OW(CW)) u_tree_odd  (.in_vec(prod_odd),  .sum(s_odd));
  dirac_adder_tree #(.N(NEVEN), .IW(PW), .OW(CW)) u_tree_even (.in_vec(prod_even), .sum(s_even));

  // The tree result for a slot is ready one clock after it was shifted in.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      idx_q     <= S_IUSB;
      out_valid <= 1'b0;
      out_idx   <= S_IUSB;
      sum_odd   <= '0;
      sum_even  <= '0;
    end else begin
      valid_q   <= slot_valid;
      idx_q     <= slot_idx;
      out_valid <= valid_q;
      out_idx   <= idx_q;
      if (valid_q) begin
        sum_odd  <= en ? s_odd  : '0;
        sum_even <= en ? s_even : '0;
      end
    end
  end
endmodule
