// dirac_cmf_taps: the tap structures of one short-time code matched filter.
//
// Every tap holds a 4-stage sample shift register (one stage per interleaved
// stream), a multiplier and two code registers. The shift registers of all
// taps form one chain: each interleaved slot enters stage 0 of tap 0, and
// stage 3 of tap j feeds stage 0 of tap j+1, so after a slot of stream s has
// shifted in, stage 0 of tap j holds stream s's sample from j sample instants
// ago. The multiplier forms stage0 x active code bit for every tap, so the
// products of all taps belong to the same stream and one adder tree can be
// shared by the four streams.
// The second (shadow) code register of each tap is loaded serially through a
// chain (code_shift/code_in, same direction as the samples) while the active
// codes are in use; code_swap copies all shadow bits into the active
// registers at once, for a seamless change of reference code.
// en models the clock gate used for power management: with en low nothing
// changes. Products are combinational from the registers.
// Sample levels are sign/magnitude (-3,-1,+1,+3) and a code bit of 1 means +1;
// both encodings are choices of this implementation. The tap structure itself
// (4-stage register, multiplier, two code registers) follows the design.
module dirac_cmf_taps
  import dirac_pkg::*;
#(
  parameter int unsigned NTAPS = 3197
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            en,
  input  logic                            slot_valid,
  input  logic [SW-1:0]                   din,
  output logic [SW-1:0]                   dout,
  input  logic                            code_shift,
  input  logic                            code_in,
  output logic                            code_out,
  input  logic                            code_swap,
  output logic [NTAPS-1:0][PW-1:0]        prod
);
  logic [NTAPS-1:0][3:0][SW-1:0] sr;
  logic [NTAPS-1:0]              code_act, code_shd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      code_act <= '0;
      code_shd <= '0;
    end else if (en) begin
      if (slot_valid) begin
        // One step along the whole chain: tap j stage k -> stage k+1,
        // stage 3 -> next tap's stage 0, din -> tap 0 stage 0.
        sr <= (NTAPS * 4 * SW)'({sr, din});
      end
      if (code_shift) code_shd <= {code_shd[NTAPS-2:0], code_in};
      if (code_swap)  code_act <= code_shd;
    end
  end

  assign dout     = sr[NTAPS-1][3];
  assign code_out = code_shd[NTAPS-1];

  always_comb begin
    for (int j = 0; j < int'(NTAPS); j++) begin
      prod[j] = code_act[j] ? sample_level(sr[j][0]) : -sample_level(sr[j][0]);
    end
  end
endmodule
