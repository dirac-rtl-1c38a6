// dirac_test_mux: data-collection selector in front of the external memory.
//
// In normal operation (test_sel = 0) the code-Doppler-compensated magnitude
// stream goes on to noncoherent integration. For data collection the stream
// written to the external memory can instead be the combined magnitude
// column before compensation (test_sel = 1) or after it (test_sel = 2); in
// both capture modes the column is written as it is, without adding, so the
// host can read one tile of that processing stage back from the memory.
// Purely combinational. Collecting data of a processing stage through the
// noncoherent memory follows the design; the two capture points are the ones
// built here.
module dirac_test_mux
  import dirac_pkg::*;
(
  input  logic [1:0]           test_sel,
  // magnitude stream before compensation
  input  logic                 a_valid,
  input  logic [2:0]           a_pair,
  input  col_tag_t             a_tag,
  input  logic [1:0][MAGW-1:0] a_mag,
  // stream after compensation
  input  logic                 b_valid,
  input  logic [2:0]           b_pair,
  input  col_tag_t             b_tag,
  input  logic [1:0][MAGW-1:0] b_mag,
  // to the noncoherent integrator
  output logic                 capture,
  output logic                 o_valid,
  output logic [2:0]           o_pair,
  output col_tag_t             o_tag,
  output logic [1:0][MAGW-1:0] o_mag
);
  always_comb begin
    capture = (test_sel != 2'd0);
    if (test_sel == 2'd1) begin
      o_valid = a_valid;
      o_pair  = a_pair;
      o_tag   = a_tag;
      o_mag   = a_mag;
    end else begin
      o_valid = b_valid;
      o_pair  = b_pair;
      o_tag   = b_tag;
      o_mag   = b_mag;
    end
  end
endmodule
