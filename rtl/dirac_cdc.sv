// dirac_cdc: code Doppler compensation.
//
// A frequency offset between satellite and receiver also changes the code
// rate, so the correlation peak drifts along the time axis from one 10 ms
// integration to the next. Each of the 16 bins has its own drift, set by the
// host as rate[b] (signed, in samples per integration, 12 fraction bits).
// Before integration n is added to the stored tile, the magnitude stream of
// bin b is delayed by  d = 16 + n*rate[b]  samples: the integer part through a
// variable delay line, the fractional part (quantised to 1/16) through a
// 4-tap Lagrange interpolator whose coefficients come from a table of 16 x 4
// entries computed from the cubic Lagrange formula (dirac_pkg). The constant
// 16 lets the drift go either way; d is clamped to 2..29 so all four taps lie
// in the 32-column ring buffer of each bin.
// Input and output are the bin-pair stream of dirac_mag_comb (pair p carries
// bins 2p and 2p+1, a column is 8 pairs); the output is registered, one clock
// after the input, with the same tag. Values are clamped to 0..2^MAGW-1.
// Integer plus 4-tap Lagrange fractional delay, growing with the integration
// count, follows the design; the delay range, table resolution, rate format
// and the bias of 16 are choices of this implementation. The first cells of
// each integration read columns of the previous one.
module dirac_cdc
  import dirac_pkg::*;
#(
  parameter int unsigned DEPTH     = 32,
  parameter int unsigned RATE_FRAC = 12
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NBIN-1:0][15:0]         rate,
  input  logic                          in_valid,
  input  logic [2:0]                    in_pair,
  input  col_tag_t                      in_tag,
  input  logic [1:0][MAGW-1:0]          in_mag,
  output logic                          out_valid,
  output logic [2:0]                    out_pair,
  output col_tag_t                      out_tag,
  output logic [1:0][MAGW-1:0]          out_mag
);
  localparam int unsigned FRAC_BITS = 4;           // table of 16 delays
  localparam int unsigned PTRW  = $clog2(DEPTH);
  localparam int          BIAS  = DEPTH / 2;
  localparam int          DMIN  = 2;
  localparam int          DMAX  = DEPTH - 3;
  localparam int unsigned NFRAC = 1 << FRAC_BITS;
  localparam int          CSH   = 3 * FRAC_BITS;   // coefficient scale 2^12

  typedef logic signed [15:0] coef_t;
  typedef coef_t coef_row_t [4];

  function automatic coef_t coef(input int j, input int i);
    return coef_t'(lagrange_coef(j, i));
  endfunction

  logic [MAGW-1:0]  ring [NBIN][DEPTH];
  logic [PTRW-1:0]  wp;

  // Delay of one bin for integration n: integer part and table index.
  function automatic void bin_delay(input logic [15:0] r, input logic [NW-1:0] n,
                                    output int d_int, output int j);
    logic signed [31:0] d;
    d = (32'(BIAS) <<< RATE_FRAC) + 32'(signed'(r)) * 32'(n);
    d_int = int'(d >>> RATE_FRAC);
    j     = int'((d >>> (RATE_FRAC - FRAC_BITS)) & 32'(NFRAC - 1));
    if (d_int < DMIN) begin d_int = DMIN; j = 0; end
    if (d_int > DMAX) begin d_int = DMAX; j = 0; end
  endfunction

  logic [1:0][MAGW-1:0] res;

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      automatic int b = 2 * int'(in_pair) + h;
      automatic int d_int, j;
      automatic logic signed [31:0] acc = 32'sd0;
      bin_delay(rate[b], in_tag.n, d_int, j);
      for (int i = 0; i < 4; i++) begin
        automatic logic [PTRW-1:0] idx = wp - PTRW'(d_int - 1 + i);
        acc += 32'(coef(j, i)) * 32'(ring[b][idx]);
      end
      acc = (acc + 32'sd2048) >>> CSH;
      if (acc < 0)                        res[h] = '0;
      else if (acc > (1 << MAGW) - 1)     res[h] = '1;
      else                                res[h] = MAGW'(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      out_valid <= 1'b0;
      out_pair  <= '0;
      out_tag   <= '0;
      out_mag   <= '0;
      for (int b = 0; b < int'(NBIN); b++)
        for (int k = 0; k < int'(DEPTH); k++) ring[b][k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ring[2*in_pair][wp]   <= in_mag[0];
        ring[2*in_pair+1][wp] <= in_mag[1];
        if (in_pair == 3'd7) wp <= wp + 1'b1;
        out_pair <= in_pair;
        out_tag  <= in_tag;
        out_mag  <= res;
      end
    end
  end
endmodule
