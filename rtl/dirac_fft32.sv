// dirac_fft32: 32-point zero-padded complex FFT keeping the 16 centre bins.
//
// The 16 partial correlations of one coherent interval (one per short-time
// CMF, 0.625 ms apart) are padded with 16 zeros and transformed with a 32-point
// FFT. Zero padding halves the bin spacing to 50 Hz while each bin keeps the
// 100 Hz width of a 10 ms interval, which reduces scalloping loss; only the 16
// bins nearest zero frequency (-8..7, i.e. +/-400 Hz) are kept.
// Structure: radix-2 decimation in frequency, five butterfly stages computed
// combinationally in one clock and registered: y is valid (out_valid) the
// clock after in_valid, and a new transform can start every clock. Twiddles
// are cos/sin scaled by 2^14 (dirac_pkg), products are rounded back to the
// data scale, and the arithmetic carries full word growth; the result is
// saturated to FW bits.
// y[i] is bin i-8, so y[8] is zero frequency. Size, padding and the retained
// bins follow the design; the radix-2 structure and word lengths are this
// implementation's.
module dirac_fft32
  import dirac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  cplx_c_t [15:0]     x,
  output logic               out_valid,
  output cplx_f_t [15:0]     y
);
  localparam int unsigned IW = FW + 2;   // internal width

  logic signed [IW-1:0] re [32];
  logic signed [IW-1:0] im [32];
  cplx_f_t [15:0]       y_d;

  function automatic logic signed [IW-1:0] tw_mul(input logic signed [IW-1:0] a,
                                                  input logic signed [IW-1:0] b,
                                                  input int wa, input int wb);
    // (a*wa - b*wb) / 2^TWB, rounded
    logic signed [IW+TWB+1:0] p;
    p = (IW+TWB+2)'(a) * (IW+TWB+2)'(wa) - (IW+TWB+2)'(b) * (IW+TWB+2)'(wb)
        + (IW+TWB+2)'(1 << (TWB - 1));
    return IW'(p >>> TWB);
  endfunction

  function automatic logic signed [FW-1:0] sat(input logic signed [IW-1:0] v);
    if (v > IW'((1 << (FW - 1)) - 1))   return FW'((1 << (FW - 1)) - 1);
    if (v < -IW'(1 << (FW - 1)))        return FW'(-(1 << (FW - 1)));
    return FW'(v);
  endfunction

  function automatic int bitrev5(input int v);
    int r;
    r = 0;
    for (int b = 0; b < 5; b++) if (v[b]) r[4-b] = 1'b1;
    return r;
  endfunction

  always_comb begin
    for (int n = 0; n < 32; n++) begin
      re[n] = (n < 16) ? IW'(x[n].re) : '0;
      im[n] = (n < 16) ? IW'(x[n].im) : '0;
    end
    for (int s = 0; s < 5; s++) begin
      automatic int span = 16 >> s;
      for (int g = 0; g < 32; g += 2 * span) begin
        for (int i = 0; i < span; i++) begin
          automatic int k = i << s;
          automatic logic signed [IW-1:0] ar = re[g+i];
          automatic logic signed [IW-1:0] ai = im[g+i];
          automatic logic signed [IW-1:0] br = re[g+i+span];
          automatic logic signed [IW-1:0] bi = im[g+i+span];
          automatic logic signed [IW-1:0] dr = ar - br;
          automatic logic signed [IW-1:0] di = ai - bi;
          re[g+i] = ar + br;
          im[g+i] = ai + bi;
          if (k == 0) begin
            re[g+i+span] = dr;
            im[g+i+span] = di;
          end else begin
            re[g+i+span] = tw_mul(dr, di, tw_re(k), tw_im(k));
            im[g+i+span] = tw_mul(dr, -di, tw_im(k), tw_re(k));
          end
        end
      end
    end
    // Outputs come out in bit-reversed order; bin m sits at re[bitrev5(m)].
    for (int i = 0; i < 16; i++) begin
      automatic int m = (i + 24) % 32;   // bin i-8 modulo 32
      y_d[i].re = sat(re[bitrev5(m)]);
      y_d[i].im = sat(im[bitrev5(m)]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= y_d;
    end
  end
endmodule
