// dirac_pkg: types and constants shared by the DirAc direct-acquisition engine.
//
// The engine correlates four 2-bit sideband sample streams against a reference
// spreading code in a bank of short-time code matched filters (CMFs), turns the
// 16 partial correlations into 16 frequency bins with a zero-padded 32-point
// FFT, and integrates magnitudes noncoherently in an external memory.
// This package holds the sample encoding, the column tag that travels with the
// data, the FFT twiddle table and the Lagrange fractional-delay table. The two
// tables are computed from their formulas at elaboration.
package dirac_pkg;

  // Word widths. 18-bit memory cells follow from the external memory sizing
  // (16 bins x 51150 time offsets x 18 bits = 14 Mbit); the rest are chosen here.
  localparam int unsigned SW     = 2;    // sample width
  localparam int unsigned PW     = 3;    // tap product width (+-1, +-3)
  localparam int unsigned CW     = 14;   // CMF partial correlation width
  localparam int unsigned FW     = 19;   // FFT output width
  localparam int unsigned MAGW   = 11;   // per-tile magnitude width
  localparam int unsigned ACCW   = 18;   // integrated cell width (memory)
  localparam int unsigned NBIN   = 16;   // retained FFT bins
  localparam int unsigned TOFW   = 16;   // time offset index width
  localparam int unsigned TWB    = 14;   // twiddle fraction bits
  localparam int unsigned NW     = 7;    // integration index width (max 128)

  // Stream order within one interleaved sample period.
  typedef enum logic [1:0] {S_IUSB = 2'd0, S_QUSB = 2'd1, S_ILSB = 2'd2, S_QLSB = 2'd3} stream_e;

  // Tag carried with every column of the time-frequency tile.
  typedef struct packed {
    logic            act;      // column belongs to a search in progress
    logic [TOFW-1:0] t;        // time offset within the tile
    logic [NW-1:0]   n;        // noncoherent integration index
    logic            first;    // first noncoherent integration
    logic            last;     // last noncoherent integration
    logic            col_last; // last time offset of the tile
  } col_tag_t;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } cplx_c_t;

  typedef struct packed {
    logic signed [FW-1:0] re;
    logic signed [FW-1:0] im;
  } cplx_f_t;

  // 2-bit sample to signed level: bit 1 is the sign, bit 0 the magnitude;
  // levels -3, -1, +1, +3.
  function automatic logic signed [PW-1:0] sample_level(input logic [SW-1:0] s);
    logic signed [PW-1:0] m;
    m = s[0] ? 3'sd3 : 3'sd1;
    return s[1] ? -m : m;
  endfunction

  // round(cos(pi*k/16) * 2^14) for k = 0..8; the other twiddles follow by symmetry.
  function automatic int cos16(input int k);
    int kk;
    kk = k;
    case (kk)
      0: return 16384;
      1: return 16069;  // round(16384*cos(pi/16))
      2: return 15137;  // round(16384*cos(pi/8))
      3: return 13623;  // round(16384*cos(3pi/16))
      4: return 11585;  // round(16384*cos(pi/4))
      5: return 9102;   // round(16384*cos(5pi/16))
      6: return 6270;   // round(16384*cos(3pi/8))
      7: return 3196;   // round(16384*cos(7pi/16))
      default: return 0;
    endcase
  endfunction

  // Twiddle W32^k = exp(-j*2*pi*k/32) = cos(pi*k/16) - j*sin(pi*k/16), k = 0..15.
  function automatic int tw_re(input int k);
    return (k <= 8) ? cos16(k) : -cos16(16 - k);
  endfunction
  function automatic int tw_im(input int k);
    // sin(pi*k/16) = cos(pi*(8-k)/16)
    return (k <= 8) ? -cos16(8 - k) : -cos16(k - 8);
  endfunction

  // Cubic Lagrange coefficients for a delay of (D + j/16) samples, using the
  // samples at delays D-1, D, D+1, D+2 (i = 0..3), scaled by 4096 = 16^3:
  //   c0 = -mu(mu-1)(mu-2)/6, c1 = (mu+1)(mu-1)(mu-2)/2,
  //   c2 = -(mu+1)mu(mu-2)/2, c3 = (mu+1)mu(mu-1)/6, with mu = j/16.
  function automatic int lagrange_coef(input int j, input int i);
    case (i)
      0: return -(j * (j - 16) * (j - 32)) / 6;
      1: return ((j + 16) * (j - 16) * (j - 32)) / 2;
      2: return -((j + 16) * j * (j - 32)) / 2;
      default: return ((j + 16) * j * (j - 16)) / 6;
    endcase
  endfunction

endpackage
