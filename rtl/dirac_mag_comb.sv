// dirac_mag_comb: FFT sequencing and magnitude combination.
//
// For every column of the time-frequency tile the translator delivers four
// complex 16-point sequences: USB odd taps, USB even taps, LSB odd taps and
// LSB even taps. They are sent one per clock through a single shared
// dirac_fft32; the magnitude of each of the 16 retained bins is added over
// the four transforms, so the upper and lower sideband CAFs and the odd and
// even tap CAFs are combined noncoherently into one magnitude column.
// CMF 0 holds the newest samples, so each sequence enters the FFT reversed
// (CMF 15 first, i.e. oldest first); a positive bin index then means a
// frequency above the tile centre.
// The magnitude is approximated as max(|re|,|im|) + min(|re|,|im|)/2. The
// column sum is shifted right by mag_shift and saturated to MAGW (11) bits so
// that up to 128 integrations fit an 18-bit memory cell.
// Output: the column leaves as 8 bin pairs, one pair per clock
// (out_pair = 0..7 carries bins 2p and 2p+1); out_valid rises 6 clocks after
// the clock edge that takes col_valid. A new column may arrive every 8 clocks.
// Combining USB/LSB and odd/even magnitudes follows the design; the magnitude
// approximation and the scaling are choices of this implementation.
module dirac_mag_comb
  import dirac_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     col_valid,
  input  col_tag_t                 tag_in,
  input  cplx_c_t [15:0]           usb_odd,
  input  cplx_c_t [15:0]           usb_even,
  input  cplx_c_t [15:0]           lsb_odd,
  input  cplx_c_t [15:0]           lsb_even,
  input  logic [3:0]               mag_shift,
  output logic                     out_valid,
  output logic [2:0]               out_pair,
  output col_tag_t                 out_tag,
  output logic [1:0][MAGW-1:0]     out_mag,
  // full column, for test capture and checking
  output logic                     col_done,
  output logic [NBIN-1:0][MAGW-1:0] col_mag
);
  localparam int unsigned SUMW = FW + 3;

  logic [2:0]            seq;        // 1..4 while feeding the FFT
  logic                  fft_in_v, fft_out_v;
  cplx_c_t [15:0]        fft_x;
  cplx_f_t [15:0]        fft_y;
  logic [1:0]            res_cnt;
  logic [SUMW-1:0]       acc [NBIN];
  col_tag_t              tag_a, tag_b;
  logic [3:0]            emit;       // 8..15 while emitting, bit 3 = busy

  function automatic logic [FW:0] mag_approx(input cplx_f_t z);
    logic [FW-1:0] a, b, mx, mn;
    a  = z.re[FW-1] ? FW'(-z.re) : FW'(z.re);
    b  = z.im[FW-1] ? FW'(-z.im) : FW'(z.im);
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    return (FW+1)'(mx) + (FW+1)'(mn >> 1);
  endfunction

  function automatic logic [MAGW-1:0] scale_sat(input logic [SUMW-1:0] v, input logic [3:0] sh);
    logic [SUMW-1:0] s;
    s = v >> sh;
    return (s > SUMW'((1 << MAGW) - 1)) ? MAGW'((1 << MAGW) - 1) : MAGW'(s);
  endfunction

  // Feed the four transforms on the four clocks after col_valid. CMF 0 holds
  // the newest samples, so the sets are reversed (oldest CMF first) to give
  // bin indices with the sign of the frequency offset.
  cplx_c_t [15:0] set_sel;
  always_comb begin
    fft_in_v = (seq != 3'd0);
    unique case (seq)
      3'd1:    set_sel = usb_odd;
      3'd2:    set_sel = usb_even;
      3'd3:    set_sel = lsb_odd;
      default: set_sel = lsb_even;
    endcase
    for (int n = 0; n < 16; n++) fft_x[n] = set_sel[15-n];
  end

  dirac_fft32 u_fft (
    .clk, .rst_n, .in_valid(fft_in_v), .x(fft_x), .out_valid(fft_out_v), .y(fft_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq       <= '0;
      res_cnt   <= '0;
      tag_a     <= '0;
      tag_b     <= '0;
      emit      <= '0;
      col_done  <= 1'b0;
      col_mag   <= '0;
      out_valid <= 1'b0;
      out_pair  <= '0;
      out_tag   <= '0;
      out_mag   <= '0;
      for (int b = 0; b < int'(NBIN); b++) acc[b] <= '0;
    end else begin
      col_done  <= 1'b0;
      out_valid <= 1'b0;
      if (col_valid) begin
        seq   <= 3'd1;
        tag_a <= tag_in;
      end else if (seq == 3'd4) begin
        seq <= 3'd0;
      end else if (seq != 3'd0) begin
        seq <= seq + 3'd1;
      end

      // Emission comes first so that loading a new column overrides it.
      if (emit[3]) begin
        out_valid  <= 1'b1;
        out_pair   <= emit[2:0];
        out_tag    <= tag_b;
        out_mag[0] <= col_mag[{emit[2:0], 1'b0}];
        out_mag[1] <= col_mag[{emit[2:0], 1'b1}];
        emit       <= (emit == 4'd15) ? 4'd0 : emit + 4'd1;
      end

      if (fft_out_v) begin
        res_cnt <= res_cnt + 2'd1;
        for (int b = 0; b < int'(NBIN); b++) begin
          if (res_cnt == 2'd0) acc[b] <= SUMW'(mag_approx(fft_y[b]));
          else                 acc[b] <= acc[b] + SUMW'(mag_approx(fft_y[b]));
        end
        if (res_cnt == 2'd3) begin
          for (int b = 0; b < int'(NBIN); b++)
            col_mag[b] <= scale_sat(acc[b] + SUMW'(mag_approx(fft_y[b])), mag_shift);
          col_done <= 1'b1;
          tag_b    <= tag_a;
          emit     <= 4'd8;
        end
      end

    end
  end
endmodule
