// dirac_translator: CMF/FFT translator.
//
// The CMF bank delivers its results interleaved in time: in one sample period
// it produces the I_USB, Q_USB, I_LSB and Q_LSB correlations (odd and even
// tap sums each) of every CMF, one stream per result. The translator gathers
// these four results for all NCMF CMFs in parallel and, when the Q_LSB result
// arrives, presents them as complex pairs: USB = I_USB + jQ_USB and
// LSB = I_LSB + jQ_LSB, separately for odd and even taps. The output set is
// held in its own register until the next set is complete (one sample period,
// 8 clocks), so the FFT can take its four transforms from it at leisure.
// The column tag is latched with the I_USB result and leaves with the set.
// Timing: col_valid is high for one clock, the clock after the Q_LSB result.
// The translator's function follows the design; the double register and the
// tag handling are choices made here.
module dirac_translator
  import dirac_pkg::*;
#(
  parameter int unsigned NCMF = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  stream_e                   in_idx,
  input  logic [NCMF-1:0][CW-1:0]   in_odd,
  input  logic [NCMF-1:0][CW-1:0]   in_even,
  input  col_tag_t                  tag_in,
  output logic                      col_valid,
  output col_tag_t                  tag_out,
  output cplx_c_t [NCMF-1:0]        usb_odd,
  output cplx_c_t [NCMF-1:0]        usb_even,
  output cplx_c_t [NCMF-1:0]        lsb_odd,
  output cplx_c_t [NCMF-1:0]        lsb_even
);
  logic [NCMF-1:0][CW-1:0] iu_o, iu_e, qu_o, qu_e, il_o, il_e;
  col_tag_t                tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {iu_o, iu_e, qu_o, qu_e, il_o, il_e} <= '0;
      tag_q     <= '0;
      tag_out   <= '0;
      col_valid <= 1'b0;
      usb_odd   <= '0;
      usb_even  <= '0;
      lsb_odd   <= '0;
      lsb_even  <= '0;
    end else begin
      col_valid <= 1'b0;
      if (in_valid) begin
        unique case (in_idx)
          S_IUSB: begin iu_o <= in_odd; iu_e <= in_even; tag_q <= tag_in; end
          S_QUSB: begin qu_o <= in_odd; qu_e <= in_even; end
          S_ILSB: begin il_o <= in_odd; il_e <= in_even; end
          S_QLSB: begin
            for (int k = 0; k < int'(NCMF); k++) begin
              usb_odd[k]  <= '{re: iu_o[k], im: qu_o[k]};
              usb_even[k] <= '{re: iu_e[k], im: qu_e[k]};
              lsb_odd[k]  <= '{re: il_o[k], im: in_odd[k]};
              lsb_even[k] <= '{re: il_e[k], im: in_even[k]};
            end
            tag_out   <= tag_q;
            col_valid <= 1'b1;
          end
        endcase
      end
    end
  end
endmodule
