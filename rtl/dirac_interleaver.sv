// dirac_interleaver: merges the four sideband sample streams into one.
//
// The four 2-bit streams I_USB, Q_USB, I_LSB, Q_LSB arrive together at the
// 5.115 MHz sample rate (samp_valid, one pulse per sample instant, at least 8
// clocks apart). They are latched and sent out as four interleaved slots on
// every second clock (20.46 MHz at the 40.92 MHz system clock), in the order
// I_USB, Q_USB, I_LSB, Q_LSB, so that one CMF tap structure serves all four.
// Timing: slot s of a sample instant is valid 2 + 2*s clocks after samp_valid.
// Interleaving to one 20.46 MHz stream follows the design description; the
// slot order and spacing are choices of this implementation.
module dirac_interleaver
  import dirac_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          samp_valid,
  input  logic [SW-1:0] i_usb,
  input  logic [SW-1:0] q_usb,
  input  logic [SW-1:0] i_lsb,
  input  logic [SW-1:0] q_lsb,
  output logic          slot_valid,
  output stream_e       slot_idx,
  output logic [SW-1:0] slot_data,
  output logic          overrun     // samp_valid arrived before the last instant was sent
);
  logic [3:0][SW-1:0] held;
  logic [2:0]         phase;   // 0..6 while busy
  logic               busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held       <= '0;
      phase      <= '0;
      busy       <= 1'b0;
      slot_valid <= 1'b0;
      slot_idx   <= S_IUSB;
      slot_data  <= '0;
      overrun    <= 1'b0;
    end else begin
      slot_valid <= 1'b0;
      if (samp_valid) begin
        if (busy) overrun <= 1'b1;
        held  <= {q_lsb, i_lsb, q_usb, i_usb};
        busy  <= 1'b1;
        phase <= '0;
      end else if (busy) begin
        phase <= phase + 3'd1;
        if (phase == 3'd6) busy <= 1'b0;
      end
      // Emit on even phases: phase 0 is the clock after samp_valid.
      if (busy && !samp_valid && phase[0] == 1'b0) begin
        slot_valid <= 1'b1;
        slot_idx   <= stream_e'(phase[2:1]);
        slot_data  <= held[phase[2:1]];
      end
    end
  end
endmodule
