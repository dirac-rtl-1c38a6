// dirac_ctrl: tile and integration sequencer.
//
// A search covers one time-frequency tile (10 ms x 800 Hz in 10 ms mode) and
// repeats it for n_nci noncoherent integrations (1..128); tiles follow each
// other while run is high, and the controller stops at the end of a tile once
// run is low. Every 5.115 MHz sample instant is one time offset t of the
// tile: TILE_COLS offsets in 10 ms mode, half as many in 5 ms mode.
// At t = 0 the controller pulses code_swap so that the CMFs switch to the
// next segment of the reference code exactly as that instant's first slot
// enters the CMF bank (two clocks after samp_valid), and pulses code_req to
// tell the code source to shift the segment after it into the shadow
// registers. Because each integration uses the code segment one coherent
// interval later, every integration searches the same code offsets.
// The tag of the instant (t, integration index, first/last flags, last
// column, active) changes with code_swap's clock and stays stable for the
// instant, so the translator can pick it up with the I_USB result.
// The sequence (code update every coherent interval, up to 128 integrations,
// 10/5 ms modes) follows the design; the run/stop handshake is this design's.
module dirac_ctrl
  import dirac_pkg::*;
#(
  parameter int unsigned TILE_COLS = 51150,
  parameter int unsigned MAX_NCI   = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            mode_5ms,
  input  logic [7:0]      n_nci,       // integrations per tile, 1..MAX_NCI (0 counts as 1)
  input  logic            samp_valid,
  output logic            code_swap,
  output logic            code_req,
  output col_tag_t        tag,
  output logic            busy,
  output logic            tile_done
);
  logic            sv_d;
  logic            active;
  logic [TOFW-1:0] t;
  logic [NW-1:0]   n;
  logic [TOFW-1:0] cols;
  logic [NW-1:0]   nlast;

  assign cols  = mode_5ms ? TOFW'(TILE_COLS / 2) : TOFW'(TILE_COLS);
  always_comb begin
    if (n_nci == 8'd0)                    nlast = '0;
    else if (n_nci > 8'(MAX_NCI))         nlast = NW'(MAX_NCI - 1);
    else                                  nlast = NW'(n_nci - 8'd1);
  end
  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv_d      <= '0;
      active    <= 1'b0;
      t         <= '0;
      n         <= '0;
      tag       <= '0;
      code_swap <= 1'b0;
      code_req  <= 1'b0;
      tile_done <= 1'b0;
    end else begin
      sv_d      <= samp_valid;
      code_swap <= 1'b0;
      code_req  <= 1'b0;
      tile_done <= 1'b0;
      if (sv_d) begin
        // sv_d is one clock ahead of the instant's first slot.
        if (!active && run) begin
          active <= 1'b1;
        end
        if (active || run) begin
          automatic logic [TOFW-1:0] tt = active ? t : '0;
          automatic logic [NW-1:0]   nn = active ? n : '0;
          tag <= '{act: 1'b1, t: tt, n: nn, first: nn == '0, last: nn == nlast,
                   col_last: tt == cols - 1'b1};
          if (tt == '0) begin
            code_swap <= 1'b1;
            code_req  <= 1'b1;
          end
          if (tt == cols - 1'b1) begin
            t <= '0;
            if (nn == nlast) begin
              n         <= '0;
              tile_done <= 1'b1;
              if (!run) active <= 1'b0;
            end else begin
              n <= nn + 1'b1;
            end
          end else begin
            t <= tt + 1'b1;
            n <= nn;
          end
        end else begin
          tag <= '0;
        end
      end
    end
  end
endmodule
