// tb_dirac_interleaver: checks the interleaved slot order, data and timing.
// Random samples arrive every 8 clocks; each must come out as four slots,
// I_USB, Q_USB, I_LSB, Q_LSB, at 2, 4, 6 and 8 clocks after samp_valid.
module tb_dirac_interleaver;
  import dirac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic samp_valid = 0;
  logic [1:0] i_usb = 0, q_usb = 0, i_lsb = 0, q_lsb = 0;
  logic slot_valid, overrun;
  stream_e slot_idx;
  logic [1:0] slot_data;
  int checks = 0, failures = 0, cyc = 0;
  logic [1:0] exp_d [4];
  int t0;

  dirac_interleaver dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      {i_usb, q_usb, i_lsb, q_lsb} = 8'($urandom);
      exp_d = '{i_usb, q_usb, i_lsb, q_lsb};
      samp_valid = 1;
      t0 = cyc;
      @(negedge clk);
      samp_valid = 0;
      for (int s = 0; s < 4; s++) begin
        // wait until the slot is due
        while (cyc < t0 + 2 + 2 * s) @(negedge clk);
        checks++;
        if (!slot_valid || slot_idx != stream_e'(s) || slot_data != exp_d[s]) begin
          failures++;
          $display("slot %0d: valid=%0d idx=%0d data=%0d exp %0d", s, slot_valid, slot_idx, slot_data, exp_d[s]);
        end
        @(negedge clk);
        checks++;
        if (slot_valid) begin failures++; $display("extra slot"); end
      end
      while (cyc < t0 + 8) @(negedge clk);
    end
    checks++;
    if (overrun) begin failures++; $display("false overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
