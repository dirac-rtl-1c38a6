// tb_dirac_mag_comb: random USB/LSB odd/even sets every 8 clocks. The expected
// column is computed independently: floating-point DFT of each zero-padded
// set taken oldest CMF first, magnitude max+min/2, sum over the four sets, shift and saturation.
// Checks every bin pair within a small tolerance, the pair order, the tag and
// the latency: out_valid rises 6 clocks after the edge that takes col_valid.
module tb_dirac_mag_comb;
  import dirac_pkg::*;
  logic clk = 0, rst_n = 0, col_valid = 0;
  col_tag_t tag_in = '0, out_tag;
  cplx_c_t [15:0] usb_odd, usb_even, lsb_odd, lsb_even;
  logic [3:0] mag_shift = 4'd5;
  logic out_valid, col_done;
  logic [2:0] out_pair;
  logic [1:0][MAGW-1:0] out_mag;
  logic [NBIN-1:0][MAGW-1:0] col_mag;
  int checks = 0, failures = 0, cyc = 0;
  real expm [16];
  col_tag_t tg;
  int t_cv;
  int maxerr = 0;

  dirac_mag_comb dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real dft_mag(cplx_c_t [15:0] x, int m);
    real r, i, a, ar, ai;
    r = 0.0; i = 0.0;
    for (int n = 0; n < 16; n++) begin
      a = -2.0 * 3.14159265358979 * real'(m * n) / 32.0;
      // the oldest CMF (index 15) is time sample 0
      r += real'(x[15-n].re) * $cos(a) - real'(x[15-n].im) * $sin(a);
      i += real'(x[15-n].re) * $sin(a) + real'(x[15-n].im) * $cos(a);
    end
    ar = (r < 0) ? -r : r;
    ai = (i < 0) ? -i : i;
    return (ar > ai) ? ar + ai / 2.0 : ai + ar / 2.0;
  endfunction

  task automatic randset(output cplx_c_t [15:0] x, input int amp);
    for (int n = 0; n < 16; n++) begin
      x[n].re = CW'($urandom_range(2 * amp) - amp);
      x[n].im = CW'($urandom_range(2 * amp) - amp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int amp;
      amp = (k % 50 == 49) ? 8000 : 1500;   // some columns saturate
      randset(usb_odd, amp); randset(usb_even, amp);
      randset(lsb_odd, amp); randset(lsb_even, amp);
      tg = col_tag_t'($urandom);
      tag_in = tg;
      for (int b = 0; b < 16; b++) begin
        expm[b] = (dft_mag(usb_odd, b - 8) + dft_mag(usb_even, b - 8) +
                   dft_mag(lsb_odd, b - 8) + dft_mag(lsb_even, b - 8)) / 32.0;
        if (expm[b] > 2047.0) expm[b] = 2047.0;
      end
      col_valid = 1;
      t_cv = cyc;
      @(negedge clk);
      col_valid = 0;
      for (int p = 0; p < 8; p++) begin
        while (!out_valid) @(negedge clk);
        checks++;
        if (p == 0 && cyc - t_cv != 7) begin
          failures++;
          $display("latency %0d", cyc - t_cv);
        end
        if (out_pair != 3'(p) || out_tag != tg) begin failures++; $display("pair/tag wrong"); end
        for (int h = 0; h < 2; h++) begin
          int d;
          d = int'(out_mag[h]) - $rtoi(expm[2*p+h]);
          if (d < 0) d = -d;
          if (d > maxerr) maxerr = d;
          checks++;
          if (d > 3) begin
            failures++;
            $display("k=%0d bin %0d got %0d exp %f", k, 2*p+h, out_mag[h], expm[2*p+h]);
          end
        end
        @(negedge clk);
      end
    end
    $display("largest error %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
