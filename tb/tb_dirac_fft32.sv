// tb_dirac_fft32: random and single-tone inputs; every retained bin is
// compared with a direct 32-point DFT of the zero-padded input computed in
// floating point, within a rounding tolerance. Also checks the one-clock
// latency and back-to-back transforms.
module tb_dirac_fft32;
  import dirac_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_c_t [15:0] x = '0;
  cplx_f_t [15:0] y;
  int checks = 0, failures = 0;
  real er [16], ei [16];
  real worst = 0.0;

  dirac_fft32 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reference();
    for (int i = 0; i < 16; i++) begin
      int m;
      m = i - 8;
      er[i] = 0.0; ei[i] = 0.0;
      for (int n = 0; n < 16; n++) begin
        real a;
        a = -2.0 * 3.14159265358979 * real'(m * n) / 32.0;
        er[i] += real'(x[n].re) * $cos(a) - real'(x[n].im) * $sin(a);
        ei[i] += real'(x[n].re) * $sin(a) + real'(x[n].im) * $cos(a);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      for (int n = 0; n < 16; n++) begin
        if (k % 4 == 0) begin
          // tone in bin (k/4 % 16) - 8 with full-scale amplitude
          real a;
          a = 2.0 * 3.14159265358979 * real'((((k / 4) % 16) - 8) * n) / 32.0;
          x[n].re = CW'($rtoi(8000.0 * $cos(a)));
          x[n].im = CW'($rtoi(8000.0 * $sin(a)));
        end else begin
          x[n].re = CW'($urandom);
          x[n].im = CW'($urandom);
        end
      end
      in_valid = 1;
      reference();
      @(posedge clk); #1;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      for (int i = 0; i < 16; i++) begin
        real dr, di;
        dr = real'(y[i].re) - er[i];
        di = real'(y[i].im) - ei[i];
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > worst) worst = dr;
        if (di > worst) worst = di;
        checks++;
        if (dr > 12.0 || di > 12.0) begin
          failures++;
          $display("k=%0d bin %0d got %0d,%0d exp %f,%f", k, i - 8, y[i].re, y[i].im, er[i], ei[i]);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    $display("largest error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
