// tb_dirac_cdc: each bin carries a linear ramp in time, which the cubic
// Lagrange interpolator must reproduce exactly, so the output must equal the
// ramp evaluated at (time - delay) with delay = 16 + n*rate (1/16-sample
// steps, limited to 2..29). Rates are positive, negative, zero and large
// enough to hit both limits; several integrations n are run. Also checks
// the one-clock latency and the tag.
module tb_dirac_cdc;
  import dirac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NBIN-1:0][15:0] rate;
  logic in_valid = 0, out_valid;
  logic [2:0] in_pair = 0, out_pair;
  col_tag_t in_tag = '0, out_tag;
  logic [1:0][MAGW-1:0] in_mag = '0, out_mag;
  int checks = 0, failures = 0;
  int g = 0;

  dirac_cdc dut (.*);
  always #5 clk = ~clk;

  function automatic real ramp(real gg, int b);
    return 3.0 * gg + 20.0 * real'(b) + 50.0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rv [16];
    rv = '{0, 4096, -4096, 1000, -1000, 300, -300, 2048, -2048, 12345, -12345, 77, -77, 5000, -9000, 30000};
    for (int b = 0; b < 16; b++) rate[b] = 16'(rv[b]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      for (int t = 0; t < 60; t++) begin
        for (int p = 0; p < 8; p++) begin
          @(negedge clk);
          in_valid = 1;
          in_pair  = 3'(p);
          in_tag   = '{act: 1'b1, t: 16'(t), n: 7'(n), first: n == 0, last: 1'b0, col_last: t == 59};
          for (int h = 0; h < 2; h++) in_mag[h] = MAGW'($rtoi(ramp(real'(g), 2 * p + h)));
          @(posedge clk); #1;
          checks++;
          if (!out_valid || out_pair != 3'(p) || out_tag != in_tag) begin
            failures++; $display("valid/pair/tag wrong");
          end
          if (g >= 32) begin
            for (int h = 0; h < 2; h++) begin
              int b, dq, di, j;
              real e, d;
              b  = 2 * p + h;
              dq = 16 * 4096 + n * rv[b];
              di = dq >>> 12;
              j  = (dq >>> 8) & 15;
              if (di < 2)  begin di = 2;  j = 0; end
              if (di > 29) begin di = 29; j = 0; end
              e = ramp(real'(g) - real'(di) - real'(j) / 16.0, b);
              d = real'(out_mag[h]) - e;
              if (d < 0) d = -d;
              checks++;
              if (d > 1.5) begin
                failures++;
                $display("n=%0d g=%0d bin %0d got %0d exp %f", n, g, b, out_mag[h], e);
              end
            end
          end
        end
        g++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
