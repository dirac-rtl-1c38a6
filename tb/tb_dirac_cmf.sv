// tb_dirac_cmf: drives interleaved slots every second clock with random samples,
// random code loading and code swaps, and compares the registered odd- and
// even-tap sums with a reference correlation computed from a model of the
// sample chain and code registers. Checks the two-clock result timing and
// that a powered-down CMF outputs zero.
module tb_dirac_cmf;
  import dirac_pkg::*;
  localparam int NC = 1, NT = 7;
  logic clk = 0, rst_n = 0, slot_valid = 0, code_shift = 0, code_in = 0, code_swap = 0;
  stream_e slot_idx = S_IUSB;
  logic [1:0] din = 0;
  logic [NC-1:0] cmf_en = '1;
  logic out_valid;
  stream_e out_idx;
  logic [NC-1:0][CW-1:0] sum_odd, sum_even;
  int checks = 0, failures = 0;
  logic [1:0] hist [4*NC*NT];
  logic shd [NC*NT], act [NC*NT];
  logic [NC-1:0] en_q;

  logic [1:0] dout;
  logic code_out;
  dirac_cmf #(.NTAPS(NT)) dut (
    .clk, .rst_n, .en(cmf_en[0]), .slot_valid, .slot_idx, .din, .dout,
    .code_shift, .code_in, .code_out, .code_swap, .out_valid, .out_idx,
    .sum_odd(sum_odd[0]), .sum_even(sum_even[0])
  );
  always #5 clk = ~clk;

  function automatic int lvl(logic [1:0] s);
    int m = s[0] ? 3 : 1;
    return s[1] ? -m : m;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4 * NC * NT; i++) hist[i] = 0;
    for (int i = 0; i < NC * NT; i++) begin shd[i] = 0; act[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      slot_valid = 1;
      slot_idx   = stream_e'(k % 4);
      din        = 2'($urandom);
      code_shift = 1;
      code_in    = 1'($urandom);
      code_swap  = (k % 23) == 0;
      cmf_en     = (k > 3000) ? NC'($urandom) : '1;
      // Samples and codes keep moving only where enabled; enabling is
      // all-or-nothing per instant here except in the last phase, where the
      // model only checks the zero output of disabled CMFs.
      @(posedge clk);
      en_q = cmf_en;
      if (k <= 3000) begin
        if (code_swap) for (int i = 0; i < NC * NT; i++) act[i] = shd[i];
        for (int i = NC * NT - 1; i > 0; i--) shd[i] = shd[i-1];
        shd[0] = code_in;
        for (int i = 4 * NC * NT - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = din;
      end
      @(negedge clk);
      slot_valid = 0;
      code_shift = 0;
      code_swap  = 0;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_idx != stream_e'(k % 4)) begin
        failures++;
        $display("k=%0d out_valid/idx wrong", k);
      end
      for (int c = 0; c < NC; c++) begin
        int eo, ee;
        eo = 0; ee = 0;
        for (int j = 0; j < NT; j++) begin
          int g, p;
          g = c * NT + j;
          p = act[g] ? lvl(hist[4*g]) : -lvl(hist[4*g]);
          if (j % 2 == 0) eo += p; else ee += p;
        end
        if (!en_q[c]) begin eo = 0; ee = 0; end
        if (k <= 3000 || !en_q[c]) begin
          checks++;
          if (int'(signed'(sum_odd[c])) != eo || int'(signed'(sum_even[c])) != ee) begin
            failures++;
            $display("k=%0d cmf %0d odd %0d/%0d even %0d/%0d", k, c,
                     signed'(sum_odd[c]), eo, signed'(sum_even[c]), ee);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
