// tb_dirac_cmf_taps: compares the tap array with a reference model of the
// sample chain (4 stages per tap) and of the shadow/active code registers,
// including the power-down enable.
module tb_dirac_cmf_taps;
  import dirac_pkg::*;
  localparam int NT = 5;
  logic clk = 0, rst_n = 0, en = 1, slot_valid = 0, code_shift = 0, code_in = 0, code_swap = 0;
  logic [1:0] din = 0, dout;
  logic code_out;
  logic [NT-1:0][2:0] prod;
  int checks = 0, failures = 0;
  logic [1:0] hist [4*NT];    // hist[0] = newest slot
  logic shd [NT], act [NT];

  dirac_cmf_taps #(.NTAPS(NT)) dut (.*);
  always #5 clk = ~clk;

  function automatic int lvl(logic [1:0] s);
    int m = s[0] ? 3 : 1;
    return s[1] ? -m : m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4 * NT; i++) hist[i] = 0;
    for (int i = 0; i < NT; i++) begin shd[i] = 0; act[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      slot_valid = ($urandom % 3) != 0;
      din        = 2'($urandom);
      code_shift = ($urandom % 2) == 0;
      code_in    = 1'($urandom);
      code_swap  = ($urandom % 17) == 0;
      en         = ($urandom % 11) != 0;
      @(posedge clk);
      if (en) begin
        if (code_swap) for (int i = 0; i < NT; i++) act[i] = shd[i];
        if (code_shift) begin
          for (int i = NT - 1; i > 0; i--) shd[i] = shd[i-1];
          shd[0] = code_in;
        end
        if (slot_valid) begin
          for (int i = 4 * NT - 1; i > 0; i--) hist[i] = hist[i-1];
          hist[0] = din;
        end
      end
      #1;
      for (int j = 0; j < NT; j++) begin
        int e;
        e = act[j] ? lvl(hist[4*j]) : -lvl(hist[4*j]);
        checks++;
        if (int'(signed'(prod[j])) != e) begin
          failures++;
          $display("k=%0d tap %0d prod %0d exp %0d", k, j, signed'(prod[j]), e);
        end
      end
      checks++;
      if (dout != hist[4*NT-1] || code_out != shd[NT-1]) begin
        failures++;
        $display("chain outputs wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
