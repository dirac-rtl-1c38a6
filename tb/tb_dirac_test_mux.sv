// tb_dirac_test_mux: random streams on both inputs; for each test_sel the
// output must be the selected stream and capture must be set in the two
// capture modes only.
module tb_dirac_test_mux;
  import dirac_pkg::*;
  logic [1:0] test_sel;
  logic a_valid, b_valid, capture, o_valid;
  logic [2:0] a_pair, b_pair, o_pair;
  col_tag_t a_tag, b_tag, o_tag;
  logic [1:0][MAGW-1:0] a_mag, b_mag, o_mag;
  int checks = 0, failures = 0;

  dirac_test_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      test_sel = 2'(k % 3);
      {a_valid, a_pair, a_tag, a_mag} = {$urandom, $urandom};
      {b_valid, b_pair, b_tag, b_mag} = {$urandom, $urandom};
      #1;
      checks++;
      if (capture != (test_sel != 0)) begin failures++; $display("capture wrong"); end
      checks++;
      if (test_sel == 1 ? {o_valid, o_pair, o_tag, o_mag} != {a_valid, a_pair, a_tag, a_mag}
                        : {o_valid, o_pair, o_tag, o_mag} != {b_valid, b_pair, b_tag, b_mag}) begin
        failures++; $display("selection wrong for test_sel %0d", test_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
