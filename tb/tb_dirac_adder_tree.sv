// tb_dirac_adder_tree: random operands, sum compared with a plain loop sum,
// for an odd operand count so that pass-through nodes are exercised.
module tb_dirac_adder_tree;
  localparam int N = 13, IW = 3, OW = 8;
  logic [N-1:0][IW-1:0] in_vec;
  logic signed [OW-1:0] sum;
  int checks = 0, failures = 0;

  dirac_adder_tree #(.N(N), .IW(IW), .OW(OW)) dut (.in_vec, .sum);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int ref_sum;
      ref_sum = 0;
      for (int i = 0; i < N; i++) begin
        in_vec[i] = IW'($urandom);
        ref_sum += int'(signed'(in_vec[i]));
      end
      if (k == 0) for (int i = 0; i < N; i++) begin in_vec[i] = 3'b100; end
      if (k == 0) ref_sum = -4 * N;
      #1;
      checks++;
      if (int'(sum) != ref_sum) begin
        failures++;
        $display("sum %0d exp %0d", sum, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
