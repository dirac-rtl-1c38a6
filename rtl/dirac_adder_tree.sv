// dirac_adder_tree: signed sum of N operands as a balanced binary tree.
//
// Used twice in every short-time CMF, once for the products of the odd taps
// and once for the even taps. Level 0 holds the sign-extended operands; each
// further level adds neighbouring pairs of the level below, and an element
// without a partner passes up unchanged, so the tree has ceil(log2 N) adder
// levels. The result is combinational; the CMF registers it. OW must hold N
// times the largest operand magnitude.
module dirac_adder_tree #(
  parameter int unsigned N  = 1599,
  parameter int unsigned IW = 3,
  parameter int unsigned OW = 14
) (
  input  logic [N-1:0][IW-1:0] in_vec,
  output logic signed [OW-1:0] sum
);
  localparam int LEVELS = (N <= 1) ? 1 : $clog2(N) + 1;

  // Number of elements on level l.
  function automatic int cnt(input int l);
    return (int'(N) + (1 << l) - 1) >> l;
  endfunction

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    logic signed [OW-1:0] v [cnt(l)];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < cnt(0); i++) begin : g_in
        assign v[i] = OW'(signed'(in_vec[i]));
      end
    end else begin : g_add
      for (genvar i = 0; i < cnt(l); i++) begin : g_node
        if (2 * i + 1 < cnt(l - 1)) begin : g_pair
          assign v[i] = g_lvl[l-1].v[2*i] + g_lvl[l-1].v[2*i+1];
        end else begin : g_pass
          assign v[i] = g_lvl[l-1].v[2*i];
        end
      end
    end
  end

  assign sum = g_lvl[LEVELS-1].v[0];
endmodule
