// Q_{i,j} computing unit.
//
// Computes the products Q_{i,j} = P_{i,0} * prod_{m=1..j} (P_{i,0} + P_{m,0}) that the
// erasure estimator needs, from the erasure locators P_{i,0} = alpha^(l_i). Only
// Q_{i,j} with 1 <= j <= i-2 has to be computed: Q_{i,0} is the locator itself and
// Q_{k,k-1} never appears in the estimator. Each needed term is one cell with an adder
// and a multiplier, chained along j:
//     Q_{i,j} = Q_{i,j-1} * (P_{i,0} + P_{j,0}),
// which is (V-1)(V-2)/2 cells; for V = 4 the three cells give Q_{3,1}, Q_{4,1} and
// Q_{4,2}, following the published design.
//
// Purely combinational. Input loc_i[i-1] = P_{i,0}. Output q_o[i-1][j] = Q_{i,j} for
// 0 <= j <= i-2; all other entries are 0.
module q_compute_unit
  import bch_erasure_pkg::*;
#(
  parameter int unsigned M = 8,  // field degree
  parameter int unsigned V = 4   // number of erasures handled
) (
  input  logic [M-1:0] loc_i [V],
  output logic [M-1:0] q_o   [V][V]
);

  typedef logic [M-1:0] elem_t;

  always_comb begin
    for (int i = 0; i < int'(V); i++) begin     // i is the 0-based index of Q_{i+1,.}
      for (int j = 0; j < int'(V); j++) q_o[i][j] = '0;
      if (i >= 1) q_o[i][0] = loc_i[i];
      for (int j = 1; j <= i - 1; j++) begin
        q_o[i][j] = elem_t'(gf_mul(gf_word_t'(q_o[i][j-1]),
                                   gf_word_t'(elem_t'(loc_i[i] ^ loc_i[j-1])), M));
      end
    end
  end

endmodule
