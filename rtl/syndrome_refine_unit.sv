// Syndrome refining unit.
//
// Turns the syndromes S_1..S_V and the erasure locators P_{i,0} = alpha^(l_i) into the
// refined syndromes S_1^(k), k = 1..V, that the erasure estimator consumes. It is a
// triangular array of V(V-1)/2 identical cells; the cell in row k (k = 2..V), column w
// (w = 1..V-k+1) computes
//     S_w^(k) = S_{w+1}^(k-1) + S_w^(k-1) * P_{k-1,0}
// with one GF(2^M) multiplier and one XOR. Row k removes erasure k-1 from the
// syndromes, so that S_1^(k) = sum_{i>=k} delta_i Q_{i,k-1}. For V = 4 this is the
// six-cell array of the design (three, two and one cells per row).
//
// Purely combinational; the array structure and the cell equation follow the published design.
// Inputs: syn_i[w-1] = S_w, loc_i[i-1] = P_{i,0}. Output: s1_o[k-1] = S_1^(k)
// (s1_o[0] = S_1 itself).
module syndrome_refine_unit
  import bch_erasure_pkg::*;
#(
  parameter int unsigned M = 8,  // field degree
  parameter int unsigned V = 4   // number of erasures handled
) (
  input  logic [M-1:0] syn_i [V],
  input  logic [M-1:0] loc_i [V],
  output logic [M-1:0] s1_o  [V]
);

  typedef logic [M-1:0] elem_t;

  // Cells are evaluated row by row; row holds S_w^(k) of the current row k.
  always_comb begin
    elem_t row [V];
    row = syn_i;
    s1_o[0] = row[0];
    for (int k = 1; k < int'(V); k++) begin
      for (int w = 0; w < int'(V) - k; w++) begin
        row[w] = row[w+1] ^ elem_t'(gf_mul(gf_word_t'(row[w]), gf_word_t'(loc_i[k-1]), M));
      end
      s1_o[k] = row[0];
    end
  end

endmodule
