// Erasure estimating unit.
//
// Recovers the binary values of the erased bits, delta_V first and delta_1 last. Row k
// of the refined syndromes satisfies S_1^(k) = sum_{i>=k} delta_i Q_{i,k-1}, so once
// delta_{k+1}..delta_V are known,
//     delta_k = 1  if  S_1^(k) + sum_{i=k+1..V} delta_i Q_{i,k-1} != 0,  else 0,
// because Q_{k,k-1} is non-zero for distinct, non-zero locators. Each row is an XOR of
// the refined syndrome with the Q terms gated by the already estimated bits, followed by
// an M-input OR; the rows form a chain from k = V down to k = 1. No inverses are needed.
//
// Purely combinational; the recursion follows the published design. Inputs: s1_i[k-1] = S_1^(k),
// q_i[i-1][j] = Q_{i,j}. Output: delta_o[k-1] = estimated delta_k.
module erasure_estimate_unit #(
  parameter int unsigned M = 8,  // field degree
  parameter int unsigned V = 4   // number of erasures handled
) (
  input  logic [M-1:0] s1_i [V],
  input  logic [M-1:0] q_i  [V][V],
  output logic [V-1:0] delta_o
);

  typedef logic [M-1:0] elem_t;

  // acc = S_1^(k) + sum_{i>k} delta_i Q_{i,k-1}, rows evaluated from k = V down to 1.
  always_comb begin
    elem_t acc;
    delta_o = '0;
    for (int k = int'(V) - 1; k >= 0; k--) begin
      acc = s1_i[k];
      for (int i = k + 1; i < int'(V); i++) begin
        if (delta_o[i]) acc = acc ^ q_i[i][k];
      end
      delta_o[k] = |acc;
    end
  end

endmodule
