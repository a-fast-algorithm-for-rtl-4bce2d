// Erasure check unit (decoding-error alarm).
//
// Verifies an estimate by re-encoding it into syndromes: for each odd w = 1, 3, ..,
// 2T-1 it forms S~_w = sum_i delta_i * alpha^(w*l_i) and compares it with the received
// syndrome S_w. If all odd syndromes agree the corrected word is a codeword (for a binary
// code the even syndromes follow from the odd ones) and the estimate is accepted;
// otherwise some bit outside the erased positions is in error and alarm_o is raised.
// The odd powers alpha^(w*l_i) are built from the locator x by a chain of multipliers
// (x, x*x^2, x^3*x^2, ..); unused slots have locator 0 and contribute nothing.
//
// Purely combinational. The check itself follows the published design; how the powers are
// formed is a choice of this design. mismatch_o[u] flags S~_{2u+1} != S_{2u+1}.
module erasure_check_unit
  import bch_erasure_pkg::*;
#(
  parameter int unsigned M = 8,  // field degree
  parameter int unsigned V = 4,  // number of erasures handled
  parameter int unsigned T = 2   // error-correcting capability, 2T syndromes
) (
  input  logic [M-1:0] syn_i [2*T],  // syn_i[w-1] = S_w
  input  logic [M-1:0] loc_i [V],    // loc_i[i-1] = alpha^(l_i)
  input  logic [V-1:0] delta_i,      // estimated erased bits
  output logic [T-1:0] mismatch_o,
  output logic         alarm_o
);

  typedef logic [M-1:0] elem_t;

  always_comb begin
    elem_t pw;     // loc_i[i]^e
    elem_t sq;     // loc_i[i]^2
    elem_t s_est [T];
    for (int u = 0; u < int'(T); u++) s_est[u] = '0;
    for (int i = 0; i < int'(V); i++) begin
      pw = loc_i[i];
      sq = elem_t'(gf_mul(gf_word_t'(loc_i[i]), gf_word_t'(loc_i[i]), M));
      for (int u = 0; u < int'(T); u++) begin
        if (u > 0) pw = elem_t'(gf_mul(gf_word_t'(pw), gf_word_t'(sq), M));
        if (delta_i[i]) s_est[u] = s_est[u] ^ pw;
      end
    end
    for (int u = 0; u < int'(T); u++) mismatch_o[u] = (s_est[u] != syn_i[2*u]);
  end

  assign alarm_o = |mismatch_o;

endmodule
