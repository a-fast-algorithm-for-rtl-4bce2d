// Shared Galois-field arithmetic for the binary BCH erasure decoder.
//
// All field elements of GF(2^m) are held in polynomial basis: bit b of a word is the
// coefficient of alpha^b, where alpha is a root of the primitive polynomial returned by
// prim_poly(m). The functions work on words of GF_MAX_M bits and take the field degree
// m as an argument, so one package serves every field size a module is built for
// (3 <= m <= 16); modules pass their own parameter M and keep only the low M bits.
// The primitive polynomials are the usual minimum-weight ones; the published design fixes
// none, so this table is a choice of this design. All functions are combinational
// and synthesizable when m is a constant.
package bch_erasure_pkg;

  localparam int unsigned GF_MAX_M = 16;

  typedef logic [GF_MAX_M-1:0] gf_word_t;

  // Primitive polynomial of degree m, including the x^m term.
  function automatic logic [GF_MAX_M:0] prim_poly(input int unsigned m);
    case (m)
      3:       return 17'h0000B;  // x^3+x+1
      4:       return 17'h00013;  // x^4+x+1
      5:       return 17'h00025;  // x^5+x^2+1
      6:       return 17'h00043;  // x^6+x+1
      7:       return 17'h00089;  // x^7+x^3+1
      8:       return 17'h0011D;  // x^8+x^4+x^3+x^2+1
      9:       return 17'h00211;  // x^9+x^4+1
      10:      return 17'h00409;  // x^10+x^3+1
      11:      return 17'h00805;  // x^11+x^2+1
      12:      return 17'h01053;  // x^12+x^6+x^4+x+1
      13:      return 17'h0201B;  // x^13+x^4+x^3+x+1
      14:      return 17'h04443;  // x^14+x^10+x^6+x+1
      15:      return 17'h08003;  // x^15+x+1
      16:      return 17'h1100B;  // x^16+x^12+x^3+x+1
      default: return '0;
    endcase
  endfunction

  // Multiply a field element by alpha (one shift with conditional reduction).
  function automatic gf_word_t gf_mul_alpha(input gf_word_t a, input int unsigned m);
    logic [GF_MAX_M:0] p;
    logic [GF_MAX_M:0] t;
    p = prim_poly(m);
    t = {a, 1'b0};
    if (t[m]) t = t ^ p;
    return t[GF_MAX_M-1:0] & gf_word_t'((17'd1 << m) - 17'd1);
  endfunction

  // General multiplier, most-significant bit of b first (Horner form): m shift-and-add
  // steps, each a multiply by alpha and a conditional XOR of a.
  function automatic gf_word_t gf_mul(input gf_word_t a, input gf_word_t b,
                                      input int unsigned m);
    gf_word_t acc;
    acc = '0;
    for (int i = GF_MAX_M - 1; i >= 0; i--) begin
      if (i < int'(m)) begin
        acc = gf_mul_alpha(acc, m);
        if (b[i]) acc = acc ^ a;
      end
    end
    return acc;
  endfunction

  // alpha^e, for the small constant exponents used by the syndrome unit.
  function automatic gf_word_t gf_alpha_pow(input int unsigned e, input int unsigned m);
    gf_word_t r;
    r = gf_word_t'(1);
    for (int unsigned i = 0; i < e; i++) r = gf_mul_alpha(r, m);
    return r;
  endfunction

endpackage
