// Reference GF(2^m) and BCH arithmetic for the testbenches.
//
// Multiplication here uses logarithm and antilogarithm tables built at run time by
// ref_init(m), a method independent of the shift-and-add multiplier in the RTL. The
// package also builds the generator polynomial of the t-error-correcting narrow-sense
// binary BCH code of length n = 2^m - 1 (product of (x + alpha^e) over the conjugacy
// classes of alpha^1, alpha^3, .., alpha^(2t-1)) so that testbenches can draw random
// codewords as multiples of g(x).
package tb_gf_ref_pkg;

  int unsigned ref_m;
  int unsigned ref_n;
  int unsigned gexp [0:65535];
  int unsigned glog [0:65535];
  bit          gpoly [0:65535];   // g(x) coefficients
  int unsigned gdeg;

  function automatic int unsigned ref_prim(input int unsigned m);
    case (m)
      3: return 'hB;     4: return 'h13;    5: return 'h25;    6: return 'h43;
      7: return 'h89;    8: return 'h11D;   9: return 'h211;   10: return 'h409;
      default: return 0;
    endcase
  endfunction

  function automatic void ref_init(input int unsigned m);
    int unsigned x;
    ref_m = m;
    ref_n = (1 << m) - 1;
    x = 1;
    for (int unsigned e = 0; e < ref_n; e++) begin
      gexp[e] = x;
      glog[x] = e;
      x = x << 1;
      if (x >> m) x = x ^ ref_prim(m);
    end
  endfunction

  function automatic int unsigned ref_mul(input int unsigned a, input int unsigned b);
    if (a == 0 || b == 0) return 0;
    return gexp[(glog[a] + glog[b]) % ref_n];
  endfunction

  function automatic int unsigned ref_alpha(input longint unsigned e);
    return gexp[e % ref_n];
  endfunction

  // Generator polynomial of the t-error-correcting BCH code.
  function automatic void ref_genpoly(input int unsigned t);
    int unsigned coef [0:65535];
    bit          mark [0:65535];
    int unsigned e;
    for (int unsigned i = 0; i < ref_n; i++) mark[i] = 0;
    coef[0] = 1;
    gdeg = 0;
    for (int unsigned w = 1; w < 2 * t; w += 2) begin
      e = w % ref_n;
      while (!mark[e]) begin
        mark[e] = 1;
        // multiply by (x + alpha^e)
        coef[gdeg+1] = 0;
        for (int d = int'(gdeg) + 1; d >= 1; d--)
          coef[d] = coef[d-1] ^ ref_mul(coef[d], gexp[e]);
        coef[0] = ref_mul(coef[0], gexp[e]);
        gdeg++;
        e = (2 * e) % ref_n;
      end
    end
    for (int unsigned d = 0; d <= gdeg; d++) gpoly[d] = coef[d][0];
  endfunction

endpackage
