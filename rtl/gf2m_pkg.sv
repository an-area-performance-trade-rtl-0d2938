// gf2m_pkg - constants and helper functions shared by the GF(2^m) multiplier.
//
// A field GF(2^m) in polynomial basis is fixed by its reduction polynomial
// F(x) = x^m + g(x). The multiplier blocks take g(x) as an m-bit parameter
// vector (bit i = coefficient of x^i); reduction_g() returns it for the field
// orders the multiplier was evaluated for. The five NIST binary-field
// polynomials are the standard ones (FIPS 186). The text names m = 277 without
// giving a polynomial; x^277 + x^12 + x^6 + x^3 + 1 is used here, a pentanomial
// that is irreducible over GF(2). For any other m the function returns zero,
// and the modules refuse to elaborate without an explicit G.
package gf2m_pkg;

  // Largest field order the helper functions cover.
  localparam int unsigned MAX_M = 571;

  // Width of the words exchanged by the I/O interface.
  localparam int unsigned IO_WORD = 32;

  typedef logic [MAX_M-1:0] gpoly_t;

  // g(x) of F(x) = x^m + g(x) for the supported field orders.
  function automatic gpoly_t reduction_g(int unsigned m);
    gpoly_t g;
    g = '0;
    case (m)
      163: begin g[7] = 1'b1; g[6] = 1'b1; g[3] = 1'b1; g[0] = 1'b1; end
      233: begin g[74] = 1'b1; g[0] = 1'b1; end
      277: begin g[12] = 1'b1; g[6] = 1'b1; g[3] = 1'b1; g[0] = 1'b1; end
      283: begin g[12] = 1'b1; g[7] = 1'b1; g[5] = 1'b1; g[0] = 1'b1; end
      409: begin g[87] = 1'b1; g[0] = 1'b1; end
      571: begin g[10] = 1'b1; g[5] = 1'b1; g[2] = 1'b1; g[0] = 1'b1; end
      default: g = '0;
    endcase
    return g;
  endfunction

  // Number of d-bit digits of an m-bit operand: s = ceil(m/d).
  function automatic int unsigned num_digits(int unsigned m, int unsigned d);
    return (m + d - 1) / d;
  endfunction

endpackage
