// gf2m_ref_pkg - reference arithmetic for the GF(2^m) multiplier testbenches.
//
// Works bit by bit and independently of the hardware's digit decomposition:
// a full schoolbook product of two polynomials over GF(2), followed by long
// division by the complete F(x) (x^m included), highest coefficient first.
// The reduction polynomials are listed here again by their exponents.
// Also holds a small random-vector helper.
package gf2m_ref_pkg;

  localparam int unsigned RMAX = 571;
  typedef logic [RMAX-1:0]   fe_t;
  typedef logic [2*RMAX-1:0] dbl_t;

  // F(x) in full (bit m set) for the evaluated field orders.
  function automatic dbl_t ref_f(int unsigned m);
    dbl_t f;
    f = '0;
    f[m] = 1'b1;
    f[0] = 1'b1;
    case (m)
      163: begin f[7] = 1'b1; f[6] = 1'b1; f[3] = 1'b1; end
      233: f[74] = 1'b1;
      277: begin f[12] = 1'b1; f[6] = 1'b1; f[3] = 1'b1; end
      283: begin f[12] = 1'b1; f[7] = 1'b1; f[5] = 1'b1; end
      409: f[87] = 1'b1;
      571: begin f[10] = 1'b1; f[5] = 1'b1; f[2] = 1'b1; end
      default: f = '0;
    endcase
    return f;
  endfunction

  // a(x) * b(x) mod F(x); a and b have at most m significant bits.
  function automatic fe_t ref_mulmod(int unsigned m, fe_t a, fe_t b);
    dbl_t prod, f;
    prod = '0;
    f = ref_f(m);
    for (int unsigned i = 0; i < m; i++)
      if (b[i]) prod = prod ^ (dbl_t'(a) << i);
    for (int i = 2 * int'(m) - 2; i >= int'(m); i--)
      if (prod[i]) prod = prod ^ (f << (i - int'(m)));
    return fe_t'(prod);
  endfunction

  // Random element with m significant bits.
  function automatic fe_t rand_fe(int unsigned m);
    logic [RMAX+31:0] v;
    for (int unsigned i = 0; i < RMAX; i += 32) v[i +: 32] = $urandom;
    for (int unsigned i = m; i < RMAX + 32; i++) v[i] = 1'b0;
    return fe_t'(v);
  endfunction

endpackage
