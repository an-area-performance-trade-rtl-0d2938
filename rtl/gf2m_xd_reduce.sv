// gf2m_xd_reduce - the product x^d C(x) mod F(x), in two parts.
//
// With F(x) = x^M + g(x), multiplying the accumulator C(x) by x^D splits into
//   Q2(x) = the M-D low coefficients of C moved up D places, which stays below
//           x^M and needs no reduction (the shift-left-by-D module), and
//   Q1(x) mod F = g(x) * (c_{M-1} x^(D-1) + ... + c_{M-D}), because x^M = g(x)
//           modulo F. It is formed by a parallel multiplier whose A operand is
//           g(x) widened to M bits and whose digit is the top D bits of C.
// x^D C(x) mod F(x) = Q1 xor Q2. The two parts are returned separately; the
// multiplier core XORs them together with B_k(x)A(x) in one 3M-input XOR.
// This split is the source architecture's; when grade(g) + D - 1 < M the
// reduction steps inside the Q1 multiplier never fire, and when that does not
// hold they keep the result correct anyway.
//
// By construction the D low bits of q2, and the bits of q1 above
// grade(g) + D - 1, are constant zero; synthesis removes them.
//
// Interface: c (M bits) in; q1, q2 (M bits each) out. Combinational.
module gf2m_xd_reduce #(
  parameter int unsigned M = 233,
  parameter int unsigned D = 32,
  parameter logic [M-1:0] G = M'(gf2m_pkg::reduction_g(M))
) (
  input  logic [M-1:0] c,
  output logic [M-1:0] q1,
  output logic [M-1:0] q2
);

  if (D >= M) begin : d_check
    $error("gf2m_xd_reduce: the digit size D must be smaller than M");
  end

  // Shift to the left by D places; the top D bits drop out into Q1.
  assign q2 = {c[M-D-1:0], {D{1'b0}}};

  gf2m_parallel_mult #(.M(M), .D(D), .G(G)) u_q1_mult (
    .a (G),
    .u (c[M-1:M-D]),
    .p (q1)
  );

endmodule
