// gf2m_parallel_mult - combinational digit multiplier U(x)*A(x) mod F(x).
//
// Multiplies a D-bit digit U(x) (grade D-1) by an M-bit field element A(x)
// (grade M-1) and reduces modulo F(x) = x^M + g(x), in one combinational
// pass. It follows the decomposition
//     U(x)A(x) mod F = sum_i u_i * (x^i A(x) mod F),
// where x^i A mod F is obtained from x^(i-1) A mod F by a shift left of one
// place and, if the bit shifted out is 1, an XOR with g(x). The D partial
// values are gated by the digit bits and XOR-ed together. This chain of
// shift-and-reduce stages is the parallel multiplier of the source
// architecture; only the coding style is this design's own.
//
// The digit serial multiplier uses two of these: one for B_k(x)*A(x) and one,
// with A = g(x), for the reduction of the top digit of the accumulator.
//
// Interface: a (M bits), u (D bits) in; p (M bits) out. No clock; the depth
// is D shift/reduce stages followed by a D-input XOR per output bit.
module gf2m_parallel_mult #(
  parameter int unsigned M = 233,
  parameter int unsigned D = 32,
  parameter logic [M-1:0] G = M'(gf2m_pkg::reduction_g(M))
) (
  input  logic [M-1:0] a,
  input  logic [D-1:0] u,
  output logic [M-1:0] p
);

  if (G == '0) begin : g_check
    $error("gf2m_parallel_mult: no reduction polynomial for this M; set G");
  end

  // xa[i] = x^i A(x) mod F(x); acc[i] = sum over j < i of u_j xa[j]
  logic [M-1:0] xa  [D];
  logic [M-1:0] acc [D+1];

  assign xa[0]  = a;
  assign acc[0] = '0;

  for (genvar i = 0; i < D; i++) begin : g_stage
    if (i > 0) begin : g_shift
      assign xa[i] = {xa[i-1][M-2:0], 1'b0} ^ (xa[i-1][M-1] ? G : '0);
    end
    assign acc[i+1] = acc[i] ^ (u[i] ? xa[i] : '0);
  end

  assign p = acc[D];

endmodule
