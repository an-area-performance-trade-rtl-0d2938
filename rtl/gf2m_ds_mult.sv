// gf2m_ds_mult - digit-serial GF(2^m) multiplier, C(x) = A(x)B(x) mod F(x).
//
// B(x) is cut into S = ceil(M/D) digits of D bits, B_{S-1} (the top one, with
// M mod D bits, zero-extended here) down to B_0, and processed most
// significant digit first by Horner's rule:
//     C <- B_{S-1} A mod F                      (initialisation)
//     C <- x^D C + B_k A mod F,  k = S-2 .. 0   (one loop iteration per clock)
// Each clock does one step combinationally: a parallel multiplier forms
// B_k(x)A(x) mod F, the x^D C mod F unit gives the shifted low part Q2 and
// the reduced top part Q1 = g(x)*(top D bits of C), and a 3M-input XOR adds
// the three into the accumulator register C. A shift register supplies the
// next digit of B. The algorithm, the datapath split and the two registers
// follow the source architecture; the handshake is this design's own.
//
// Timing: start is taken while not busy; a and b are sampled in that clock
// and the initialisation step happens in it. done pulses S clocks later, with
// the product in c, which holds until the next start. a is read in every
// step, so it must stay stable from start to done (b is captured).
// Interface: clk, rst_n (asynchronous, active low), start, a, b -> busy, done,
// c. F(x) = x^M + g(x) with g(x) given by G.
module gf2m_ds_mult #(
  parameter int unsigned M = 233,
  parameter int unsigned D = 32,
  parameter logic [M-1:0] G = M'(gf2m_pkg::reduction_g(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);

  localparam int unsigned S = gf2m_pkg::num_digits(M, D);

  if (D < 1 || D >= M) begin : d_check
    $error("gf2m_ds_mult: need 1 <= D < M");
  end

  logic init, iter;

  gf2m_ds_fsm #(.S(S)) u_fsm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .init  (init),
    .iter  (iter),
    .busy  (busy),
    .done  (done)
  );

  // B zero-extended to S whole digits.
  logic [S*D-1:0] b_pad;
  assign b_pad = (S*D)'(b);

  // Digits B_{S-2} .. B_0 still to be processed, next one at the top.
  logic [(S-1)*D-1:0] b_reg;

  logic [D-1:0] digit;
  assign digit = init ? b_pad[S*D-1 -: D] : b_reg[(S-1)*D-1 -: D];

  logic [M-1:0] ba, q1, q2, c_next;

  gf2m_parallel_mult #(.M(M), .D(D), .G(G)) u_digit_mult (
    .a (a),
    .u (digit),
    .p (ba)
  );

  gf2m_xd_reduce #(.M(M), .D(D), .G(G)) u_xd (
    .c  (c),
    .q1 (q1),
    .q2 (q2)
  );

  // 3M-input XOR; in the initialisation step C starts from zero.
  assign c_next = init ? ba : (q1 ^ q2 ^ ba);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c     <= '0;
      b_reg <= '0;
    end else if (init) begin
      c     <= c_next;
      b_reg <= b_pad[(S-1)*D-1:0];
    end else if (iter) begin
      c     <= c_next;
      b_reg <= b_reg << D;
    end
  end

  // Operand A is read in every step of the operation.
  a_stable : assert property (@(posedge clk) disable iff (!rst_n) busy |-> $stable(a))
    else $error("gf2m_ds_mult: operand a changed during a multiplication");

endmodule
