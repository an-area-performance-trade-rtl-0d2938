// gf2m_top - digit-serial GF(2^m) multiplier with its 32-bit word interface.
//
// The multiplier (gf2m_ds_mult) computes A(x)B(x) mod F(x) in ceil(M/D)
// clocks, one D-bit digit of B per clock. Its M-bit operands and result are
// carried over 32-bit valid/ready word streams by gf2m_io_if: send the
// ceil(M/32) words of A, then those of B (least significant word first), and
// read back ceil(M/32) words of C. This pairing of the multiplier with a word
// I/O state machine is the configuration the source evaluates for area and
// time; the stream handshake is this design's own.
//
// Parameters: M field order, D digit size (1 <= D < M), G the g(x) of
// F(x) = x^M + g(x) (defaults to the NIST polynomial for M).
// Timing: after the last input word, one clock to start, ceil(M/D) clocks of
// multiplication, one clock into SEND, then one result word per clock that
// out_ready is high.
module gf2m_top #(
  parameter int unsigned M = 233,
  parameter int unsigned D = 32,
  parameter logic [M-1:0] G = M'(gf2m_pkg::reduction_g(M))
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [31:0] out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        busy
);

  logic [M-1:0] mul_a, mul_b, mul_c;
  logic         mul_start, mul_done;

  gf2m_io_if #(.M(M), .W(32)) u_io (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_data   (in_data),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .out_data  (out_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .mul_a     (mul_a),
    .mul_b     (mul_b),
    .mul_start (mul_start),
    .mul_done  (mul_done),
    .mul_c     (mul_c)
  );

  gf2m_ds_mult #(.M(M), .D(D), .G(G)) u_mult (
    .clk   (clk),
    .rst_n (rst_n),
    .start (mul_start),
    .a     (mul_a),
    .b     (mul_b),
    .busy  (busy),
    .done  (mul_done),
    .c     (mul_c)
  );

endmodule
