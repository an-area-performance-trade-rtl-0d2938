// gf2m_io_if - 32-bit word interface of the GF(2^m) multiplier.
//
// An M-bit field multiplier has too many pins to bring out directly, so its
// operands and result travel as NW = ceil(M/W) words of W = 32 bits. This
// state machine
//   LOAD  takes 2*NW words on the input stream: A(x) first, then B(x), each
//         least significant word first (bits above M in a top word are
//         dropped);
//   START pulses the multiplier's start for one clock;
//   WAIT  waits for the multiplier's done;
//   SEND  returns C(x) as NW words on the output stream, least significant
//         word first, with zeros above bit M-1.
// Both streams use a valid/ready handshake: a word moves in a clock where
// valid and ready are both high. The operands sit in a 2*NW-word shift
// register, so A stays stable while the multiplier runs; the result words are
// selected straight from the multiplier's C register, which holds the product
// until the next start.
//
// That the multiplier is wrapped by a state machine exchanging 32-bit words
// follows the source; word order, handshake and the state sequence are this
// design's own. Reset is asynchronous, active low.
module gf2m_io_if #(
  parameter int unsigned M = 233,
  parameter int unsigned W = gf2m_pkg::IO_WORD
) (
  input  logic         clk,
  input  logic         rst_n,
  // input word stream
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,
  // output word stream
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready,
  // multiplier side
  output logic [M-1:0] mul_a,
  output logic [M-1:0] mul_b,
  output logic         mul_start,
  input  logic         mul_done,
  input  logic [M-1:0] mul_c
);

  localparam int unsigned NW  = (M + W - 1) / W;
  localparam int unsigned IW  = $clog2(2 * NW);

  typedef enum logic [1:0] {LOAD, START, WAIT, SEND} state_t;

  state_t          state;
  logic [IW-1:0]   widx;              // word counter for LOAD and SEND
  logic [NW*W-1:0] a_buf, b_buf;      // operand words, shifted in at the top of b_buf
  logic [NW*W-1:0] c_ext;

  assign mul_a     = a_buf[M-1:0];
  assign mul_b     = b_buf[M-1:0];
  assign mul_start = (state == START);
  assign in_ready  = (state == LOAD);
  assign out_valid = (state == SEND);

  assign c_ext    = (NW*W)'(mul_c);
  assign out_data = c_ext[widx*W +: W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD;
      widx  <= '0;
      a_buf <= '0;
      b_buf <= '0;
    end else begin
      unique case (state)
        LOAD: begin
          if (in_valid) begin
            {b_buf, a_buf} <= {in_data, b_buf, a_buf[NW*W-1:W]};
            if (widx == IW'(2*NW - 1)) begin
              widx  <= '0;
              state <= START;
            end else begin
              widx <= widx + 1'b1;
            end
          end
        end
        START: state <= WAIT;
        WAIT:  if (mul_done) state <= SEND;
        SEND: begin
          if (out_ready) begin
            if (widx == IW'(NW - 1)) begin
              widx  <= '0;
              state <= LOAD;
            end else begin
              widx <= widx + 1'b1;
            end
          end
        end
        default: state <= LOAD;
      endcase
    end
  end

  // A result word, once offered, stays until it is taken.
  out_hold : assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid && !out_ready |=> out_valid && $stable(out_data))
    else $error("gf2m_io_if: result word withdrawn before it was taken");

endmodule
