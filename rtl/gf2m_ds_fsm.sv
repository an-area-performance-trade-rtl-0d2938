// gf2m_ds_fsm - controller of the digit-serial multiplier.
//
// Runs the loop of the digit-serial algorithm over S digits. In the clock in
// which start is accepted (idle only) it asserts init for that clock: the
// datapath performs the initialisation step C <- B_{S-1}(x)A(x) mod F and
// loads the remaining digits of B. It then spends S-1 clocks in RUN with iter
// high, one per remaining digit (C <- x^d C + B_k A mod F, k = S-2 .. 0), and
// pulses done for one clock when the product is in C. A product therefore
// takes S clocks from start to done; a new start is taken in the clock that
// done is high. A start while busy is ignored.
//
// The source architecture states only that a finite state machine runs the
// loop; the two states, the down-counter and the start/done pulses are this
// design's own. Reset is asynchronous, active low.
module gf2m_ds_fsm #(
  parameter int unsigned S = 8   // number of digits, ceil(M/D), at least 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic init,
  output logic iter,
  output logic busy,
  output logic done
);

  if (S < 2) begin : s_check
    $error("gf2m_ds_fsm: S must be at least 2 (digit size below field order)");
  end

  localparam int unsigned CW = (S > 2) ? $clog2(S - 1) : 1;

  typedef enum logic {IDLE, RUN} state_t;

  state_t        state;
  logic [CW-1:0] cnt;   // iterations still to run after the current one

  assign init = (state == IDLE) && start;
  assign iter = (state == RUN);
  assign busy = (state == RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            state <= RUN;
            cnt   <= CW'(S - 2);
          end
        end
        RUN: begin
          if (cnt == '0) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
