// gf2m_ds_mult_runner - drives one digit-serial multiplier with N products
// and checks them (test helper shared by several testbenches).
//
// Instantiates gf2m_ds_mult for field order M and digit size D. The first
// operands are corner cases (zero, one, all ones, only the top bit), the rest
// random. For every product it checks the value against the bit-serial
// reference, that done comes exactly ceil(M/D) clocks after start, and that
// c holds the product while idle. Half of the products are started back to
// back in the clock done is high. Results are reported through its ports.
module gf2m_ds_mult_runner #(
  parameter int unsigned M = 233,
  parameter int unsigned D = 32,
  parameter int unsigned N = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import gf2m_ref_pkg::*;

  localparam int unsigned S = (M + D - 1) / D;

  logic         start, busy, done;
  logic [M-1:0] a, b, c;

  gf2m_ds_mult #(.M(M), .D(D)) dut (
    .clk, .rst_n, .start, .a, .b, .busy, .done, .c
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL M=%0d D=%0d: %s at %0t", M, D, what, $time);
    end
  endtask

  function automatic logic [M-1:0] operand(int n);
    fe_t r;
    case (n)
      0: return '0;
      1: return M'(1);
      2: return '1;
      3: return {1'b1, {(M-1){1'b0}}};
      default: begin
        r = rand_fe(M);
        return r[M-1:0];
      end
    endcase
  endfunction

  initial begin
    fe_t exp;
    int  cyc;
    checks   = 0;
    failures = 0;
    finished = 1'b0;
    start    = 1'b0;
    a        = '0;
    b        = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < int'(N); n++) begin
      a     = operand(n);
      b     = operand((n + 2) % int'(N));
      start = 1'b1;
      cyc   = 0;
      @(negedge clk);
      start = 1'b0;
      cyc++;
      while (!done && cyc < int'(S) + 4) begin
        chk(busy, "busy while running");
        @(negedge clk);
        cyc++;
      end
      exp = ref_mulmod(M, fe_t'(a), fe_t'(b));
      chk(done && cyc == int'(S), $sformatf("latency %0d, expected %0d", cyc, S));
      chk(c == exp[M-1:0], $sformatf("product a=%h b=%h c=%h exp=%h", a, b, c, exp[M-1:0]));
      if (n % 2 == 1) begin
        @(negedge clk);
        chk(!done && !busy && c == exp[M-1:0], "result held while idle");
      end
    end
    finished = 1'b1;
  end
endmodule
