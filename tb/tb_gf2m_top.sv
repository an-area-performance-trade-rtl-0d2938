// tb_gf2m_top - end-to-end test of the multiplier with its word interface,
// at the default parameters (M=233, D=32, F(x) = x^233 + x^74 + 1).
//
// Each operation sends the 8 words of A and the 8 words of B, waits, and
// reads the 8 words of C, which must equal A(x)B(x) mod F(x) from the
// bit-serial reference. Corner operands come first, then random ones. Input
// gaps and output back-pressure are inserted at random. The time from the
// last input word to the first result word must be ceil(M/D) + 2 clocks
// (start, ceil(M/D) multiplier clocks, change to sending). Also counted,
// each of which must happen: clocks with the x^d C reduction term Q1 non-zero,
// operations whose top digit of B (M mod D = 9 bits) is non-zero, input gaps,
// output stalls, and operations loaded right after the previous result.
module tb_gf2m_top;
  import gf2m_ref_pkg::*;

  localparam int unsigned M  = 233;
  localparam int unsigned D  = 32;
  localparam int unsigned S  = (M + D - 1) / D;
  localparam int unsigned NW = (M + 31) / 32;
  localparam int          NOPS = 40;

  int checks = 0, failures = 0;
  int n_q1 = 0, n_topdigit = 0, n_gap = 0, n_stall = 0, n_b2b = 0, n_iter = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] in_data, out_data;
  logic        in_valid, in_ready, out_valid, out_ready, busy;

  gf2m_top dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready, .busy
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism monitors.
  always @(posedge clk) begin
    if (busy) begin
      n_iter++;
      if (dut.u_mult.q1 != '0) n_q1++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    logic [NW*32-1:0] wa, wb, got;
    logic [M-1:0]     a, b;
    fe_t              exp;
    int               lat;
    in_valid  = 1'b0;
    in_data   = '0;
    out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      a  = operand(op);
      b  = operand((op + 2) % NOPS);
      wa = (NW*32)'(a);
      wb = (NW*32)'(b);
      if (b[M-1 -: (M % D)] != '0) n_topdigit++;
      for (int i = 0; i < 2 * int'(NW); i++) begin
        @(negedge clk);
        if (i == 0 && op > 0 && in_ready) n_b2b++;
        while (op > 3 && $urandom % 4 == 0) begin
          in_valid = 1'b0;
          n_gap++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = (i < int'(NW)) ? wa[i*32 +: 32] : wb[(i-int'(NW))*32 +: 32];
        #1;
        chk(in_ready, "in_ready while loading");
      end
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      chk(lat == int'(S) + 2, $sformatf("last input word to first result word %0d clocks, expected %0d", lat, S + 2));
      exp = ref_mulmod(M, fe_t'(a), fe_t'(b));
      for (int i = 0; i < int'(NW); i++) begin
        while (!out_valid) @(negedge clk);
        if (op > 3 && $urandom % 3 == 0) begin
          out_ready = 1'b0;
          n_stall++;
          @(negedge clk);
        end
        out_ready = 1'b1;
        got[i*32 +: 32] = out_data;
        @(negedge clk);
        out_ready = 1'b0;
      end
      chk(got == (NW*32)'(exp[M-1:0]), $sformatf("op %0d: a=%h b=%h c=%h exp=%h", op, a, b, got, exp[M-1:0]));
    end
    $display("mechanisms: iterations=%0d q1_reductions=%0d top_digit_ops=%0d input_gaps=%0d output_stalls=%0d back_to_back=%0d",
             n_iter, n_q1, n_topdigit, n_gap, n_stall, n_b2b);
    chk(n_iter == NOPS * (int'(S) - 1), "S-1 iterations per operation");
    chk(n_q1 > 0, "reduction of the top digit of C exercised");
    chk(n_topdigit > 0, "partial top digit of B exercised");
    chk(n_gap > 0, "input gaps exercised");
    chk(n_stall > 0, "output back-pressure exercised");
    chk(n_b2b > 0, "back-to-back operations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
