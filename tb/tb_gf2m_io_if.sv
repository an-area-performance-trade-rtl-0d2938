// tb_gf2m_io_if - self-checking test of the 32-bit word interface.
//
// The multiplier is replaced by a small model: a start pulse is answered by
// done after a random delay, with mul_c = mul_a xor (mul_b >> 1), so that
// both operands must have been assembled right for the result to match.
// Words are fed with random gaps in in_valid and taken with random
// back-pressure on out_ready. Checked: operand assembly (A words then B
// words, least significant first, bits above M dropped), one start pulse
// per operation, the returned words (zero above M), in_ready only while
// loading, and that a word on hold does not change.
module tb_gf2m_io_if;
  import gf2m_ref_pkg::*;

  localparam int unsigned M  = 233;
  localparam int unsigned NW = (M + 31) / 32;

  int checks = 0, failures = 0;
  int starts = 0, holds = 0, gaps = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]  in_data, out_data;
  logic         in_valid, in_ready, out_valid, out_ready;
  logic [M-1:0] mul_a, mul_b, mul_c;
  logic         mul_start, mul_done;

  gf2m_io_if dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready,
    .mul_a, .mul_b, .mul_start, .mul_done, .mul_c
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Multiplier model.
  initial begin
    mul_done = 1'b0;
    mul_c    = '0;
    forever begin
      @(posedge clk);
      if (mul_start) begin
        starts++;
        repeat (1 + $urandom % 10) @(posedge clk);
        mul_c    <= mul_a ^ (mul_b >> 1);
        mul_done <= 1'b1;
        @(posedge clk);
        mul_done <= 1'b0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW*32-1:0] wa, wb, wexp, got;
    logic [M-1:0]     exp;
    in_valid  = 1'b0;
    in_data   = '0;
    out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 30; op++) begin
      for (int i = 0; i < int'(NW); i++) begin
        wa[i*32 +: 32] = $urandom;
        wb[i*32 +: 32] = $urandom;
      end
      // Feed A then B.
      for (int i = 0; i < 2 * int'(NW); i++) begin
        @(negedge clk);
        while ($urandom % 3 == 0) begin
          in_valid = 1'b0;
          gaps++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = (i < int'(NW)) ? wa[i*32 +: 32] : wb[(i-int'(NW))*32 +: 32];
        #1;
        chk(in_ready, "in_ready while loading");
      end
      @(negedge clk);
      in_valid = 1'b0;
      chk(!in_ready, "no in_ready after the last operand word");
      chk(mul_a == wa[M-1:0] && mul_b == wb[M-1:0], "operands assembled");
      exp  = wa[M-1:0] ^ (wb[M-1:0] >> 1);
      wexp = (NW*32)'(exp);
      // Collect the result with back-pressure.
      for (int i = 0; i < int'(NW); i++) begin
        while (!out_valid) @(negedge clk);
        if ($urandom % 3 == 0) begin
          logic [31:0] held;
          held = out_data;
          out_ready = 1'b0;
          @(negedge clk);
          holds++;
          chk(out_valid && out_data == held, "word held under back-pressure");
        end
        out_ready = 1'b1;
        got[i*32 +: 32] = out_data;
        chk(!in_ready, "no in_ready while sending");
        @(negedge clk);
        out_ready = 1'b0;
      end
      chk(got == wexp, $sformatf("result words %h exp %h", got, wexp));
      chk(starts == op + 1, "one start per operation");
    end
    chk(holds > 0 && gaps > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
