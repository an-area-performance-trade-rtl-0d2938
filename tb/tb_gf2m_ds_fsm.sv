// tb_gf2m_ds_fsm - self-checking test of the digit-serial controller.
//
// For S = 8 (default) and S = 2 it starts operations, some back to back and
// some with extra start pulses while busy, and checks cycle by cycle: init
// only in the clock start is taken, exactly S-1 clocks of iter, done one clock
// wide S clocks after start, busy exactly during the iterations.
module tb_gf2m_ds_fsm;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start8, init8, iter8, busy8, done8;
  logic start2, init2, iter2, busy2, done2;

  always #5 clk = ~clk;

  gf2m_ds_fsm dut8 (.clk, .rst_n, .start(start8), .init(init8), .iter(iter8), .busy(busy8), .done(done8));
  gf2m_ds_fsm #(.S(2)) dut2 (.clk, .rst_n, .start(start2), .init(init2), .iter(iter2), .busy(busy2), .done(done2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run one operation on the S=8 instance. Start is pulsed at the first
  // clock; extra start pulses are given while busy when noisy is set.
  task automatic op8(input bit noisy);
    int iters = 0;
    @(negedge clk);
    start8 = 1'b1;
    #1;
    chk(init8 && !busy8, "S=8 init with start");
    for (int t = 1; t <= 8; t++) begin
      @(negedge clk);
      start8 = noisy && (t < 7) ? 1'($urandom) : 1'b0;
      if (t < 8) begin
        chk(iter8 && busy8 && !init8 && !done8, "S=8 iterating");
        iters++;
      end else begin
        chk(done8 && !busy8 && !iter8, "S=8 done after S clocks");
      end
    end
    chk(iters == 7, "S=8 S-1 iterations");
    start8 = 1'b0;
  endtask

  task automatic op2();
    @(negedge clk);
    start2 = 1'b1;
    #1;
    chk(init2, "S=2 init");
    @(negedge clk);
    start2 = 1'b0;
    chk(iter2 && busy2 && !done2, "S=2 one iteration");
    @(negedge clk);
    chk(done2 && !busy2, "S=2 done after 2 clocks");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start8 = 1'b0;
    start2 = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy8 && !done8 && !init8 && !iter8, "idle after reset");
    op8(1'b0);
    op8(1'b1);        // start pulses while busy must be ignored
    @(negedge clk);
    chk(!done8 && !busy8, "S=8 done is one clock wide");
    op8(1'b0);
    op2();
    op2();
    repeat (3) @(negedge clk);
    chk(!busy8 && !busy2 && !done2, "stays idle without start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
