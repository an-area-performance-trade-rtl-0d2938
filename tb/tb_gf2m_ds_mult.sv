// tb_gf2m_ds_mult - self-checking test of the digit-serial multiplier.
//
// Runs products on four configurations: the default (M=233, D=32, top
// digit of 9 bits), the bit-serial corner D=1 on M=163, M=283 with D=8 and
// M=571 with D=16. Each product's value and its latency of ceil(M/D) clocks
// are checked against the bit-serial reference (see gf2m_ds_mult_runner).
module tb_gf2m_ds_mult;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int   ck [4], fl [4];
  logic fin [4];

  gf2m_ds_mult_runner #(.M(233), .D(32), .N(40)) r0 (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  gf2m_ds_mult_runner #(.M(163), .D(1),  .N(12)) r1 (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  gf2m_ds_mult_runner #(.M(283), .D(8),  .N(20)) r2 (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  gf2m_ds_mult_runner #(.M(571), .D(16), .N(20)) r3 (.clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));

  function automatic int total(input int v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(ck), total(fl) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(ck), total(fl));
    $finish;
  end
endmodule
