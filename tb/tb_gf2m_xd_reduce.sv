// tb_gf2m_xd_reduce - self-checking test of the x^d C(x) mod F(x) unit.
//
// For the default field (M=233, D=32) and for M=571, D=16 it checks that
// q2 is C's low M-D bits moved up D places, and that q1 xor q2 equals
// x^D C(x) mod F(x) from the bit-serial reference, for corner cases and
// random accumulators.
module tb_gf2m_xd_reduce;
  import gf2m_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [232:0] c0, q10, q20;
  logic [570:0] c1, q11, q21;

  gf2m_xd_reduce dut0 (.c(c0), .q1(q10), .q2(q20));
  gf2m_xd_reduce #(.M(571), .D(16)) dut1 (.c(c1), .q1(q11), .q2(q21));

  task automatic check0(input logic [232:0] c);
    fe_t exp;
    c0 = c;
    #1;
    exp = ref_mulmod(233, fe_t'(c), fe_t'(1) << 32);
    checks += 2;
    if (q20 !== {c[200:0], 32'd0}) begin
      failures++;
      $display("FAIL q2 m=233 c=%h q2=%h", c, q20);
    end
    if ((q10 ^ q20) !== exp[232:0]) begin
      failures++;
      $display("FAIL m=233 c=%h got=%h exp=%h", c, q10 ^ q20, exp[232:0]);
    end
  endtask

  task automatic check1(input logic [570:0] c);
    fe_t exp;
    c1 = c;
    #1;
    exp = ref_mulmod(571, fe_t'(c), fe_t'(1) << 16);
    checks++;
    if ((q11 ^ q21) !== exp[570:0]) begin
      failures++;
      $display("FAIL m=571 c=%h got=%h exp=%h", c, q11 ^ q21, exp[570:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t r;
    check0('0);
    check0({233{1'b1}});
    check0({1'b1, 232'd0});
    check0(233'd1);
    check1({571{1'b1}});
    for (int n = 0; n < 300; n++) begin
      r = rand_fe(233);
      check0(r[232:0]);
      r = rand_fe(571);
      check1(r[570:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
