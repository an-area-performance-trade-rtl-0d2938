// tb_gf2m_parallel_mult - self-checking test of the combinational digit
// multiplier U(x)A(x) mod F(x).
//
// Two instances: the default field (M=233, D=32) and a narrow one (M=163,
// D=4). Each is driven with corner cases (zero, one, all-ones, the top bit of
// A set so that every shift stage reduces) and random operands; the output
// is compared with a bit-serial schoolbook reference.
module tb_gf2m_parallel_mult;
  import gf2m_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [232:0] a0, p0;
  logic [31:0]  u0;
  logic [162:0] a1, p1;
  logic [3:0]   u1;

  gf2m_parallel_mult dut0 (.a(a0), .u(u0), .p(p0));
  gf2m_parallel_mult #(.M(163), .D(4)) dut1 (.a(a1), .u(u1), .p(p1));

  task automatic check0(input logic [232:0] a, input logic [31:0] u);
    fe_t exp;
    a0 = a; u0 = u;
    #1;
    exp = ref_mulmod(233, fe_t'(a), fe_t'(u));
    checks++;
    if (p0 !== exp[232:0]) begin
      failures++;
      $display("FAIL m=233 a=%h u=%h p=%h exp=%h", a, u, p0, exp[232:0]);
    end
  endtask

  task automatic check1(input logic [162:0] a, input logic [3:0] u);
    fe_t exp;
    a1 = a; u1 = u;
    #1;
    exp = ref_mulmod(163, fe_t'(a), fe_t'(u));
    checks++;
    if (p1 !== exp[162:0]) begin
      failures++;
      $display("FAIL m=163 a=%h u=%h p=%h exp=%h", a, u, p1, exp[162:0]);
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
    check0('0, 32'hffff_ffff);
    check0(233'd1, 32'h1);
    check0({233{1'b1}}, 32'hffff_ffff);
    check0({1'b1, 232'd0}, 32'hffff_ffff);
    check0({1'b1, 232'd0}, 32'h8000_0000);
    check1({1'b1, 162'd0}, 4'hf);
    check1({163{1'b1}}, 4'h9);
    for (int n = 0; n < 300; n++) begin
      r = rand_fe(233);
      check0(r[232:0], $urandom);
      r = rand_fe(163);
      check1(r[162:0], 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
