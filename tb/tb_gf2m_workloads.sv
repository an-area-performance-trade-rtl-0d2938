// tb_gf2m_workloads - the evaluated grid of field orders and digit sizes.
//
// One digit-serial multiplier per configuration: field orders
// m = 163, 233, 283, 409, 571 (NIST) and 277, each with digit sizes
// d = 1, 4, 8, 16 and 32 - thirty multipliers running side by side. Each
// computes a few products (corner cases and random operands); every value is
// checked against the bit-serial reference and every latency against
// ceil(m/d) clocks (see gf2m_ds_mult_runner). The clock counts per product
// are printed as a table.
module tb_gf2m_workloads;
  localparam int NF = 6, ND = 5;
  localparam int unsigned MS [NF] = '{163, 233, 277, 283, 409, 571};
  localparam int unsigned DS [ND] = '{1, 4, 8, 16, 32};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int   ck [NF*ND], fl [NF*ND];
  logic fin [NF*ND];

  for (genvar f = 0; f < NF; f++) begin : g_f
    for (genvar d = 0; d < ND; d++) begin : g_d
      gf2m_ds_mult_runner #(.M(MS[f]), .D(DS[d]), .N(6)) r (
        .clk, .rst_n, .checks(ck[f*ND+d]), .failures(fl[f*ND+d]), .finished(fin[f*ND+d])
      );
    end
  end

  function automatic int sum(input int v [NF*ND]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  function automatic bit all_done();
    foreach (fin[i]) if (!fin[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(ck), sum(fl) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    $display("clocks per multiplication, ceil(m/d) (checked per product):");
    for (int f = 0; f < NF; f++)
      $display("  m=%0d: d=1 %0d, d=4 %0d, d=8 %0d, d=16 %0d, d=32 %0d", MS[f],
               MS[f], (MS[f] + 3) / 4, (MS[f] + 7) / 8, (MS[f] + 15) / 16, (MS[f] + 31) / 32);
    $display("TB_RESULT checks=%0d failures=%0d", sum(ck), sum(fl));
    $finish;
  end
endmodule
