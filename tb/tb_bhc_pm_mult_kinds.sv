// Point multiplication with each of the other five multipliers built into the
// processor: hybrid Karatsuba, schoolbook, 2-way Karatsuba, 3-way and 4-way
// split. All five run the same point multiplication side by side; each result
// is compared with the reference model and each cycle count with
//   3 + (17n+20)(m-1) + (17n+20) wt + (10n + m-1) + 2n + 1,
// n being 1, 232, 116, 77 and 58 cycles per multiplication. With a key of
// weight 116 the counts are 13,124, 1,382,492, 694,844, 463,652 and 351,020.
module tb_bhc_pm_mult_kinds;
  import tb_gf_ref::*;
  import bhc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NK = 5;
  localparam mul_kind_e KINDS [NK] = '{MUL_HYBRID_KAR, MUL_SCHOOLBOOK, MUL_KAR2, MUL_TOOM3, MUL_TOOM4};
  localparam int unsigned TABLE [NK] = '{13124, 1382492, 694844, 463652, 351020};

  logic start;
  rfe_t k, xp, yp, alpha, beta;
  rfe_t xq [NK], yq [NK];
  logic busy [NK], done [NK];

  for (genvar g = 0; g < NK; g++) begin : g_dut
    bhc_pm_top #(.MUL_KIND(KINDS[g])) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .k(k), .xp(xp), .yp(yp), .alpha(alpha),
      .beta(beta), .xq(xq[g]), .yq(yq[g]), .busy(busy[g]), .done(done[g]));
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rfe_t exq, eyq;
    int unsigned cyc [NK];
    bit fin [NK];
    int nfin;
    start = 0;
    xp = rand_fe(); yp = rand_fe(); alpha = rand_fe(); beta = rand_fe();
    k = '0;
    for (int i = 0; i < 116; i++) k[2*i + 1 - (i % 2)] = 1'b1;
    k[RM-1] = 1'b1;
    pm(k, xp, yp, alpha, beta, exq, eyq);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = '{default: 0};
    fin = '{default: 0};
    nfin = 0;
    while (nfin < NK) begin
      for (int g = 0; g < NK; g++) begin
        if (busy[g]) cyc[g]++;
        if (done[g] && !fin[g]) begin
          fin[g] = 1; nfin++;
        end
      end
      @(negedge clk);
    end
    for (int g = 0; g < NK; g++) begin
      int unsigned n, expc;
      n = mul_cycles(KINDS[g]);
      expc = 3 + (17*n + 20)*(RM - 1) + (17*n + 20)*116 + 10*n + (RM - 1) + 2*n + 1;
      checks += 4;
      if (cyc[g] != expc)      begin failures++; $display("kind %0d: %0d cycles, formula %0d", g, cyc[g], expc); end
      if (cyc[g] != TABLE[g])  begin failures++; $display("kind %0d: %0d cycles, table %0d", g, cyc[g], TABLE[g]); end
      if (xq[g] != exq)        begin failures++; $display("kind %0d: x mismatch", g); end
      if (yq[g] != eyq)        begin failures++; $display("kind %0d: y mismatch", g); end
      $display("multiplier %0d: n=%0d, %0d cycles", g, n, cyc[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
