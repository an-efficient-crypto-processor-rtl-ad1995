// Testbench of bhc_control with a stand-in multiplier of latency n (n = 1, 3
// and 7: `mul_last` raised in the n-th cycle of `mul_go`). For random keys, and
// keys of weight 0 and m-1 below the top bit, it checks:
//  - the number of busy cycles equals
//    3 + (17n+20)(m-1) + (17n+20)wt + 10n + (m-1) + 2n + 1;
//  - m-1 doublings happen, each followed by an addition exactly when the key
//    bit in turn (k_{m-2} first) is 1;
//  - the number of register writes (one per instruction or squaring);
//  - `done` pulses once, after busy falls.
module tb_bhc_control;
  import tb_gf_ref::*;
  import bhc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start, busy, done, out_en, dup, we, mul_go, mul_last, ev_pd, ev_pa;
  logic [M-1:0] k;
  op_e          op;
  src_e         src;
  addr_t        ra, rb, rw;
  int unsigned  lat;
  int unsigned  mcnt;

  bhc_control dut (.clk(clk), .rst_n(rst_n), .start(start), .k(k), .busy(busy), .done(done),
    .out_en(out_en), .op(op), .src(src), .ra(ra), .rb(rb), .rw(rw), .dup(dup), .we(we),
    .mul_go(mul_go), .mul_last(mul_last), .ev_pd_end(ev_pd), .ev_pa_end(ev_pa));

  // stand-in multiplier
  always_comb mul_last = mul_go && (mcnt == lat - 1);
  always_ff @(posedge clk) mcnt <= (!mul_go || mul_last) ? 0 : mcnt + 1;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; k = '0; lat = 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 9; t++) begin
      int unsigned wt, cyc, pds, pas, writes, exp_writes, dones, bit_i;
      bit order_ok;
      lat = (t < 5) ? 1 : (t < 7 ? 3 : 7);
      k = rand_fe();
      if (t == 1) k = '0;
      if (t == 2) k = '1;
      k[M-1] = 1'b1;
      wt = popcount(k, M - 2);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0; pds = 0; pas = 0; writes = 0; dones = 0; order_ok = 1; bit_i = M - 2;
      while (busy) begin
        cyc++;
        if (we) writes++;
        if (ev_pd) begin
          pds++;
        end
        if (ev_pa) begin
          pas++;
          if (!k[bit_i]) order_ok = 0;
        end
        // a key bit is finished when its doubling ends without an addition
        // following, or when its addition ends
        if (ev_pa || (ev_pd && !k[bit_i])) bit_i--;
        @(negedge clk);
        if (done) dones++;
      end
      exp_writes = 3 + 37 * (M - 1 + wt) + 10 + 232 + 2;
      check($sformatf("cycles n=%0d wt=%0d: %0d vs %0d", lat, wt, cyc,
                      3 + (17*lat+20)*(M-1) + (17*lat+20)*wt + 10*lat + (M-1) + 2*lat + 1),
            cyc == 3 + (17*lat+20)*(M-1) + (17*lat+20)*wt + 10*lat + (M-1) + 2*lat + 1);
      check("doublings", pds == M - 1);
      check("additions", pas == wt);
      check("additions follow one bits", order_ok);
      check($sformatf("writes %0d vs %0d", writes, exp_writes), writes == exp_writes);
      check("done pulse", dones == 1 || done);
      if (t == 0)
        $display("n=1, wt=%0d: %0d cycles (13,124 for wt=116)", wt, cyc);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
