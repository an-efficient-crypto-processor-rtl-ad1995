// Testbench of bhc_regfile: random writes to all 24 registers tracked in a
// scoreboard, both read ports and the fixed taps compared with it after every
// write, the `dup` double write checked, writes with `we` low checked to have no
// effect, and out-of-range reads checked to return zero.
module tb_bhc_regfile;
  import tb_gf_ref::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] ra, rb, wa;
  logic       we, dup;
  rfe_t       wd, rda, rdb, xa, ya;
  rfe_t       sb [24];

  bhc_regfile dut (.clk(clk), .rst_n(rst_n), .ra(ra), .rb(rb), .wa(wa), .we(we), .dup(dup),
                   .wd(wd), .rda(rda), .rdb(rdb), .x_aff(xa), .y_aff(ya));

  task automatic check(string what, rfe_t got, rfe_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 8) $display("%s mismatch ra=%0d rb=%0d", what, ra, rb);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; dup = 0; ra = 0; rb = 0; wa = 0; wd = '0;
    foreach (sb[i]) sb[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      wa  = 5'($urandom_range(0, 23));
      dup = ($urandom_range(0, 5) == 0) && (wa < 21);
      we  = ($urandom_range(0, 7) != 0);
      wd  = rand_fe();
      @(negedge clk);
      if (we) begin
        sb[wa] = wd;
        if (dup) sb[wa + 3] = wd;
      end
      we = 0;
      for (int r = 0; r < 32; r++) begin
        int q;
        rfe_t ea, eb;
        q  = 31 - r;
        ra = 5'(r);
        rb = 5'(q);
        ea = (r < 24) ? sb[r] : '0;
        eb = (q < 24) ? sb[q] : '0;
        #1;
        check("port a", rda, ea);
        check("port b", rdb, eb);
      end
      check("x tap", xa, sb[21]);
      check("y tap", ya, sb[22]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
