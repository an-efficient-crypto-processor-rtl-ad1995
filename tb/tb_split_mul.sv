// Testbench of split_mul for K = 2, 3 and 4 parts at m = 233: the three
// instances get the same random operands; every product is compared with a
// reference carry-less product and each latency is checked against
// ceil(m/K) - 1 = 116, 77 and 58 cycles.
module tb_split_mul;
  import tb_gf_ref::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rfe_t   a, b;
  rprod_t p [3];
  logic   go;
  logic   last [3];
  localparam int unsigned EXP [3] = '{116, 77, 58};

  split_mul #(.W(RM), .K(2)) dut2 (.clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p[0]), .last(last[0]));
  split_mul #(.W(RM), .K(3)) dut3 (.clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p[1]), .last(last[1]));
  split_mul #(.W(RM), .K(4)) dut4 (.clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p[2]), .last(last[2]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      int cyc;
      bit seen [3];
      rprod_t exp_p;
      if (n == 0) begin a = '1; b = '1; end
      else if (n < 10) begin a = rand_fe(); b = rfe_t'(1) << (n*25); end
      else begin a = rand_fe(); b = rand_fe(); end
      exp_p = clmul(a, b);
      go = 1'b1;
      seen = '{0, 0, 0};
      // run for the longest latency; products stay valid only in their last cycle
      for (cyc = 1; cyc <= 116; cyc++) begin
        #1;
        for (int u = 0; u < 3; u++)
          if (last[u] && !seen[u]) begin
            seen[u] = 1;
            checks += 2;
            if (p[u] !== exp_p) begin
              failures++;
              if (failures < 8) $display("K=%0d product mismatch n=%0d", u + 2, n);
            end
            if (cyc != int'(EXP[u])) begin
              failures++;
              $display("K=%0d latency %0d, expected %0d", u + 2, cyc, EXP[u]);
            end
          end
        @(negedge clk);
        // the faster units restart when they finish; keep them idle instead
        if (cyc == 116) go = 1'b0;
      end
      for (int u = 0; u < 3; u++) if (!seen[u]) begin
        failures++; $display("K=%0d never finished", u + 2);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
