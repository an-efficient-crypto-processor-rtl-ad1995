// Testbench of schoolbook_mul at m = 233: products of random and corner-case
// operands compared with a reference carry-less product, and the latency
// checked to be m-1 = 232 cycles per product. Some products follow each other
// back to back (go stays high), others are separated by an idle cycle.
module tb_schoolbook_mul;
  import tb_gf_ref::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rfe_t   a, b;
  rprod_t p;
  logic   go, last;

  schoolbook_mul #(.W(RM)) dut (.clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p), .last(last));

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
    @(posedge clk); #1;
    for (int n = 0; n < 60; n++) begin
      int cyc;
      if (n == 0) begin a = '1; b = '1; end
      else if (n < 10) begin a = rand_fe(); b = rfe_t'(1) << (n*25); end
      else begin a = rand_fe(); b = rand_fe(); end
      go = 1'b1;
      cyc = 1;
      @(negedge clk);
      while (!last && cyc < 1000) begin
        @(posedge clk); #1;
        cyc++;
        @(negedge clk);
      end
      checks += 2;
      if (p !== clmul(a, b)) begin
        failures++;
        if (failures < 5) $display("product mismatch n=%0d", n);
      end
      if (cyc != RM - 1) begin
        failures++;
        $display("latency %0d, expected %0d", cyc, RM - 1);
      end
      @(posedge clk); #1;
      if (n % 3 == 0) begin go = 1'b0; @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
