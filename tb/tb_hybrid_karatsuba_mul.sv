// Testbench of hybrid_karatsuba_mul: unreduced products of random operands, of all-ones
// operands and of single powers of x, compared with a bit-serial carry-less
// product; the product must be available in the same cycle (one-cycle
// multiplier).
module tb_hybrid_karatsuba_mul;
  import tb_gf_ref::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rfe_t   a, b;
  rprod_t p;

  hybrid_karatsuba_mul dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      if (n == 0) begin a = '1; b = '1; end
      else if (n <= RM) begin a = rand_fe(); b = rfe_t'(1) << (n-1); end
      else begin a = rand_fe(); b = rand_fe(); end
      @(posedge clk);
      checks++;
      if (p !== clmul(a, b)) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
