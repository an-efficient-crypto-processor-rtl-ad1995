// Testbench of gf_reduce: random (2m-1)-bit polynomials and corner cases (all
// ones, single high coefficients) compared with bit-serial long division by
// x^233 + x^74 + 1.
module tb_gf_reduce;
  import tb_gf_ref::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rprod_t c;
  rfe_t   r;

  gf_reduce dut (.c(c), .r(r));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      if (n < 2*RM-1)  c = rprod_t'(1) << n;
      else if (n == 2*RM-1) c = '1;
      else             c = rand_prod();
      @(posedge clk);
      checks++;
      if (r !== mod_f(c)) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
