// Testbench of gf_sqr: squares of random elements and of single powers of x
// compared with the reference shift-and-add field multiplication a*a.
module tb_gf_sqr;
  import tb_gf_ref::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rfe_t a, s;

  gf_sqr dut (.a(a), .s(s));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = (n < RM) ? rfe_t'(1) << n : rand_fe();
      @(posedge clk);
      checks++;
      if (s !== fmul(a, a)) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
