// Testbench of gf_add: random operands, sum checked coefficient by coefficient
// against the GF(2) addition table (1+1 = 0).
module tb_gf_add;
  import tb_gf_ref::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rfe_t a, b, s;

  gf_add dut (.a(a), .b(b), .s(s));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = rand_fe(); b = rand_fe();
      if (n == 0) b = a;
      @(posedge clk);
      for (int i = 0; i < RM; i++) begin
        logic e;
        e = (a[i] == b[i]) ? 1'b0 : 1'b1;
        if (s[i] !== e) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d bit %0d", n, i);
        end
      end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
