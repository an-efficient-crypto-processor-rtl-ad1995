// Testbench of bhc_ucode_rom. It reads the whole micro-program and executes it
// on a register-array model with the reference field arithmetic:
//  - the initial loads must give Q = P = (xp, yp, 1);
//  - the doubling program must turn random Q into UAL(Q, Q) and the addition
//    program random (P, Q) into UAL(P, Q), leaving P untouched;
//  - the inversion program must leave Z^-1 in register 23 and the last two
//    instructions X/Z and Y/Z in registers 21 and 22.
// It also counts the operations: 17 multiplications, 15 additions and 5
// squarings per unified addition, 10 multiplications and 232 squarings per
// inversion, 2 multiplications for the affine conversion.
module tb_bhc_ucode_rom;
  import tb_gf_ref::*;
  import bhc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0] pc;
  uinstr_t    ins;
  rfe_t       regs [24];
  rfe_t       xp, yp, alpha, beta;
  int         n_mul, n_add, n_sqr;

  bhc_ucode_rom dut (.pc(pc), .ins(ins));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic exec(int unsigned first, int unsigned count);
    n_mul = 0; n_add = 0; n_sqr = 0;
    for (int unsigned p = first; p < first + count; p++) begin
      rfe_t va;
      pc = 7'(p);
      @(posedge clk);
      case (ins.src)
        SRC_ALPHA: va = alpha;
        SRC_BETA:  va = beta;
        SRC_XP:    va = xp;
        SRC_YP:    va = yp;
        SRC_ONE:   va = rfe_t'(1);
        default:   va = regs[ins.ra];
      endcase
      case (ins.op)
        OP_ADD: begin regs[ins.rw] = va ^ regs[ins.rb]; n_add++; end
        OP_MUL: begin regs[ins.rw] = fmul(va, regs[ins.rb]); n_mul++; end
        OP_SQR: begin
          regs[ins.rw] = fsqr(regs[ins.rb]);
          for (int r = 1; r < int'(ins.rep); r++) regs[ins.rw] = fsqr(regs[ins.rw]);
          n_sqr += ins.rep;
        end
        default: begin
          regs[ins.rw] = va;
          if (ins.dup) regs[ins.rw + 3] = va;
        end
      endcase
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rpt_t p, q, r;
    rfe_t z;
    pc = '0;
    xp = rand_fe(); yp = rand_fe(); alpha = rand_fe(); beta = rand_fe();
    foreach (regs[i]) regs[i] = rand_fe();
    exec(0, 3);
    check("init Q", regs[0] == xp && regs[1] == yp && regs[2] == rfe_t'(1));
    check("init P", regs[3] == xp && regs[4] == yp && regs[5] == rfe_t'(1));
    for (int n = 0; n < 4; n++) begin
      foreach (regs[i]) regs[i] = rand_fe();
      q = '{regs[0], regs[1], regs[2]};
      r = ual(q, q, alpha, beta);
      exec(3, 37);
      check("doubling result", regs[0] == r.x && regs[1] == r.y && regs[2] == r.z);
      check("doubling op counts", n_mul == 17 && n_add == 15 && n_sqr == 5);
      foreach (regs[i]) if (i > 2) regs[i] = rand_fe();
      p = '{regs[3], regs[4], regs[5]};
      q = '{regs[0], regs[1], regs[2]};
      r = ual(p, q, alpha, beta);
      exec(40, 37);
      check("addition result", regs[0] == r.x && regs[1] == r.y && regs[2] == r.z);
      check("addition keeps P", regs[3] == p.x && regs[4] == p.y && regs[5] == p.z);
      check("addition op counts", n_mul == 17 && n_add == 15 && n_sqr == 5);
      z = regs[2];
      exec(77, 21);
      check("inverse", regs[23] == finv(z));
      check("inversion op counts", n_mul == 10 && n_sqr == 232 && n_add == 0);
      exec(98, 2);
      check("affine x", regs[21] == fmul(regs[0], finv(z)));
      check("affine y", regs[22] == fmul(regs[1], finv(z)));
      check("affine op counts", n_mul == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
