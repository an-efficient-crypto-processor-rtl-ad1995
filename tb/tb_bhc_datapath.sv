// Testbench of bhc_datapath with its default (one-cycle LSD) multiplier. It
// loads the base point through Mux_3 with `dup`, then issues random additions,
// multiplications, squarings and multiplications by alpha and beta between
// random registers, keeping a scoreboard of the register array computed with
// the reference field arithmetic, and compares the affine result taps, which it
// fills with random multiplications, with the scoreboard.
module tb_bhc_datapath;
  import tb_gf_ref::*;
  import bhc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  op_e   op;
  src_e  src;
  addr_t ra, rb, rw;
  logic  dup, we, mul_go, mul_last;
  rfe_t  alpha, beta, xp, yp, xa, ya;
  rfe_t  sb [24];

  bhc_datapath dut (.clk(clk), .rst_n(rst_n), .op(op), .src(src), .ra(ra), .rb(rb), .rw(rw),
    .dup(dup), .we(we), .mul_go(mul_go), .mul_last(mul_last), .alpha(alpha), .beta(beta),
    .xp(xp), .yp(yp), .x_aff(xa), .y_aff(ya));

  task automatic issue(op_e o, src_e s, int a, int b, int w, bit d = 0);
    rfe_t va, res;
    op = o; src = s; ra = addr_t'(a); rb = addr_t'(b); rw = addr_t'(w); dup = d;
    we = 1'b1; mul_go = (o == OP_MUL);
    case (s)
      SRC_ALPHA: va = alpha;
      SRC_BETA:  va = beta;
      SRC_XP:    va = xp;
      SRC_YP:    va = yp;
      SRC_ONE:   va = rfe_t'(1);
      default:   va = sb[a];
    endcase
    case (o)
      OP_ADD:  res = va ^ sb[b];
      OP_MUL:  res = fmul(va, sb[b]);
      OP_SQR:  res = fmul(sb[b], sb[b]);
      default: res = va;
    endcase
    #1;
    checks++;
    if (o == OP_MUL && !mul_last) begin
      failures++; $display("one-cycle multiplier did not finish");
    end
    @(negedge clk);
    sb[w] = res;
    if (d) sb[w + 3] = res;
    we = 1'b0; mul_go = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_ADD; src = SRC_MEM; ra = 0; rb = 0; rw = 0; dup = 0; we = 0; mul_go = 0;
    alpha = rand_fe(); beta = rand_fe(); xp = rand_fe(); yp = rand_fe();
    foreach (sb[i]) sb[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    issue(OP_LOAD, SRC_XP, 0, 0, 0, 1);
    issue(OP_LOAD, SRC_YP, 0, 0, 1, 1);
    issue(OP_LOAD, SRC_ONE, 0, 0, 2, 1);
    for (int n = 0; n < 600; n++) begin
      int a, b, w, o, s;
      a = $urandom_range(0, 23); b = $urandom_range(0, 23); w = $urandom_range(0, 23);
      o = $urandom_range(0, 2);
      s = ($urandom_range(0, 4) == 0) ? $urandom_range(1, 2) : 0;
      issue(op_e'(o), src_e'(s), a, b, w);
      if (n % 50 == 49) begin
        issue(OP_MUL, SRC_MEM, $urandom_range(0, 20), $urandom_range(0, 20), 21);
        issue(OP_MUL, SRC_MEM, $urandom_range(0, 20), $urandom_range(0, 20), 22);
        checks += 2;
        if (xa !== sb[21]) begin failures++; $display("x tap mismatch at %0d", n); end
        if (ya !== sb[22]) begin failures++; $display("y tap mismatch at %0d", n); end
      end
    end
    // read every register back through an add with a zero register
    issue(OP_ADD, SRC_ONE, 0, 0, 23);
    issue(OP_ADD, SRC_MEM, 23, 23, 23);     // r23 = 0
    for (int r = 0; r < 23; r++) begin
      issue(OP_ADD, SRC_MEM, r, 23, 21);
      checks++;
      if (xa !== sb[r]) begin failures++; $display("register %0d mismatch", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
