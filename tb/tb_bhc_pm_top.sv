// End-to-end testbench of bhc_pm_top at its default configuration (m = 233,
// least-significant-digit-parallel multiplier).
//
// A binary Huff curve a x (y^2+y+1) = b y (x^2+x+1) is drawn at random; a base
// point on it is found by solving the quadratic in y with the half-trace, and
// alpha = (a+b)/b, beta = (a+b)/a are computed with the reference inversion.
// Each point multiplication is compared with the reference double-and-add over
// the unified addition law, the result is checked to lie on the curve, and the
// cycle count is checked against 3 + 37(m-1) + 37 wt + 242 + 3 (13,124 for a
// key of weight 116 below the top bit, which the first run uses).
// Mechanisms counted (each must occur): point doublings, point additions,
// doublings not followed by an addition (key bit 0), multi-cycle squaring runs
// of the inversion, operands taken from alpha/beta through Mux_3, and the
// double write that loads Q and P together.
module tb_bhc_pm_top;
  import tb_gf_ref::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start, busy, done;
  rfe_t       k, xp, yp, alpha, beta, xq, yq;

  bhc_pm_top dut (.clk(clk), .rst_n(rst_n), .start(start), .k(k), .xp(xp), .yp(yp),
                  .alpha(alpha), .beta(beta), .xq(xq), .yq(yq), .busy(busy), .done(done));

  // mechanism counters
  int n_pd, n_pa, n_skip, n_sqr_run, n_const, n_dup;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.ev_pd_end) n_pd++;
    if (dut.u_ctrl.ev_pa_end) n_pa++;
    if (dut.u_ctrl.ev_pd_end && dut.u_ctrl.pc == 7'(bhc_pkg::PC_PA - 1) &&
        !dut.u_ctrl.k_q[dut.u_ctrl.bit_i]) n_skip++;
    if (dut.u_ctrl.we && dut.u_ctrl.ins.op == bhc_pkg::OP_SQR && dut.u_ctrl.rep_cnt != 0) n_sqr_run++;
    if (dut.u_ctrl.we && (dut.u_ctrl.ins.src == bhc_pkg::SRC_ALPHA ||
                          dut.u_ctrl.ins.src == bhc_pkg::SRC_BETA)) n_const++;
    if (dut.u_ctrl.we && dut.u_ctrl.dup) n_dup++;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic rfe_t trace(rfe_t c);
    rfe_t t, s;
    t = '0; s = c;
    for (int i = 0; i < RM; i++) begin t ^= s; s = fsqr(s); end
    return t;   // 0 or 1
  endfunction

  function automatic rfe_t half_trace(rfe_t c);
    rfe_t h, s;
    h = '0; s = c;
    for (int i = 0; i <= (RM - 1) / 2; i++) begin h ^= s; s = fsqr(fsqr(s)); end
    return h;
  endfunction

  function automatic bit on_curve(rfe_t a, rfe_t b, rfe_t x, rfe_t y);
    rfe_t one;
    one = rfe_t'(1);
    return fmul(fmul(a, x), fsqr(y) ^ y ^ one) == fmul(fmul(b, y), fsqr(x) ^ x ^ one);
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rfe_t a, b, x, y, ca, cb, c, exq, eyq;
    start = 0; k = '0;
    n_pd = 0; n_pa = 0; n_skip = 0; n_sqr_run = 0; n_const = 0; n_dup = 0;
    // random curve and a point on it
    a = rand_fe(); b = rand_fe();
    alpha = fmul(a ^ b, finv(b));
    beta  = fmul(a ^ b, finv(a));
    do begin
      x  = rand_fe();
      ca = fmul(a, x);                                       // A = a x
      cb = ca ^ fmul(b, fsqr(x) ^ x ^ rfe_t'(1));            // B = a x + b (x^2+x+1)
      c  = fmul(ca, finv(cb));                               // A/B
    end while (trace(c) != '0);
    y = fmul(fmul(cb, finv(ca)), half_trace(fsqr(c)));     // y = (B/A) H((A/B)^2)
    check("base point on curve", on_curve(a, b, x, y));
    xp = x; yp = y;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2; t++) begin
      int unsigned wt, cyc, expc;
      k = rand_fe();
      if (t == 0) begin
        // exactly 116 ones below the top bit
        k = '0;
        for (int i = 0; i < 116; i++) k[2*i + (i % 2)] = 1'b1;
      end
      k[RM-1] = 1'b1;
      wt = popcount(k, RM - 2);
      pm(k, xp, yp, alpha, beta, exq, eyq);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (!done) begin
        if (busy) cyc++;
        @(negedge clk);
      end
      expc = 3 + 37 * (RM - 1) + 37 * wt + 242 + 3;
      check($sformatf("cycles %0d vs %0d", cyc, expc), cyc == expc);
      if (wt == 116) check("13,124 cycles at weight 116", cyc == 13124);
      check("x matches reference", xq == exq);
      check("y matches reference", yq == eyq);
      check("result on curve", on_curve(a, b, xq, yq));
      $display("run %0d: weight %0d, %0d cycles", t, wt, cyc);
    end
    check($sformatf("doublings occurred (%0d)", n_pd), n_pd == 2 * (RM - 1));
    check($sformatf("additions occurred (%0d)", n_pa), n_pa > 0);
    check($sformatf("additions skipped on k_i = 0 (%0d)", n_skip), n_skip > 0);
    check($sformatf("squaring runs (%0d)", n_sqr_run), n_sqr_run == 2 * 221);
    check($sformatf("alpha/beta operands (%0d)", n_const), n_const == 2 * (n_pd + n_pa));
    check($sformatf("Q/P double loads (%0d)", n_dup), n_dup == 6);
    $display("mechanisms: doublings=%0d additions=%0d skipped=%0d sqr-run=%0d const=%0d dup=%0d",
             n_pd, n_pa, n_skip, n_sqr_run, n_const, n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
