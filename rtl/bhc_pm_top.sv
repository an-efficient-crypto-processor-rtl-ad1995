// Binary Huff Curve point-multiplication processor over GF(2^233).
//
// Computes the affine point Q = k.P on a binary Huff curve
//   a X (Y^2 + YZ + Z^2) = b Y (X^2 + XZ + Z^2)
// by left-to-right double-and-add in projective coordinates, where both the
// doubling and the addition use the same unified addition law (so the
// arithmetic of the two is identical), followed by an Itoh-Tsujii inversion
// and conversion back to affine coordinates. The curve enters only through the
// precomputed constants alpha = (a+b)/b and beta = (a+b)/a.
//
// Structure: control unit (bhc_control with its micro-program) driving the
// datapath (bhc_datapath: 24 x m register array, Mux_3, ALU with adder,
// multiplier and squarer, Mux_4). MUL_KIND selects one of the six multipliers;
// the default is the least-significant-digit-parallel one.
//
// Interface: pulse `start` for one cycle with k, xp, yp, alpha and beta valid;
// k must have bit m-1 set, and alpha, beta, xp and yp must be held until
// `done`. `busy` is high during the operation; `done` pulses for one cycle
// when xq, yq hold the result, which they keep until the next `done`.
// Latency: 3 + (17n+20)(m-1+wt) + 10n + m-1 + 2n + 1 cycles with n the
// multiplier latency and wt the weight of k_{m-2..0} (13,124 cycles for n = 1
// and wt = 116). Output registers and the start/busy/done handshake are this
// design's own.
module bhc_pm_top
  import bhc_pkg::*;
#(
  parameter mul_kind_e MUL_KIND = MUL_LSD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  fe_t          xp,
  input  fe_t          yp,
  input  fe_t          alpha,
  input  fe_t          beta,
  output fe_t          xq,
  output fe_t          yq,
  output logic         busy,
  output logic         done
);
  op_e   op;
  src_e  src;
  addr_t ra, rb, rw;
  logic  dup, we, mul_go, mul_last, out_en, ev_pd_end, ev_pa_end;
  fe_t   x_aff, y_aff;

  bhc_control u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .k(k), .busy(busy), .done(done),
    .out_en(out_en), .op(op), .src(src), .ra(ra), .rb(rb), .rw(rw), .dup(dup),
    .we(we), .mul_go(mul_go), .mul_last(mul_last),
    .ev_pd_end(ev_pd_end), .ev_pa_end(ev_pa_end));

  bhc_datapath #(.KIND(MUL_KIND)) u_dp (
    .clk(clk), .rst_n(rst_n), .op(op), .src(src), .ra(ra), .rb(rb), .rw(rw),
    .dup(dup), .we(we), .mul_go(mul_go), .mul_last(mul_last),
    .alpha(alpha), .beta(beta), .xp(xp), .yp(yp), .x_aff(x_aff), .y_aff(y_aff));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xq <= '0;
      yq <= '0;
    end else if (out_en) begin
      xq <= x_aff;
      yq <= y_aff;
    end
  end
endmodule
