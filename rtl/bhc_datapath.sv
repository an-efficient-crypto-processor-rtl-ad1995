// Datapath of the BHC processor (Figure 1 of the design description):
// memory unit, routing multiplexer Mux_3, ALU and routing multiplexer Mux_4.
//
// Mux_3 (C4) chooses the first ALU operand: a register (read port C1), one of the
// precomputed curve constants alpha and beta, or, for the initial conversion,
// the affine base point coordinates or the constant 1. The second operand always
// comes from the register array (read port C2). The ALU has one adder, one
// multiplier unit (KIND selects which of the six) and one squarer, the latter two
// followed by reduction; the squarer squares the second operand. Mux_4 (C5) picks
// the result that the demultiplexer writes back to address C3.
//
// Timing: add, square and load complete in one cycle (written at the clock edge
// ending the cycle). A multiplication holds `mul_go` and the addresses for the
// multiplier's latency; the controller writes when `mul_last` is high.
// Putting the base point and the constant 1 on Mux_3 is this design's own way of
// loading the initial point; the rest follows the description.
module bhc_datapath
  import bhc_pkg::*;
#(
  parameter mul_kind_e KIND = MUL_LSD
) (
  input  logic  clk,
  input  logic  rst_n,
  // control (C1..C5)
  input  op_e   op,
  input  src_e  src,
  input  addr_t ra,
  input  addr_t rb,
  input  addr_t rw,
  input  logic  dup,
  input  logic  we,
  input  logic  mul_go,
  output logic  mul_last,
  // constants and inputs
  input  fe_t   alpha,
  input  fe_t   beta,
  input  fe_t   xp,
  input  fe_t   yp,
  // results
  output fe_t   x_aff,
  output fe_t   y_aff
);
  fe_t rda, rdb, opa, sum, prod, sq, wd;

  bhc_regfile u_mem (
    .clk(clk), .rst_n(rst_n), .ra(ra), .rb(rb), .wa(rw), .we(we), .dup(dup),
    .wd(wd), .rda(rda), .rdb(rdb), .x_aff(x_aff), .y_aff(y_aff));

  // Mux_3
  always_comb begin
    unique case (src)
      SRC_ALPHA: opa = alpha;
      SRC_BETA:  opa = beta;
      SRC_XP:    opa = xp;
      SRC_YP:    opa = yp;
      SRC_ONE:   opa = fe_t'(1);
      default:   opa = rda;
    endcase
  end

  gf_add       u_add (.a(opa), .b(rdb), .s(sum));
  bhc_mul_unit #(.KIND(KIND)) u_mul (
    .clk(clk), .rst_n(rst_n), .go(mul_go), .a(opa), .b(rdb), .r(prod), .last(mul_last));
  gf_sqr       u_sqr (.a(rdb), .s(sq));

  // Mux_4
  always_comb begin
    unique case (op)
      OP_ADD:  wd = sum;
      OP_MUL:  wd = prod;
      OP_SQR:  wd = sq;
      default: wd = opa;
    endcase
  end
endmodule
