// Field multiplier of the ALU: one of the six polynomial multipliers followed by
// the NIST reduction unit.
//
// KIND selects the multiplier at elaboration time (default: the
// least-significant-digit-parallel multiplier, the configuration the design
// description selects as its main one). The combinational kinds (LSD, hybrid
// Karatsuba) finish in the cycle `go` is raised, so `last` equals `go`; the
// bit-serial kinds take mul_cycles(KIND) cycles. Operands must be held while
// `go` is high; `r` is valid, already reduced, when `last` is high.
module bhc_mul_unit
  import bhc_pkg::*;
#(
  parameter mul_kind_e KIND = MUL_LSD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  fe_t  a,
  input  fe_t  b,
  output fe_t  r,
  output logic last
);
  prod_t p;

  if (KIND == MUL_LSD) begin : g_lsd
    lsd_mul #(.W(M), .D(32)) u_mul (.a(a), .b(b), .p(p));
    always_comb last = go;
  end else if (KIND == MUL_HYBRID_KAR) begin : g_hk
    hybrid_karatsuba_mul #(.W(M)) u_mul (.a(a), .b(b), .p(p));
    always_comb last = go;
  end else if (KIND == MUL_SCHOOLBOOK) begin : g_sb
    schoolbook_mul #(.W(M)) u_mul (
      .clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p), .last(last));
  end else if (KIND == MUL_KAR2) begin : g_k2
    split_mul #(.W(M), .K(2)) u_mul (
      .clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p), .last(last));
  end else if (KIND == MUL_TOOM3) begin : g_t3
    split_mul #(.W(M), .K(3)) u_mul (
      .clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p), .last(last));
  end else begin : g_t4
    split_mul #(.W(M), .K(4)) u_mul (
      .clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .p(p), .last(last));
  end

  gf_reduce u_red (.c(p), .r(r));
endmodule
