// Hybrid Karatsuba polynomial multiplier (unreduced), one cycle.
//
// Multiplies two m-bit polynomials combinationally by a Karatsuba recursion:
// simple two-term Karatsuba splits the 233-bit operands down to sizes of at most
// TH bits (233 -> 117/116 -> 59/58 -> 30/29), where a general n-term Karatsuba
// block forms the product from single-bit terms (see kara_node). The product is
// valid in the same cycle as the operands, as the description states for this
// multiplier; the recursion threshold is this design's own choice.
module hybrid_karatsuba_mul #(
  parameter int unsigned W  = bhc_pkg::M,
  parameter int unsigned TH = 30
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  kara_node #(.W(W), .TH(TH)) u_root (.a(a), .b(b), .p(p));
endmodule
