// GF(2^m) adder.
//
// Addition of two binary polynomials is the coefficient-wise XOR of their bit
// vectors, so this unit is an array of m two-input XOR gates, as in the design
// description. It is purely combinational: the sum is valid in the same cycle as
// the operands, and no reduction is needed because the degree does not grow.
module gf_add #(
  parameter int unsigned W = bhc_pkg::M
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  always_comb s = a ^ b;
endmodule
