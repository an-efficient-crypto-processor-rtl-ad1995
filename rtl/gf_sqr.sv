// GF(2^m) squarer.
//
// Over GF(2) the square of a polynomial has the same coefficients at even
// positions only, so the squarer inserts a zero after every input bit (giving a
// 2m-1 bit polynomial) and reduces the result with the NIST reduction unit. This
// follows the design description. Combinational: the square is valid in the same
// cycle as the input.
module gf_sqr
  import bhc_pkg::*;
(
  input  fe_t a,
  output fe_t s
);
  prod_t wide;
  always_comb wide = spread(a);
  gf_reduce u_red (.c(wide), .r(s));
endmodule
