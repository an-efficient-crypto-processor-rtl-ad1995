// Polynomial reduction modulo the NIST trinomial x^233 + x^74 + 1.
//
// Takes the (2m-1)-bit result of a multiplication or squaring and returns the
// m-bit remainder. Because x^233 = x^74 + 1, every coefficient at position i >= m
// is added back at i-m and i-m+74. Doing this for the whole upper half at once
// leaves coefficients up to position 305, which a second fold of the same kind
// removes. The unit is combinational (wires and XOR gates only) and takes no
// cycle of its own, matching the one-cycle reduction of the description; the
// two-fold word-level formulation is this design's own choice.
module gf_reduce
  import bhc_pkg::*;
(
  input  prod_t c,   // unreduced polynomial, degree <= 2m-2
  output fe_t   r    // c mod f(x)
);
  always_comb r = reduce(c);
endmodule
