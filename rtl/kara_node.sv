// One node of the combinational hybrid Karatsuba multiplier (unreduced).
//
// Above the threshold TH the node applies simple (two-term) Karatsuba: operands
// split into a low part of L = ceil(W/2) bits and a high part of W-L bits, and
// three half-size products (low, high, and of the sums) are formed by child
// nodes of this same module:
//   C = P_hi x^(2L) + (P_mid + P_lo + P_hi) x^L + P_lo.
// At or below TH the node uses general (n-term) Karatsuba on single bits:
//   c_i = sum_{j<k, j+k=i} [(a_j+a_k)(b_j+b_k) + a_j b_j + a_k b_k] + a_{i/2} b_{i/2}.
// Simple Karatsuba at large sizes and general Karatsuba at small ones follows the
// hybrid scheme referred to by the design description; the threshold is this
// design's choice. Purely combinational.
//
// Lint note: when this module is linted on its own as the top, Verilator
// reports p_lo, p_mid and p_hi as undriven. They are driven by the three child
// instances of this same module; the report comes from the recursive
// instantiation and does not appear when the node sits under
// hybrid_karatsuba_mul, whose testbench checks every product bit.
module kara_node #(
  parameter int unsigned W  = bhc_pkg::M,
  parameter int unsigned TH = 30
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  if (W <= TH) begin : g_general
    always_comb begin
      logic [W-1:0] d;
      for (int j = 0; j < W; j++) d[j] = a[j] & b[j];
      p = '0;
      for (int i = 0; i < 2*W-1; i++) begin
        if (i % 2 == 0) p[i] = d[i/2];
        // pairs j < k with j + k = i
        for (int j = (i >= W ? i - W + 1 : 0); 2*j < i; j++)
          p[i] = p[i] ^ ((a[j] ^ a[i-j]) & (b[j] ^ b[i-j])) ^ d[j] ^ d[i-j];
      end
    end
  end else begin : g_simple
    localparam int unsigned L = (W + 1) / 2;
    localparam int unsigned H = W - L;
    logic [L-1:0]   a_lo, b_lo, a_s, b_s;
    logic [H-1:0]   a_hi, b_hi;
    logic [2*L-2:0] p_lo, p_mid;
    logic [2*H-2:0] p_hi;
    always_comb begin
      a_lo = a[L-1:0];
      b_lo = b[L-1:0];
      a_hi = a[W-1:L];
      b_hi = b[W-1:L];
      a_s  = a_lo ^ L'(a_hi);
      b_s  = b_lo ^ L'(b_hi);
    end
    kara_node #(.W(L), .TH(TH)) u_lo  (.a(a_lo), .b(b_lo), .p(p_lo));
    kara_node #(.W(H), .TH(TH)) u_hi  (.a(a_hi), .b(b_hi), .p(p_hi));
    kara_node #(.W(L), .TH(TH)) u_mid (.a(a_s),  .b(b_s),  .p(p_mid));
    always_comb begin
      logic [2*W-2:0] mid;
      mid = (2*W-1)'(p_mid) ^ (2*W-1)'(p_lo) ^ (2*W-1)'(p_hi);
      p   = (2*W-1)'(p_lo) ^ (mid << L) ^ ((2*W-1)'(p_hi) << (2*L));
    end
  end
endmodule
