// Multi-way split polynomial multiplier with bit-serial inner products (unreduced).
//
// Both W-bit operands are cut into K parts of w = ceil(W/K) bits. The inner
// products are computed by K*(K+1)/2 bit-serial schoolbook multipliers working in
// parallel, so one multiplication takes w-1 cycles: 116, 77 and 58 cycles for
// K = 2, 3, 4 at m = 233, the counts given for the 2-way Karatsuba, 3-way and
// 4-way Toom-Cook multipliers. The splitting and the schoolbook inner products
// follow the design description. The recombination is this design's own: over
// GF(2) it uses the K-term Karatsuba identity
//   C = sum_i M_i x^(2iw) + sum_{i<j} (M_ij + M_i + M_j) x^((i+j)w),
//   M_i = A_i*B_i,  M_ij = (A_i+A_j)*(B_i+B_j),
// which for K = 2 is the classical Karatsuba formula and for K = 3, 4 replaces
// Toom-Cook interpolation (whose evaluation points need division, awkward in
// characteristic 2) with the same split structure and cycle count.
//
// Interface and timing as schoolbook_mul: hold `go` and the operands; `last`
// marks the cycle in which `p` is valid.
module split_mul #(
  parameter int unsigned W = bhc_pkg::M,
  parameter int unsigned K = 2            // number of parts: 2, 3 or 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p,
  output logic           last
);
  localparam int unsigned SW = (W + K - 1) / K;   // part width w
  localparam int unsigned PWW = 2*SW - 1;         // inner product width

  logic [K*SW-1:0] apad, bpad;
  always_comb begin
    apad = '0; apad[W-1:0] = a;
    bpad = '0; bpad[W-1:0] = b;
  end

  // prod[i][j], j >= i: M_i on the diagonal, M_ij above it
  logic [PWW-1:0] prod [K][K];
  logic [K-1:0]   lasts [K];

  for (genvar i = 0; i < K; i++) begin : g_row
    for (genvar j = 0; j < K; j++) begin : g_col
      if (j >= i) begin : g_mul
        logic [SW-1:0] oa, ob;
        always_comb begin
          if (i == j) begin
            oa = apad[i*SW +: SW];
            ob = bpad[i*SW +: SW];
          end else begin
            oa = apad[i*SW +: SW] ^ apad[j*SW +: SW];
            ob = bpad[i*SW +: SW] ^ bpad[j*SW +: SW];
          end
        end
        schoolbook_mul #(.W(SW)) u_sb (
          .clk(clk), .rst_n(rst_n), .go(go), .a(oa), .b(ob),
          .p(prod[i][j]), .last(lasts[i][j])
        );
      end else begin : g_none
        always_comb begin
          prod[i][j]  = '0;
          lasts[i][j] = 1'b0;
        end
      end
    end
  end

  // all inner multipliers run in lock step; the first one paces the unit
  always_comb last = lasts[0][0];

  always_comb begin
    logic [2*K*SW-2:0] acc;
    acc = '0;
    for (int i = 0; i < K; i++) begin
      acc = acc ^ ((2*K*SW-1)'(prod[i][i]) << (2*i*SW));
      for (int j = i + 1; j < K; j++)
        acc = acc ^ ((2*K*SW-1)'(prod[i][j] ^ prod[i][i] ^ prod[j][j]) << ((i+j)*SW));
    end
    p = acc[2*W-2:0];   // higher coefficients are zero: the padding is zero
  end
endmodule
