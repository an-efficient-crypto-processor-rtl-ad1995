// Least-significant-digit-parallel polynomial multiplier (unreduced).
//
// B is cut into digits of D bits, least significant first. A is multiplied by
// every digit in parallel, giving partial products of D+m-1 bits; each partial
// product is shifted by its digit position and all are added (XOR) into the
// 2m-1 bit result. The digit size of 32 and the one-cycle (fully combinational)
// operation follow the design description; the result is reduced elsewhere.
module lsd_mul #(
  parameter int unsigned W = bhc_pkg::M,  // operand width
  parameter int unsigned D = 32           // digit size
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  localparam int unsigned ND = (W + D - 1) / D;   // number of digits (8 for 233/32)

  logic [ND*D-1:0]     bpad;
  logic [D+W-2:0]      pp [ND];                    // digit partial products

  always_comb begin
    bpad = '0;
    bpad[W-1:0] = b;
    for (int j = 0; j < ND; j++) begin
      pp[j] = '0;
      for (int t = 0; t < D; t++)
        if (bpad[j*D+t]) pp[j] = pp[j] ^ ((D+W-1)'(a) << t);
    end
  end

  always_comb begin
    logic [ND*D+W-2:0] acc;
    acc = '0;
    for (int j = 0; j < ND; j++)
      acc = acc ^ ((ND*D+W-1)'(pp[j]) << (j*D));
    p = acc[2*W-2:0];
  end
endmodule
