// Bit-serial schoolbook polynomial multiplier (unreduced).
//
// Computes the 2W-1 bit product of two W-bit polynomials by shift-and-add,
// scanning B from its most significant bit: acc = acc*x + A*b_i. The first cycle
// handles the two top bits of B (the first step starts from zero and needs no
// register), so one product takes W-1 cycles, the m-1 cycles given for the
// schoolbook multiplier in the design description. The scan order and the
// handshake are this design's own.
//
// Interface: hold `go` high and the operands stable for the whole operation.
// `last` is high in the cycle where `p` carries the product (combinationally from
// the final step), W-1 cycles after `go` rose. The counter returns to zero after
// `last` or whenever `go` is low, so back-to-back operations are allowed.
module schoolbook_mul #(
  parameter int unsigned W = bhc_pkg::M   // operand width, >= 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p,
  output logic           last
);
  localparam int unsigned CW = $clog2(W);

  logic [CW-1:0]  cnt;
  logic [2*W-2:0] acc_q, acc_in, acc_d;
  logic           first;

  always_comb begin
    first  = (cnt == '0);
    last   = go && (cnt == CW'(W-2));
    acc_in = first ? (b[W-1] ? (2*W-1)'(a) : '0) : acc_q;
    // bit handled this cycle: W-2 down to 0
    acc_d  = (acc_in << 1) ^ (b[W-2-int'(cnt)] ? (2*W-1)'(a) : '0);
    p      = acc_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      acc_q <= '0;
    end else if (!go || last) begin
      cnt   <= '0;
    end else begin
      cnt   <= cnt + 1'b1;
      acc_q <= acc_d;
    end
  end
endmodule
