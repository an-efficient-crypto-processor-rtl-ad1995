// Memory unit: a register array of 24 x m bits.
//
// Two read multiplexers, addressed by C1 (ra) and C2 (rb), deliver the ALU
// operands combinationally; a write demultiplexer addressed by C3 (wa) updates
// one register on the rising clock edge when `we` is high. With `dup` set the
// same data is also written to register wa+3, which lets the three-cycle initial
// conversion load the accumulator Q and the base point P together. Two fixed read
// taps expose the affine result registers. The 24 x m size, the two read
// multiplexers, the demultiplexer and the 5-bit controls follow the design
// description; `dup`, the fixed taps and the asynchronous clear to zero are this
// design's own. Reads of addresses 24..31 return zero.
module bhc_regfile
  import bhc_pkg::*;
#(
  parameter int unsigned DEPTH = NREG
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t ra,     // C1
  input  addr_t rb,     // C2
  input  addr_t wa,     // C3
  input  logic  we,
  input  logic  dup,
  input  fe_t   wd,
  output fe_t   rda,
  output fe_t   rdb,
  output fe_t   x_aff,  // register R_XA
  output fe_t   y_aff   // register R_YA
);
  fe_t mem [DEPTH];

  always_comb begin
    rda   = (int'(ra) < DEPTH) ? mem[ra] : '0;
    rdb   = (int'(rb) < DEPTH) ? mem[rb] : '0;
    x_aff = mem[R_XA];
    y_aff = mem[R_YA];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      if (int'(wa) < DEPTH)            mem[wa]      <= wd;
      if (dup && int'(wa) + 3 < DEPTH) mem[wa + 5'd3] <= wd;
    end
  end
endmodule
