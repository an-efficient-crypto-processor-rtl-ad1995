// Shared types and constants of the Binary Huff Curve (BHC) point-multiplication
// processor over GF(2^233).
//
// The field is GF(2^m) with m = 233 in polynomial basis, reduced by the NIST
// trinomial f(x) = x^233 + x^74 + 1. Field elements are m-bit vectors, bit i being
// the coefficient of x^i; unreduced products are 2m-1 bits wide.
//
// The processor executes one micro-instruction per state. A micro-instruction
// names an ALU operation (add, multiply, square or load), the source of the first
// operand (Mux_3: register array, curve constants alpha/beta, or the affine input
// point), two read addresses (C1, C2), a write address (C3) and, for squarings, a
// repeat count. The field size, the trinomial, the 24-entry register array and the
// 5-bit address width follow the design description; the instruction encoding,
// the register map and the multiplier selection code are this design's own.
package bhc_pkg;

  localparam int unsigned M      = 233;   // field size m
  localparam int unsigned TRI_K  = 74;    // middle term of x^233 + x^74 + 1
  localparam int unsigned NREG   = 24;    // register array depth (24 x m)
  localparam int unsigned AW     = 5;     // C1/C2/C3 address width
  localparam int unsigned PW     = 2*M-1; // unreduced product width

  typedef logic [M-1:0]  fe_t;            // field element
  typedef logic [PW-1:0] prod_t;          // unreduced product
  typedef logic [AW-1:0] addr_t;

  // Selection of the field multiplier built into the ALU.
  typedef enum logic [2:0] {
    MUL_LSD        = 3'd0,  // least-significant-digit-parallel, 1 cycle
    MUL_HYBRID_KAR = 3'd1,  // hybrid Karatsuba, 1 cycle
    MUL_SCHOOLBOOK = 3'd2,  // bit-serial schoolbook, m-1 cycles
    MUL_KAR2       = 3'd3,  // 2-way Karatsuba, ceil(m/2)-1 cycles
    MUL_TOOM3      = 3'd4,  // 3-way split, ceil(m/3)-1 cycles
    MUL_TOOM4      = 3'd5   // 4-way split, ceil(m/4)-1 cycles
  } mul_kind_e;

  // Mux_4 selection (C5): which ALU result is written back.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,
    OP_MUL  = 2'd1,
    OP_SQR  = 2'd2,
    OP_LOAD = 2'd3    // first operand written unchanged (initial conversion)
  } op_e;

  // Mux_3 selection (C4): source of the first ALU operand.
  typedef enum logic [2:0] {
    SRC_MEM   = 3'd0,
    SRC_ALPHA = 3'd1,
    SRC_BETA  = 3'd2,
    SRC_XP    = 3'd3,
    SRC_YP    = 3'd4,
    SRC_ONE   = 3'd5
  } src_e;

  // One micro-instruction.
  typedef struct packed {
    op_e         op;   // C5
    src_e        src;  // C4
    addr_t       ra;   // C1: first operand address (used when src == SRC_MEM)
    addr_t       rb;   // C2: second operand address
    addr_t       rw;   // C3: destination address
    logic        dup;  // also write rw+3 (loads Q and P together)
    logic [6:0]  rep;  // number of squarings (SQR only), 1..116
  } uinstr_t;

  // Register map of the 24 x m array.
  localparam addr_t R_QX = 5'd0,  R_QY = 5'd1,  R_QZ = 5'd2;   // accumulator Q
  localparam addr_t R_PX = 5'd3,  R_PY = 5'd4,  R_PZ = 5'd5;   // base point P
  localparam addr_t R_T1 = 5'd6;                               // t1..t12 = 6..17
  localparam addr_t R_U1 = 5'd18, R_U2 = 5'd19, R_U3 = 5'd20;  // T1, T2, T3
  localparam addr_t R_XA = 5'd21, R_YA = 5'd22, R_ZI = 5'd23;  // affine x, y, 1/Z

  // Micro-program layout (ROM index = control state - 1).
  localparam int unsigned UAL_LEN  = 37;
  localparam int unsigned PC_INIT  = 0;                 // 3 load instructions
  localparam int unsigned PC_PD    = 3;                 // 37 instructions, Q = UAL(Q,Q)
  localparam int unsigned PC_PA    = PC_PD + UAL_LEN;   // 37 instructions, Q = UAL(P,Q)
  localparam int unsigned PC_INV   = PC_PA + UAL_LEN;   // 21 instructions, Itoh-Tsujii
  localparam int unsigned INV_LEN  = 21;
  localparam int unsigned PC_AFF   = PC_INV + INV_LEN;  // 2 instructions, x = X/Z, y = Y/Z
  localparam int unsigned ROM_LEN  = PC_AFF + 2;        // 100

  // Latency in cycles of one field multiplication for each multiplier kind.
  function automatic int unsigned mul_cycles(mul_kind_e k);
    case (k)
      MUL_SCHOOLBOOK: return M - 1;
      MUL_KAR2:       return (M + 1) / 2 - 1;
      MUL_TOOM3:      return (M + 2) / 3 - 1;
      MUL_TOOM4:      return (M + 3) / 4 - 1;
      default:        return 1;
    endcase
  endfunction

  // Reduction of a (2m-1)-bit polynomial modulo x^233 + x^74 + 1, done as two
  // word-level folds: bits >= m are added back at offsets 0 and TRI_K.
  function automatic fe_t reduce(prod_t c);
    logic [M-2:0]        hi1;   // c[2m-2:m], 232 bits
    logic [M+TRI_K-2:0]  r;     // result of the first fold, 306 bits
    logic [TRI_K-2:0]    hi2;   // r[305:233], 73 bits
    fe_t                 lo;
    hi1 = c[PW-1:M];
    r   = {{(TRI_K-1){1'b0}}, c[M-1:0]};
    r   = r ^ {{TRI_K{1'b0}}, hi1} ^ ({{TRI_K{1'b0}}, hi1} << TRI_K);
    hi2 = r[M+TRI_K-2:M];
    lo  = r[M-1:0];
    lo  = lo ^ fe_t'(hi2) ^ (fe_t'(hi2) << TRI_K);
    return lo;
  endfunction

  // Zero insertion: coefficient i of a moves to position 2i.
  function automatic prod_t spread(fe_t a);
    prod_t s;
    s = '0;
    for (int i = 0; i < M; i++) s[2*i] = a[i];
    return s;
  endfunction

endpackage
