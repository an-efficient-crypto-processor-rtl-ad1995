// Micro-program of the BHC processor: one instruction per control state.
//
// Layout (index = control state number - 1):
//   0..2    initial conversion: Q = P = (xp, yp, 1)
//   3..39   Q = UAL(Q, Q)   point doubling, the 37 single-operator instructions
//   40..76  Q = UAL(P, Q)   point addition, the same 37 instructions
//   77..97  inversion of Z by the square Itoh-Tsujii algorithm
//   98..99  x = X * Z^-1, y = Y * Z^-1
//
// The 37 UAL instructions follow the list of the design description (17
// multiplications, 15 additions, 5 squarings) with t1..t12 in registers 6..17
// and T1..T3 in registers 18..20. Z3 is written over Z of Q at instruction 23
// and X3, Y3 over X and Y at instructions 30 and 37, once the inputs are no
// longer read, so the result stays in Q without copies. The inversion computes
// Z^(2^232-1) along the addition chain 1,2,3,6,7,14,28,29,58,116,232 (squaring
// runs of 1,1,3,1,7,14,1,29,58,116 and 10 multiplications) and a final squaring,
// 232 squarings in all. A squaring instruction with rep = r squares its source
// once and then its destination in place r-1 times. The register map and the
// instruction encoding are this design's own. Combinational lookup.
module bhc_ucode_rom
  import bhc_pkg::*;
(
  input  logic [6:0] pc,
  output uinstr_t    ins
);
  localparam addr_t T1 = R_U1, T2 = R_U2, T3 = R_U3;

  function automatic addr_t t(int unsigned i);   // t_i, i = 1..12
    return addr_t'(int'(R_T1) + int'(i) - 1);
  endfunction

  function automatic uinstr_t mk(op_e o, src_e so, addr_t xa, addr_t xb, addr_t xw,
                                 logic dbl = 1'b0, logic [6:0] n = 7'd1);
    uinstr_t u;
    u.op = o; u.src = so; u.ra = xa; u.rb = xb; u.rw = xw; u.dup = dbl; u.rep = n;
    return u;
  endfunction
  function automatic uinstr_t add(addr_t xa, addr_t xb, addr_t xw);
    return mk(OP_ADD, SRC_MEM, xa, xb, xw);
  endfunction
  function automatic uinstr_t mul(addr_t xa, addr_t xb, addr_t xw);
    return mk(OP_MUL, SRC_MEM, xa, xb, xw);
  endfunction
  function automatic uinstr_t sqr(addr_t xb, addr_t xw, logic [6:0] n = 7'd1);
    return mk(OP_SQR, SRC_MEM, '0, xb, xw, 1'b0, n);
  endfunction

  // Instruction j (0..36) of Q = UAL((x1,y1,z1), Q)
  function automatic uinstr_t ual(int unsigned j, addr_t x1, addr_t y1, addr_t z1);
    addr_t x2, y2, z2;
    x2 = R_QX; y2 = R_QY; z2 = R_QZ;
    case (j)
      0:  return mul(x1, x2, t(1));
      1:  return mul(y1, y2, t(2));
      2:  return mul(z1, z2, t(3));
      3:  return add(x1, z1, T1);
      4:  return add(x2, z2, T2);
      5:  return mul(T1, T2, t(4));
      6:  return add(y1, z1, T1);
      7:  return add(y2, z2, T2);
      8:  return mul(T1, T2, t(5));
      9:  return mul(t(1), t(3), t(6));
      10: return mul(t(2), t(3), t(7));
      11: return sqr(t(3), T1);
      12: return mul(t(1), t(2), T2);
      13: return add(T1, T2, t(8));
      14: return add(t(2), t(3), T1);
      15: return sqr(T1, T2);
      16: return mul(t(6), T2, t(9));
      17: return add(t(1), t(3), T2);
      18: return sqr(T2, T3);
      19: return mul(t(7), T3, t(10));
      20: return mul(t(8), T1, t(11));
      21: return mul(t(8), T2, t(12));
      22: return mul(t(11), T2, R_QZ);                    // Z3
      23: return add(t(11), t(4), T1);
      24: return mul(T1, t(11), T2);
      25: return sqr(t(11), T1);
      26: return add(T1, T2, T3);
      27: return mk(OP_MUL, SRC_ALPHA, '0, t(9), T1);      // alpha * t9
      28: return add(T1, T3, T2);
      29: return add(T2, R_QZ, R_QX);                     // X3
      30: return add(t(5), t(12), T1);
      31: return mul(T1, t(12), T2);
      32: return sqr(t(12), T3);
      33: return add(T2, T3, T1);
      34: return mk(OP_MUL, SRC_BETA, '0, t(10), T2);     // beta * t10
      35: return add(T1, T2, T3);
      default: return add(T3, R_QZ, R_QY);                // Y3
    endcase
  endfunction

  // Instruction j (0..20) of the inversion: R_ZI = Z^-1, Z in R_QZ
  function automatic uinstr_t inv(int unsigned j);
    // squaring run before multiplication s, and whether that multiplication
    // takes Z (beta_1) or the current beta_i as second factor
    logic [6:0]  runs [10] = '{7'd1, 7'd1, 7'd3, 7'd1, 7'd7, 7'd14, 7'd1, 7'd29, 7'd58, 7'd116};
    logic        by_z [10] = '{1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
    logic [3:0] s;
    s = 4'(j / 2);
    if (j == 20)        return sqr(t(1), R_ZI, 7'd1);
    else if (j % 2 == 0) return sqr((j == 0) ? R_QZ : t(1), t(2), runs[s]);
    else                 return mul(t(2), by_z[s] ? R_QZ : t(1), t(1));
  endfunction

  always_comb begin
    int unsigned p;
    p = int'(pc);
    if (p == 0)               ins = mk(OP_LOAD, SRC_XP,  '0, '0, R_QX, 1'b1);
    else if (p == 1)          ins = mk(OP_LOAD, SRC_YP,  '0, '0, R_QY, 1'b1);
    else if (p == 2)          ins = mk(OP_LOAD, SRC_ONE, '0, '0, R_QZ, 1'b1);
    else if (p < PC_PA)       ins = ual(p - PC_PD, R_QX, R_QY, R_QZ);
    else if (p < PC_INV)      ins = ual(p - PC_PA, R_PX, R_PY, R_PZ);
    else if (p < PC_AFF)      ins = inv(p - PC_INV);
    else if (p == PC_AFF)     ins = mul(R_QX, R_ZI, R_XA);
    else                      ins = mul(R_QY, R_ZI, R_YA);
  end
endmodule
