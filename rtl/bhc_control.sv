// FSM-based control unit of the BHC processor.
//
// State 0 is idle. A `start` pulse latches the scalar k and runs the
// micro-program (bhc_ucode_rom) one instruction per state: states 1..3 convert
// the base point, states 4..40 double Q, states 41..77 add P to Q, states
// 78..98 invert Z and states 99..100 form the affine result; a final output
// state raises `done` for one cycle and returns to idle. At the last doubling
// state the controller tests the current key bit k_i: for 1 it goes on to the
// addition states, otherwise straight to the next bit. The bit counter starts at
// m-2 (the top bit k_{m-1} must be 1 and is absorbed by Q = P) and after bit 0 the
// controller enters the inversion.
//
// Each state drives C1..C5 and the write enable. Additions, loads and squarings
// take one cycle (a squaring with rep = r stays r cycles in its state, squaring
// in place after the first cycle); multiplications hold `mul_go` until the
// multiplier reports `mul_last`. With a multiplier of n cycles one point
// multiplication therefore takes
//   3 + (17n+20)(m-1) + (17n+20)*wt + (10n + m-1) + 2n + 1 cycles,
// wt being the number of ones among k_{m-2..0}: 13,124 cycles for n = 1 and
// wt = (m-1)/2, as in the design description. The state numbering of the
// inversion and the single output state differ from the description's 100
// states; the handshake (start/busy/done) is this design's own.
module bhc_control
  import bhc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  output logic         busy,
  output logic         done,      // one-cycle pulse, result registers valid
  output logic         out_en,    // output state: capture the affine result
  // datapath control
  output op_e          op,
  output src_e         src,
  output addr_t        ra,
  output addr_t        rb,
  output addr_t        rw,
  output logic         dup,
  output logic         we,
  output logic         mul_go,
  input  logic         mul_last,
  // observation of the sequence (for test and debug)
  output logic         ev_pd_end,   // a doubling finished
  output logic         ev_pa_end    // an addition finished
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} fsm_e;

  fsm_e          st;
  logic [6:0]    pc;
  logic [M-1:0]  k_q;
  logic [7:0]    bit_i;      // index of the key bit in use, m-2 .. 0
  logic [6:0]    rep_cnt;
  uinstr_t       ins;
  logic          step;       // current instruction completes this cycle

  bhc_ucode_rom u_rom (.pc(pc), .ins(ins));

  always_comb begin
    op     = ins.op;
    src    = ins.src;
    ra     = ins.ra;
    rb     = (ins.op == OP_SQR && rep_cnt != '0) ? ins.rw : ins.rb;
    rw     = ins.rw;
    dup    = ins.dup;
    mul_go = (st == S_RUN) && (ins.op == OP_MUL);
    unique case (ins.op)
      OP_MUL:  step = mul_last;
      OP_SQR:  step = (rep_cnt == ins.rep - 7'd1);
      default: step = 1'b1;
    endcase
    we        = (st == S_RUN) && (step || ins.op == OP_SQR);   // every squaring of a run is written
    busy      = (st != S_IDLE);
    out_en    = (st == S_OUT);
    ev_pd_end = (st == S_RUN) && step && (int'(pc) == PC_PA - 1);
    ev_pa_end = (st == S_RUN) && step && (int'(pc) == PC_INV - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      pc      <= '0;
      k_q     <= '0;
      bit_i   <= '0;
      rep_cnt <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st      <= S_RUN;
          pc      <= 7'(PC_INIT);
          k_q     <= k;
          bit_i   <= 8'(M - 2);
          rep_cnt <= '0;
        end
        S_RUN: begin
          if (!step) begin
            if (ins.op == OP_SQR) rep_cnt <= rep_cnt + 7'd1;
          end else begin
            rep_cnt <= '0;
            if (int'(pc) == PC_PA - 1) begin            // end of doubling: test k_i
              if (k_q[bit_i])          pc <= 7'(PC_PA);
              else if (bit_i == '0)    pc <= 7'(PC_INV);
              else begin               pc <= 7'(PC_PD); bit_i <= bit_i - 8'd1; end
            end else if (int'(pc) == PC_INV - 1) begin  // end of addition
              if (bit_i == '0)         pc <= 7'(PC_INV);
              else begin               pc <= 7'(PC_PD); bit_i <= bit_i - 8'd1; end
            end else if (int'(pc) == ROM_LEN - 1) begin
              st <= S_OUT;
            end else begin
              pc <= pc + 7'd1;
            end
          end
        end
        default: begin                                  // S_OUT
          st   <= S_IDLE;
          done <= 1'b1;
        end
      endcase
    end
  end

`ifndef SYNTHESIS
  // a multiplication must not be interrupted: the operands stay until mul_last
  a_mul_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mul_go && !mul_last) |=> (mul_go && $stable(ra) && $stable(rb) && $stable(src)));
`endif
endmodule
