// mont_datapath: arithmetic of the radix-2^17 Montgomery multiplier.
//
// Two parts, as in the multiplier's structure:
//  * a multiply-accumulate unit shaped like one DSP48E1 slice: operand
//    registers A and B, a 17x17 product register, a 17-bit addend register
//    and a 34-bit output register P. The upper 17 bits of P are fed back as
//    the addend two operations later, so the alternating streams X_j*Y_i and
//    q*M_j each keep their own 17-bit carry (C_alpha, C_beta).
//  * a 17-bit adder in fabric with 1-bit carries. In alternate cycles it
//    forms gamma = alpha + beta + C_gamma and S(i+1,j-1) = gamma + S(i,j) +
//    C_S; the low 17 bits of its output are fed back and written to RAM.
//
// The q digit of each outer iteration is formed in the same unit: first
// X0*Y_i + S(i,0) (S(i,0) enters through the addend register), whose low 17
// bits load the q register, then t*(-M^-1), whose low 17 bits load q again.
//
// Timing: an op issued in cycle e (operands sampled at the end of e) has its
// product in cycle e+2 and P in cycle e+3. For the pair XY_j (cycle e) and
// QM_j (cycle e+1): the S(i,j) read must be addressed in cycle e+3
// (s_rd_en), gamma is formed in e+4, S(i+1,j-1) in e+5, and it is written
// in cycle e+6 (wr_en). During the q computation the adder of the DSP adds
// zero, so q is taken from the product register one cycle before P; this
// keeps the q computation to six cycles.
//
// What follows the document: the operand multiplexers (X_j, M_j, -M^-1 and
// Y_i, q), the 17-bit carry feedback, the adder fed from P and from RAM.
// This design's choices: the S(i,0) path through the addend register, the
// q register loads, and separate flip-flops for C_gamma and C_S (the two
// carries are produced in alternate cycles and each is used two cycles
// later).
module mont_datapath
  import rsa_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  // operation issue (operands sampled at the end of this cycle)
  input  mm_op_t  op,
  // block RAM read data
  input  word_t   ram_a_q,   // X_j, M_j, Y_i, S(i,0)
  input  word_t   ram_b_q,   // S(i,j), -M^-1
  // register loads
  input  logic    minv_load, // -M^-1 <= ram_b_q
  input  logic    y_load,    // Y_i <= ram_a_q (or zero)
  input  logic    y_zero,
  // S(i,j) read request and S(i+1,j-1) write
  output logic    s_rd_en,
  output len_t    s_rd_idx,
  output logic    wr_en,
  output len_t    wr_idx,
  output digit_t  wr_digit,
  // observation
  output logic    mult_busy  // a real product is being formed
);

  // ---------------------------------------------------------------- regs
  digit_t minv_r, y_r, q_r;
  digit_t a_r, b_r;
  logic [2*DIGIT_W-1:0] m_r, p_r;
  digit_t c_r;
  digit_t alpha_r, s_in_r, sum_r;
  logic   cg_r, cs_r;
  mm_op_t op1, op2, op3, op4, op5;

  // operand selection at issue
  digit_t a_sel, b_sel;
  always_comb begin
    unique case (op.kind)
      OP_QT:   a_sel = minv_r;
      OP_NOP:  a_sel = '0;
      default: a_sel = op.a_zero ? '0 : ram_a_q[DIGIT_W-1:0];
    endcase
    unique case (op.kind)
      OP_QT, OP_QM: b_sel = q_r;
      default:      b_sel = y_r;
    endcase
  end

  // addend register source (stage 1)
  digit_t c_sel;
  always_comb begin
    unique case (op1.kind)
      OP_QXY:       c_sel = op1.s_zero ? '0 : ram_a_q[DIGIT_W-1:0];
      OP_XY, OP_QM: c_sel = op1.first ? '0 : p_r[2*DIGIT_W-1:DIGIT_W];
      default:      c_sel = '0;
    endcase
  end

  // fabric adder
  logic [DIGIT_W:0] add_gamma, add_s;
  assign add_gamma = {1'b0, alpha_r} + {1'b0, p_r[DIGIT_W-1:0]}
                   + {{DIGIT_W{1'b0}}, (op3.first ? 1'b0 : cg_r)};
  assign add_s     = {1'b0, sum_r} + {1'b0, s_in_r}
                   + {{DIGIT_W{1'b0}}, (op4.first ? 1'b0 : cs_r)};

  always_ff @(posedge clk) begin
    if (rst) begin
      minv_r <= '0; y_r <= '0; q_r <= '0;
      a_r <= '0; b_r <= '0; m_r <= '0; p_r <= '0; c_r <= '0;
      alpha_r <= '0; s_in_r <= '0; sum_r <= '0; cg_r <= 1'b0; cs_r <= 1'b0;
      op1 <= '0; op2 <= '0; op3 <= '0; op4 <= '0; op5 <= '0;
    end else begin
      if (minv_load) minv_r <= ram_b_q[DIGIT_W-1:0];
      if (y_load)    y_r    <= y_zero ? '0 : ram_a_q[DIGIT_W-1:0];
      // DSP pipeline
      a_r <= a_sel;
      b_r <= b_sel;
      op1 <= op;
      m_r <= a_r * b_r;
      c_r <= c_sel;
      op2 <= op1;
      p_r <= m_r + {{DIGIT_W{1'b0}}, c_r};
      op3 <= op2;
      op4 <= op3;
      op5 <= op4;
      // q register
      if (op2.kind == OP_QT)  q_r <= m_r[DIGIT_W-1:0];
      if (op3.kind == OP_QXY) q_r <= p_r[DIGIT_W-1:0];
      // fabric adder
      if (op3.kind == OP_XY) alpha_r <= p_r[DIGIT_W-1:0];
      if (op3.kind == OP_QM) begin
        sum_r  <= add_gamma[DIGIT_W-1:0];
        cg_r   <= add_gamma[DIGIT_W];
        s_in_r <= op3.s_zero ? '0 : ram_b_q[DIGIT_W-1:0];
      end
      if (op4.kind == OP_QM) begin
        sum_r <= add_s[DIGIT_W-1:0];
        cs_r  <= add_s[DIGIT_W];
      end
    end
  end

  assign s_rd_en   = (op2.kind == OP_QM) && !op2.s_zero;
  assign s_rd_idx  = op2.idx;
  assign wr_en     = (op5.kind == OP_QM) && (op5.idx != '0);
  assign wr_idx    = op5.idx - len_t'(1);
  assign wr_digit  = sum_r;
  assign mult_busy = (op1.kind != OP_NOP) && !op1.a_zero;

endmodule
