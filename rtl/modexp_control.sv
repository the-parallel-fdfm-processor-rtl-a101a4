// modexp_control: the state machine of one core. It runs CRT-based RSA
// decryption as a sequence of Montgomery multiplications on mm_control and
// finishes with a digit-serial modular addition.
//
// Sequence, after run (all values in the block RAM of the core):
//  0. Scan the end flags of M, p, q, D_p and D_q to learn their digit counts
//     dM, dp, dq and the exponent lengths.
//  1. C_h = C mod h for h = p, then q:  T = MM(C, R2_h), C_h = MM(T, 1);
//     the second result is written to the C_h slot, its digits above dh to
//     the P slot (spill).
//  2. P_h = C_h^D_h mod h for h = p, then q, by left-to-right square and
//     multiply: A = MM(R2_h, 1), B = MM(R2_h, C_h), then for every bit of
//     D_h from the top A = MM(A, A) and, for a 1 bit, A = MM(A, B); last
//     P_h = MM(A, 1), written over C_h. A ping-pongs between two buffers.
//  3. S_h = P_h Z_h mod M for h = p, then q: T1 = MM(R2_M, P_h),
//     T2 = MM(T1, Z_h), S_h = MM(T2, 1). Z_h is stored in Montgomery form
//     (Z_h * 2^(17*dM) mod M), so the three products leave S_h <= M.
//  4. P = S_p + S_q, and P - M replaces it when no borrow shows P >= M.
// R2_h = 2^(2*17*dh) mod h and R2_M = 2^(2*17*dM) mod M are precomputed
// by the host, like Z_h, D_h and the -h^-1 mod 2^17 digits.
//
// With encrypt set at run, the core instead computes C = P^E mod M by the
// same square-and-multiply sequence on the full-length modulus (scan of M
// and E, A = MM(R2_M, 1), B = MM(R2_M, P), the exponent bits, C = MM(A, 1)).
// A alternates between the C and P slots, B sits in the upper S slot.
//
// The four steps, their serial order (C_p, C_q, P_p, P_q, S_p, S_q), the
// two-plus-three multiplications of steps 1 and 3 and the exponentiation
// algorithm follow the document, as does the use of the same circuit for
// encryption. The buffer assignment, the mode input, the length scan,
// the Montgomery form of Z_h, the exponent taken over all 17*digits bits
// and the step-4 circuit are this design's choices.
//
// Interface: run (pulse) starts the sequence; busy is high until the
// result is in the P slot, then done stays high until the next run. The
// RAM ports are driven only while the multiplier is idle (mm_busy low).
module modexp_control
  import rsa_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    run,
  input  logic    encrypt,  // sampled with run: 1 = C = P^E mod M, no CRT
  output logic    busy,
  output logic    done,
  // Montgomery multiplier
  output logic    mm_start,
  output mm_cmd_t mm_cmd,
  input  logic    mm_done,
  // block RAM (used while the multiplier is idle)
  output addr_t   ram_a_addr,
  output logic    ram_a_we,
  output word_t   ram_a_wdata,
  input  word_t   ram_a_q,
  output addr_t   ram_b_addr,
  output logic    ram_b_we,
  output word_t   ram_b_wdata,
  input  word_t   ram_b_q,
  // observation: step-4 outcome
  output logic    sub_taken
);

  typedef enum logic [3:0] {
    ST_IDLE, ST_SCAN_RD, ST_SCAN_CHK, ST_MM_GO, ST_MM_WAIT,
    ST_EXP_RD, ST_EXP_LD, ST_ADD_RD, ST_ADD_SUM, ST_ADD_DIFF,
    ST_COPY_RD, ST_COPY_WR, ST_FIN
  } state_e;

  typedef enum logic [3:0] {
    PH_S1A, PH_S1B, PH_E1, PH_E2, PH_SQR, PH_MUL, PH_EFIN,
    PH_S3A, PH_S3B, PH_S3C
  } phase_e;

  state_e state;
  phase_e ph;
  logic   h;        // 0: prime p, 1: prime q
  logic   enc;      // plain modular exponentiation mod M (encryption)
  logic   cur;      // which exponentiation buffer holds A
  len_t   d_m, d_p, d_q, l_dp, l_dq;
  logic [2:0] sc;   // slot under scan
  len_t   cnt;      // scan index / digit index of steps 2 and 4
  logic [4:0] bitn; // bit inside the exponent digit
  digit_t e_r;
  logic   carry_r, borrow_r;
  digit_t sum_r;

  // ----------------------------------------------------------- scan table
  addr_t scan_base;
  len_t  scan_max;
  always_comb begin
    unique case (sc)
      3'd0:    begin scan_base = A_M;  scan_max = len_t'(UP_SLOT_WORDS - 1); end
      3'd1:    begin scan_base = A_PP; scan_max = len_t'(LO_SLOT_WORDS - 1); end
      3'd2:    begin scan_base = A_QQ; scan_max = len_t'(LO_SLOT_WORDS - 1); end
      3'd3:    begin scan_base = A_DP; scan_max = len_t'(LO_SLOT_WORDS - 1); end
      3'd4:    begin scan_base = A_DQ; scan_max = len_t'(LO_SLOT_WORDS - 1); end
      default: begin scan_base = A_ED; scan_max = len_t'(UP_SLOT_WORDS - 1); end
    endcase
  end

  // ------------------------------------------------------- command builder
  function automatic len_t max4(input len_t a, input len_t b);
    len_t m;
    m = (a > b) ? a : b;
    return (m < len_t'(4)) ? len_t'(4) : m;
  endfunction

  len_t  d_h, d_hx, d_mx, l_dh;
  addr_t a_mod, a_minv, a_r2, a_ch, a_zh, a_cur, a_oth, a_dh;
  addr_t a_buf0, a_buf1, a_base, a_res;
  // In encryption mode the exponentiation runs on M with full-length
  // buffers: A ping-pongs between the C and P slots (P is free once its
  // Montgomery form is in S), the base sits in S, the result goes to C.
  assign d_h    = enc ? d_m : (h ? d_q : d_p);
  assign l_dh   = h ? l_dq : l_dp;
  assign d_hx   = max4(d_h, d_h);
  assign d_mx   = max4(d_m, d_h);
  assign a_mod  = enc ? A_M    : (h ? A_QQ   : A_PP);
  assign a_minv = enc ? A_MINV : (h ? A_QINV : A_PINV);
  assign a_r2   = enc ? A_R2M  : (h ? A_R2Q  : A_R2P);
  assign a_ch   = enc ? A_P    : (h ? A_CQ   : A_CP);
  assign a_zh   = h ? A_ZQ   : A_ZP;
  assign a_dh   = enc ? A_ED   : (h ? A_DQ   : A_DP);
  assign a_buf0 = enc ? A_C    : A_X;
  assign a_buf1 = enc ? A_P    : A_SL;
  assign a_base = enc ? A_S    : A_Y;
  assign a_res  = enc ? A_C    : a_ch;
  assign a_cur  = cur ? a_buf1 : a_buf0;
  assign a_oth  = cur ? a_buf0 : a_buf1;

  always_comb begin
    mm_cmd = '0;
    // half-length defaults (modulus h)
    mm_cmd.m_base    = a_mod;   mm_cmd.m_len = d_h;
    mm_cmd.minv_addr = a_minv;
    mm_cmd.nx        = d_hx;    mm_cmd.ny    = d_h;
    unique case (ph)
      PH_S1A: begin
        mm_cmd.x_base = A_C;   mm_cmd.x_len = d_m;
        mm_cmd.y_base = a_r2;  mm_cmd.y_len = d_h;
        mm_cmd.nx     = d_mx;  mm_cmd.s_base = A_S;
      end
      PH_S1B: begin
        mm_cmd.x_base = A_S;   mm_cmd.x_len = d_mx;
        mm_cmd.y_base = A_ONE; mm_cmd.y_len = len_t'(1);
        mm_cmd.nx     = d_mx;  mm_cmd.s_base = a_ch;
        mm_cmd.s_split = d_h;  mm_cmd.spill_base = A_P;
      end
      PH_E1: begin
        mm_cmd.x_base = a_r2;  mm_cmd.x_len = d_h;
        mm_cmd.y_base = A_ONE; mm_cmd.y_len = len_t'(1);
        mm_cmd.s_base = a_buf0;
      end
      PH_E2: begin
        mm_cmd.x_base = a_r2;  mm_cmd.x_len = d_h;
        mm_cmd.y_base = a_ch;  mm_cmd.y_len = d_h;
        mm_cmd.s_base = a_base;
      end
      PH_SQR: begin
        mm_cmd.x_base = a_cur; mm_cmd.x_len = d_hx;
        mm_cmd.y_base = a_cur; mm_cmd.y_len = d_h;
        mm_cmd.s_base = a_oth;
      end
      PH_MUL: begin
        mm_cmd.x_base = a_cur; mm_cmd.x_len = d_hx;
        mm_cmd.y_base = a_base; mm_cmd.y_len = d_h;
        mm_cmd.s_base = a_oth;
      end
      PH_EFIN: begin
        mm_cmd.x_base = a_cur; mm_cmd.x_len = d_hx;
        mm_cmd.y_base = A_ONE; mm_cmd.y_len = len_t'(1);
        mm_cmd.s_base = a_res;  // in place when A is in C: one Y digit
      end
      default: begin
        // step 3, modulus M
        mm_cmd.m_base    = A_M;    mm_cmd.m_len = d_m;
        mm_cmd.minv_addr = A_MINV;
        mm_cmd.nx        = max4(d_m, d_m);
        mm_cmd.ny        = d_m;
        unique case (ph)
          PH_S3A: begin
            mm_cmd.x_base = A_R2M; mm_cmd.x_len = d_m;
            mm_cmd.y_base = a_ch;  mm_cmd.y_len = d_h;
            mm_cmd.s_base = A_S;
          end
          PH_S3B: begin
            mm_cmd.x_base = A_S;   mm_cmd.x_len = max4(d_m, d_m);
            mm_cmd.y_base = a_zh;  mm_cmd.y_len = d_m;
            mm_cmd.s_base = A_P;
          end
          default: begin
            mm_cmd.x_base = A_P;   mm_cmd.x_len = max4(d_m, d_m);
            mm_cmd.y_base = A_ONE; mm_cmd.y_len = len_t'(1);
            mm_cmd.s_base = h ? A_S : A_ED;
          end
        endcase
      end
    endcase
  end

  assign mm_start = (state == ST_MM_GO);

  // ------------------------------------------------------------ step 4 math
  logic [DIGIT_W:0] add_w, sub_w;
  assign add_w = {1'b0, ram_a_q[DIGIT_W-1:0]} + {1'b0, ram_b_q[DIGIT_W-1:0]}
               + {{DIGIT_W{1'b0}}, carry_r};
  assign sub_w = {1'b0, sum_r} - {1'b0, ram_b_q[DIGIT_W-1:0]}
               - {{DIGIT_W{1'b0}}, borrow_r};

  logic last_digit;
  assign last_digit = (cnt == d_m - len_t'(1));

  // -------------------------------------------------------------- RAM drive
  always_comb begin
    ram_a_addr  = scan_base + addr_t'(cnt);
    ram_a_we    = 1'b0;
    ram_a_wdata = '0;
    ram_b_addr  = A_M + addr_t'(cnt);
    ram_b_we    = 1'b0;
    ram_b_wdata = '0;
    unique case (state)
      ST_EXP_RD:  ram_a_addr = a_dh + addr_t'(cnt);
      ST_ADD_RD: begin
        ram_a_addr = A_ED + addr_t'(cnt);
        ram_b_addr = A_S  + addr_t'(cnt);
      end
      ST_ADD_SUM: begin
        ram_a_addr  = A_P + addr_t'(cnt);
        ram_a_we    = 1'b1;
        ram_a_wdata = {last_digit, add_w[DIGIT_W-1:0]};
        ram_b_addr  = A_M + addr_t'(cnt);
      end
      ST_ADD_DIFF: begin
        ram_b_addr  = A_S + addr_t'(cnt);
        ram_b_we    = 1'b1;
        ram_b_wdata = {last_digit, sub_w[DIGIT_W-1:0]};
      end
      ST_COPY_RD: ram_a_addr = A_S + addr_t'(cnt);
      ST_COPY_WR: begin
        ram_b_addr  = A_P + addr_t'(cnt);
        ram_b_we    = 1'b1;
        ram_b_wdata = ram_a_q;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------- state machine
  // what follows a finished multiplication
  // step after the current exponent bit
  state_e nb_state;
  phase_e nb_ph;
  len_t   nb_cnt;
  logic [4:0] nb_bitn;
  always_comb begin
    nb_state = ST_MM_GO;
    nb_ph    = PH_SQR;
    nb_cnt   = cnt;
    nb_bitn  = bitn - 5'd1;
    if (bitn == 5'd0) begin
      nb_bitn = 5'd16;
      if (cnt == '0) nb_ph = PH_EFIN;
      else begin
        nb_cnt   = cnt - len_t'(1);
        nb_state = ST_EXP_RD;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE; ph <= PH_S1A; h <= 1'b0; cur <= 1'b0; enc <= 1'b0;
      d_m <= '0; d_p <= '0; d_q <= '0; l_dp <= '0; l_dq <= '0;
      sc <= '0; cnt <= '0; bitn <= '0; e_r <= '0;
      carry_r <= 1'b0; borrow_r <= 1'b0; sum_r <= '0;
      done <= 1'b0; sub_taken <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (run) begin
          done <= 1'b0; sub_taken <= 1'b0; enc <= encrypt;
          sc <= '0; cnt <= '0; state <= ST_SCAN_RD;
        end
        ST_SCAN_RD: state <= ST_SCAN_CHK;
        ST_SCAN_CHK: begin
          if (ram_a_q[WORD_W-1] || cnt == scan_max) begin
            unique case (sc)
              3'd0:    d_m  <= cnt + len_t'(1);
              3'd1:    d_p  <= cnt + len_t'(1);
              3'd2:    d_q  <= cnt + len_t'(1);
              3'd3:    l_dp <= cnt + len_t'(1);
              3'd4:    l_dq <= cnt + len_t'(1);
              default: l_dp <= cnt + len_t'(1);  // E, encryption only
            endcase
            cnt <= '0;
            if (sc == 3'd4) begin
              ph <= PH_S1A; h <= 1'b0; state <= ST_MM_GO;
            end else if (sc == 3'd5) begin
              ph <= PH_E1; h <= 1'b0; state <= ST_MM_GO;
            end else if (enc) begin
              sc <= 3'd5; state <= ST_SCAN_RD;
            end else begin
              sc <= sc + 3'd1; state <= ST_SCAN_RD;
            end
          end else begin
            cnt <= cnt + len_t'(1); state <= ST_SCAN_RD;
          end
        end
        ST_MM_GO:   state <= ST_MM_WAIT;
        ST_MM_WAIT: if (mm_done) begin
          state <= ST_MM_GO;
          unique case (ph)
            PH_S1A: ph <= PH_S1B;
            PH_S1B: begin ph <= h ? PH_E1 : PH_S1A; h <= ~h; end
            PH_E1:  begin ph <= PH_E2; cur <= 1'b0; end
            PH_E2: begin
              cnt   <= l_dh - len_t'(1);
              bitn  <= 5'd16;
              state <= ST_EXP_RD;
            end
            PH_SQR: begin
              cur <= ~cur;
              if (e_r[bitn]) ph <= PH_MUL;
              else begin
                state <= nb_state; ph <= nb_ph; cnt <= nb_cnt; bitn <= nb_bitn;
              end
            end
            PH_MUL: begin
              cur <= ~cur;
              state <= nb_state; ph <= nb_ph; cnt <= nb_cnt; bitn <= nb_bitn;
            end
            PH_EFIN: begin
              if (enc) state <= ST_FIN;
              else begin ph <= h ? PH_S3A : PH_E1; h <= ~h; end
            end
            PH_S3A: ph <= PH_S3B;
            PH_S3B: ph <= PH_S3C;
            default: begin
              if (h) begin
                cnt <= '0; carry_r <= 1'b0; borrow_r <= 1'b0;
                state <= ST_ADD_RD;
              end else begin
                ph <= PH_S3A; h <= 1'b1;
              end
            end
          endcase
        end
        ST_EXP_RD:  state <= ST_EXP_LD;
        ST_EXP_LD: begin
          e_r <= ram_a_q[DIGIT_W-1:0];
          ph <= PH_SQR; state <= ST_MM_GO;
        end
        ST_ADD_RD: state <= ST_ADD_SUM;
        ST_ADD_SUM: begin
          sum_r   <= add_w[DIGIT_W-1:0];
          carry_r <= add_w[DIGIT_W];
          state   <= ST_ADD_DIFF;
        end
        ST_ADD_DIFF: begin
          borrow_r <= sub_w[DIGIT_W];
          if (last_digit) begin
            cnt <= '0;
            if (sub_w[DIGIT_W]) state <= ST_FIN;
            else begin state <= ST_COPY_RD; sub_taken <= 1'b1; end
          end else begin
            cnt <= cnt + len_t'(1); state <= ST_ADD_RD;
          end
        end
        ST_COPY_RD: state <= ST_COPY_WR;
        ST_COPY_WR: begin
          if (last_digit) state <= ST_FIN;
          else begin cnt <= cnt + len_t'(1); state <= ST_COPY_RD; end
        end
        ST_FIN: begin done <= 1'b1; state <= ST_IDLE; end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);

endmodule
