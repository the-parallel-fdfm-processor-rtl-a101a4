// rsa_pkg: shared widths, block RAM map and bundle types of the FDFM
// CRT-RSA decryption core.
//
// Numbers are held as radix-2^17 digits, one digit per 18-bit block RAM
// word; bit 17 of a word is a flag that marks the most significant digit
// of an operand. The 2k-word block RAM of a core is split into an upper
// half of eight 128-word slots (full-length RSA values) and a lower half of
// sixteen 64-word slots (half-length CRT values). The slot names follow the
// memory map of the design. Z_q is a full-length value: it takes lower
// slots 0 and 1 together (128 words), as Z_p takes one upper slot.
//
// The shift-register packet of the multicore chain carries a 1-bit
// send/receive flag, a 9-bit core ID, an 11-bit address and 18-bit data;
// the extra valid bit marks an empty stage and is this design's addition.
package rsa_pkg;

  localparam int unsigned DIGIT_W = 17;           // radix 2^17
  localparam int unsigned WORD_W  = DIGIT_W + 1;  // digit + end flag
  localparam int unsigned ADDR_W  = 11;           // 2k words
  localparam int unsigned LEN_W   = 8;            // digit counts up to 128
  localparam int unsigned ID_W    = 9;            // core ID in the chain
  localparam int unsigned UP_SLOT_WORDS = 128;
  localparam int unsigned LO_SLOT_WORDS = 64;

  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [LEN_W-1:0]   len_t;

  // Base address of an upper (128-word) and a lower (64-word) slot.
  function automatic addr_t up_slot(input int unsigned k);
    return addr_t'({1'b0, 3'(k), 7'd0});
  endfunction
  function automatic addr_t lo_slot(input int unsigned k);
    return addr_t'({1'b1, 4'(k), 6'd0});
  endfunction

  // Upper half
  localparam addr_t A_P    = up_slot(0);  // decrypted text
  localparam addr_t A_C    = up_slot(1);  // cypher text
  localparam addr_t A_S    = up_slot(2);  // full-length work area
  localparam addr_t A_R2M  = up_slot(3);  // 2^(2*17*dM) mod M
  localparam addr_t A_M    = up_slot(4);  // modulus M = p*q
  localparam addr_t A_ED   = up_slot(5);  // E or D; holds S_p during decryption
  localparam addr_t A_MINV = up_slot(6);  // -M^-1 mod 2^17
  localparam addr_t A_ZP   = up_slot(7);  // Z_p in Montgomery form
  // Lower half
  localparam addr_t A_ZQ    = lo_slot(0);  // Z_q in Montgomery form (2 slots)
  localparam addr_t A_ZQ_HI = lo_slot(1);  // upper 64 words of Z_q
  localparam addr_t A_CP    = lo_slot(2);  // C_p, later P_p
  localparam addr_t A_CQ    = lo_slot(3);  // C_q, later P_q
  localparam addr_t A_PP    = lo_slot(4);  // prime p
  localparam addr_t A_QQ    = lo_slot(5);  // prime q
  localparam addr_t A_PINV  = lo_slot(6);  // -p^-1 mod 2^17
  localparam addr_t A_QINV  = lo_slot(7);  // -q^-1 mod 2^17
  localparam addr_t A_X     = lo_slot(8);  // exponentiation buffer A
  localparam addr_t A_Y     = lo_slot(9);  // Montgomery form of the base
  localparam addr_t A_SL    = lo_slot(10); // exponentiation buffer B
  localparam addr_t A_R2P   = lo_slot(11); // 2^(2*17*dp) mod p
  localparam addr_t A_R2Q   = lo_slot(12); // 2^(2*17*dq) mod q
  localparam addr_t A_DP    = lo_slot(13); // D_p = D mod (p-1)
  localparam addr_t A_DQ    = lo_slot(14); // D_q = D mod (q-1)
  localparam addr_t A_ONE   = lo_slot(15); // the constant 1

  // One Montgomery multiplication S = X*Y*2^(-17*ny) mod M (result < 2M).
  // Digits of X, Y and M at or above their lengths read as zero. Result
  // digit k goes to s_base+k when k < s_split and to spill_base+k above;
  // s_split = 0 means "no spill".
  typedef struct packed {
    addr_t x_base;  len_t x_len;
    addr_t y_base;  len_t y_len;
    addr_t m_base;  len_t m_len;
    addr_t minv_addr;
    addr_t s_base;  len_t s_split;
    addr_t spill_base;
    len_t  nx;      // inner-loop digits (max of X and M lengths)
    len_t  ny;      // outer-loop digits (digits of Y consumed)
  } mm_cmd_t;

  // Operation issued to the multiply-accumulate unit.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,
    OP_QXY = 3'd1,  // X0*Y_i + S(i,0), first half of the q computation
    OP_QT  = 3'd2,  // t*(-M^-1), second half of the q computation
    OP_XY  = 3'd3,  // X_j*Y_i + C_alpha
    OP_QM  = 3'd4   // q*M_j + C_beta
  } mm_kind_e;

  typedef struct packed {
    mm_kind_e kind;
    logic     first;   // j == 0: clear carries
    logic     s_zero;  // S(i,j) reads as zero (i == 0 or j == nx)
    logic     a_zero;  // X_j / M_j reads as zero (beyond its length)
    len_t     idx;     // digit index j
  } mm_op_t;

  // Shift-register packet of the multicore chain.
  typedef struct packed {
    logic               valid;
    logic               rd;      // 0 = send (write), 1 = receive (read)
    logic [ID_W-1:0]    id;
    addr_t              addr;
    word_t              data;
  } link_pkt_t;

endpackage
