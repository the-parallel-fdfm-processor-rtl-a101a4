// rsa_core: one FDFM processor core for CRT-based RSA decryption. It uses
// one multiply-accumulate unit (one DSP48E1 slice on the target FPGA), one
// 2k x 18-bit block RAM and a little logic.
//
// Parts: the Montgomery multiplier (mont_datapath) and its sequencer
// (mm_control), the decryption state machine (modexp_control), the block
// RAM (bram_2k18) and this core's stage of the loading shift register
// (core_link). The RAM ports belong to the multiplier while it runs, to the
// state machine between multiplications, and port B to the shift register
// while the core is idle.
//
// Use: load C, M, p, q, D_p, D_q, -M^-1, -p^-1, -q^-1 (mod 2^17),
// R2_M, R2_p, R2_q, Z_p, Z_q (Montgomery form) and the constant 1 into
// their slots (see rsa_pkg), each as radix-2^17 digits with the end flag
// on the top digit; pulse run; when done rises the plaintext P < M is in
// the P slot. For 1024-bit keys a decryption takes about 3.5 million
// clocks with a random key, at most about 4.67 million (see the multiplier
// for the per-product count). With encrypt high at run the core computes
// C = P^E mod M from the P, E/D, M, -M^-1 and R2_M slots into the C slot.
module rsa_core
  import rsa_pkg::*;
#(
  parameter int unsigned CORE_ID = 1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      run,
  input  logic      encrypt,     // with run: plain C = P^E mod M instead
  output logic      busy,
  output logic      done,
  output logic      mult_active, // the multiplier forms a real product
  input  link_pkt_t link_in,
  output link_pkt_t link_out
);

  // RAM ports
  addr_t ra_addr, rb_addr;
  logic  ra_we, rb_we;
  word_t ra_wdata, rb_wdata, ra_q, rb_q;

  // multiplier
  logic    mm_start, mm_busy, mm_done;
  mm_cmd_t mm_cmd;
  addr_t   mm_a_addr, mm_b_addr;
  logic    mm_b_we;
  word_t   mm_b_wdata;
  mm_op_t  op;
  logic    minv_load, y_load, y_zero;
  logic    s_rd_en, wr_en;
  len_t    s_rd_idx, wr_idx;
  digit_t  wr_digit;

  // state machine
  addr_t me_a_addr, me_b_addr;
  logic  me_a_we, me_b_we, me_busy, sub_taken;
  word_t me_a_wdata, me_b_wdata;

  // shift-register stage
  logic  lk_we;
  addr_t lk_addr;
  word_t lk_wdata;

  bram_2k18 u_bram (
    .clk, .a_we(ra_we), .a_addr(ra_addr), .a_wdata(ra_wdata), .a_q(ra_q),
    .b_we(rb_we), .b_addr(rb_addr), .b_wdata(rb_wdata), .b_q(rb_q)
  );

  mont_datapath u_dp (
    .clk, .rst, .op, .ram_a_q(ra_q), .ram_b_q(rb_q),
    .minv_load, .y_load, .y_zero, .s_rd_en, .s_rd_idx,
    .wr_en, .wr_idx, .wr_digit, .mult_busy(mult_active)
  );

  mm_control u_mm (
    .clk, .rst, .start(mm_start), .cmd(mm_cmd), .busy(mm_busy), .done(mm_done),
    .ram_a_addr(mm_a_addr), .ram_b_addr(mm_b_addr), .ram_b_we(mm_b_we),
    .ram_b_wdata(mm_b_wdata), .op, .minv_load, .y_load, .y_zero,
    .s_rd_en, .s_rd_idx, .wr_en, .wr_idx, .wr_digit
  );

  modexp_control u_me (
    .clk, .rst, .run, .encrypt, .busy(me_busy), .done,
    .mm_start, .mm_cmd, .mm_done,
    .ram_a_addr(me_a_addr), .ram_a_we(me_a_we), .ram_a_wdata(me_a_wdata),
    .ram_a_q(ra_q),
    .ram_b_addr(me_b_addr), .ram_b_we(me_b_we), .ram_b_wdata(me_b_wdata),
    .ram_b_q(rb_q), .sub_taken
  );

  core_link #(.CORE_ID(CORE_ID)) u_link (
    .clk, .rst, .pkt_in(link_in), .pkt_out(link_out), .allow(!busy),
    .ram_we(lk_we), .ram_addr(lk_addr), .ram_wdata(lk_wdata), .ram_q(rb_q)
  );

  assign busy = me_busy || run;

  always_comb begin
    if (mm_busy) begin
      ra_addr = mm_a_addr;  ra_we = 1'b0;    ra_wdata = '0;
      rb_addr = mm_b_addr;  rb_we = mm_b_we; rb_wdata = mm_b_wdata;
    end else begin
      ra_addr = me_a_addr;  ra_we = me_a_we; ra_wdata = me_a_wdata;
      if (me_busy) begin
        rb_addr = me_b_addr; rb_we = me_b_we; rb_wdata = me_b_wdata;
      end else begin
        rb_addr = lk_addr;   rb_we = lk_we;   rb_wdata = lk_wdata;
      end
    end
  end

endmodule
