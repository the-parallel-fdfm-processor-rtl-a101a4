// mm_control: sequencer of one radix-2^17 Montgomery multiplication
// S = X * Y * 2^(-17*ny) mod M (result below 2M, no final subtraction).
//
// It runs the two loops of the digit-serial algorithm on mont_datapath and
// generates every block RAM address. Each outer iteration i takes
// 2*(nx+1) + 6 cycles: six for the q digit, then the inner loop j = 0..nx
// issues X_j*Y_i and q*M_j in alternate cycles. Port A of the RAM reads
// X_j and M_j in alternate cycles (and Y_{i+1}, X_0, S(i+1,0) in the free
// cycles between iterations); port B reads S(i,j) in odd cycles and writes
// S(i+1,j-1) in even cycles, so S is updated in place.
//
// Interface: pulse start with cmd valid; the command is used in the start
// cycle and kept until done. done pulses in the cycle that writes the last
// result digit, ny*(2*(nx+1)+6) + 6 cycles after start: the six are two to
// fetch Y_0 and X_0 before the first q digit and four to drain the
// pipeline. ram_a_addr is read-only; port B reads and writes.
//
// The loop structure, the 6-cycle q computation and the per-iteration
// count follow the document. Its count adds 4 cycles per multiplication
// where this sequencer spends 6. This design's choices: explicit operand
// lengths in the command (digits beyond a length read as zero), a minimum
// of four inner digits (so S(i+1,0) is written before it is read for the
// next q), and the optional spill of high result digits to a second slot.
module mm_control
  import rsa_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  mm_cmd_t cmd,
  output logic    busy,
  output logic    done,
  // block RAM
  output addr_t   ram_a_addr,
  output addr_t   ram_b_addr,
  output logic    ram_b_we,
  output word_t   ram_b_wdata,
  // datapath
  output mm_op_t  op,
  output logic    minv_load,
  output logic    y_load,
  output logic    y_zero,
  input  logic    s_rd_en,
  input  len_t    s_rd_idx,
  input  logic    wr_en,
  input  len_t    wr_idx,
  input  digit_t  wr_digit
);

  localparam len_t MIN_NX = len_t'(4);

  typedef enum logic [2:0] {ST_IDLE, ST_PRE, ST_LOOP, ST_DRAIN} state_e;
  state_e state;

  mm_cmd_t c_q, c;
  len_t    nx_eff, split, i_r;
  logic [LEN_W+1:0] tau, period;  // position inside one outer iteration
  logic [2:0]       sub;          // cycle inside ST_PRE / ST_DRAIN

  assign c      = (state == ST_IDLE) ? cmd : c_q;
  assign nx_eff = (c.nx < MIN_NX) ? MIN_NX : c.nx;
  assign split  = (c.s_split == '0) ? nx_eff : c.s_split;
  assign period = (LEN_W+2)'(2) * (LEN_W+2)'(nx_eff) + (LEN_W+2)'(8);

  function automatic addr_t s_addr(input len_t k);
    return (k < split) ? c.s_base + addr_t'(k) : c.spill_base + addr_t'(k);
  endfunction

  // inner-loop digit index for the current tau (valid when tau >= 6)
  len_t j_cur;
  assign j_cur = len_t'((tau - (LEN_W+2)'(6)) >> 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE;
      c_q   <= '0;
      i_r   <= '0;
      tau   <= '0;
      sub   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          c_q   <= cmd;
          state <= ST_PRE;
          sub   <= 3'd1;
        end
        ST_PRE: begin
          state <= ST_LOOP;
          i_r   <= '0;
          tau   <= '0;
        end
        ST_LOOP: begin
          if (tau == period - 1) begin
            tau <= '0;
            if (i_r == c.ny - len_t'(1)) begin
              state <= ST_DRAIN;
              sub   <= '0;
            end else begin
              i_r <= i_r + len_t'(1);
            end
          end else begin
            tau <= tau + 1'b1;
          end
        end
        ST_DRAIN: begin
          sub <= sub + 3'd1;
          if (sub == 3'd4) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE) || start;
  assign done = (state == ST_DRAIN) && (sub == 3'd4);

  // ------------------------------------------------------ per-cycle actions
  logic in_loop;
  assign in_loop = (state == ST_LOOP);

  always_comb begin
    op         = '0;
    op.kind    = OP_NOP;
    ram_a_addr = c.x_base;
    minv_load  = 1'b0;
    y_load     = 1'b0;
    y_zero     = 1'b0;
    if (state == ST_IDLE && start) begin
      // tau = -2 of iteration 0
      ram_a_addr = c.y_base;
    end else if (state == ST_PRE) begin
      // tau = -1 of iteration 0
      ram_a_addr = c.x_base;
      minv_load  = 1'b1;
      y_load     = 1'b1;
      y_zero     = (c.y_len == '0);
    end else if (in_loop) begin
      if (tau == 0) begin
        op.kind    = OP_QXY;
        op.s_zero  = (i_r == '0);
        ram_a_addr = s_addr('0);
      end else if (tau == 4) begin
        op.kind = OP_QT;
      end else if (tau == 5) begin
        ram_a_addr = c.x_base;
      end else if (tau >= 6) begin
        op.kind   = tau[0] ? OP_QM : OP_XY;
        op.first  = (j_cur == '0);
        op.s_zero = (i_r == '0) || (j_cur == nx_eff);
        op.idx    = j_cur;
        op.a_zero = tau[0] ? (j_cur >= c.m_len) : (j_cur >= c.x_len);
        if (tau == period - 2) begin
          ram_a_addr = c.y_base + addr_t'(i_r) + addr_t'(1);
        end else if (tau == period - 1) begin
          ram_a_addr = c.x_base;
          y_load     = 1'b1;
          y_zero     = (i_r + len_t'(1) >= c.y_len);
        end else if (tau[0]) begin
          ram_a_addr = c.x_base + addr_t'(j_cur) + addr_t'(1);
        end else begin
          ram_a_addr = c.m_base + addr_t'(j_cur);
        end
      end
    end
  end

  always_comb begin
    ram_b_addr  = c.minv_addr;
    ram_b_we    = 1'b0;
    ram_b_wdata = '0;
    if (wr_en) begin
      ram_b_addr  = s_addr(wr_idx);
      ram_b_we    = 1'b1;
      ram_b_wdata = {(wr_idx == split - len_t'(1)), wr_digit};
    end else if (s_rd_en) begin
      ram_b_addr = s_addr(s_rd_idx);
    end
  end

  // Port B serves one S read or one S write per cycle.
  a_port_b_single : assert property (@(posedge clk) disable iff (rst)
    !(wr_en && s_rd_en));

endmodule
