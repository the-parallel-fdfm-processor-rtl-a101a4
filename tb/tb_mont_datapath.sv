// tb_mont_datapath: checks the Montgomery multiplier datapath on its own.
//
// The bench plays the sequencer and the block RAM: each clock it issues one
// operation with its RAM word, answers S(i,j) read requests one cycle later
// from a model RAM, and applies the datapath's writes to that RAM. The
// schedule per outer iteration is the one of the sequencer: QXY, three
// empty cycles, QT, one empty cycle, then XY_j / QM_j for j = 0..n with n
// at least 4 (digits beyond the operand length issue a zero product).
// Checks, against wide-integer arithmetic:
//  * the q digit after every iteration equals (S_0 + X_0*Y_i)*(-M^-1) mod 2^17;
//  * after all iterations S*2^(17*ny) = X*Y mod M and S < 2M;
//  * every write S(i+1,j-1) comes exactly 6 cycles after the XY_j issue;
//  * the multiplier-active flag is raised once per issued non-zero product.
module tb_mont_datapath;
  import rsa_pkg::*;
  import tb_rsa_util::*;

  logic clk = 1'b0, rst = 1'b1;
  mm_op_t op;
  word_t  ram_a_q, ram_b_q, s_q;
  logic   minv_load, y_load, y_zero, b_minv;
  logic   s_rd_en, wr_en, mult_busy;
  len_t   s_rd_idx, wr_idx;
  digit_t wr_digit, minv_v;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint xy_issue [0:255];
  int     n_wr = 0, n_wr_late = 0, n_busy = 0;
  digit_t smem [0:255];

  mont_datapath dut (
    .clk, .rst, .op, .ram_a_q, .ram_b_q, .minv_load, .y_load, .y_zero,
    .s_rd_en, .s_rd_idx, .wr_en, .wr_idx, .wr_digit, .mult_busy
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign ram_b_q = b_minv ? {1'b0, minv_v} : s_q;

  // model RAM port B: one-cycle read latency, writes from the datapath
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) s_q <= '0;
    else if (s_rd_en) s_q <= {1'b0, smem[s_rd_idx]};
    if (!rst && wr_en) begin
      smem[wr_idx] <= wr_digit;
      n_wr++;
      if (cyc != xy_issue[wr_idx + 1] + 6) n_wr_late++;
    end
    if (!rst && mult_busy) n_busy++;
  end

  function automatic big_t rand_bits(input int bits);
    big_t v;
    v = '0;
    for (int k = 0; k < bits; k += 32) v[k +: 32] = $urandom;
    return v & ((big_t'(1) << bits) - 1);
  endfunction

  // drive one cycle: op, port A word and register loads
  task automatic issue(input mm_kind_e kind, input digit_t a, input bit first,
                       input bit s_zero, input bit a_zero, input int idx);
    @(negedge clk);
    op        = '0;
    op.kind   = kind;
    op.first  = first;
    op.s_zero = s_zero;
    op.a_zero = a_zero;
    op.idx    = len_t'(idx);
    ram_a_q   = {1'b0, a};
    minv_load = 1'b0;
    y_load    = 1'b0;
    y_zero    = 1'b0;
    b_minv    = 1'b0;
    if (kind == OP_XY) xy_issue[idx] = cyc;
  endtask

  task automatic one(input int n);
    big_t m, x, y, s, lhs, rhs, t;
    digit_t minv, yi, q_exp;
    int expect_busy, ne;
    ne = n < 4 ? 4 : n;   // the sequencer runs at least four inner digits
    m = rand_bits(17 * n - 3); m[17*n-4] = 1'b1; m[0] = 1'b1;
    x = rand_bits(17 * n - 2) % (m << 1);
    y = rand_bits(17 * n - 2) % (m << 1);
    minv = digit_t'(neg_inv17(m));
    for (int k = 0; k < 256; k++) smem[k] = '0;
    n_busy = 0;
    expect_busy = 0;
    // load -M^-1
    issue(OP_NOP, '0, 0, 0, 0, 0);
    b_minv = 1'b1; minv_v = minv; minv_load = 1'b1;
    for (int i = 0; i < n; i++) begin
      yi = y[17*i +: 17];
      t  = '0;
      for (int k = 0; k <= n; k++) t[17*k +: 17] = smem[k];
      q_exp = digit_t'(((t[16:0] + x[16:0] * yi) * minv) & 17'h1ffff);
      // load Y_i
      issue(OP_NOP, yi, 0, 0, 0, 0);
      y_load = 1'b1;
      // q: QXY, S(i,0) one cycle later on port A
      issue(OP_QXY, x[16:0], 0, i == 0, 0, 0);
      issue(OP_NOP, smem[0], 0, 0, 0, 0);
      issue(OP_NOP, '0, 0, 0, 0, 0);
      issue(OP_NOP, '0, 0, 0, 0, 0);
      issue(OP_QT, '0, 0, 0, 0, 0);
      issue(OP_NOP, '0, 0, 0, 0, 0);
      expect_busy += 2;
      for (int j = 0; j <= ne; j++) begin
        issue(OP_XY, j < n ? x[17*j +: 17] : '0, j == 0, i == 0 || j == ne, j >= n, j);
        issue(OP_QM, j < n ? m[17*j +: 17] : '0, j == 0, i == 0 || j == ne, j >= n, j);
        if (j < n) expect_busy += 2;
      end
      issue(OP_NOP, '0, 0, 0, 0, 0);
      issue(OP_NOP, '0, 0, 0, 0, 0);
      checks++;
      if (dut.q_r != q_exp) begin
        failures++;
        $display("FAIL n=%0d i=%0d: q=%h expected %h", n, i, dut.q_r, q_exp);
      end
    end
    repeat (6) issue(OP_NOP, '0, 0, 0, 0, 0);
    s = '0;
    for (int k = 0; k < ne; k++) s[17*k +: 17] = smem[k];
    lhs = (s << (17 * n)) % m;
    rhs = (x * y) % m;
    checks++;
    if (lhs != rhs || s >= (m << 1)) begin
      failures++;
      $display("FAIL n=%0d: wrong product", n);
    end
    checks++;
    if (n_busy != expect_busy) begin
      failures++;
      $display("FAIL n=%0d: multiplier active %0d cycles, expected %0d", n, n_busy, expect_busy);
    end
  endtask

  initial begin
    op = '0; ram_a_q = '0; minv_load = 1'b0; y_load = 1'b0; y_zero = 1'b0;
    b_minv = 1'b0; minv_v = '0;
    for (int k = 0; k < 256; k++) begin smem[k] = '0; xy_issue[k] = 0; end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 1; n <= 8; n++) one(n);
    one(20);
    one(61);
    checks++;
    if (n_wr_late != 0 || n_wr == 0) begin
      failures++;
      $display("FAIL: %0d of %0d writes not 6 cycles after their XY issue", n_wr_late, n_wr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
