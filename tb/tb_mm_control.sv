// tb_mm_control: checks one Montgomery multiplication S = X*Y*2^(-17*ny)
// mod M run by mm_control on mont_datapath and a block RAM.
//
// Random odd moduli of 1 to 64 digits, operands below 2M (and operands
// longer than the modulus, as in the reduction C mod p), the constant 1 as
// Y, and a result split between two slots. Each result is checked against
// wide-integer arithmetic (congruence and range) and each run's clock
// count against ny*(2*(nx+1)+6)+6 with nx at least 4.
module tb_mm_control;
  import rsa_pkg::*;
  import tb_rsa_util::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  mm_cmd_t cmd;
  logic busy, done;
  addr_t a_addr, b_addr;
  logic b_we;
  word_t b_wdata, a_q, b_q;
  mm_op_t op;
  logic minv_load, y_load, y_zero, s_rd_en, wr_en, mact;
  len_t s_rd_idx, wr_idx;
  digit_t wr_digit;
  int checks = 0, failures = 0;

  bram_2k18 u_bram (
    .clk, .a_we(1'b0), .a_addr(a_addr), .a_wdata('0), .a_q(a_q),
    .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_q(b_q)
  );
  mont_datapath u_dp (
    .clk, .rst, .op, .ram_a_q(a_q), .ram_b_q(b_q), .minv_load, .y_load, .y_zero,
    .s_rd_en, .s_rd_idx, .wr_en, .wr_idx, .wr_digit, .mult_busy(mact)
  );
  mm_control dut (
    .clk, .rst, .start, .cmd, .busy, .done,
    .ram_a_addr(a_addr), .ram_b_addr(b_addr), .ram_b_we(b_we), .ram_b_wdata(b_wdata),
    .op, .minv_load, .y_load, .y_zero, .s_rd_en, .s_rd_idx, .wr_en, .wr_idx, .wr_digit
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t rand_bits(input int bits);
    big_t v;
    v = '0;
    for (int k = 0; k < bits; k += 32) v[k +: 32] = $urandom;
    return v & ((big_t'(1) << bits) - 1);
  endfunction

  task automatic put(input addr_t base, input big_t v, input int n);
    for (int k = 0; k < n; k++) u_bram.mem[base + addr_t'(k)] = {k == n - 1, v[17*k +: 17]};
  endtask

  function automatic big_t get(input addr_t base, input int n, input int split,
                               input addr_t spill);
    big_t v;
    v = '0;
    for (int k = 0; k < n; k++)
      v[17*k +: 17] = (k < split) ? u_bram.mem[base + addr_t'(k)][16:0]
                                  : u_bram.mem[spill + addr_t'(k)][16:0];
    return v;
  endfunction

  // one multiplication; xd digits of X, md digits of M, ny digits of Y
  task automatic one(input int md, input int xd, input int yd, input bit y_one,
                     input int split);
    big_t m, x, y, s, lhs, rhs;
    int nx, nxe, mbits;
    longint t0, t1, expect_cyc;
    mbits = 17 * md - 3;
    m = rand_bits(mbits); m[mbits-1] = 1'b1; m[0] = 1'b1;
    if (xd > md) x = rand_bits(17 * xd - 3);
    else         x = rand_bits(mbits + 1) % (m << 1);
    y = y_one ? big_t'(1) : rand_bits(mbits + 1) % (m << 1);
    nx  = xd > md ? xd : md;
    nxe = nx < 4 ? 4 : nx;
    put(A_X, x, xd);
    put(A_Y, y, y_one ? 1 : yd);
    put(A_PP, m, md);
    put(A_PINV, big_t'(neg_inv17(m)), 1);
    cmd = '0;
    cmd.x_base = A_X;   cmd.x_len = len_t'(xd);
    cmd.y_base = A_Y;   cmd.y_len = len_t'(y_one ? 1 : yd);
    cmd.m_base = A_PP;  cmd.m_len = len_t'(md);
    cmd.minv_addr = A_PINV;
    cmd.s_base = A_SL;  cmd.s_split = len_t'(split); cmd.spill_base = A_S;
    cmd.nx = len_t'(nx); cmd.ny = len_t'(yd);
    start <= 1'b1;
    t0 = longint'($time / 10);
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    t1 = longint'($time / 10);
    @(posedge clk);
    s = get(A_SL, nxe, split == 0 ? nxe : split, A_S);
    lhs = (s << (17 * yd)) % m;
    rhs = (x * y) % m;
    checks++;
    if (lhs != rhs || s >= x + m) begin
      failures++;
      $display("FAIL md=%0d xd=%0d yd=%0d: S=%h", md, xd, yd, s[255:0]);
    end
    if (xd <= md) begin
      checks++;
      if (s >= (m << 1)) begin
        failures++;
        $display("FAIL md=%0d: S not below 2M", md);
      end
    end
    expect_cyc = longint'(yd) * (2 * (nxe + 1) + 6) + 6;
    checks++;
    // t0 is the edge before the one that samples start
    if (t1 - t0 - 1 != expect_cyc) begin
      failures++;
      $display("FAIL md=%0d yd=%0d: %0d cycles, expected %0d", md, yd, t1 - t0 - 1, expect_cyc);
    end
  endtask

  initial begin
    cmd = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int md = 1; md <= 12; md++) one(md, md, md, 1'b0, 0);
    for (int r = 0; r < 10; r++) begin
      int md;
      md = 1 + $urandom_range(0, 40);
      one(md, md, md, 1'b0, 0);
    end
    one(31, 31, 31, 1'b0, 0);
    one(61, 61, 61, 1'b0, 0);
    one(64, 64, 64, 1'b0, 0);
    one(31, 31, 31, 1'b1, 0);       // multiply by one
    one(16, 31, 16, 1'b0, 0);       // X longer than M
    one(16, 31, 16, 1'b1, 16);      // ... with the high digits spilled
    one(3, 6, 3, 1'b1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
