// tb_rsa_core: end-to-end check of one decryption core.
//
// For several key sizes it generates an RSA key (E = 65537), a random
// plaintext and its cypher text, loads all operands through the core's
// shift-register stage, runs the CRT decryption and reads the plaintext
// back. Checks: the recovered plaintext, the exact clock count of the
// decryption against the closed-form count, that a write sent while the
// core is busy is ignored, and that the final conditional subtraction
// occurs at least once. It also runs the encryption mode (plain
// P^E mod M without CRT) with E = 65537 and with random full-length
// exponents, checking the result and the exact clock count.
module tb_rsa_core;
  import rsa_pkg::*;
  import tb_rsa_util::*;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0, encrypt = 1'b0;
  logic busy, done, mult_active;
  link_pkt_t lin, lout;
  int checks = 0, failures = 0;

  rsa_core #(.CORE_ID(1)) dut (
    .clk, .rst, .run, .encrypt, .busy, .done, .mult_active, .link_in(lin), .link_out(lout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input addr_t a, input word_t w);
    lin <= '{valid: 1'b1, rd: 1'b0, id: ID_W'(1), addr: a, data: w};
    @(posedge clk);
  endtask

  task automatic idle();
    lin <= '0;
    @(posedge clk);
  endtask

  task automatic load(input addr_t base, input big_t v, input int n);
    for (int k = 0; k < n; k++)
      send(base + addr_t'(k), {k == n - 1, v[17*k +: 17]});
  endtask

  task automatic fetch(input addr_t a, output word_t w);
    lin <= '{valid: 1'b1, rd: 1'b1, id: ID_W'(1), addr: a, data: '0};
    @(posedge clk);
    #1 w = lout.data;
  endtask

  task automatic read_val(input addr_t base, input int n, output big_t v);
    word_t w;
    v = '0;
    for (int k = 0; k < n; k++) begin
      fetch(base + addr_t'(k), w);
      v[17*k +: 17] = w[16:0];
    end
  endtask

  int sub_seen = 0, nosub_seen = 0;

  task automatic one_key(input int bits);
    key_t k;
    big_t res;
    word_t w;
    longint t0, t1, expect_cyc;
    k = make_key(bits);
    load(A_C, k.c, k.dm_n);
    load(A_M, k.m, k.dm_n);
    load(A_R2M, k.r2m, k.dm_n);
    load(A_MINV, big_t'(k.minv), 1);
    load(A_ZP, k.zp, k.dm_n);
    load(A_ZQ, k.zq, k.dm_n);
    load(A_PP, k.p, k.dp_n);
    load(A_QQ, k.q, k.dq_n);
    load(A_PINV, big_t'(k.pinv), 1);
    load(A_QINV, big_t'(k.qinv), 1);
    load(A_R2P, k.r2p, k.dp_n);
    load(A_R2Q, k.r2q, k.dq_n);
    load(A_DP, k.dp, k.dp_n);
    load(A_DQ, k.dq, k.dq_n);
    load(A_ONE, big_t'(1), 1);
    send(A_ZQ_HI, 18'h155AA);
    idle();
    run <= 1'b1;
    t0 = longint'($time / 10);
    @(posedge clk);
    run <= 1'b0;
    // a write during the run must be ignored
    repeat (5) @(posedge clk);
    send(A_ZQ_HI, 18'h0F0F0);
    idle();
    while (!done) @(posedge clk);
    t1 = longint'($time / 10);
    if (dut.u_me.sub_taken) sub_seen++; else nosub_seen++;
    read_val(A_P, k.dm_n, res);
    idle();
    checks++;
    if (res != k.pt) begin
      failures++;
      $display("FAIL %0d-bit: P=%h expected %h", bits, res[1087:0], k.pt[1087:0]);
    end
    expect_cyc = core_cycles(k, dut.u_me.sub_taken);
    checks++;
    if (t1 - t0 != expect_cyc) begin
      failures++;
      $display("FAIL %0d-bit: %0d cycles, expected %0d", bits, t1 - t0, expect_cyc);
    end
    fetch(A_ZQ_HI, w);
    idle();
    checks++;
    if (w != 18'h155AA) begin
      failures++;
      $display("FAIL write while busy was not ignored: %h", w);
    end
    $display("%0d-bit key: dM=%0d dp=%0d dq=%0d, %0d cycles", bits, k.dm_n, k.dp_n,
             k.dq_n, t1 - t0);
  endtask

  // encryption of the key's plaintext with exponent e of le digits
  int n_enc = 0;
  task automatic enc_test(input key_t k, input big_t e, input int le);
    big_t res;
    longint t0, t1, expect_cyc;
    load(A_M, k.m, k.dm_n);
    load(A_R2M, k.r2m, k.dm_n);
    load(A_MINV, big_t'(k.minv), 1);
    load(A_ONE, big_t'(1), 1);
    load(A_P, k.pt, k.dm_n);
    load(A_ED, e, le);
    idle();
    encrypt <= 1'b1;
    run <= 1'b1;
    t0 = longint'($time / 10);
    @(posedge clk);
    run <= 1'b0;
    encrypt <= 1'b0;
    @(negedge clk);
    while (!done) @(posedge clk);
    t1 = longint'($time / 10);
    read_val(A_C, k.dm_n, res);
    idle();
    checks++;
    if (res != modexp(k.pt, e, k.m)) begin
      failures++;
      $display("FAIL encryption, %0d-digit modulus: C=%h", k.dm_n, res[255:0]);
    end else n_enc++;
    expect_cyc = enc_cycles(k.dm_n, e, le);
    checks++;
    if (t1 - t0 != expect_cyc) begin
      failures++;
      $display("FAIL encryption: %0d cycles, expected %0d", t1 - t0, expect_cyc);
    end
  endtask

  task automatic enc_key(input int bits);
    key_t k;
    big_t e;
    k = make_key(bits);
    enc_test(k, big_t'(65537), 1);
    e = '0;
    for (int j = 0; j < bits; j += 32) e[j +: 32] = $urandom;
    e = e % k.m;
    enc_test(k, e, (bitlen(e) + 16) / 17);
  endtask

  initial begin
    lin = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    one_key(40);    // p, q of two digits: short inner loops
    one_key(64);
    one_key(100);
    one_key(128);
    one_key(128);
    one_key(200);
    one_key(256);
    checks++;
    if (sub_seen == 0) begin
      // the conditional subtraction of step 4 must have happened
      // (P >= M occurs for roughly half of all keys); try more keys
      for (int r = 0; r < 8 && sub_seen == 0; r++) one_key(64);
      if (sub_seen == 0) begin
        failures++;
        $display("FAIL final subtraction never taken");
      end
    end
    enc_key(40);
    enc_key(64);
    enc_key(128);
    enc_key(256);
    checks++;
    if (n_enc == 0) begin
      failures++;
      $display("FAIL encryption never ran");
    end
    $display("step-4 subtraction taken %0d times, skipped %0d times", sub_seen, nosub_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
