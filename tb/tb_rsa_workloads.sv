// tb_rsa_workloads: one decryption core at the key sizes of the published
// timing table that a wide-integer reference of 2304 bits can handle:
// 512-bit and 1024-bit moduli (2048-bit keys would need 4096-bit products
// and run 33 million clocks).
//
// Like the core's own testbench it generates a key (E = 65537), loads all
// operands through the shift-register stage, runs the decryption and reads
// the plaintext back. Checks: the plaintext, the exact clock count against
// the closed-form count, and that the count stays within the published
// worst case plus 1 % (this design spends 2 more clocks per multiplication
// and a few more in the length scan and final addition). It prints the
// clock count, the share of clocks in which the multiplier forms a real
// product, and the published worst case.
module tb_rsa_workloads;
  import rsa_pkg::*;
  import tb_rsa_util::*;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic busy, done, mult_active;
  link_pkt_t lin, lout;
  int checks = 0, failures = 0;

  rsa_core #(.CORE_ID(1)) dut (
    .clk, .rst, .run, .encrypt(1'b0), .busy, .done, .mult_active, .link_in(lin), .link_out(lout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (12_000_000) @(posedge clk);
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


  longint n_mult;
  always @(posedge clk) if (mult_active) n_mult <= n_mult + 1;

  task automatic one_key(input int bits, input longint table_cyc);
    key_t k;
    big_t res;
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
    idle();
    n_mult = 0;
    run <= 1'b1;
    t0 = longint'($time / 10);
    @(posedge clk);
    run <= 1'b0;
    @(negedge clk);  // done of the previous key falls at the edge that sees run
    while (!done) @(posedge clk);
    t1 = longint'($time / 10);
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
    checks++;
    if (real'(t1 - t0) > 1.01 * real'(table_cyc)) begin
      failures++;
      $display("FAIL %0d-bit: %0d cycles, above the published worst case %0d", bits,
               t1 - t0, table_cyc);
    end
    $display("%0d-bit key: dM=%0d dp=%0d dq=%0d, %0d cycles (published worst case %0d), multiplier busy %0.1f %%",
             bits, k.dm_n, k.dp_n, k.dq_n, t1 - t0, table_cyc,
             100.0 * real'(n_mult) / real'(t1 - t0));
  endtask

  initial begin
    lin = '0;
    n_mult = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    one_key(512, 713_048);
    one_key(1024, 4_625_348);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
