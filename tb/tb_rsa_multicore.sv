// tb_rsa_multicore: end-to-end check of the multicore system at 8 cores.
//
// Every core gets its own RSA key (E = 65537), plaintext and cypher text.
// All operands are streamed into the cores through the shift-register
// chain, one word per clock, run starts every core at once, and the
// plaintexts are read back through the chain. Checks: every core's
// plaintext; that each reply leaves the chain NC clocks after its request
// (it is sampled at the edge after that, NC+1 counted clocks); that a write sent to a busy core is ignored; and that each
// mechanism (send, receive, write refused while busy, final subtraction
// taken and skipped, multiply skipped for a 0 exponent bit, encryption
// mode) happened. After the decryption every core is switched to
// encryption: E is loaded into the E/D slot, and the plaintext left in the
// P slot must encrypt back to the original cypher text.
module tb_rsa_multicore;
  import rsa_pkg::*;
  import tb_rsa_util::*;

  localparam int NC = 8;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0, encrypt = 1'b0;
  link_pkt_t lin, lout;
  logic [NC-1:0] done, busy, mact;
  int checks = 0, failures = 0;

  rsa_multicore #(.NCORES(NC)) dut (
    .clk, .rst, .run, .encrypt, .link_in(lin), .link_out(lout), .done, .busy,
    .mult_active(mact)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-core observation of the final subtraction and skipped multiplies
  logic [NC-1:0] sub_vec, skip_vec;
  for (genvar g = 0; g < NC; g++) begin : g_obs
    assign sub_vec[g]  = dut.g_core[g].u_core.u_me.sub_taken;
    assign skip_vec[g] = dut.g_core[g].u_core.u_me.state == 4'd4 &&
                         dut.g_core[g].u_core.u_me.ph == 4'd4 &&
                         dut.g_core[g].u_core.u_mm.done &&
                         !dut.g_core[g].u_core.u_me.e_r[dut.g_core[g].u_core.u_me.bitn];
  end
  longint n_skip = 0, n_mult = 0, n_cyc = 0;
  always @(posedge clk) begin
    n_skip += $countones(skip_vec);
    n_mult += longint'(mact[0]);
    if (busy[0]) n_cyc++;
  end

  // reply collection
  longint cyc = 0;
  always @(negedge clk) cyc++;   // away from the edge the TB drives on
  longint sent_at [int];
  word_t  reply   [int];
  int     n_send = 0, n_recv = 0, bad_latency = 0;
  always @(posedge clk) begin
    if (lout.valid && lout.rd) begin
      int key;
      key = int'(lout.id) * 4096 + int'(lout.addr);
      reply[key] = lout.data;
      n_recv++;
      if (!sent_at.exists(key) || cyc - sent_at[key] != longint'(NC + 1)) begin
        if (bad_latency == 0) $display("reply after %0d clocks", cyc - sent_at[key]);
        bad_latency++;
      end
    end
  end

  task automatic send(input int id, input addr_t a, input word_t w);
    lin <= '{valid: 1'b1, rd: 1'b0, id: ID_W'(id), addr: a, data: w};
    n_send++;
    @(posedge clk);
  endtask

  task automatic request(input int id, input addr_t a);
    lin <= '{valid: 1'b1, rd: 1'b1, id: ID_W'(id), addr: a, data: '0};
    sent_at[id * 4096 + int'(a)] = cyc;
    @(posedge clk);
  endtask

  task automatic load(input int id, input addr_t base, input big_t v, input int n);
    for (int k = 0; k < n; k++)
      send(id, base + addr_t'(k), {k == n - 1, v[17*k +: 17]});
  endtask

  key_t keys [NC];

  initial begin
    int n_sub = 0, n_nosub = 0, refused = 0;
    lin = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      int id;
      id = c + 1;
      keys[c] = make_key(64);
      load(id, A_C, keys[c].c, keys[c].dm_n);
      load(id, A_M, keys[c].m, keys[c].dm_n);
      load(id, A_R2M, keys[c].r2m, keys[c].dm_n);
      load(id, A_MINV, big_t'(keys[c].minv), 1);
      load(id, A_ZP, keys[c].zp, keys[c].dm_n);
      load(id, A_ZQ, keys[c].zq, keys[c].dm_n);
      load(id, A_PP, keys[c].p, keys[c].dp_n);
      load(id, A_QQ, keys[c].q, keys[c].dq_n);
      load(id, A_PINV, big_t'(keys[c].pinv), 1);
      load(id, A_QINV, big_t'(keys[c].qinv), 1);
      load(id, A_R2P, keys[c].r2p, keys[c].dp_n);
      load(id, A_R2Q, keys[c].r2q, keys[c].dq_n);
      load(id, A_DP, keys[c].dp, keys[c].dp_n);
      load(id, A_DQ, keys[c].dq, keys[c].dq_n);
      load(id, A_ONE, big_t'(1), 1);
      send(id, A_ZQ_HI, 18'h155AA);
    end
    // let the last packet reach the last core, then start all cores
    lin <= '0;
    repeat (NC + 2) @(posedge clk);
    run <= 1'b1;
    @(posedge clk);
    run <= 1'b0;
    // a write to every core while it is busy must be refused
    for (int c = 0; c < NC; c++) send(c + 1, A_ZQ_HI, 18'h0F0F0);
    lin <= '0;
    while (done != '1) @(posedge clk);
    for (int c = 0; c < NC; c++) if (sub_vec[c]) n_sub++; else n_nosub++;
    // read back all plaintexts and the spare words
    for (int c = 0; c < NC; c++) begin
      for (int k = 0; k < keys[c].dm_n; k++) request(c + 1, A_P + addr_t'(k));
      request(c + 1, A_ZQ_HI);
    end
    lin <= '0;
    repeat (NC + 4) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      big_t res;
      res = '0;
      for (int k = 0; k < keys[c].dm_n; k++)
        res[17*k +: 17] = reply[(c + 1) * 4096 + int'(A_P) + k][16:0];
      checks++;
      if (res != keys[c].pt) begin
        failures++;
        $display("FAIL core %0d: P=%h expected %h", c + 1, res[255:0], keys[c].pt[255:0]);
      end
      checks++;
      if (reply[(c + 1) * 4096 + int'(A_ZQ_HI)] != 18'h155AA) failures++;
      else refused++;
    end
    checks++;
    if (bad_latency != 0) begin
      failures++;
      $display("FAIL %0d replies with wrong latency", bad_latency);
    end
    $display("sends=%0d receives=%0d refused-while-busy=%0d subtraction taken=%0d skipped=%0d multiplies skipped=%0d",
             n_send, n_recv, refused, n_sub, n_nosub, n_skip);
    $display("core 1: %0d busy cycles, multiplier active in %0d (%0d%%)", n_cyc, n_mult,
             n_mult * 100 / n_cyc);
    // every mechanism must have happened
    checks++; if (n_send == 0)  begin failures++; $display("FAIL no send");  end
    checks++; if (n_recv == 0)  begin failures++; $display("FAIL no receive"); end
    checks++; if (refused == 0) begin failures++; $display("FAIL no refused write"); end
    checks++; if (n_sub == 0)   begin failures++; $display("FAIL subtraction never taken"); end
    checks++; if (n_nosub == 0) begin failures++; $display("FAIL subtraction never skipped"); end
    checks++; if (n_skip == 0)  begin failures++; $display("FAIL no skipped multiply"); end
    // encryption mode: C = P^E mod M on every core, from the plaintext the
    // decryption left in the P slot
    for (int c = 0; c < NC; c++) load(c + 1, A_ED, big_t'(65537), 1);
    lin <= '0;
    repeat (NC + 2) @(posedge clk);
    encrypt <= 1'b1;
    run <= 1'b1;
    @(posedge clk);
    run <= 1'b0;
    encrypt <= 1'b0;
    @(negedge clk);
    while (done != '1) @(posedge clk);
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < keys[c].dm_n; k++) request(c + 1, A_C + addr_t'(k));
    lin <= '0;
    repeat (NC + 4) @(posedge clk);
    begin
      int n_enc;
      n_enc = 0;
      for (int c = 0; c < NC; c++) begin
        big_t res;
        res = '0;
        for (int k = 0; k < keys[c].dm_n; k++)
          res[17*k +: 17] = reply[(c + 1) * 4096 + int'(A_C) + k][16:0];
        checks++;
        if (res != keys[c].c) begin
          failures++;
          $display("FAIL core %0d encryption: C=%h expected %h", c + 1, res[255:0], keys[c].c[255:0]);
        end else n_enc++;
      end
      $display("encryptions=%0d", n_enc);
      checks++; if (n_enc == 0) begin failures++; $display("FAIL no encryption"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
