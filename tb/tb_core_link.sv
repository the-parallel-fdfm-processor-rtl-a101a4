// tb_core_link: checks a chain of four shift-register stages (core IDs 1-4),
// each with its own block RAM, as in the multicore system.
//
// Checks: a packet moves one stage per clock and leaves the chain after
// four clocks; a send writes only the RAM of the core it names; a receive
// returns that RAM word in the packet's data field, other fields unchanged;
// a packet for a core whose access is not allowed (busy) passes unchanged
// and does not write; packets for ID 0 or an ID beyond the chain touch no
// RAM. Back-to-back packets (one per clock) are used throughout.
module tb_core_link;
  import rsa_pkg::*;

  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  link_pkt_t chain [0:N];
  logic [N-1:0] allow;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic  we;
    addr_t addr;
    word_t wdata, q, q_unused;
    core_link #(.CORE_ID(k + 1)) u_link (
      .clk, .rst, .pkt_in(chain[k]), .pkt_out(chain[k + 1]), .allow(allow[k]),
      .ram_we(we), .ram_addr(addr), .ram_wdata(wdata), .ram_q(q)
    );
    bram_2k18 u_ram (
      .clk, .a_we(1'b0), .a_addr('0), .a_wdata('0), .a_q(q_unused),
      .b_we(we), .b_addr(addr), .b_wdata(wdata), .b_q(q)
    );
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic link_pkt_t pkt(input bit rd, input int id, input int a, input int d);
    link_pkt_t p;
    p.valid = 1'b1;
    p.rd    = rd;
    p.id    = ID_W'(id);
    p.addr  = addr_t'(a);
    p.data  = word_t'(d);
    return p;
  endfunction

  // expected RAM contents per core
  word_t model [1:N][0:15];

  // output monitor: compare every valid packet leaving the chain in order
  link_pkt_t exp_q [$];
  longint    exp_t [$];
  always @(negedge clk) begin
    if (!rst && chain[N].valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected packet %p", chain[N]);
      end else begin
        link_pkt_t e;
        longint t;
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        if (chain[N] != e || cyc != t) begin
          failures++;
          $display("FAIL packet %p at %0d, expected %p at %0d", chain[N], cyc, e, t);
        end
      end
    end
  end

  // put one packet on the chain input in the next clock
  task automatic put(input link_pkt_t p, input link_pkt_t expect_out);
    @(negedge clk);
    chain[0] = p;
    exp_q.push_back(expect_out);
    exp_t.push_back(cyc + N);
  endtask

  initial begin
    chain[0] = '0;
    allow = '1;
    for (int c = 1; c <= N; c++)
      for (int a = 0; a < 16; a++) model[c][a] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 1; c <= N; c++)
      for (int a = 0; a < 16; a++) g_zero(c, a);
    // writes to every core, back to back
    for (int a = 0; a < 16; a++)
      for (int c = 1; c <= N; c++) begin
        int d;
        d = $urandom & 18'h3ffff;
        put(pkt(0, c, a, d), pkt(0, c, a, d));
        model[c][a] = word_t'(d);
      end
    // reads from every core, back to back
    for (int a = 0; a < 16; a++)
      for (int c = 1; c <= N; c++)
        put(pkt(1, c, a, 18'h15555), pkt(1, c, a, int'(model[c][a])));
    // core 2 busy: its write and read pass untouched (the last packets for
    // core 2 have already passed its stage)
    allow[1] = 1'b0;
    put(pkt(0, 2, 3, 18'h00abc), pkt(0, 2, 3, 18'h00abc));
    put(pkt(1, 2, 3, 18'h01234), pkt(1, 2, 3, 18'h01234));
    // IDs not in the chain
    put(pkt(0, 0, 4, 18'h3ffff), pkt(0, 0, 4, 18'h3ffff));
    put(pkt(0, N + 1, 5, 18'h3ffff), pkt(0, N + 1, 5, 18'h3ffff));
    @(negedge clk);
    chain[0] = '0;
    repeat (N + 2) @(negedge clk);
    allow[1] = 1'b1;
    // read back everything; nothing above may have changed any RAM
    for (int a = 0; a < 16; a++)
      for (int c = 1; c <= N; c++)
        put(pkt(1, c, a, 0), pkt(1, c, a, int'(model[c][a])));
    @(negedge clk);
    chain[0] = '0;
    repeat (N + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d packets never left the chain", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clear one RAM word (the RAM contents start random)
  task automatic g_zero(input int c, input int a);
    put(pkt(0, c, a, 0), pkt(0, c, a, 0));
  endtask

endmodule
