// tb_bram_2k18: checks the 2048 x 18-bit true dual-port block RAM.
//
// Writes random words through both ports, reads them back through the
// other port, and checks the one-cycle read latency, read-first behaviour
// on a port that writes and reads the same address, and that port B wins
// when both ports write one address in the same cycle. A shadow array
// holds the expected contents.
module tb_bram_2k18;
  import rsa_pkg::*;

  logic  clk = 1'b0;
  logic  a_we, b_we;
  addr_t a_addr, b_addr;
  word_t a_wdata, b_wdata, a_q, b_q;
  word_t shadow [0:2047];
  int checks = 0, failures = 0;

  bram_2k18 dut (.clk, .a_we, .a_addr, .a_wdata, .a_q, .b_we, .b_addr, .b_wdata, .b_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a_we = 1'b0; b_we = 1'b0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // fill: even addresses through port A, odd through port B
    for (int k = 0; k < 2048; k += 2) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = addr_t'(k);     a_wdata = word_t'($urandom);
      b_we = 1'b1; b_addr = addr_t'(k + 1); b_wdata = word_t'($urandom);
      shadow[k] = a_wdata;
      shadow[k + 1] = b_wdata;
    end
    @(negedge clk);
    a_we = 1'b0; b_we = 1'b0;
    // read back through the opposite ports; data valid one cycle later
    for (int k = 0; k < 2048; k += 2) begin
      a_addr = addr_t'(k + 1); b_addr = addr_t'(k);
      @(negedge clk);
      check("A read", a_q, shadow[k + 1]);
      check("B read", b_q, shadow[k]);
    end
    // read-first: write and read the same address on one port
    a_addr = 11'd100; a_we = 1'b1; a_wdata = 18'h2aaaa;
    @(negedge clk);
    check("read-first", a_q, shadow[100]);
    shadow[100] = 18'h2aaaa;
    a_we = 1'b0;
    @(negedge clk);
    check("after write", a_q, 18'h2aaaa);
    // both ports write one address: port B wins
    a_we = 1'b1; b_we = 1'b1; a_addr = 11'd7; b_addr = 11'd7;
    a_wdata = 18'h11111; b_wdata = 18'h22222;
    @(negedge clk);
    a_we = 1'b0; b_we = 1'b0;
    @(negedge clk);
    check("collision", a_q, 18'h22222);
    // read latency: a new address shows its data only after the clock
    a_addr = 11'd0;
    @(negedge clk);
    a_addr = 11'd1;
    #1 check("latency", a_q, shadow[0]);
    @(negedge clk);
    check("latency next", a_q, shadow[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
