// bram_2k18: the core's single 36k-bit block RAM, used as a 2048 x 18-bit
// true dual-port RAM.
//
// Both ports can read or write one word per clock. Reads are synchronous:
// the word addressed in cycle t appears on a_q / b_q in cycle t+1. A read of
// the word that the same cycle writes returns the old contents (read-first).
// If both ports write the same address in one cycle, port B wins. The
// organisation (2k x 18, dual port) is the document's; the collision rules
// are this design's choice.
module bram_2k18 #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 18,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_q,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_q
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    a_q <= mem[a_addr];
    b_q <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

endmodule
