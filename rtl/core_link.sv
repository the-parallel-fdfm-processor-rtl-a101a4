// core_link: one stage of the shift register that joins the cores of the
// multicore system. It is how the host loads and unloads every core's
// block RAM without a shared bus.
//
// A packet (valid, send/receive flag, 9-bit core ID, 11-bit address,
// 18-bit data) moves one stage to the right every clock. In the cycle a
// packet enters the stage whose CORE_ID it names, the stage drives the
// RAM port: a send (rd = 0) writes data to the address; a receive (rd = 1)
// reads the address, and one cycle later, while the packet sits in this
// stage's register, the word read replaces the packet's data on pkt_out.
// So a packet entering the first stage reaches core p after p clocks and
// every packet leaves the last stage after as many clocks as there are
// cores. Access is granted only while the core is idle (allow); a packet
// for a busy core passes unchanged.
//
// The fields and the move-right-every-clock behaviour follow the
// document; the valid bit, the one-cycle read slot and the busy rule are
// this design's choices.
module core_link
  import rsa_pkg::*;
#(
  parameter int unsigned CORE_ID = 1
) (
  input  logic      clk,
  input  logic      rst,
  input  link_pkt_t pkt_in,
  output link_pkt_t pkt_out,
  input  logic      allow,
  // block RAM port
  output logic      ram_we,
  output addr_t     ram_addr,
  output word_t     ram_wdata,
  input  word_t     ram_q
);

  link_pkt_t pkt_r;
  logic      rd_hit_r;
  logic      hit;

  assign hit       = pkt_in.valid && allow && (pkt_in.id == ID_W'(CORE_ID));
  assign ram_we    = hit && !pkt_in.rd;
  assign ram_addr  = pkt_in.addr;
  assign ram_wdata = pkt_in.data;

  always_ff @(posedge clk) begin
    if (rst) begin
      pkt_r    <= '0;
      rd_hit_r <= 1'b0;
    end else begin
      pkt_r    <= pkt_in;
      rd_hit_r <= hit && pkt_in.rd;
    end
  end

  always_comb begin
    pkt_out = pkt_r;
    if (rd_hit_r) pkt_out.data = ram_q;
  end

endmodule
