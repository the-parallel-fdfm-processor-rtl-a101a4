// rsa_multicore: NCORES independent RSA decryption cores that work in
// parallel, loaded and unloaded through one chain of shift registers.
//
// Each core owns one stage of the chain (core_link). A packet written to
// link_in moves one core to the right per clock; a send packet stores its
// data word at its address in the block RAM of the core it names, a
// receive packet picks up the word at its address there. A packet driven
// on link_in acts on core p in that cycle plus p-1 clocks, and leaves
// link_out NCORES clocks after it was driven (one register per core), with
// the word read for a receive in its data field. So the host can stream one 18-bit
// word per clock in and out, and no wide multiplexer sits between the
// host and the cores. Core IDs run from 1 to NCORES; the packet's 9-bit
// ID field allows up to 511 cores.
//
// run starts every core at once (encrypt, sampled with run, selects plain
// exponentiation instead of decryption); done and busy report each core.
//
// The shift-register chain, its packet fields and the 320 cores follow
// the document; the broadcast run and the per-core status outputs are this
// design's choices.
module rsa_multicore
  import rsa_pkg::*;
#(
  parameter int unsigned NCORES = 320
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              encrypt,
  input  link_pkt_t         link_in,
  output link_pkt_t         link_out,
  output logic [NCORES-1:0] done,
  output logic [NCORES-1:0] busy,
  output logic [NCORES-1:0] mult_active
);

  link_pkt_t chain [NCORES+1];

  assign chain[0] = link_in;

  for (genvar k = 0; k < NCORES; k++) begin : g_core
    rsa_core #(.CORE_ID(k + 1)) u_core (
      .clk, .rst, .run, .encrypt,
      .busy(busy[k]), .done(done[k]), .mult_active(mult_active[k]),
      .link_in(chain[k]), .link_out(chain[k+1])
    );
  end

  assign link_out = chain[NCORES];

endmodule
