// noc_odd_invert_top: end-to-end odd-bit-inversion coding around a NoC.
//
// The source network interface encodes every body flit with
// odd_invert_encoder before it enters the network; the destination network
// interface restores it with odd_invert_decoder. The network in between
// (wormhole-switched routers and links) is left unchanged by the scheme and
// is not part of this module: the encoded flit leaves on link_tx and comes
// back on link_rx after whatever path the network gives it. Because wormhole
// switching keeps the flits of a packet in order on every link, the encoded
// sequence, and so the reduced switching, is the same on every hop.
//
// link_tx / link_rx layout: {valid, head, flag, data[W-2:0]}, W+2 bits.
// Timing: one cycle in the encoder and one in the decoder, plus the network
// latency. TYPE selects which transition type the encoder counts (Type 1 is
// the reference choice). The split into encoder, network and decoder follows
// the published scheme; the link layout is this design's own.
module noc_odd_invert_top
  import noc_enc_pkg::*;
#(
  parameter int unsigned W    = 9,
  parameter trans_type_e TYPE = TYPE1
) (
  input  logic         clk,
  input  logic         rst_n,
  // source core side
  input  logic         src_valid,
  input  logic         src_head,
  input  logic [W-2:0] src_data,
  // into and out of the network
  output logic [W+1:0] link_tx,
  input  logic [W+1:0] link_rx,
  // destination core side
  output logic         dst_valid,
  output logic         dst_head,
  output logic [W-2:0] dst_data,
  output logic         inv_taken
);

  logic         enc_valid, enc_head;
  logic [W-1:0] enc_flit;

  odd_invert_encoder #(.W(W), .TYPE(TYPE)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (src_valid),
    .in_head  (src_head),
    .in_data  (src_data),
    .out_valid(enc_valid),
    .out_head (enc_head),
    .out_flit (enc_flit),
    .inv_taken(inv_taken)
  );

  assign link_tx = {enc_valid, enc_head, enc_flit};

  odd_invert_decoder #(.W(W)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (link_rx[W+1]),
    .in_head  (link_rx[W]),
    .in_flit  (link_rx[W-1:0]),
    .out_valid(dst_valid),
    .out_head (dst_head),
    .out_data (dst_data)
  );

endmodule
