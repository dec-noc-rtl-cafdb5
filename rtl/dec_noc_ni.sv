// dec_noc_ni: DEC-NoC network interface (top level).
//
// DEC-NoC lowers the retransmission traffic of an error-controlled network on
// chip by protecting only as many bits of each data word as the
// application's error threshold requires. A word marked approximable keeps its
// sign, exponent and enough mantissa MSBs under the error control code; an
// integer small enough to be exact as a float is sent as one (CIF) so that the
// same rule applies. Bit errors in the unprotected low bits are accepted
// instead of causing a retransmission.
//
// This module joins the two halves of one node's interface:
//   ni_tx : core words -> ACL -> packet assembly -> packet encoder ->
//           link, with every sent packet kept in the packet buffer until it
//           is acknowledged, and resent on a NACK;
//   ni_rx : link -> packet decoder -> CIF-to-integer converter -> core,
//           answering each packet with ACK or NACK.
// The router is not part of this design: tx_* is the flit stream towards the
// router, rx_* the stream from it, and the ACK/NACK channels are separate
// point-to-point signals between a sender and its receiver.
//
// ECC selects CRC-16 (ARQ+CRC, the default) or SECDED (ARQ+SECDED); NBUF is the
// number of packet-buffer slots. Latency: head flit two cycles after the last
// core word; packet at the far core two cycles after its tail flit arrives.
// The assertions inside ni_tx and packet_buffer sample rst_n synchronously
// while all flops reset asynchronously; lint reports this mixed use of rst_n,
// and it is intended.
module dec_noc_ni
  import dec_noc_pkg::*;
#(
  parameter ecc_e ECC  = ECC_CRC,
  parameter int   NBUF = 3
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NODE_W-1:0]                     node_id,
  // core -> NI
  input  logic                                  core_valid,
  output logic                                  core_ready,
  input  core_word_t                            core_word,
  input  logic [NODE_W-1:0]                     core_dest,
  // NI -> router
  output logic                                  tx_valid,
  input  logic                                  tx_ready,
  output flit_t                                 tx_flit,
  input  logic                                  tx_ack_valid,
  input  logic                                  tx_ack_nack,
  input  logic [SEQ_W-1:0]                      tx_ack_seq,
  // router -> NI
  input  logic                                  rx_valid,
  input  flit_t                                 rx_flit,
  output logic                                  rx_ack_valid,
  output logic                                  rx_ack_nack,
  output logic [SEQ_W-1:0]                      rx_ack_seq,
  // NI -> core
  output logic                                  pkt_valid,
  output logic [WORDS_PER_PKT-1:0][WORD_W-1:0]  pkt_data,
  output logic [NODE_W-1:0]                     pkt_src,
  output logic [SEQ_W-1:0]                      pkt_seq,
  // events of the receive half
  output logic                                  ev_corrected,
  output logic                                  ev_error
);

  ni_tx #(.ECC(ECC), .NBUF(NBUF)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .node_id   (node_id),
    .in_valid  (core_valid),
    .in_ready  (core_ready),
    .in_word   (core_word),
    .in_dest   (core_dest),
    .out_valid (tx_valid),
    .out_ready (tx_ready),
    .out_flit  (tx_flit),
    .ack_valid (tx_ack_valid),
    .ack_nack  (tx_ack_nack),
    .ack_seq   (tx_ack_seq)
  );

  ni_rx #(.ECC(ECC)) u_rx (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (rx_valid),
    .in_flit      (rx_flit),
    .ack_valid    (rx_ack_valid),
    .ack_nack     (rx_ack_nack),
    .ack_seq      (rx_ack_seq),
    .pkt_valid    (pkt_valid),
    .pkt_data     (pkt_data),
    .pkt_src      (pkt_src),
    .pkt_seq      (pkt_seq),
    .ev_corrected (ev_corrected),
    .ev_error     (ev_error)
  );

endmodule
