// ni_rx: receive half of the DEC-NoC network interface.
//
// Flits from the link go through the packet decoder, which checks the head
// flit in full and the body/tail flits over their protected MSBs only, and
// answers every packet with one ACK or NACK. Each word of a decoded flit is
// steered by its conversion code: a CIF goes through the data type converter
// back to an integer, any other word passes unchanged. The words are collected
// into a 16-word reassembly register; a good tail flit hands the whole packet
// to the core for one cycle on pkt_*. A packet that fails is never delivered;
// its retransmission arrives later under the same sequence number, so packets
// may reach the core out of order.
//
// Timing: a tail flit sampled at clock edge t is checked and registered by
// the decoder at that edge, the packet is registered at edge t+1 and the core
// takes it at edge t+2 (pkt_valid is high for that one cycle). The link is
// always accepted (no back-pressure) and the core must take pkt_* in the
// cycle it is valid. Delivering whole
// packets and the ev_* event pulses are this design's choices.
module ni_rx
  import dec_noc_pkg::*;
#(
  parameter ecc_e ECC = ECC_CRC
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // link side
  input  logic                                  in_valid,
  input  flit_t                                 in_flit,
  // acknowledgement to the sender
  output logic                                  ack_valid,
  output logic                                  ack_nack,
  output logic [SEQ_W-1:0]                      ack_seq,
  // core side
  output logic                                  pkt_valid,
  output logic [WORDS_PER_PKT-1:0][WORD_W-1:0]  pkt_data,
  output logic [NODE_W-1:0]                     pkt_src,
  output logic [SEQ_W-1:0]                      pkt_seq,
  // events
  output logic                                  ev_corrected,
  output logic                                  ev_error
);

  localparam int IDX_W = $clog2(BODY_FLITS);

  logic                       dec_valid, dec_last;
  logic [IDX_W-1:0]           dec_idx;
  logic [SEQ_W-1:0]           dec_seq;
  logic [NODE_W-1:0]          dec_src;
  logic [PAYLOAD_W-1:0]       dec_data;
  logic [WORDS_PER_FLIT-1:0]  dec_conv;

  packet_decoder #(.ECC(ECC)) u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_flit      (in_flit),
    .out_valid    (dec_valid),
    .out_idx      (dec_idx),
    .out_last     (dec_last),
    .out_seq      (dec_seq),
    .out_src      (dec_src),
    .out_data     (dec_data),
    .out_conv     (dec_conv),
    .ack_valid    (ack_valid),
    .ack_nack     (ack_nack),
    .ack_seq      (ack_seq),
    .ev_corrected (ev_corrected),
    .ev_error     (ev_error)
  );

  // demultiplexer and data type converters, one per word of a flit
  logic [WORDS_PER_FLIT-1:0][WORD_W-1:0] conv_int, word_out;

  for (genvar w = 0; w < WORDS_PER_FLIT; w++) begin : g_conv
    cif_to_int u_cvt (.cif(dec_data[w*WORD_W +: WORD_W]), .dout(conv_int[w]));
    assign word_out[w] = dec_conv[w] ? conv_int[w] : dec_data[w*WORD_W +: WORD_W];
  end

  logic [WORDS_PER_PKT-1:0][WORD_W-1:0] reasm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reasm     <= '0;
      pkt_valid <= 1'b0;
      pkt_data  <= '0;
      pkt_src   <= '0;
      pkt_seq   <= '0;
    end else begin
      pkt_valid <= 1'b0;
      if (dec_valid) begin
        reasm[int'(dec_idx)*WORDS_PER_FLIT +: WORDS_PER_FLIT] <= word_out;
        if (dec_last) begin
          pkt_valid <= 1'b1;
          pkt_data  <= reasm;
          pkt_data[int'(dec_idx)*WORDS_PER_FLIT +: WORDS_PER_FLIT] <= word_out;
          pkt_src   <= dec_src;
          pkt_seq   <= dec_seq;
        end
      end
    end
  end

endmodule
