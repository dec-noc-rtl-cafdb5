// packet_decoder: flit checking of the receiving network interface
// (Algorithm 2 of DEC-NoC).
//
// Head flit: checked over all payload bits. If it passes (after correction in
// SECDED mode) the 16 approximation codes, the source node and the sequence
// number are kept and the packet becomes active. If it fails, the packet is
// refused with a NACK and its remaining flits are dropped.
// Body/tail flit of the active packet: only the protected MSBs of each word
// (per the stored protection codes) are checked. CRC mode: any mismatch is an
// error. SECDED mode: a single flipped bit is corrected, two are an error. On
// an error the decoder sends a NACK and drops the rest of the packet; the
// sender then repeats the whole packet from its packet buffer. A good tail
// flit produces an ACK. Unprotected bits pass through untouched.
//
// Timing: one register stage. Results of a flit sampled at clock edge t
// (in_valid) appear on out_*/ack_* after that edge, for one cycle. The
// decoder always accepts a flit. A flit of a packet that is not active (its
// head failed, an earlier flit failed, or its sequence number does not match)
// is dropped silently. Packet-level NACK for a failed head and the sideband
// sequence number are this design's choices where the method lets the router
// repeat the head flit.
module packet_decoder
  import dec_noc_pkg::*;
#(
  parameter ecc_e ECC = ECC_CRC
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  flit_t                                 in_flit,
  // decoded body/tail flit
  output logic                                  out_valid,
  output logic [$clog2(BODY_FLITS)-1:0]         out_idx,
  output logic                                  out_last,
  output logic [SEQ_W-1:0]                      out_seq,
  output logic [NODE_W-1:0]                     out_src,
  output logic [PAYLOAD_W-1:0]                  out_data,
  output logic [WORDS_PER_FLIT-1:0]             out_conv,
  // acknowledgement to the sender
  output logic                                  ack_valid,
  output logic                                  ack_nack,
  output logic [SEQ_W-1:0]                      ack_seq,
  // event pulses
  output logic                                  ev_corrected,
  output logic                                  ev_error
);

  localparam int IDX_W = $clog2(BODY_FLITS);

  acode_t [WORDS_PER_PKT-1:0] codes_q;
  logic                       active_q;
  logic [SEQ_W-1:0]           seq_q;
  logic [NODE_W-1:0]          src_q;
  logic [IDX_W-1:0]           idx_q;

  // combinational check of the incoming flit
  logic [WORDS_PER_FLIT*PROT_W-1:0] prot_sel;
  logic [WORDS_PER_FLIT-1:0]        conv_sel;
  logic [PAYLOAD_W-1:0]             mask, masked, fixed;
  logic                             bad, corr;
  secded_res_t                      sres;

  always_comb begin
    for (int w = 0; w < WORDS_PER_FLIT; w++) begin
      prot_sel[w*PROT_W +: PROT_W] = codes_q[int'(idx_q)*WORDS_PER_FLIT + w].prot;
      conv_sel[w]                  = codes_q[int'(idx_q)*WORDS_PER_FLIT + w].conv;
    end
    mask   = flit_mask(in_flit.ftype, prot_sel);
    masked = in_flit.payload & mask;
    sres   = secded_decode(masked, in_flit.check[SECDED_W-1:0]);
    if (ECC == ECC_CRC) begin
      bad   = (crc16(masked) != in_flit.check);
      corr  = 1'b0;
      fixed = in_flit.payload;
    end else begin
      bad   = sres.uncorrectable;
      corr  = sres.corrected && !sres.uncorrectable;
      fixed = (sres.data & mask) | (in_flit.payload & ~mask);
    end
  end

  logic is_head, body_ok;
  assign is_head = in_valid && (in_flit.ftype == FLIT_HEAD);
  assign body_ok = in_valid && (in_flit.ftype != FLIT_HEAD) && active_q &&
                   (in_flit.seq == seq_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      codes_q      <= '0;
      active_q     <= 1'b0;
      seq_q        <= '0;
      src_q        <= '0;
      idx_q        <= '0;
      out_valid    <= 1'b0;
      out_idx      <= '0;
      out_last     <= 1'b0;
      out_seq      <= '0;
      out_src      <= '0;
      out_data     <= '0;
      out_conv     <= '0;
      ack_valid    <= 1'b0;
      ack_nack     <= 1'b0;
      ack_seq      <= '0;
      ev_corrected <= 1'b0;
      ev_error     <= 1'b0;
    end else begin
      out_valid    <= 1'b0;
      out_last     <= 1'b0;
      ack_valid    <= 1'b0;
      ev_corrected <= 1'b0;
      ev_error     <= 1'b0;
      if (is_head) begin
        seq_q        <= in_flit.seq;
        idx_q        <= '0;
        ev_corrected <= corr;
        ev_error     <= bad;
        if (bad) begin
          active_q  <= 1'b0;
          ack_valid <= 1'b1;
          ack_nack  <= 1'b1;
          ack_seq   <= in_flit.seq;
        end else begin
          active_q <= 1'b1;
          codes_q  <= fixed[HEAD_CODES_LSB +: WORDS_PER_PKT*ACODE_W];
          src_q    <= fixed[HEAD_SRC_LSB +: NODE_W];
        end
      end else if (body_ok) begin
        ev_corrected <= corr;
        ev_error     <= bad;
        if (bad) begin
          active_q  <= 1'b0;
          ack_valid <= 1'b1;
          ack_nack  <= 1'b1;
          ack_seq   <= seq_q;
        end else begin
          out_valid <= 1'b1;
          out_idx   <= idx_q;
          out_seq   <= seq_q;
          out_src   <= src_q;
          out_data  <= fixed;
          out_conv  <= conv_sel;
          idx_q     <= idx_q + 1'b1;
          if (in_flit.ftype == FLIT_TAIL) begin
            out_last  <= 1'b1;
            active_q  <= 1'b0;
            ack_valid <= 1'b1;
            ack_nack  <= 1'b0;
            ack_seq   <= seq_q;
          end
        end
      end
    end
  end

endmodule
