// ni_tx: transmit half of the DEC-NoC network interface.
//
// Words from the core pass through the approximate coding logic (ACL) one per
// cycle and are collected, with their approximation codes, into a 16-word
// packet. The destination is taken with the first word of a packet. When a
// packet is complete and a packet-buffer slot is free, the sender emits its
// five flits: a fully protected head flit carrying the 16 approximation codes,
// then four flits of four words whose check bits cover only the protected
// MSBs. Each flit is written into the packet buffer as it is sent. A NACK
// marks the packet for retransmission; a pending retransmission is served
// before the next new packet, flit by flit from the buffer. An ACK frees the
// slot.
//
// Interfaces: core side in_valid/in_ready/in_word/in_dest; link side
// out_valid/out_ready/out_flit (a flit moves when both are high); ack_* from
// the receiver at the far end. Sequence numbers count packets modulo 256.
//
// Timing: the ACL result is registered at the edge that accepts a word, and
// the head flit is encoded and registered at the next edge, so the router
// takes the head flit at the second edge after the one that accepted the last
// word; one flit per cycle follows while out_ready is high.
//
// The assertion samples rst_n synchronously while the flops reset
// asynchronously; the lint note about rst_n being used both ways refers to
// that and is intended. The two source cycles follow the method's overhead
// figure; the assembly of a whole packet before sending is needed because the
// head flit carries the codes of every word.
module ni_tx
  import dec_noc_pkg::*;
#(
  parameter ecc_e ECC  = ECC_CRC,
  parameter int   NBUF = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // core side
  input  logic              in_valid,
  output logic              in_ready,
  input  core_word_t        in_word,
  input  logic [NODE_W-1:0] in_dest,
  // link side
  output logic              out_valid,
  input  logic              out_ready,
  output flit_t             out_flit,
  // acknowledgements from the receiver
  input  logic              ack_valid,
  input  logic              ack_nack,
  input  logic [SEQ_W-1:0]  ack_seq
);

  localparam int SW = $clog2(NBUF);
  localparam int CW = $clog2(WORDS_PER_PKT);

  // ---------------- ACL and packet assembly ----------------
  logic [WORD_W-1:0]                  acl_data;
  acode_t                             acl_code;
  logic [WORDS_PER_PKT-1:0][WORD_W-1:0] asm_data;
  acode_t [WORDS_PER_PKT-1:0]         asm_code;
  logic [CW-1:0]                      asm_cnt;
  logic                               asm_full;
  logic [NODE_W-1:0]                  asm_dest;

  acl u_acl (.din(in_word), .dout(acl_data), .acode(acl_code));

  assign in_ready = !asm_full;

  // ---------------- sender ----------------
  logic              sending, mode_retx;
  logic [SW-1:0]     cur_slot;
  logic [2:0]        cur_idx;
  logic [SEQ_W-1:0]  cur_seq, next_seq;

  logic              free_any, retx_avail;
  logic [SW-1:0]     free_slot, retx_slot;
  flit_t             rd_flit;

  // flit candidate for this cycle
  logic              cand_valid, cand_retx, start_new, start_retx;
  logic [SW-1:0]     cand_slot;
  logic [2:0]        cand_idx;
  logic [SEQ_W-1:0]  cand_seq;
  logic              out_load, emit;
  flit_t             new_flit;
  logic [WORDS_PER_FLIT*PROT_W-1:0] enc_prot;
  logic [CHECK_W-1:0] enc_check;

  always_comb begin
    start_new  = 1'b0;
    start_retx = 1'b0;
    cand_valid = sending;
    cand_retx  = mode_retx;
    cand_slot  = cur_slot;
    cand_idx   = cur_idx;
    cand_seq   = cur_seq;
    if (!sending) begin
      if (retx_avail) begin
        start_retx = 1'b1;
        cand_valid = 1'b1;
        cand_retx  = 1'b1;
        cand_slot  = retx_slot;
        cand_idx   = '0;
      end else if (asm_full && free_any) begin
        start_new  = 1'b1;
        cand_valid = 1'b1;
        cand_retx  = 1'b0;
        cand_slot  = free_slot;
        cand_idx   = '0;
        cand_seq   = next_seq;
      end
    end
  end

  assign out_load = !out_valid || out_ready;
  assign emit     = cand_valid && out_load;

  // new flit built from the assembled packet
  always_comb begin
    new_flit.seq     = cand_seq;
    new_flit.payload = '0;
    enc_prot         = '0;
    if (cand_idx == 3'd0) begin
      new_flit.ftype = FLIT_HEAD;
      new_flit.payload[HEAD_CODES_LSB +: WORDS_PER_PKT*ACODE_W] = asm_code;
      new_flit.payload[HEAD_DEST_LSB +: NODE_W] = asm_dest;
      new_flit.payload[HEAD_SRC_LSB +: NODE_W]  = node_id;
    end else begin
      new_flit.ftype = (cand_idx == 3'(BODY_FLITS)) ? FLIT_TAIL : FLIT_BODY;
      for (int w = 0; w < WORDS_PER_FLIT; w++) begin
        new_flit.payload[w*WORD_W +: WORD_W] =
          asm_data[(int'(cand_idx) - 1)*WORDS_PER_FLIT + w];
        enc_prot[w*PROT_W +: PROT_W] =
          asm_code[(int'(cand_idx) - 1)*WORDS_PER_FLIT + w].prot;
      end
    end
    new_flit.check = enc_check;
  end

  packet_encoder #(.ECC(ECC)) u_enc (
    .ftype   (new_flit.ftype),
    .payload (new_flit.payload),
    .prot    (enc_prot),
    .check   (enc_check)
  );

  packet_buffer #(.NBUF(NBUF)) u_buf (
    .clk        (clk),
    .rst_n      (rst_n),
    .free_any   (free_any),
    .free_slot  (free_slot),
    .alloc      (emit && start_new),
    .alloc_seq  (next_seq),
    .wr_en      (emit && !cand_retx),
    .wr_slot    (cand_slot),
    .wr_idx     (cand_idx),
    .wr_flit    (new_flit),
    .rd_slot    (cand_slot),
    .rd_idx     (cand_idx),
    .rd_flit    (rd_flit),
    .ack_valid  (ack_valid),
    .ack_nack   (ack_nack),
    .ack_seq    (ack_seq),
    .retx_avail (retx_avail),
    .retx_slot  (retx_slot),
    .retx_take  (emit && start_retx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_data  <= '0;
      asm_code  <= '0;
      asm_cnt   <= '0;
      asm_full  <= 1'b0;
      asm_dest  <= '0;
      sending   <= 1'b0;
      mode_retx <= 1'b0;
      cur_slot  <= '0;
      cur_idx   <= '0;
      cur_seq   <= '0;
      next_seq  <= '0;
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      // packet assembly: one word per cycle through the ACL
      if (in_valid && in_ready) begin
        asm_data[asm_cnt] <= acl_data;
        asm_code[asm_cnt] <= acl_code;
        if (asm_cnt == '0) asm_dest <= in_dest;
        asm_cnt <= asm_cnt + 1'b1;
        if (asm_cnt == CW'(WORDS_PER_PKT - 1)) asm_full <= 1'b1;
      end

      // link output register
      if (out_ready) out_valid <= 1'b0;
      if (emit) begin
        out_valid <= 1'b1;
        out_flit  <= cand_retx ? rd_flit : new_flit;
        if (cand_idx == 3'(BODY_FLITS)) begin
          sending <= 1'b0;
          if (!cand_retx) asm_full <= 1'b0;
        end else begin
          sending   <= 1'b1;
          mode_retx <= cand_retx;
          cur_slot  <= cand_slot;
          cur_idx   <= cand_idx + 3'd1;
          cur_seq   <= cand_retx ? rd_flit.seq : cand_seq;
        end
        if (start_new) next_seq <= next_seq + 1'b1;
      end
    end
  end

  // The core never sees in_ready high while a packet waits for sending.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   asm_full |-> !in_ready);

endmodule
