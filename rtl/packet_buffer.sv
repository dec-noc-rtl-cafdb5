// packet_buffer: retransmission storage of the DEC-NoC transmit path.
//
// NBUF slots, each holding the five encoded flits of one packet exactly as
// they were sent. A slot is claimed (alloc) when a new packet starts, filled
// flit by flit as the encoder produces it (wr_*), and released when an ACK
// carrying its sequence number arrives. A NACK marks the slot for
// retransmission; retx_avail/retx_slot name the lowest marked slot and
// retx_take clears the mark when the sender starts repeating it. Flits are
// read back combinationally (rd_slot, rd_idx -> rd_flit).
// Keeping sent packets until they are acknowledged and resending them on a
// NACK is the method's; the slot count, the sequence-number match and the
// priority order are this design's choices. The flit memory has no reset
// (it is only read after being written); the ACK assertion samples rst_n
// synchronously, which the lint tool notes as a mixed use of rst_n.
module packet_buffer
  import dec_noc_pkg::*;
#(
  parameter int NBUF = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // allocation of a free slot
  output logic                      free_any,
  output logic [$clog2(NBUF)-1:0]   free_slot,
  input  logic                      alloc,
  input  logic [SEQ_W-1:0]          alloc_seq,
  // flit write
  input  logic                      wr_en,
  input  logic [$clog2(NBUF)-1:0]   wr_slot,
  input  logic [2:0]                wr_idx,
  input  flit_t                     wr_flit,
  // flit read
  input  logic [$clog2(NBUF)-1:0]   rd_slot,
  input  logic [2:0]                rd_idx,
  output flit_t                     rd_flit,
  // acknowledgements
  input  logic                      ack_valid,
  input  logic                      ack_nack,
  input  logic [SEQ_W-1:0]          ack_seq,
  // retransmission requests
  output logic                      retx_avail,
  output logic [$clog2(NBUF)-1:0]   retx_slot,
  input  logic                      retx_take
);

  localparam int SW = $clog2(NBUF);

  flit_t            mem [NBUF][FLITS_PER_PKT];
  logic [SEQ_W-1:0] seq_q   [NBUF];
  logic [NBUF-1:0]  busy_q;
  logic [NBUF-1:0]  pend_q;

  always_comb begin
    free_any   = 1'b0;
    free_slot  = '0;
    retx_avail = 1'b0;
    retx_slot  = '0;
    for (int i = NBUF - 1; i >= 0; i--) begin
      if (!busy_q[i]) begin
        free_any  = 1'b1;
        free_slot = SW'(i);
      end
      if (pend_q[i]) begin
        retx_avail = 1'b1;
        retx_slot  = SW'(i);
      end
    end
  end

  assign rd_flit = mem[rd_slot][rd_idx];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_slot][wr_idx] <= wr_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      pend_q <= '0;
      for (int i = 0; i < NBUF; i++) seq_q[i] <= '0;
    end else begin
      if (retx_take) pend_q[retx_slot] <= 1'b0;
      if (ack_valid) begin
        for (int i = 0; i < NBUF; i++) begin
          if (busy_q[i] && seq_q[i] == ack_seq) begin
            if (ack_nack) pend_q[i] <= 1'b1;
            else          busy_q[i] <= 1'b0;
          end
        end
      end
      if (alloc) begin
        busy_q[free_slot] <= 1'b1;
        pend_q[free_slot] <= 1'b0;
        seq_q[free_slot]  <= alloc_seq;
      end
    end
  end

  // An ACK or NACK must name the sequence number of a packet being held.
  logic [NBUF-1:0] hit;
  always_comb
    for (int i = 0; i < NBUF; i++) hit[i] = busy_q[i] && (seq_q[i] == ack_seq);

  property p_ack_matches;
    @(posedge clk) disable iff (!rst_n)
      ack_valid |-> (|hit);
  endproperty
  a_ack_matches: assert property (p_ack_matches);

endmodule
