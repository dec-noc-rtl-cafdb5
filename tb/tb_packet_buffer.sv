// tb_packet_buffer: random test of the retransmission buffer against a
// reference model kept here. Every cycle a random mix of slot allocation, flit
// writes, ACKs, NACKs and retransmission pick-ups is applied; before each
// clock edge the free-slot choice (lowest free slot), the retransmission
// choice (lowest NACKed slot) and a random flit read are compared with the
// model. Every operation kind must occur, and the buffer must be seen full.
module tb_packet_buffer;
  import dec_noc_pkg::*;

  localparam int NBUF = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic             free_any, retx_avail;
  logic [1:0]       free_slot, retx_slot, wr_slot, rd_slot;
  logic             alloc, wr_en, ack_valid, ack_nack, retx_take;
  logic [7:0]       alloc_seq, ack_seq;
  logic [2:0]       wr_idx, rd_idx;
  flit_t            wr_flit, rd_flit;

  packet_buffer dut (.*);

  flit_t       m_mem  [NBUF][5];
  bit          m_busy [NBUF];
  bit          m_pend [NBUF];
  logic [7:0]  m_seq  [NBUF];
  bit          m_written [NBUF][5];
  int checks = 0, failures = 0;
  int n_alloc = 0, n_ack = 0, n_nack = 0, n_take = 0, n_full = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] next_seq = 8'd0;
    int e_free, e_retx, s;
    {alloc, wr_en, ack_valid, ack_nack, retx_take} = '0;
    {alloc_seq, ack_seq, wr_slot, rd_slot, wr_idx, rd_idx} = '0;
    wr_flit = '0;
    for (int i = 0; i < NBUF; i++) begin
      m_busy[i] = 0; m_pend[i] = 0;
      for (int f = 0; f < 5; f++) m_written[i][f] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // reference choices
      e_free = -1; e_retx = -1;
      for (int i = NBUF - 1; i >= 0; i--) begin
        if (!m_busy[i]) e_free = i;
        if (m_pend[i]) e_retx = i;
      end
      if (e_free < 0) n_full++;
      // random operations
      alloc     = (e_free >= 0) && ($urandom % 3 == 0);
      alloc_seq = next_seq;
      s         = $urandom % NBUF;
      wr_en     = m_busy[s] && ($urandom % 2 == 0);
      wr_slot   = 2'(s);
      wr_idx    = 3'($urandom % 5);
      wr_flit   = $bits(flit_t)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      s         = $urandom % NBUF;
      ack_valid = m_busy[s] && ($urandom % 4 == 0) && !(alloc && 2'(e_free) == 2'(s));
      ack_nack  = ($urandom % 2 == 0);
      ack_seq   = m_seq[s];
      retx_take = (e_retx >= 0) && ($urandom % 2 == 0);
      // read a written location
      s = $urandom % NBUF;
      rd_slot = 2'(s);
      rd_idx  = 3'($urandom % 5);
      #1;
      checks++;
      if (free_any !== (e_free >= 0) || (e_free >= 0 && free_slot !== 2'(e_free)) ||
          retx_avail !== (e_retx >= 0) || (e_retx >= 0 && retx_slot !== 2'(e_retx))) begin
        failures++;
        $display("FAIL t=%0d free %b/%0d exp %0d retx %b/%0d exp %0d", t, free_any, free_slot, e_free,
                 retx_avail, retx_slot, e_retx);
      end
      if (m_written[s][rd_idx]) begin
        checks++;
        if (rd_flit !== m_mem[s][rd_idx]) begin
          failures++;
          $display("FAIL read slot %0d idx %0d", s, rd_idx);
        end
      end
      // update the model as the clock edge will
      if (wr_en) begin
        m_mem[wr_slot][wr_idx] = wr_flit;
        m_written[wr_slot][wr_idx] = 1;
      end
      if (retx_take) begin m_pend[e_retx] = 0; n_take++; end
      if (ack_valid) begin
        for (int i = 0; i < NBUF; i++)
          if (m_busy[i] && m_seq[i] == ack_seq) begin
            if (ack_nack) begin m_pend[i] = 1; n_nack++; end
            else begin m_busy[i] = 0; n_ack++; end
          end
      end
      if (alloc) begin
        m_busy[e_free] = 1; m_pend[e_free] = 0; m_seq[e_free] = alloc_seq;
        next_seq++;
        n_alloc++;
      end
    end
    checks++;
    if (n_alloc == 0 || n_ack == 0 || n_nack == 0 || n_take == 0 || n_full == 0) failures++;
    $display("allocs %0d, ACKs %0d, NACKs %0d, retransmissions %0d, full cycles %0d",
             n_alloc, n_ack, n_nack, n_take, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
