// tb_ni_rx: checks the receive half of the network interface.
// Packets are built here (codes, words, CIFs from double-precision
// conversion) and encoded with the CRC packet encoder; the test then feeds
// them to the receiver:
//   a clean packet            -> ACK, delivered 2 cycles after its tail flit;
//   a protected-bit error     -> NACK, nothing delivered, rest dropped;
//   the retransmission        -> ACK and delivery;
//   a head flit error         -> NACK, rest dropped; retransmission delivered;
//   unprotected-bit errors    -> ACK, delivered with the flipped bits, CIF
//                                words converted back with truncation.
// Expected integers come from $rtoi of the (possibly disturbed) float value.
module tb_ni_rx;
  import dec_noc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                         in_valid, ack_valid, ack_nack, pkt_valid, evc, eve;
  flit_t                        in_flit;
  logic [7:0]                   ack_seq, pkt_seq;
  logic [15:0][31:0]            pkt_data;
  logic [5:0]                   pkt_src;

  ni_rx dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_flit(in_flit),
             .ack_valid(ack_valid), .ack_nack(ack_nack), .ack_seq(ack_seq),
             .pkt_valid(pkt_valid), .pkt_data(pkt_data), .pkt_src(pkt_src), .pkt_seq(pkt_seq),
             .ev_corrected(evc), .ev_error(eve));

  flit_type_e   e_type;
  logic [127:0] e_pay;
  logic [11:0]  e_prot;
  logic [15:0]  e_chk;
  packet_encoder enc (.ftype(e_type), .payload(e_pay), .prot(e_prot), .check(e_chk));

  int checks = 0, failures = 0;
  logic [3:0]  codes [16];
  logic [31:0] wire_w [16];   // words as sent (CIF for converted integers)
  int          ints   [16];
  int          n_ack = 0, n_nack = 0, n_pkt = 0, t_tail, t_pkt;
  logic [7:0]  last_ack_seq;
  bit          last_nack;
  logic [15:0][31:0] got;
  logic [7:0]  got_seq;

  function automatic logic [31:0] ref_float(int v);
    logic [63:0] d;
    if (v == 0) return 32'd0;
    d = $realtobits(real'(v));
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic logic [127:0] mask_of(logic [11:0] p);
    int len[8] = '{12, 13, 15, 18, 22, 25, 28, 32};
    logic [127:0] m = '0;
    for (int w = 0; w < 4; w++)
      for (int b = 0; b < 32; b++)
        if (b >= 32 - len[p[w*3 +: 3]]) m[w*32 + b] = 1'b1;
    return m;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ack_valid) begin
      if (ack_nack) n_nack++; else n_ack++;
      last_ack_seq = ack_seq;
      last_nack    = ack_nack;
    end
    if (pkt_valid) begin
      n_pkt++;
      got     = pkt_data;
      got_seq = pkt_seq;
      t_pkt   = cyc;
      checks++;
      if (pkt_src !== 6'd33) failures++;
    end
  end

  task automatic new_packet();
    for (int w = 0; w < 16; w++) begin
      codes[w] = {1'($urandom), 3'($urandom)};
      if (codes[w][3]) begin
        ints[w]   = int'($urandom >> (8 + $urandom % 20));
        if ($urandom % 2 == 1) ints[w] = -ints[w];
        wire_w[w] = ref_float(ints[w]);
      end else begin
        wire_w[w] = $urandom;
      end
    end
  endtask

  // send the packet; err_flit: flit that gets a protected error (-1 none);
  // unprot: flip unprotected bits in the body flits
  task automatic send_packet(int seq, int err_flit, bit unprot, output logic [31:0] exp_w [16]);
    logic [127:0] flip, m;
    for (int w = 0; w < 16; w++) exp_w[w] = codes[w][3] ? 32'(ints[w]) : wire_w[w];
    for (int f = 0; f < 5; f++) begin
      @(negedge clk);
      if (f == 0) begin
        e_type = FLIT_HEAD;
        e_pay  = '0;
        for (int w = 0; w < 16; w++) e_pay[w*4 +: 4] = codes[w];
        e_pay[75:70] = 6'd33;
        e_prot = '0;
        m = '1;
      end else begin
        e_type = (f == 4) ? FLIT_TAIL : FLIT_BODY;
        for (int w = 0; w < 4; w++) begin
          e_pay[w*32 +: 32]  = wire_w[(f-1)*4 + w];
          e_prot[w*3 +: 3]   = codes[(f-1)*4 + w][2:0];
        end
        m = mask_of(e_prot);
      end
      flip = '0;
      if (f == err_flit) flip[$urandom % 128] = 1'b1;   // head: every bit protected
      if (f == err_flit && f > 0) begin
        flip = '0;
        for (int b = 0; b < 128; b++) if (m[b]) begin flip[b] = 1'b1; break; end
      end
      if (unprot && f > 0) begin
        flip = {$urandom, $urandom, $urandom, $urandom} & ~m;
        for (int w = 0; w < 4; w++) begin
          int k = (f - 1) * 4 + w;
          logic [31:0] x = wire_w[k] ^ flip[w*32 +: 32];
          if (codes[k][3])
            exp_w[k] = (x[30:23] < 8'd127) ? 32'd0 :
                       32'($rtoi($bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0})));
          else
            exp_w[k] = x;
        end
      end
      #1;
      in_valid        = 1;
      in_flit.ftype   = e_type;
      in_flit.seq     = 8'(seq);
      in_flit.payload = e_pay ^ flip;
      in_flit.check   = e_chk;
      @(posedge clk);
      if (f == 4) t_tail = cyc;
      #1;
      in_valid = 0;
    end
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_delivery(string what, int seq, logic [31:0] exp_w [16], int npkt_before);
    checks++;
    if (n_pkt != npkt_before + 1 || got_seq !== 8'(seq) || last_nack || last_ack_seq !== 8'(seq)) begin
      failures++;
      $display("FAIL %s: delivered %0d seq %0d nack %b", what, n_pkt - npkt_before, got_seq, last_nack);
    end
    for (int w = 0; w < 16; w++) begin
      checks++;
      if (got[w] !== exp_w[w]) begin
        failures++;
        $display("FAIL %s word %0d: %h exp %h (code %b)", what, w, got[w], exp_w[w], codes[w]);
      end
    end
  endtask

  task automatic expect_refusal(string what, int seq, int npkt_before, int nnack_before);
    checks++;
    if (n_pkt != npkt_before || n_nack != nnack_before + 1 || last_ack_seq !== 8'(seq)) begin
      failures++;
      $display("FAIL %s: delivered %0d NACKs %0d", what, n_pkt - npkt_before, n_nack - nnack_before);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_w [16];
    int np, nn;
    in_valid = 0; in_flit = '0; e_type = FLIT_HEAD; e_pay = '0; e_prot = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      automatic int seq = round * 4;
      // clean packet, with latency check
      new_packet();
      np = n_pkt;
      send_packet(seq, -1, 0, exp_w);
      expect_delivery("clean", seq, exp_w, np);
      checks++;
      if (t_pkt - t_tail != 2) begin failures++; $display("FAIL latency %0d", t_pkt - t_tail); end
      // protected error in a body flit, then retransmission
      new_packet();
      np = n_pkt; nn = n_nack;
      send_packet(seq + 1, 1 + $urandom % 4, 0, exp_w);
      expect_refusal("body error", seq + 1, np, nn);
      send_packet(seq + 1, -1, 0, exp_w);
      expect_delivery("retransmission", seq + 1, exp_w, np);
      // head error, then retransmission
      new_packet();
      np = n_pkt; nn = n_nack;
      send_packet(seq + 2, 0, 0, exp_w);
      expect_refusal("head error", seq + 2, np, nn);
      send_packet(seq + 2, -1, 0, exp_w);
      expect_delivery("head retransmission", seq + 2, exp_w, np);
      // unprotected errors tolerated
      new_packet();
      np = n_pkt;
      send_packet(seq + 3, -1, 1, exp_w);
      expect_delivery("unprotected errors", seq + 3, exp_w, np);
    end
    $display("ACKs %0d, NACKs %0d, packets %0d", n_ack, n_nack, n_pkt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
