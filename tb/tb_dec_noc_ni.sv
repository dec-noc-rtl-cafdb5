// tb_dec_noc_ni: end-to-end test of two DEC-NoC network interfaces.
//
// Node A (id 0) and node B (id 9) each send NPKT packets of 16 words to the
// other. Each direction runs over a link model that flips payload and check
// bits at random (at most two per flit) and stalls the sender at random; the
// ACK/NACK of each packet travels back through a fixed ACK_DELAY-cycle delay
// line, as it would through the network. Words are a mix of approximable
// floats, approximable integers inside and outside the conversion range, and
// exact words, with thresholds from the evaluated set and beyond.
//
// Checks: every packet is delivered exactly once, from the right source;
// exact words arrive unchanged; floats keep sign, exponent and the protected
// mantissa bits (count worked out here from the threshold) and stay within
// the threshold; converted integers come back as integers within the
// threshold. At the start one error-free packet measures the latencies: the
// head flit is taken by the link 2 cycles after the last word, and the packet
// reaches the far core 2 cycles after its tail flit. Each mechanism (float
// approximation, integer conversion, out-of-range integer, exact word, every
// protection code, bit errors tolerated in unprotected bits, NACK, packet
// retransmission, head-flit error, link stall, core stall, all packet-buffer
// slots busy) is counted and must occur at least once.
module tb_dec_noc_ni;
  import dec_noc_pkg::*;

  localparam int NPKT      = 120;
  localparam int ACK_DELAY = 40;
  localparam int BER_PPM   = 1500;     // bit flip probability x 1e6
  localparam int N         = 2;        // nodes: 0 = A, 1 = B

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DUT ports ----------------
  logic                                  core_valid [N];
  logic                                  core_ready [N];
  core_word_t                            core_word  [N];
  logic [NODE_W-1:0]                     core_dest  [N];
  logic                                  tx_valid   [N];
  logic                                  tx_ready   [N];
  flit_t                                 tx_flit    [N];
  logic                                  txa_valid  [N];
  logic                                  txa_nack   [N];
  logic [SEQ_W-1:0]                      txa_seq    [N];
  logic                                  rx_valid   [N];
  flit_t                                 rx_flit    [N];
  logic                                  rxa_valid  [N];
  logic                                  rxa_nack   [N];
  logic [SEQ_W-1:0]                      rxa_seq    [N];
  logic                                  pkt_valid  [N];
  logic [WORDS_PER_PKT-1:0][WORD_W-1:0]  pkt_data   [N];
  logic [NODE_W-1:0]                     pkt_src    [N];
  logic [SEQ_W-1:0]                      pkt_seq    [N];
  logic                                  ev_corr    [N];
  logic                                  ev_err     [N];

  localparam logic [NODE_W-1:0] ID [N] = '{6'd0, 6'd9};

  dec_noc_ni u_a (
    .clk(clk), .rst_n(rst_n), .node_id(ID[0]),
    .core_valid(core_valid[0]), .core_ready(core_ready[0]), .core_word(core_word[0]), .core_dest(core_dest[0]),
    .tx_valid(tx_valid[0]), .tx_ready(tx_ready[0]), .tx_flit(tx_flit[0]),
    .tx_ack_valid(txa_valid[0]), .tx_ack_nack(txa_nack[0]), .tx_ack_seq(txa_seq[0]),
    .rx_valid(rx_valid[0]), .rx_flit(rx_flit[0]),
    .rx_ack_valid(rxa_valid[0]), .rx_ack_nack(rxa_nack[0]), .rx_ack_seq(rxa_seq[0]),
    .pkt_valid(pkt_valid[0]), .pkt_data(pkt_data[0]), .pkt_src(pkt_src[0]), .pkt_seq(pkt_seq[0]),
    .ev_corrected(ev_corr[0]), .ev_error(ev_err[0]));

  dec_noc_ni u_b (
    .clk(clk), .rst_n(rst_n), .node_id(ID[1]),
    .core_valid(core_valid[1]), .core_ready(core_ready[1]), .core_word(core_word[1]), .core_dest(core_dest[1]),
    .tx_valid(tx_valid[1]), .tx_ready(tx_ready[1]), .tx_flit(tx_flit[1]),
    .tx_ack_valid(txa_valid[1]), .tx_ack_nack(txa_nack[1]), .tx_ack_seq(txa_seq[1]),
    .rx_valid(rx_valid[1]), .rx_flit(rx_flit[1]),
    .rx_ack_valid(rxa_valid[1]), .rx_ack_nack(rxa_nack[1]), .rx_ack_seq(rxa_seq[1]),
    .pkt_valid(pkt_valid[1]), .pkt_data(pkt_data[1]), .pkt_src(pkt_src[1]), .pkt_seq(pkt_seq[1]),
    .ev_corrected(ev_corr[1]), .ev_error(ev_err[1]));

  int checks = 0, failures = 0;

  // ---------------- link and ACK channel models ----------------
  bit              inject = 0;
  bit              stall_en = 0;
  logic [143:0]    errmask [N];
  logic            ack_dv [N][ACK_DELAY];
  logic            ack_dn [N][ACK_DELAY];
  logic [SEQ_W-1:0] ack_ds [N][ACK_DELAY];

  function automatic logic [143:0] gen_mask();
    logic [143:0] m = '0;
    int nflip = 0;
    for (int i = 0; i < 144; i++)
      if (nflip < 2 && ($urandom % 1000000) < 32'(BER_PPM)) begin
        m[i] = 1'b1;
        nflip++;
      end
    return m;
  endfunction

  for (genvar s = 0; s < N; s++) begin : g_link
    // flits from node s go to node 1-s
    assign rx_valid[1-s]        = tx_valid[s] && tx_ready[s];
    assign rx_flit[1-s].ftype   = tx_flit[s].ftype;
    assign rx_flit[1-s].seq     = tx_flit[s].seq;
    assign {rx_flit[1-s].payload, rx_flit[1-s].check} = {tx_flit[s].payload, tx_flit[s].check} ^ errmask[s];
    // receiver of node 1-s acknowledges to the sender of node s
    assign txa_valid[s] = ack_dv[1-s][ACK_DELAY-1];
    assign txa_nack[s]  = ack_dn[1-s][ACK_DELAY-1];
    assign txa_seq[s]   = ack_ds[1-s][ACK_DELAY-1];
  end

  always @(posedge clk) begin
    for (int s = 0; s < N; s++) begin
      errmask[s]  <= inject ? gen_mask() : '0;
      tx_ready[s] <= stall_en ? (($urandom % 8) != 0) : 1'b1;
      ack_dv[s][0] <= rxa_valid[s] && rst_n;
      ack_dn[s][0] <= rxa_nack[s];
      ack_ds[s][0] <= rxa_seq[s];
      for (int d = 1; d < ACK_DELAY; d++) begin
        ack_dv[s][d] <= ack_dv[s][d-1];
        ack_dn[s][d] <= ack_dn[s][d-1];
        ack_ds[s][d] <= ack_ds[s][d-1];
      end
    end
  end

  // ---------------- stimulus and scoreboard ----------------
  logic [31:0] orig [N][NPKT][WORDS_PER_PKT];
  logic [31:0] othr [N][NPKT][WORDS_PER_PKT];
  logic        oapx [N][NPKT][WORDS_PER_PKT];
  dtype_e      otyp [N][NPKT][WORDS_PER_PKT];
  int          delivered [N][NPKT];
  int          sent_words [N];
  int          done_cnt = 0;
  bit          started = 0;

  // mechanism counters
  int n_float = 0, n_conv = 0, n_big = 0, n_exact = 0, n_tolerated = 0;
  int n_nack = 0, n_retx = 0, n_head_err = 0, n_link_stall = 0, n_core_stall = 0, n_buf_full = 0;
  int n_corrected = 0;
  int n_code [8];
  int head_seen [N][256];

  // thresholds: 0, 1e-6, 3 %, 5 %, 10 %, 15 %, 2e-3, 1.4e-4, 1.6e-5, 2.1e-6
  localparam logic [31:0] THR_SET [10] = '{32'd0, 32'd4295, 32'd128849019, 32'd214748365,
                                           32'd429496730, 32'd644245094, 32'd8590000,
                                           32'd600000, 32'd70000, 32'd9000};

  function automatic int ref_len(logic [31:0] thr);
    real t;
    int n[7] = '{3, 4, 6, 9, 13, 16, 19};
    t = real'(thr) / 4294967296.0;
    for (int i = 0; i < 7; i++) if (t >= 2.0 ** (-n[i])) return 9 + n[i];
    return 32;
  endfunction

  function automatic int code_of_len(int l);
    case (l)
      12: return 0; 13: return 1; 15: return 2; 18: return 3;
      22: return 4; 25: return 5; 28: return 6; default: return 7;
    endcase
  endfunction

  function automatic real f2r(logic [31:0] f);
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  task automatic gen_packet(int s, int p);
    for (int w = 0; w < WORDS_PER_PKT; w++) begin
      automatic int k = $urandom % 4;
      othr[s][p][w] = THR_SET[$urandom % 10];
      case (k)
        0: begin   // approximable float, normal value
          orig[s][p][w] = {1'($urandom), 8'($urandom_range(100, 154)), 23'($urandom)};
          oapx[s][p][w] = 1; otyp[s][p][w] = DT_FLOAT;
        end
        1: begin   // approximable integer inside the conversion range
          orig[s][p][w] = 32'($urandom >> (8 + $urandom % 24));
          if ($urandom % 2 == 1) orig[s][p][w] = -orig[s][p][w];
          oapx[s][p][w] = 1; otyp[s][p][w] = DT_INT;
        end
        2: begin   // approximable integer beyond the conversion range
          orig[s][p][w] = 32'h0100_0001 + ($urandom % 32'h3E00_0000);
          if ($urandom % 2 == 1) orig[s][p][w] = -orig[s][p][w];
          oapx[s][p][w] = 1; otyp[s][p][w] = DT_INT;
        end
        default: begin  // exact word
          orig[s][p][w] = $urandom;
          oapx[s][p][w] = 0; otyp[s][p][w] = dtype_e'($urandom);
        end
      endcase
    end
  endtask

  // core drivers
  for (genvar s = 0; s < N; s++) begin : g_core
    initial begin
      core_valid[s] = 0;
      core_word[s]  = '0;
      core_dest[s]  = ID[1-s];
      sent_words[s] = 0;
      wait (started);
      // first packet from A travels alone for the latency measurement
      if (s == 1) wait (done_cnt >= 1);
      for (int p = 0; p < NPKT; p++) begin
        for (int w = 0; w < WORDS_PER_PKT; w++) begin
          @(negedge clk);
          while (p > 0 && ($urandom % 6) == 0) @(negedge clk);   // core idle cycles
          core_valid[s] = 1;
          core_word[s]  = '{data: orig[s][p][w], approx: oapx[s][p][w],
                            dtype: otyp[s][p][w], thr: othr[s][p][w]};
          while (!core_ready[s]) @(negedge clk);   // ready only changes at posedge
          @(posedge clk);
          #1;
          core_valid[s] = 0;
          sent_words[s]++;
        end
      end
    end
  end

  // latency measurement on the first packet of A
  longint t_last = -1, t_head = -1, t_tail = -1, t_pkt = -1;
  always @(posedge clk) if (rst_n) begin
    if (core_valid[0] && core_ready[0] && sent_words[0] == 15 && t_last < 0) t_last = cyc;
    if (tx_valid[0] && tx_ready[0] && tx_flit[0].ftype == FLIT_HEAD && t_head < 0) t_head = cyc;
    if (tx_valid[0] && tx_ready[0] && tx_flit[0].ftype == FLIT_TAIL && t_tail < 0) t_tail = cyc;
    if (pkt_valid[1] && t_pkt < 0) t_pkt = cyc;
  end

  // monitors: delivery check and event counting
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) begin
      automatic int r = 1 - s;   // receiver node
      if (core_valid[s] && !core_ready[s]) n_core_stall++;
      if (tx_valid[s] && !tx_ready[s]) n_link_stall++;
      if (tx_valid[s] && tx_ready[s] && tx_flit[s].ftype == FLIT_HEAD) begin
        if (head_seen[s][tx_flit[s].seq] > 0) n_retx++;
        head_seen[s][tx_flit[s].seq]++;
        if (errmask[s] != 0) n_head_err++;
      end
      if (rxa_valid[r] && rxa_nack[r]) n_nack++;
      if (ev_corr[r]) n_corrected++;
      if (pkt_valid[r]) begin
        automatic int p = int'(pkt_seq[r]);
        checks++;
        if (p >= NPKT || pkt_src[r] !== ID[s] || delivered[s][p] != 0) begin
          failures++;
          $display("FAIL bad delivery node %0d seq %0d src %0d", r, p, pkt_src[r]);
        end else begin
          delivered[s][p] = 1;
          done_cnt++;
          for (int w = 0; w < WORDS_PER_PKT; w++) begin
            logic [31:0] o, g, m;
            int   len, iv, og;
            real  bound, err, ref_v;
            o = orig[s][p][w];
            g = pkt_data[r][w];
            len = ref_len(othr[s][p][w]);
            bound = (len == 32) ? 0.0 : 2.0 ** (9 - len);
            checks++;
            if (!oapx[s][p][w]) begin
              n_exact++; n_code[7]++;
              if (g !== o) begin failures++; $display("FAIL exact %h -> %h", o, g); end
            end else if (otyp[s][p][w] == DT_FLOAT) begin
              n_float++; n_code[code_of_len(len)]++;
              m = ~(32'hFFFF_FFFF >> len);
              ref_v = f2r(o);
              err = f2r(g) - ref_v; if (err < 0) err = -err;
              if ((g & m) !== (o & m) || (len == 32 && g !== o) ||
                  err > bound * (ref_v < 0 ? -ref_v : ref_v) ||
                  err > (real'(othr[s][p][w]) / 4294967296.0) * (ref_v < 0 ? -ref_v : ref_v) + 0.0) begin
                failures++;
                $display("FAIL float %h -> %h len %0d", o, g, len);
              end
              if (g !== o) n_tolerated++;
            end else if ($signed(o) >= -(1 <<< 24) && $signed(o) <= (1 <<< 24)) begin
              n_conv++; n_code[code_of_len(len)]++;
              og = int'(o); iv = int'(g);
              err = real'(iv) - real'(og); if (err < 0) err = -err;
              ref_v = real'(og); if (ref_v < 0) ref_v = -ref_v;
              if (err > bound * ref_v || (len == 32 && g !== o) ||
                  err > (real'(othr[s][p][w]) / 4294967296.0) * ref_v) begin
                failures++;
                $display("FAIL int %0d -> %0d len %0d", og, iv, len);
              end
              if (g !== o) n_tolerated++;
            end else begin
              n_big++; n_code[7]++;
              if (g !== o) begin failures++; $display("FAIL big int %h -> %h", o, g); end
            end
          end
        end
      end
    end
    if (u_a.u_tx.asm_full && !u_a.u_tx.free_any) n_buf_full++;
    if (u_b.u_tx.asm_full && !u_b.u_tx.free_any) n_buf_full++;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog: delivered %0d of %0d", done_cnt, 2 * NPKT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      for (int p = 0; p < NPKT; p++) begin
        gen_packet(s, p);
        delivered[s][p] = 0;
      end
      for (int q = 0; q < 256; q++) head_seen[s][q] = 0;
    end
    for (int c = 0; c < 8; c++) n_code[c] = 0;
    for (int s = 0; s < N; s++)
      for (int d = 0; d < ACK_DELAY; d++) ack_dv[s][d] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    started = 1;
    // latency of one undisturbed packet
    wait (done_cnt >= 1);
    @(negedge clk);
    checks++;
    if (t_head - t_last != 2) begin failures++; $display("FAIL source latency %0d", t_head - t_last); end
    checks++;
    if (t_pkt - t_tail != 2) begin failures++; $display("FAIL destination latency %0d", t_pkt - t_tail); end
    inject = 1;
    stall_en = 1;
    wait (done_cnt == 2 * NPKT);
    repeat (2 * ACK_DELAY) @(negedge clk);
    // mechanisms
    checks++; if (n_float == 0)      begin failures++; $display("FAIL no float word"); end
    checks++; if (n_conv == 0)       begin failures++; $display("FAIL no converted int"); end
    checks++; if (n_big == 0)        begin failures++; $display("FAIL no out-of-range int"); end
    checks++; if (n_exact == 0)      begin failures++; $display("FAIL no exact word"); end
    checks++; if (n_tolerated == 0)  begin failures++; $display("FAIL no tolerated error"); end
    checks++; if (n_nack == 0)       begin failures++; $display("FAIL no NACK"); end
    checks++; if (n_retx == 0)       begin failures++; $display("FAIL no retransmission"); end
    checks++; if (n_head_err == 0)   begin failures++; $display("FAIL no head error"); end
    checks++; if (n_link_stall == 0) begin failures++; $display("FAIL no link stall"); end
    checks++; if (n_core_stall == 0) begin failures++; $display("FAIL no core stall"); end
    checks++; if (n_buf_full == 0)   begin failures++; $display("FAIL packet buffer never full"); end
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (n_code[c] == 0) begin failures++; $display("FAIL protection code %0d unused", c); end
    end
    $display("words: float %0d, converted int %0d, big int %0d, exact %0d; tolerated errors %0d",
             n_float, n_conv, n_big, n_exact, n_tolerated);
    $display("NACKs %0d, retransmitted packets %0d, head flits hit %0d, SECDED corrections %0d",
             n_nack, n_retx, n_head_err, n_corrected);
    $display("link stall cycles %0d, core stall cycles %0d, buffer-full cycles %0d",
             n_link_stall, n_core_stall, n_buf_full);
    $display("latency: source %0d, destination %0d cycles", t_head - t_last, t_pkt - t_tail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
