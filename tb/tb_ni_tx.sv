// tb_ni_tx: checks the transmit half of the network interface.
// Four packets are offered with no acknowledgement coming back. The first
// three must leave as head + three body + tail flits whose payload and check
// bits match a reference built here (approximation codes from the threshold
// levels, integer-to-float conversion via double precision, byte-wise CRC-16
// over the masked payload); the head flit must appear 2 cycles after the last
// word. The fourth packet must wait, since all three buffer slots are held.
// A NACK for packet 1 must bring back its five flits unchanged; an ACK for
// packet 0 must then release packet 3. Link stalls are applied throughout the
// second half of the test.
module tb_ni_tx;
  import dec_noc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        in_valid, in_ready, out_valid, out_ready, ack_valid, ack_nack;
  core_word_t  in_word;
  logic [5:0]  in_dest;
  flit_t       out_flit;
  logic [7:0]  ack_seq;

  ni_tx dut (.clk(clk), .rst_n(rst_n), .node_id(6'd5), .in_valid(in_valid), .in_ready(in_ready),
             .in_word(in_word), .in_dest(in_dest), .out_valid(out_valid), .out_ready(out_ready),
             .out_flit(out_flit), .ack_valid(ack_valid), .ack_nack(ack_nack), .ack_seq(ack_seq));

  int checks = 0, failures = 0;
  core_word_t words [4][16];
  flit_t      sent  [$];
  int         sent_cyc [$];
  int         last_word_cyc [4];
  bit         stall = 0;

  function automatic logic [2:0] ref_prot(logic [31:0] thr);
    int n[7] = '{3, 4, 6, 9, 13, 16, 19};
    for (int i = 0; i < 7; i++) if (real'(thr) / 4294967296.0 >= 2.0 ** (-n[i])) return 3'(i);
    return 3'b111;
  endfunction

  function automatic logic [31:0] ref_float(int v);
    logic [63:0] d;
    if (v == 0) return 32'd0;
    d = $realtobits(real'(v));
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic logic [15:0] crc_bytes(logic [127:0] d);
    logic [15:0] c = 16'hFFFF;
    for (int b = 15; b >= 0; b--) begin
      c = c ^ {d[b*8 +: 8], 8'h00};
      for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  // expected flit f (0..4) of packet p
  function automatic flit_t ref_flit(int p, int f);
    flit_t  r;
    logic [3:0]  code [16];
    logic [31:0] data [16];
    logic [127:0] m = '0;
    int len;
    for (int w = 0; w < 16; w++) begin
      core_word_t cw = words[p][w];
      int v = int'(cw.data);
      data[w] = cw.data;
      code[w] = 4'b0111;
      if (cw.approx && cw.dtype == DT_FLOAT) code[w] = {1'b0, ref_prot(cw.thr)};
      else if (cw.approx && v >= -(1 << 24) && v <= (1 << 24)) begin
        code[w] = {1'b1, ref_prot(cw.thr)};
        data[w] = ref_float(v);
      end
    end
    r = '0;
    r.seq = 8'(p);
    if (f == 0) begin
      r.ftype = FLIT_HEAD;
      for (int w = 0; w < 16; w++) r.payload[w*4 +: 4] = code[w];
      r.payload[69:64] = 6'(p + 20);
      r.payload[75:70] = 6'd5;
      r.check = crc_bytes(r.payload);
    end else begin
      r.ftype = (f == 4) ? FLIT_TAIL : FLIT_BODY;
      for (int w = 0; w < 4; w++) begin
        int k = (f - 1) * 4 + w;
        r.payload[w*32 +: 32] = data[k];
        len = (code[k][2:0] == 3'd0) ? 12 : (code[k][2:0] == 3'd1) ? 13 : (code[k][2:0] == 3'd2) ? 15 :
              (code[k][2:0] == 3'd3) ? 18 : (code[k][2:0] == 3'd4) ? 22 : (code[k][2:0] == 3'd5) ? 25 :
              (code[k][2:0] == 3'd6) ? 28 : 32;
        for (int b = 0; b < 32; b++) if (b >= 32 - len) m[w*32 + b] = 1'b1;
      end
      r.check = crc_bytes(r.payload & m);
    end
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      sent.push_back(out_flit);
      sent_cyc.push_back(cyc);
    end
    out_ready <= stall ? ($urandom % 3 != 0) : 1'b1;
  end

  task automatic expect_flits(int first, int p, string what);
    for (int f = 0; f < 5; f++) begin
      checks++;
      if (sent.size() <= first + f || sent[first + f] !== ref_flit(p, f)) begin
        failures++;
        $display("FAIL %s packet %0d flit %0d", what, p, f);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam logic [31:0] THR [4] = '{32'd128849019, 32'd429496730, 32'd9000, 32'd70000};
    in_valid = 0; in_word = '0; in_dest = '0; ack_valid = 0; ack_nack = 0; ack_seq = '0;
    out_ready = 1;
    for (int p = 0; p < 4; p++)
      for (int w = 0; w < 16; w++) begin
        automatic int k = $urandom % 4;
        words[p][w].thr    = THR[$urandom % 4];
        words[p][w].approx = (k != 3);
        words[p][w].dtype  = (k == 0) ? DT_FLOAT : DT_INT;
        words[p][w].data   = (k == 0) ? {1'($urandom), 8'($urandom_range(100, 150)), 23'($urandom)} :
                             (k == 1) ? 32'($urandom >> 10) : $urandom;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      for (int w = 0; w < 16; w++) begin
        in_valid = 1;
        in_word  = words[p][w];
        in_dest  = 6'(p + 20);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        if (w == 15) last_word_cyc[p] = cyc;
        @(negedge clk);
      end
      in_valid = 0;
    end
    // packets 0..2 out, packet 3 held back
    repeat (40) @(negedge clk);
    checks++;
    if (sent.size() != 15) begin failures++; $display("FAIL %0d flits sent, expected 15", sent.size()); end
    for (int p = 0; p < 3; p++) expect_flits(p * 5, p, "first");
    checks++;
    if (sent_cyc[0] - last_word_cyc[0] != 2) begin
      failures++;
      $display("FAIL head latency %0d", sent_cyc[0] - last_word_cyc[0]);
    end
    checks++;
    if (in_ready) begin failures++; $display("FAIL core not stalled while buffer full"); end
    // NACK packet 1 under link stalls
    stall = 1;
    ack_valid = 1; ack_nack = 1; ack_seq = 8'd1;
    @(negedge clk);
    ack_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (sent.size() != 20) begin failures++; $display("FAIL %0d flits after NACK", sent.size()); end
    expect_flits(15, 1, "retransmitted");
    // ACK packet 0: packet 3 leaves
    ack_valid = 1; ack_nack = 0; ack_seq = 8'd0;
    @(negedge clk);
    ack_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (sent.size() != 25) begin failures++; $display("FAIL %0d flits after ACK", sent.size()); end
    expect_flits(20, 3, "released");
    checks++;
    if (!in_ready) begin failures++; $display("FAIL core still stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
