// tb_packet_decoder: checks flit checking, correction and ACK/NACK for both
// error control schemes.
// Random packets (random approximation codes and words) are encoded, then
// each flit is given one of four disturbances: none, flips in unprotected
// bits only, one protected-bit flip, or two protected-bit flips. A CRC and a
// SECDED decoder receive the same flits (each with its own check bits). The
// expected reaction is worked out here from the protection masks:
//   unprotected flips -> flit accepted, flipped bits delivered as they are;
//   one protected flip -> CRC: NACK and packet dropped; SECDED: corrected;
//   two protected flips -> NACK and packet dropped for both.
// Results are compared one cycle after each flit (the decoder's latency).
module tb_packet_decoder;
  import dec_noc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  flit_type_e   ftype;
  logic [127:0] clean;
  logic [11:0]  prot;
  logic [15:0]  chk_c, chk_s;
  logic         in_valid;
  flit_t        fc, fs;

  packet_encoder #(.ECC(ECC_CRC))    enc_c (.ftype(ftype), .payload(clean), .prot(prot), .check(chk_c));
  packet_encoder #(.ECC(ECC_SECDED)) enc_s (.ftype(ftype), .payload(clean), .prot(prot), .check(chk_s));

  typedef struct packed {
    logic         valid;
    logic [1:0]   idx;
    logic         last;
    logic [7:0]   seq;
    logic [5:0]   src;
    logic [127:0] data;
    logic [3:0]   conv;
    logic         ack_valid, ack_nack;
    logic [7:0]   ack_seq;
    logic         corr;
  } obs_t;

  obs_t oc, os;

  packet_decoder #(.ECC(ECC_CRC)) dut_c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_flit(fc),
    .out_valid(oc.valid), .out_idx(oc.idx), .out_last(oc.last), .out_seq(oc.seq),
    .out_src(oc.src), .out_data(oc.data), .out_conv(oc.conv),
    .ack_valid(oc.ack_valid), .ack_nack(oc.ack_nack), .ack_seq(oc.ack_seq),
    .ev_corrected(oc.corr), .ev_error());
  packet_decoder #(.ECC(ECC_SECDED)) dut_s (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_flit(fs),
    .out_valid(os.valid), .out_idx(os.idx), .out_last(os.last), .out_seq(os.seq),
    .out_src(os.src), .out_data(os.data), .out_conv(os.conv),
    .ack_valid(os.ack_valid), .ack_nack(os.ack_nack), .ack_seq(os.ack_seq),
    .ev_corrected(os.corr), .ev_error());

  int checks = 0, failures = 0;
  int n_unprot = 0, n_corr = 0, n_nack_c = 0, n_nack_s = 0, n_ack = 0;

  function automatic logic [127:0] mask_of(flit_type_e t, logic [11:0] p);
    int len[8] = '{12, 13, 15, 18, 22, 25, 28, 32};
    logic [127:0] m = '0;
    if (t == FLIT_HEAD) return '1;
    for (int w = 0; w < 4; w++)
      for (int b = 0; b < 32; b++)
        if (b >= 32 - len[p[w*3 +: 3]]) m[w*32 + b] = 1'b1;
    return m;
  endfunction

  function automatic int pick(logic [127:0] set);
    int c = 0, r;
    for (int i = 0; i < 128; i++) c += int'(set[i]);
    if (c == 0) return -1;
    r = $urandom % c;
    for (int i = 0; i < 128; i++) if (set[i]) begin
      if (r == 0) return i;
      r--;
    end
    return -1;
  endfunction

  task automatic compare(string name, obs_t got, obs_t exp);
    checks++;
    if (got.valid !== exp.valid || got.ack_valid !== exp.ack_valid ||
        (exp.ack_valid && (got.ack_nack !== exp.ack_nack || got.ack_seq !== exp.ack_seq)) ||
        (exp.valid && (got.idx !== exp.idx || got.last !== exp.last || got.seq !== exp.seq ||
                       got.src !== exp.src || got.data !== exp.data || got.conv !== exp.conv)) ||
        got.corr !== exp.corr) begin
      failures++;
      $display("FAIL %s t=%0t got v%b a%b n%b c%b data %h / exp v%b a%b n%b c%b data %h",
               name, $time, got.valid, got.ack_valid, got.ack_nack, got.corr, got.data,
               exp.valid, exp.ack_valid, exp.ack_nack, exp.corr, exp.data);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0]  codes;
    logic [127:0] words [4];
    logic [127:0] m, flip;
    logic [5:0]   src;
    logic [7:0]   seq;
    bit           alive_c, alive_s;
    int           kind, b1, b2;
    obs_t         ec, es;

    in_valid = 0; ftype = FLIT_HEAD; clean = '0; prot = '0; fc = '0; fs = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      codes = {$urandom, $urandom};
      src   = 6'($urandom);
      seq   = 8'(p);
      for (int f = 0; f < 4; f++) words[f] = {$urandom, $urandom, $urandom, $urandom};
      alive_c = 1; alive_s = 1;
      for (int f = 0; f < 5; f++) begin
        @(negedge clk);
        if (f == 0) begin
          ftype = FLIT_HEAD;
          clean = '0;
          clean[63:0]  = codes;
          clean[75:70] = src;
          clean[69:64] = 6'($urandom);
          prot  = '0;
        end else begin
          ftype = (f == 4) ? FLIT_TAIL : FLIT_BODY;
          clean = words[f-1];
          for (int w = 0; w < 4; w++) prot[w*3 +: 3] = codes[((f-1)*4 + w)*4 +: 3];
        end
        m    = mask_of(ftype, prot);
        kind = $urandom % 6;               // 0..2 none, 3 unprot, 4 one prot, 5 two prot
        if (f == 0 && kind == 3) kind = 0;
        flip = '0;
        if (kind == 3) begin
          b1 = pick(~m);
          if (b1 >= 0) begin flip[b1] = 1; b2 = pick(~m); flip[b2] = 1; end
          else kind = 0;
        end else if (kind >= 4) begin
          b1 = pick(m); flip[b1] = 1;
          if (kind == 5) begin
            b2 = pick(m & ~flip);
            flip[b2] = 1;
          end
        end
        #1;
        in_valid   = 1;
        fc.ftype   = ftype;  fc.seq = seq;  fc.payload = clean ^ flip;  fc.check = chk_c;
        fs.ftype   = ftype;  fs.seq = seq;  fs.payload = clean ^ flip;  fs.check = chk_s;

        // expected reactions
        ec = '0; es = '0;
        if (alive_c) begin
          if (kind >= 4) begin
            ec.ack_valid = 1; ec.ack_nack = 1; ec.ack_seq = seq; alive_c = 0; n_nack_c++;
          end else if (f > 0) begin
            ec.valid = 1; ec.idx = 2'(f - 1); ec.last = (f == 4); ec.seq = seq; ec.src = src;
            ec.data = clean ^ flip;
            for (int w = 0; w < 4; w++) ec.conv[w] = codes[((f-1)*4 + w)*4 + 3];
            if (f == 4) begin ec.ack_valid = 1; ec.ack_nack = 0; ec.ack_seq = seq; n_ack++; end
            if (kind == 3) n_unprot++;
          end
        end
        if (alive_s) begin
          if (kind == 5) begin
            es.ack_valid = 1; es.ack_nack = 1; es.ack_seq = seq; alive_s = 0; n_nack_s++;
          end else begin
            es.corr = (kind == 4);
            if (kind == 4) n_corr++;
            if (f > 0) begin
              es.valid = 1; es.idx = 2'(f - 1); es.last = (f == 4); es.seq = seq; es.src = src;
              es.data = clean ^ (kind == 3 ? flip : '0);
              for (int w = 0; w < 4; w++) es.conv[w] = codes[((f-1)*4 + w)*4 + 3];
              if (f == 4) begin es.ack_valid = 1; es.ack_nack = 0; es.ack_seq = seq; end
            end
          end
        end
        @(negedge clk);
        in_valid = 0;
        compare("crc", oc, ec);
        compare("secded", os, es);
      end
    end
    // every mechanism must have been exercised
    checks++; if (n_unprot == 0 || n_corr == 0 || n_nack_c == 0 || n_nack_s == 0 || n_ack == 0) failures++;
    $display("unprotected-flip flits %0d, SECDED corrections %0d, CRC NACKs %0d, SECDED NACKs %0d, ACKs %0d",
             n_unprot, n_corr, n_nack_c, n_nack_s, n_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
