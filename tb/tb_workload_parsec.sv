// tb_workload_parsec: retransmission and latency of DEC-NoC against a fully
// protected baseline, for synthetic traffic shaped like the evaluated
// benchmarks.
//
// Seven packet mixes use the floating-point packet shares of blackscholes
// (63 %), fluidanimate (31 %), x264 (43 %), ferret (29 %), vips (21 %),
// swaptions (33 %) and dedup (0 %); the rest are integer packets. For each
// mix the same packet sequence is sent from node A to node B over a link with
// bit error rate 1e-4 and ARQ+CRC:
//   baseline : every word marked exact, so all bits are protected;
//   DEC-NoC  : every word approximable with threshold 5 %, 10 % or 15 %, and
//              25 %, 50 % or 75 % of integer packets inside the conversion
//              range (converted to CIF), the others beyond it.
// Every delivered packet is checked (exact for the baseline, within the
// threshold for DEC-NoC). The test prints retransmitted packets and mean
// packet latency (first word accepted to delivery) per run, and requires that
// over all mixes DEC-NoC at 75 % conversion retransmits fewer packets than the
// baseline at every threshold. The packet contents are synthetic: the real
// benchmark traces are not reproduced.
module tb_workload_parsec;
  import dec_noc_pkg::*;

  localparam int P         = 250;    // packets per run (sequence numbers stay unique)
  localparam int ACK_DELAY = 10;
  localparam int NB        = 7;
  localparam int FLOAT_PCT [NB] = '{63, 31, 43, 29, 21, 33, 0};
  localparam string BNAME  [NB] = '{"blackscholes", "fluidanimate", "x264", "ferret",
                                    "vips", "swaptions", "dedup"};
  localparam logic [31:0] THR [3] = '{32'd214748365, 32'd429496730, 32'd644245094}; // 5,10,15 %
  localparam int CONV_PCT [3] = '{25, 50, 75};

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        a_cv, a_cr, a_txv, a_txr, b_txv, b_rxa_v, b_rxa_n, b_pv, a_rxa_v, a_rxa_n, a_pv;
  core_word_t  a_cw;
  flit_t       a_txf, b_rxf, b_txf;
  logic [7:0]  b_rxa_s, b_ps, a_rxa_s, a_ps, a_txa_s, a_pseq_unused;
  logic        a_txa_v, a_txa_n;
  logic [15:0][31:0] b_pd, a_pd;
  logic [5:0]  b_psrc, a_psrc;
  logic [143:0] errmask;

  dec_noc_ni u_a (
    .clk(clk), .rst_n(rst_n), .node_id(6'd1),
    .core_valid(a_cv), .core_ready(a_cr), .core_word(a_cw), .core_dest(6'd2),
    .tx_valid(a_txv), .tx_ready(a_txr), .tx_flit(a_txf),
    .tx_ack_valid(a_txa_v), .tx_ack_nack(a_txa_n), .tx_ack_seq(a_txa_s),
    .rx_valid(1'b0), .rx_flit(b_txf),
    .rx_ack_valid(a_rxa_v), .rx_ack_nack(a_rxa_n), .rx_ack_seq(a_rxa_s),
    .pkt_valid(a_pv), .pkt_data(a_pd), .pkt_src(a_psrc), .pkt_seq(a_ps),
    .ev_corrected(), .ev_error());

  dec_noc_ni u_b (
    .clk(clk), .rst_n(rst_n), .node_id(6'd2),
    .core_valid(1'b0), .core_ready(), .core_word('0), .core_dest(6'd1),
    .tx_valid(b_txv), .tx_ready(1'b1), .tx_flit(b_txf),
    .tx_ack_valid(1'b0), .tx_ack_nack(1'b0), .tx_ack_seq(8'd0),
    .rx_valid(a_txv && a_txr), .rx_flit(b_rxf),
    .rx_ack_valid(b_rxa_v), .rx_ack_nack(b_rxa_n), .rx_ack_seq(b_rxa_s),
    .pkt_valid(b_pv), .pkt_data(b_pd), .pkt_src(b_psrc), .pkt_seq(b_ps),
    .ev_corrected(), .ev_error());

  assign a_txr = 1'b1;
  assign b_rxf = '{ftype: a_txf.ftype, seq: a_txf.seq,
                   payload: a_txf.payload ^ errmask[143:16], check: a_txf.check ^ errmask[15:0]};

  // ACK delay line
  logic       dv [ACK_DELAY];
  logic       dn [ACK_DELAY];
  logic [7:0] ds [ACK_DELAY];
  assign a_txa_v = dv[ACK_DELAY-1];
  assign a_txa_n = dn[ACK_DELAY-1];
  assign a_txa_s = ds[ACK_DELAY-1];

  // deterministic bit-error generator (xorshift32), reseeded per run
  logic [31:0] rng;
  function automatic logic [31:0] xs(logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction

  always @(posedge clk) begin
    logic [143:0] m;
    logic [31:0]  r;
    m = '0;
    r = rng;
    for (int i = 0; i < 144; i++) begin
      r = xs(r);
      if (r % 10000 == 0) m[i] = 1'b1;     // bit error rate 1e-4
    end
    rng     <= r;
    errmask <= m;
    dv[0] <= b_rxa_v && rst_n; dn[0] <= b_rxa_n; ds[0] <= b_rxa_s;
    for (int d = 1; d < ACK_DELAY; d++) begin dv[d] <= dv[d-1]; dn[d] <= dn[d-1]; ds[d] <= ds[d-1]; end
  end

  int checks = 0, failures = 0;

  // run state
  logic [31:0] w_data [P][16];
  bit          w_apx;
  bit          w_float [P];
  logic [31:0] w_thr;
  longint      t_start [P];
  int          got [P];
  int          n_retx, n_delivered;
  longint      lat_sum;
  int          head_cnt [256];

  always @(posedge clk) if (rst_n) begin
    if (a_txv && a_txr && a_txf.ftype == FLIT_HEAD) begin
      if (head_cnt[a_txf.seq] > 0) n_retx++;
      head_cnt[a_txf.seq]++;
    end
    if (b_pv) begin
      automatic int p = int'(b_ps);
      checks++;
      if (got[p] != 0) begin failures++; $display("FAIL duplicate %0d", p); end
      got[p] = 1;
      n_delivered++;
      lat_sum += cyc - t_start[p];
      for (int w = 0; w < 16; w++) begin
        logic [31:0] o, g;
        real e, ref_v, lim;
        o = w_data[p][w];
        g = b_pd[w];
        lim = real'(w_thr) / 4294967296.0;
        if (!w_apx) begin
          if (g !== o) begin failures++; $display("FAIL baseline word %h -> %h", o, g); end
        end else if (w_float[p]) begin
          ref_v = $bitstoreal({o[31], 11'(int'(o[30:23]) - 127 + 1023), o[22:0], 29'd0});
          e = $bitstoreal({g[31], 11'(int'(g[30:23]) - 127 + 1023), g[22:0], 29'd0}) - ref_v;
          if (e < 0) e = -e;
          if (ref_v < 0) ref_v = -ref_v;
          if (e > lim * ref_v) begin failures++; $display("FAIL float %h -> %h", o, g); end
        end else begin
          e = real'(int'(g)) - real'(int'(o)); if (e < 0) e = -e;
          ref_v = real'(int'(o)); if (ref_v < 0) ref_v = -ref_v;
          if (e > lim * ref_v) begin failures++; $display("FAIL int %0d -> %0d", int'(o), int'(g)); end
        end
      end
    end
  end

  // one run: returns retransmitted packets and mean latency x100
  task automatic run(int b, bit apx, logic [31:0] thr, int conv_pct, output int retx, output int lat100);
    logic [31:0] g;
    g = 32'h1234_5678 + 32'(b);           // same packet sequence for every run of a mix
    w_apx = apx;
    w_thr = thr;
    for (int p = 0; p < P; p++) begin
      g = xs(g);
      w_float[p] = (g % 100) < 32'(FLOAT_PCT[b]);
      g = xs(g);
      for (int w = 0; w < 16; w++) begin
        g = xs(g);
        if (w_float[p])
          w_data[p][w] = {g[31], 8'(100 + 32'(g[7:0]) % 50), g[30:8]};
        else if (((g >> 8) % 100) < 32'(conv_pct))
          w_data[p][w] = g[31] ? -(32'(g[23:0]) >> (g[3:0])) : 32'(g[23:0]) >> (g[3:0]);
        else
          w_data[p][w] = g[31] ? -(32'h0200_0000 | 32'(g[27:4])) : (32'h0200_0000 | 32'(g[27:4]));
      end
      got[p] = 0;
    end
    for (int q = 0; q < 256; q++) head_cnt[q] = 0;
    for (int d = 0; d < ACK_DELAY; d++) dv[d] = 0;
    n_retx = 0; n_delivered = 0; lat_sum = 0;
    rng = 32'hC0FF_EE00 + 32'(b);        // same error sequence for every run of a mix
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int p = 0; p < P; p++) begin
      for (int w = 0; w < 16; w++) begin
        a_cv = 1;
        a_cw = '{data: w_data[p][w], approx: apx, dtype: w_float[p] ? DT_FLOAT : DT_INT, thr: thr};
        while (!a_cr) @(negedge clk);
        @(posedge clk);
        if (w == 0) t_start[p] = cyc;
        @(negedge clk);
      end
      a_cv = 0;
    end
    while (n_delivered < P) @(negedge clk);
    repeat (2 * ACK_DELAY) @(negedge clk);
    checks++;
    for (int p = 0; p < P; p++) if (got[p] == 0) begin failures++; break; end
    retx   = n_retx;
    lat100 = int'(lat_sum * 100 / longint'(P));
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int rb, lb, rd, ld;
    automatic int sum_base = 0;
    automatic int sum_dec [3] = '{0, 0, 0};
    a_cv = 0; a_cw = '0;
    #1 rst_n = 0;
    $display("mix           float  run                 retx  latency(cycles)  norm.latency");
    for (int b = 0; b < NB; b++) begin
      run(b, 1'b0, 32'd0, 75, rb, lb);
      sum_base += rb;
      $display("%-13s %3d%%  baseline            %4d  %7.2f", BNAME[b], FLOAT_PCT[b], rb, real'(lb) / 100.0);
      for (int c = 2; c >= 0; c--)
        for (int t = 0; t < 3; t++) begin
          run(b, 1'b1, THR[t], CONV_PCT[c], rd, ld);
          if (c == 2) sum_dec[t] += rd;
          $display("%-13s %3d%%  thr %2d%% conv %2d%%    %4d  %7.2f  %5.3f", BNAME[b], FLOAT_PCT[b],
                   5 * (t + 1), CONV_PCT[c], rd, real'(ld) / 100.0, real'(ld) / real'(lb));
        end
    end
    for (int t = 0; t < 3; t++) begin
      checks++;
      $display("all mixes, conversion 75 %%, threshold %0d %%: %0d retransmissions vs %0d baseline",
               5 * (t + 1), sum_dec[t], sum_base);
      if (sum_dec[t] >= sum_base) begin failures++; $display("FAIL no retransmission saving"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
