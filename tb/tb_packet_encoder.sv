// tb_packet_encoder: checks check-bit generation for CRC and SECDED.
// CRC: a fixed head payload must give the CRC-16 (0x1021, init 0xFFFF) value
// computed offline, 0x296E; for body flits the check bits must equal a
// byte-wise CRC of the masked payload written here, must ignore flips in
// unprotected bits and must change on any single protected-bit flip.
// SECDED: the check bits of random masked payloads must zero the Hamming
// syndrome and give even overall parity, computed here from first principles.
module tb_packet_encoder;
  import dec_noc_pkg::*;

  flit_type_e   ftype;
  logic [127:0] payload;
  logic [11:0]  prot;
  logic [15:0]  chk_crc, chk_sec;
  int checks = 0, failures = 0;

  packet_encoder #(.ECC(ECC_CRC))    dut_crc (.ftype(ftype), .payload(payload), .prot(prot), .check(chk_crc));
  packet_encoder #(.ECC(ECC_SECDED)) dut_sec (.ftype(ftype), .payload(payload), .prot(prot), .check(chk_sec));

  function automatic logic [15:0] crc_bytes(logic [127:0] d);
    logic [15:0] c = 16'hFFFF;
    for (int b = 15; b >= 0; b--) begin
      c = c ^ {d[b*8 +: 8], 8'h00};
      for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  function automatic logic [127:0] mask_of(logic [11:0] p);
    int len[8] = '{12, 13, 15, 18, 22, 25, 28, 32};
    logic [127:0] m = '0;
    for (int w = 0; w < 4; w++)
      for (int b = 0; b < 32; b++)
        if (b >= 32 - len[p[w*3 +: 3]]) m[w*32 + b] = 1'b1;
    return m;
  endfunction

  // Hamming positions: data bits fill the non-power-of-two positions in order
  function automatic bit secded_ok(logic [127:0] d, logic [8:0] c);
    int pos = 0, k = 0;
    logic [7:0] syn = '0;
    while (k < 128) begin
      pos++;
      if ((pos & (pos - 1)) != 0) begin
        if (d[k]) syn ^= 8'(pos);
        k++;
      end
    end
    for (int j = 0; j < 8; j++) if (c[j]) syn ^= 8'(1 << j);
    return (syn == 0) && ((^d ^ ^c) == 1'b0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] base;
    logic [127:0] m;
    int bitn;
    ftype   = FLIT_HEAD;
    payload = 128'h0123456789ABCDEF_FEDCBA9876543210;
    prot    = '0;
    #1;
    checks++; if (chk_crc !== 16'h296E) begin failures++; $display("FAIL head crc %h", chk_crc); end
    checks++; if (!secded_ok(payload, chk_sec[8:0])) failures++;
    checks++; if (chk_sec[15:9] !== '0) failures++;
    // a head flit is fully protected: flip the lowest bit
    payload[0] = ~payload[0];
    #1; checks++; if (chk_crc === 16'h296E) failures++;
    for (int k = 0; k < 300; k++) begin
      ftype   = ($urandom % 2) ? FLIT_BODY : FLIT_TAIL;
      payload = {$urandom, $urandom, $urandom, $urandom};
      prot    = 12'($urandom);
      m       = mask_of(prot);
      #1;
      base = chk_crc;
      checks++;
      if (chk_crc !== crc_bytes(payload & m)) begin
        failures++;
        $display("FAIL body crc %h exp %h", chk_crc, crc_bytes(payload & m));
      end
      checks++;
      if (!secded_ok(payload & m, chk_sec[8:0])) begin
        failures++;
        $display("FAIL secded syndrome");
      end
      bitn = $urandom % 128;
      payload[bitn] = ~payload[bitn];
      #1;
      checks++;
      if ((chk_crc == base) == m[bitn]) begin
        failures++;
        $display("FAIL flip bit %0d protected=%b crc %h -> %h", bitn, m[bitn], base, chk_crc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
