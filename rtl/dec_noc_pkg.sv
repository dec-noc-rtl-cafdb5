// dec_noc_pkg: constants, types and error-control functions shared by the
// DEC-NoC network interface.
//
// Packet format. A packet carries 16 data words of 32 bits. It travels as
// five flits: one head flit that holds the 4-bit approximation code of every
// word (plus routing fields), then three body flits and one tail flit of four
// words each. The 32-bit word, the 16-word packet, four words per flit and the
// 4-bit approximation code (1 conversion bit + 3 protection bits) follow the
// DEC-NoC packet description; the routing fields, the sequence number, the
// check-bit field width and the CRC polynomial are this design's own choices.
//
// Protection code (Table I of the method). Code p selects how many MSBs of a
// word are covered by the error control code:
//   000:12  001:13  010:15  011:18  100:22  101:25  110:28  111:32
// A floating point word keeps sign and exponent (9 bits) plus n mantissa bits,
// so its relative error stays below 2^-n.
//
// Error control. Two schemes are provided, selected by a module parameter:
//   ECC_CRC    : CRC-16 (polynomial x^16+x^12+x^5+1, initial value 0xFFFF,
//                MSB first) over the 128-bit masked payload; detection only.
//   ECC_SECDED : extended Hamming code (8 Hamming bits + overall parity) over
//                the 128-bit masked payload; corrects one bit, detects two.
// Unprotected bits are zeroed before the code is computed at both ends, so
// errors in them are never seen and never cause a retransmission.
//
// Each module uses only some of these constants, so a lint run on a single
// module lists the rest as unused parameters.
package dec_noc_pkg;

  localparam int WORD_W         = 32;
  localparam int WORDS_PER_FLIT = 4;
  localparam int WORDS_PER_PKT  = 16;
  localparam int BODY_FLITS     = WORDS_PER_PKT / WORDS_PER_FLIT;   // 4
  localparam int FLITS_PER_PKT  = BODY_FLITS + 1;                   // 5
  localparam int PAYLOAD_W      = WORD_W * WORDS_PER_FLIT;          // 128
  localparam int PROT_W         = 3;
  localparam int ACODE_W        = PROT_W + 1;
  localparam int CHECK_W        = 16;
  localparam int SECDED_W       = 9;
  localparam int SEQ_W          = 8;
  localparam int NODE_W         = 6;    // 64 nodes of an 8x8 mesh
  localparam int THR_W          = 32;   // error threshold, unsigned 0.32 fraction

  // Head flit payload layout
  localparam int HEAD_CODES_LSB = 0;                                // 16 x 4 bits
  localparam int HEAD_DEST_LSB  = WORDS_PER_PKT * ACODE_W;          // 64
  localparam int HEAD_SRC_LSB   = HEAD_DEST_LSB + NODE_W;           // 70

  localparam logic [PROT_W-1:0] PROT_FULL = 3'b111;

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'd0,
    FLIT_BODY = 2'd1,
    FLIT_TAIL = 2'd2
  } flit_type_e;

  typedef enum logic {
    ECC_CRC    = 1'b0,
    ECC_SECDED = 1'b1
  } ecc_e;

  typedef enum logic {
    DT_FLOAT = 1'b0,
    DT_INT   = 1'b1
  } dtype_e;

  // Approximation code: conversion code in the MSB, protection code below.
  typedef struct packed {
    logic              conv;
    logic [PROT_W-1:0] prot;
  } acode_t;

  // One flit on the link. ftype and seq travel as link control fields; the
  // payload and check bits are what the error control code covers.
  typedef struct packed {
    flit_type_e           ftype;
    logic [SEQ_W-1:0]     seq;
    logic [PAYLOAD_W-1:0] payload;
    logic [CHECK_W-1:0]   check;
  } flit_t;

  // One word handed over by the core.
  typedef struct packed {
    logic [WORD_W-1:0] data;
    logic              approx;   // 1: the application marked the word approximable
    dtype_e            dtype;
    logic [THR_W-1:0]  thr;      // error threshold, value / 2^32
  } core_word_t;

  typedef struct packed {
    logic [PAYLOAD_W-1:0] data;
    logic                 corrected;
    logic                 uncorrectable;
  } secded_res_t;

  // Number of protected MSBs for a protection code (Table I).
  function automatic int unsigned prot_len(input logic [PROT_W-1:0] p);
    case (p)
      3'd0:    return 12;
      3'd1:    return 13;
      3'd2:    return 15;
      3'd3:    return 18;
      3'd4:    return 22;
      3'd5:    return 25;
      3'd6:    return 28;
      default: return 32;
    endcase
  endfunction

  // Mask with the protected MSBs of a word set.
  function automatic logic [WORD_W-1:0] prot_mask(input logic [PROT_W-1:0] p);
    return ~({WORD_W{1'b1}} >> prot_len(p));
  endfunction

  function automatic logic [CHECK_W-1:0] crc16(input logic [PAYLOAD_W-1:0] d);
    logic [15:0] c;
    logic        fb;
    c = 16'hFFFF;
    for (int i = PAYLOAD_W - 1; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  // Position (1-based) of data bit k in the Hamming codeword: the k-th
  // position that is not a power of two.
  function automatic int unsigned hpos(input int unsigned k);
    int unsigned p;
    p = k + 1;
    for (int j = 0; j < 8; j++)
      if ((32'd1 << j) <= p) p++;
    return p;
  endfunction

  // 8 Hamming check bits in [7:0], overall parity in [8].
  function automatic logic [SECDED_W-1:0] secded_check(input logic [PAYLOAD_W-1:0] d);
    logic [7:0] h;
    int unsigned pos;
    h = '0;
    for (int k = 0; k < PAYLOAD_W; k++) begin
      pos = hpos(k);
      for (int j = 0; j < 8; j++)
        if (pos[j]) h[j] = h[j] ^ d[k];
    end
    return {(^d) ^ (^h), h};
  endfunction

  function automatic secded_res_t secded_decode(input logic [PAYLOAD_W-1:0] d,
                                                input logic [SECDED_W-1:0] c);
    secded_res_t     r;
    logic [7:0]      syn;
    logic            par;
    syn = 8'(secded_check(d)) ^ c[7:0];
    par = (^d) ^ (^c);
    r.data          = d;
    r.corrected     = 1'b0;
    r.uncorrectable = 1'b0;
    if (par) begin
      // odd number of flips: assume one and correct it
      r.corrected = 1'b1;
      if ((syn & (syn - 8'd1)) != 0) begin
        if (syn > 8'd136) r.uncorrectable = 1'b1;
        for (int k = 0; k < PAYLOAD_W; k++)
          if (hpos(k) == int'(syn)) r.data[k] = ~d[k];
      end
    end else if (syn != 0) begin
      r.uncorrectable = 1'b1;
    end
    return r;
  endfunction

  // Check bits of a payload after masking, for either scheme.
  function automatic logic [CHECK_W-1:0] ecc_gen(input ecc_e s, input logic [PAYLOAD_W-1:0] d);
    if (s == ECC_CRC) return crc16(d);
    return CHECK_W'(secded_check(d));
  endfunction

  // Protection mask of a whole flit from its four protection codes.
  function automatic logic [PAYLOAD_W-1:0] flit_mask(input flit_type_e t,
                                                     input logic [WORDS_PER_FLIT*PROT_W-1:0] p);
    logic [PAYLOAD_W-1:0] m;
    if (t == FLIT_HEAD) return '1;
    for (int w = 0; w < WORDS_PER_FLIT; w++)
      m[w*WORD_W +: WORD_W] = prot_mask(p[w*PROT_W +: PROT_W]);
    return m;
  endfunction

endpackage
