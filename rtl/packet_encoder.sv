// packet_encoder: check-bit generation for one flit (Algorithm 1 of DEC-NoC).
//
// A head flit is protected in full. For a body or tail flit each of the four
// words keeps only the number of MSBs its protection code selects; the other
// bits are zeroed and the check bits are computed over the masked payload, so
// they depend on the protected bits alone. ECC selects CRC-16 (detection,
// retransmission on any error) or SECDED (single-bit correction); both are
// defined in dec_noc_pkg. Purely combinational; the transmit path registers
// the flit (second extra source cycle). Word w of a flit sits in payload bits
// [32w+31:32w] and uses protection code prot[3w+2:3w].
module packet_encoder
  import dec_noc_pkg::*;
#(
  parameter ecc_e ECC = ECC_CRC
) (
  input  flit_type_e                         ftype,
  input  logic [PAYLOAD_W-1:0]               payload,
  input  logic [WORDS_PER_FLIT*PROT_W-1:0]   prot,
  output logic [CHECK_W-1:0]                 check
);

  logic [PAYLOAD_W-1:0] masked;

  always_comb begin
    masked = payload & flit_mask(ftype, prot);
    check  = ecc_gen(ECC, masked);
  end

endmodule
