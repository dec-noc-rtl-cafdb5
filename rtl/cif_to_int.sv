// cif_to_int: data type converter of the receiving network interface.
//
// Turns a received CIF (single-precision float that started as an integer)
// back into a signed 32-bit integer, truncating toward zero. Unprotected
// mantissa bits may have been flipped on the way, so the float can carry a
// fraction; truncation keeps the integer inside the same protected prefix and
// therefore inside the error threshold. Values below 1.0 give 0; exponents
// beyond the int range saturate. Purely combinational. Truncation matches the
// worked example of the method (1033.57 is delivered as 1033); saturation is
// this design's choice for a case that cannot arise from a CIF whose exponent
// is protected.
module cif_to_int
  import dec_noc_pkg::*;
(
  input  logic [WORD_W-1:0] cif,
  output logic [WORD_W-1:0] dout
);

  logic        sign;
  logic [7:0]  expo;
  logic [23:0] sig;
  logic [31:0] mag;

  always_comb begin
    sign = cif[31];
    expo = cif[30:23];
    sig  = {1'b1, cif[22:0]};
    if (expo < 8'd127)
      mag = 32'd0;
    else if (expo > 8'd157)                 // |value| >= 2^31
      mag = sign ? 32'h8000_0000 : 32'h7FFF_FFFF;
    else if (expo <= 8'd150)                // exponent 0..23: shift right
      mag = 32'(sig) >> (8'd150 - expo);
    else                                    // exponent 24..30: shift left
      mag = 32'(sig) << (expo - 8'd150);
    dout = sign ? (~mag + 32'd1) : mag;
  end

endmodule
