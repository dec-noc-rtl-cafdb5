// int_to_cif: signed 32-bit integer to CIF (Converted Integer to Float).
//
// An integer whose magnitude is at most 2^24 lies inside the conversion value
// range (CVR) and has an exact IEEE 754 single-precision equivalent; in_cvr
// flags this and cif holds the float bits. Outside the CVR cif is don't-care
// and the caller sends the integer unchanged and fully protected. The
// conversion finds the leading one of the magnitude, uses its position as the
// unbiased exponent and left-aligns the remaining bits as mantissa; no
// rounding is ever needed inside the CVR. Zero converts to +0.0.
// Purely combinational. The range and the exactness requirement come from the
// method; the inclusive bound of 2^24 is this design's reading of "between
// -2^24 and 2^24".
module int_to_cif
  import dec_noc_pkg::*;
(
  input  logic [WORD_W-1:0] din,
  output logic              in_cvr,
  output logic [WORD_W-1:0] cif
);

  logic        sign;
  logic [31:0] mag;
  logic [4:0]  lead;
  logic [22:0] aligned;

  always_comb begin
    sign = din[31];
    mag  = sign ? (~din + 32'd1) : din;
    in_cvr = (mag <= 32'h0100_0000) && !(sign && mag[31]);
    lead = '0;
    for (int i = 0; i < 25; i++)
      if (mag[i]) lead = 5'(i);
    aligned = 23'(mag << (5'd23 - lead));  // leading one lands on bit 23, dropped
    if (mag == 32'd0)
      cif = 32'd0;
    else if (lead == 5'd24)
      cif = {sign, 8'(127 + 24), 23'd0};
    else
      cif = {sign, 8'(8'd127 + 8'(lead)), aligned[22:0]};
  end

endmodule
