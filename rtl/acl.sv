// acl: approximate coding logic of the DEC-NoC transmit path.
//
// For one data word from the core it decides how much of the word the error
// control code must cover and whether the word travels as a CIF:
//   - not approximable            : conversion 0, protection 111 (all bits)
//   - approximable float          : conversion 0, protection from threshold
//   - approximable int in the CVR : converted to CIF, conversion 1,
//                                   protection from threshold
//   - approximable int beyond CVR : conversion 0, protection 111
// The output word is the CIF for converted integers and the input otherwise.
// Purely combinational; the transmit path registers the result (first of the
// two extra source cycles). The decision flow is the method's flow chart.
module acl
  import dec_noc_pkg::*;
(
  input  core_word_t        din,
  output logic [WORD_W-1:0] dout,
  output acode_t            acode
);

  logic [PROT_W-1:0] prot_thr;
  logic              in_cvr;
  logic [WORD_W-1:0] cif;

  prot_code_calc u_prot (.thr(din.thr), .prot(prot_thr));
  int_to_cif     u_cvt  (.din(din.data), .in_cvr(in_cvr), .cif(cif));

  always_comb begin
    dout  = din.data;
    acode = '{conv: 1'b0, prot: PROT_FULL};
    if (din.approx) begin
      if (din.dtype == DT_FLOAT) begin
        acode.prot = prot_thr;
      end else if (in_cvr) begin
        dout  = cif;
        acode = '{conv: 1'b1, prot: prot_thr};
      end
    end
  end

endmodule
