// prot_code_calc: error threshold to protection code (Table I of DEC-NoC).
//
// The threshold arrives as an unsigned 0.32 fixed-point fraction (value/2^32).
// Table I lists the thresholds 2^-3, 2^-4, 2^-6, 2^-9, 2^-13, 2^-16, 2^-19 and
// 0, with protection codes 000..111 (12, 13, 15, 18, 22, 25, 28, 32 protected
// MSBs). A threshold that falls between two levels takes the lower level, so
// the guaranteed error never exceeds what the application allows: the code is
// that of the largest level not above the threshold. Purely combinational.
// The fixed-point threshold format is this design's choice; the table and the
// round-down rule are the method's.
module prot_code_calc
  import dec_noc_pkg::*;
(
  input  logic [THR_W-1:0]  thr,
  output logic [PROT_W-1:0] prot
);

  always_comb begin
    if      (thr >= (THR_W'(1) << (THR_W - 3)))  prot = 3'b000;  // 0.125
    else if (thr >= (THR_W'(1) << (THR_W - 4)))  prot = 3'b001;  // 0.0625
    else if (thr >= (THR_W'(1) << (THR_W - 6)))  prot = 3'b010;  // 0.015625
    else if (thr >= (THR_W'(1) << (THR_W - 9)))  prot = 3'b011;  // 0.001953125
    else if (thr >= (THR_W'(1) << (THR_W - 13))) prot = 3'b100;  // 0.00012207
    else if (thr >= (THR_W'(1) << (THR_W - 16))) prot = 3'b101;  // 1.52588e-5
    else if (thr >= (THR_W'(1) << (THR_W - 19))) prot = 3'b110;  // 1.90735e-6
    else                                          prot = 3'b111;  // exact
  end

endmodule
