// tb_int_to_cif: checks integer-to-CIF conversion and the CVR test.
// The expected float is derived from the simulator's own double-precision
// conversion of the integer, narrowed to single precision by hand (exact for
// all in-range values). Covers zero, +-1, +-2^24, the range limits and
// random values, including the worked-example integer 1029 (0x4480A000).
module tb_int_to_cif;
  import dec_noc_pkg::*;

  logic [31:0] din, cif;
  logic        in_cvr;
  int checks = 0, failures = 0;

  int_to_cif dut (.din(din), .in_cvr(in_cvr), .cif(cif));

  function automatic logic [31:0] ref_float(int v);
    logic [63:0] d;
    if (v == 0) return 32'd0;
    d = $realtobits(real'(v));
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  task automatic probe(int v);
    logic exp_cvr;
    din = v;
    #1;
    exp_cvr = (v >= -(1 << 24)) && (v <= (1 << 24));
    checks++;
    if (in_cvr !== exp_cvr) begin
      failures++;
      $display("FAIL cvr v=%0d got=%b", v, in_cvr);
    end
    if (exp_cvr) begin
      checks++;
      if (cif !== ref_float(v)) begin
        failures++;
        $display("FAIL v=%0d cif=%h exp=%h", v, cif, ref_float(v));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    probe(0); probe(1); probe(-1); probe(1029); probe(1000); probe(-7);
    probe(1 << 24); probe(-(1 << 24)); probe((1 << 24) + 1); probe(-(1 << 24) - 1);
    probe((1 << 24) - 1); probe(45544320); probe(32'sh8000_0000); probe(32'sh7FFF_FFFF);
    din = 1029; #1; checks++; if (cif !== 32'h4480A000) failures++;
    for (int k = 0; k < 500; k++) begin
      int v;
      v = int'($urandom) >>> ($urandom % 31);
      probe(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
