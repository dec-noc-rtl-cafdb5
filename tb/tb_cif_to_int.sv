// tb_cif_to_int: checks the receive-side CIF-to-integer converter.
// Expected values come from widening the float to double precision by hand and
// truncating it toward zero with $rtoi. Covers exact integers, floats with a
// fraction (as left by errors in unprotected mantissa bits), values below one,
// negative values, saturation, and the worked example 0x4481324A -> 1033.
module tb_cif_to_int;
  import dec_noc_pkg::*;

  logic [31:0] cif, dout;
  int checks = 0, failures = 0;

  cif_to_int dut (.cif(cif), .dout(dout));

  function automatic int ref_int(logic [31:0] f);
    real r;
    if (f[30:23] == 8'd0) return 0;
    r = $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
    if (r >= 2147483647.0) return 32'sh7FFF_FFFF;
    if (r <= -2147483648.0) return 32'sh8000_0000;
    return $rtoi(r);
  endfunction

  task automatic probe(logic [31:0] f);
    cif = f;
    #1;
    checks++;
    if (dout !== ref_int(f)) begin
      failures++;
      $display("FAIL cif=%h dout=%0d exp=%0d", f, $signed(dout), ref_int(f));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    probe(32'h4481324A);
    checks++; if (dout !== 32'd1033) failures++;
    probe(32'h00000000); probe(32'h3F800000); probe(32'hBF800000); probe(32'h3F7FFFFF);
    probe(32'h4B800000); probe(32'hCB800000); probe(32'h4EFFFFFF); probe(32'h4F000000);
    probe(32'hCF000000); probe(32'h7F000000); probe(32'h4B7FFFFF);
    for (int k = 0; k < 1000; k++)
      probe({$urandom_range(0, 1) == 1, 8'($urandom_range(120, 160)), 23'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
