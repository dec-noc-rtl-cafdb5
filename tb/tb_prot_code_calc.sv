// tb_prot_code_calc: checks the threshold-to-protection-code table.
// Each level of the table is probed exactly at, just above and just below its
// boundary; thresholds from the evaluation (5, 10, 15 %) and the worked
// example (3 %) are checked too. Expected codes come from a real-valued
// reference: the largest n in {3,4,6,9,13,16,19} with 2^-n <= threshold.
module tb_prot_code_calc;
  import dec_noc_pkg::*;

  logic [THR_W-1:0]  thr;
  logic [PROT_W-1:0] prot;
  int checks = 0, failures = 0;

  prot_code_calc dut (.thr(thr), .prot(prot));

  function automatic logic [2:0] ref_code(real t);
    int n[7] = '{3, 4, 6, 9, 13, 16, 19};
    for (int i = 0; i < 7; i++)
      if (t >= 2.0 ** (-n[i])) return 3'(i);
    return 3'b111;
  endfunction

  task automatic probe(logic [31:0] v);
    real t;
    thr = v;
    #1;
    t = real'(v) / 4294967296.0;
    checks++;
    if (prot !== ref_code(t)) begin
      failures++;
      $display("FAIL thr=%h (%g) prot=%b exp=%b", v, t, prot, ref_code(t));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n[7] = '{3, 4, 6, 9, 13, 16, 19};
    for (int i = 0; i < 7; i++) begin
      probe(32'd1 << (32 - n[i]));
      probe((32'd1 << (32 - n[i])) + 1);
      probe((32'd1 << (32 - n[i])) - 1);
    end
    probe(32'd0);
    probe(32'hFFFF_FFFF);
    // 3 %, 5 %, 10 %, 15 %
    probe(32'd128849019);  checks++; if (prot !== 3'b010) failures++;
    probe(32'd214748365);  checks++; if (prot !== 3'b010) failures++;
    probe(32'd429496730);  checks++; if (prot !== 3'b001) failures++;
    probe(32'd644245094);  checks++; if (prot !== 3'b000) failures++;
    for (int k = 0; k < 200; k++) probe($urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
