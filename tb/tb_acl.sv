// tb_acl: checks the approximate coding logic.
// Directed cases are the four words of the worked example (two floats, an
// integer inside and one outside the conversion range) plus exact words; the
// random part draws floats and integers with random thresholds and compares
// against a reference written from the decision flow (threshold levels,
// CVR bound, double-precision conversion narrowed by hand).
module tb_acl;
  import dec_noc_pkg::*;

  core_word_t  din;
  logic [31:0] dout;
  acode_t      acode;
  int checks = 0, failures = 0;

  acl dut (.din(din), .dout(dout), .acode(acode));

  function automatic logic [2:0] ref_prot(logic [31:0] thr);
    real t;
    int n[7] = '{3, 4, 6, 9, 13, 16, 19};
    t = real'(thr) / 4294967296.0;
    for (int i = 0; i < 7; i++) if (t >= 2.0 ** (-n[i])) return 3'(i);
    return 3'b111;
  endfunction

  function automatic logic [31:0] ref_float(int v);
    logic [63:0] d;
    if (v == 0) return 32'd0;
    d = $realtobits(real'(v));
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  task automatic probe(logic [31:0] data, logic approx, dtype_e dt, logic [31:0] thr);
    logic [31:0] ed;
    logic [3:0]  ec;
    int v;
    din = '{data: data, approx: approx, dtype: dt, thr: thr};
    #1;
    v  = int'(data);
    ed = data;
    ec = 4'b0111;
    if (approx && dt == DT_FLOAT) ec = {1'b0, ref_prot(thr)};
    else if (approx && v >= -(1 << 24) && v <= (1 << 24)) begin
      ed = ref_float(v);
      ec = {1'b1, ref_prot(thr)};
    end
    checks++;
    if (dout !== ed || acode !== ec) begin
      failures++;
      $display("FAIL data=%h ap=%b dt=%b thr=%h -> %h/%b exp %h/%b",
               data, approx, dt, thr, dout, acode, ed, ec);
    end
  endtask

  localparam logic [31:0] T3 = 32'd128849019, T10 = 32'd429496730;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: approximation codes 0010, 0001, 1010, 0111
    probe(32'h420F8F5C, 1'b1, DT_FLOAT, T3);
    checks++; if (acode !== 4'b0010) failures++;
    probe(32'h42B50A3D, 1'b1, DT_FLOAT, T10);
    checks++; if (acode !== 4'b0001) failures++;
    probe(32'd1029, 1'b1, DT_INT, T3);
    checks++; if (acode !== 4'b1010 || dout !== 32'h4480A000) failures++;
    probe(32'd45544320, 1'b1, DT_INT, T10);
    checks++; if (acode !== 4'b0111 || dout !== 32'd45544320) failures++;
    probe(32'h420F8F5C, 1'b0, DT_FLOAT, T10);
    probe(32'd17, 1'b0, DT_INT, T10);
    for (int k = 0; k < 1000; k++)
      probe(int'($urandom) >>> ($urandom % 32), 1'($urandom), dtype_e'($urandom),
            $urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
