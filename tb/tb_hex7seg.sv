// tb_hex7seg: checks the display decoder for every 5-bit value.  The expected
// segments are built from which segments each glyph lights (a..g), listed as
// strings, independent of the module's table.
module tb_hex7seg;
  logic [4:0] value;
  logic [6:0] seg_lo, seg_hi;
  int checks = 0, failures = 0;
  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  hex7seg #(.TIME_W(5)) dut (.*);

  function automatic logic [6:0] segs(string g);
    segs = '0;
    for (int i = 0; i < g.len(); i++) segs[g[i] - "a"] = 1'b1;
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      value = 5'(v);
      #1;
      checks++;
      if (seg_lo != segs(glyph[v % 16]) || seg_hi != segs(glyph[v / 16])) begin
        failures++;
        $display("FAIL value %0d lo=%b hi=%b", v, seg_lo, seg_hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
