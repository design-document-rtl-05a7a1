// tb_hex7seg: checks all 16 codes of the seven-segment decoder against the
// segment letters (a..g) that must be lit for each glyph; a lit segment must
// read 0 (active low).
module tb_hex7seg;
  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  hex7seg dut (.*);

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                        "abc", "abcdefg", "abcdfg", "abcefg", "cdefg", "adef",
                        "bcdeg", "adefg", "aefg"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] exp;
      exp = 7'h7f;
      foreach (glyph[d][k]) exp[glyph[d][k] - "a"] = 1'b0;
      digit = 4'(d);
      #1;
      checks++;
      if (seg !== exp) begin
        failures++;
        $display("FAIL digit %0d: seg=%b expected %b", d, seg, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
