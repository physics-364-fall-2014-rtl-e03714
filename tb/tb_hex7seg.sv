// tb_hex7seg: checks all sixteen glyphs against a table that lists, for each
// digit, the letters of the lit segments (a = top, clockwise to f, g = middle).
module tb_hex7seg;
  logic [3:0] hex;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  hex7seg dut (.hex(hex), .seg(seg));

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] mask(string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      hex = 4'(d);
      #1;
      checks++;
      if (seg !== mask(glyph[d])) begin
        failures++; $display("FAIL digit %h: seg=%b expected %b", d, seg, mask(glyph[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
