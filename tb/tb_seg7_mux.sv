// tb_seg7_mux: random digit values, blank and decimal-point masks for every
// select value; checks the active-low anode, segment and decimal-point
// outputs against a glyph table written as segment letters.
module tb_seg7_mux;
  logic [1:0] sel;
  logic [3:0][3:0] digit;
  logic [3:0] blank, dp, an_n;
  logic [6:0] seg_n;
  logic dp_n;
  int checks = 0, failures = 0;

  seg7_mux dut (.sel(sel), .digit(digit), .blank(blank), .dp(dp), .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n));

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] mask(string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [6:0] exp_seg;
      logic [3:0] exp_an;
      digit = {4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom)};
      blank = 4'($urandom_range(0, 15)) & 4'($urandom_range(0, 15));
      dp    = 4'($urandom);
      sel   = 2'(i % 4);
      #1;
      exp_an  = 4'b1111;
      exp_an[sel] = 1'b0;
      exp_seg = blank[sel] ? 7'h7F : ~mask(glyph[digit[sel]]);
      checks++;
      if (an_n !== exp_an || seg_n !== exp_seg || dp_n !== ~dp[sel]) begin
        failures++;
        $display("FAIL sel=%0d an_n=%b seg_n=%b dp_n=%b expected %b %b %b",
                 sel, an_n, seg_n, dp_n, exp_an, exp_seg, ~dp[sel]);
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
