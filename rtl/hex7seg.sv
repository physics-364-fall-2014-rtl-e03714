// hex7seg: 16-entry by 7-bit lookup table from a hexadecimal digit to the
// segments of a 7-segment display (0-9, A, b, C, d, E, F).
//
// seg[0] is segment a (top), then b, c, d, e, f clockwise, and seg[6] is g
// (middle); 1 = segment lit. Purely combinational. The lab's design holds
// such a 16x7 ROM; the exact glyphs and the active-high sense here are this
// design's choice (the display driver inverts for the board's
// common-anode display).
module hex7seg (
  input  logic [3:0] hex,
  output logic [6:0] seg
);
  always_comb begin
    unique case (hex)
      4'h0: seg = 7'h3F;
      4'h1: seg = 7'h06;
      4'h2: seg = 7'h5B;
      4'h3: seg = 7'h4F;
      4'h4: seg = 7'h66;
      4'h5: seg = 7'h6D;
      4'h6: seg = 7'h7D;
      4'h7: seg = 7'h07;
      4'h8: seg = 7'h7F;
      4'h9: seg = 7'h6F;
      4'hA: seg = 7'h77;
      4'hB: seg = 7'h7C;
      4'hC: seg = 7'h39;
      4'hD: seg = 7'h5E;
      4'hE: seg = 7'h79;
      4'hF: seg = 7'h71;
    endcase
  end
endmodule
