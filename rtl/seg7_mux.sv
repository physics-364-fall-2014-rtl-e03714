// seg7_mux: driver for a 4-digit, time-multiplexed, common-anode 7-segment
// display whose segment lines are shared by all digits.
//
// The 2-bit "sel" input (taken by the caller from a free-running counter, so
// that each digit is lit for about a millisecond in turn) picks one digit:
// a 4-bit 4-to-1 multiplexer selects its hex value, a 1-bit 4-to-1
// multiplexer its decimal point, hex7seg turns the value into segments, and
// only that digit's anode is driven. Digit 3 is the left-hand digit. A digit
// whose blank bit is set shows nothing but its decimal point. All outputs
// are active low, as on the board. Purely combinational.
//
// The two multiplexers and the ROM are the ones the lab's design contains;
// the active-low polarity, the blank inputs and the digit order are this
// design's choices.
module seg7_mux (
  input  logic [1:0]       sel,       // digit being lit, 3 = leftmost
  input  logic [3:0][3:0]  digit,     // hex value of each digit
  input  logic [3:0]       blank,     // 1 = digit shows no segments
  input  logic [3:0]       dp,        // 1 = decimal point lit
  output logic [6:0]       seg_n,     // segments a..g, active low
  output logic             dp_n,      // decimal point, active low
  output logic [3:0]       an_n       // digit anodes, active low
);
  logic [3:0] hex;
  logic [6:0] seg;

  assign hex = digit[sel];

  hex7seg u_rom (
    .hex (hex),
    .seg (seg)
  );

  assign seg_n = blank[sel] ? 7'h7F : ~seg;
  assign dp_n  = ~dp[sel];
  assign an_n  = ~(4'b0001 << sel);
endmodule
