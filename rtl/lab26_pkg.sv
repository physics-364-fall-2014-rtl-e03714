// lab26_pkg: types and constants shared by the four small FPGA designs of
// this collection (two traffic signals, an interactive RAM and a vending
// machine), all written for a 50 MHz Spartan-3E board with four
// 7-segment digits, eight LEDs, eight slide switches and four push buttons.
//
// The board clock frequency and the vending-machine state numbering
// (VEND1 = 6, VEND2 = 7) follow the lab text; the numbering of the first
// six states and the lamp struct are this design's own choices.
package lab26_pkg;

  // Board oscillator frequency in Hz.
  localparam int unsigned CLK_HZ = 50_000_000;

  // One traffic signal head: one bit per lamp, 1 = lamp lit.
  typedef struct packed {
    logic red;
    logic yellow;
    logic green;
  } lamp_t;

  // Vending machine states. GOTn means n cents have been inserted so far;
  // ENOUGH means at least 25 cents were inserted and a can is dispensed.
  typedef enum logic [2:0] {
    GOT0   = 3'd0,
    GOT5   = 3'd1,
    GOT10  = 3'd2,
    GOT15  = 3'd3,
    GOT20  = 3'd4,
    ENOUGH = 3'd5,
    VEND1  = 3'd6,
    VEND2  = 3'd7
  } vend_state_t;

  // Price of one can, in cents.
  localparam int unsigned PRICE_CENTS = 25;

endpackage
