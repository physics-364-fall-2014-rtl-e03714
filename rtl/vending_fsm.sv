// vending_fsm: state machine of a soda vending machine that takes nickels,
// dimes and quarters and dispenses a can once 25 cents have been inserted.
//
// States GOT0, GOT5, GOT10, GOT15 and GOT20 hold the money inserted so far.
// On each clock edge at which "step" is high the machine moves:
//   clear              : to GOT0 from any state (the reset button)
//   GOTn + coin        : to GOT(n+coin), or to ENOUGH if that is 25 or more
//   GOTn, no coin      : stays
//   ENOUGH             : to GOT0, or to VEND1 if VEND_FLASH is set
//   VEND1              : to VEND2;  VEND2 : to GOT0
// If several coin inputs are high at once the largest coin counts and the
// others are ignored; coins offered while the machine is in ENOUGH, VEND1 or
// VEND2 are ignored. No change is given for overpayment. "flash" is high in
// ENOUGH and VEND2, the states in which the display and LEDs light up, so
// that with VEND_FLASH set a dispensed can gives two flashes.
//
// The state names, the reset button, the three coins and the VEND1/VEND2
// extension follow the lab text. The 25-cent price is inferred from the
// six-state numbering (VEND1 is state 6); the coin priority, the handling
// of coins outside the GOT states and the lack of change are this design's
// choices.
module vending_fsm
  import lab26_pkg::*;
#(
  parameter bit VEND_FLASH = 1'b0   // 1 = ENOUGH -> VEND1 -> VEND2 -> GOT0
) (
  input  logic        clk,
  input  logic        rst,      // synchronous, active high
  input  logic        step,     // state update enable
  input  logic        clear,    // return to GOT0
  input  logic        nickel,   // 5-cent coin inserted
  input  logic        dime,     // 10-cent coin inserted
  input  logic        quarter,  // 25-cent coin inserted
  output vend_state_t state,
  output logic        flash     // dispense indication
);
  vend_state_t state_next;
  logic [5:0]  credit;      // cents held in a GOT state
  logic [5:0]  coin;        // cents offered this step
  logic [6:0]  total;

  always_comb begin
    credit = 6'(5 * int'(state));
    if (quarter)     coin = 6'd25;
    else if (dime)   coin = 6'd10;
    else if (nickel) coin = 6'd5;
    else             coin = 6'd0;
    total = 7'(credit) + 7'(coin);

    state_next = state;
    if (clear) begin
      state_next = GOT0;
    end else begin
      unique case (state)
        GOT0, GOT5, GOT10, GOT15, GOT20:
          if (total >= 7'(PRICE_CENTS)) state_next = ENOUGH;
          else                          state_next = vend_state_t'(3'(total / 7'd5));
        ENOUGH: state_next = VEND_FLASH ? VEND1 : GOT0;
        VEND1:  state_next = VEND2;
        VEND2:  state_next = GOT0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst)       state <= GOT0;
    else if (step) state <= state_next;
  end

  assign flash = (state == ENOUGH) || (state == VEND2);

  // Without the extension the two vend states are never reached.
  a_no_vend: assert property (@(posedge clk) disable iff (rst)
                              !VEND_FLASH |-> (state != VEND1 && state != VEND2));
endmodule
