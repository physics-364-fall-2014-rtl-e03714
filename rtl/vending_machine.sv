// vending_machine: board-level vending machine built around vending_fsm.
//
// Buttons: btn[0] (right-hand) inserts a nickel, btn[1] a dime, btn[2] a
// quarter, and btn[3] (left-hand) returns the machine to GOT0. The state
// machine moves on a slow tick (one clock cycle every 2^TICK_BITS cycles,
// ~3 Hz at 50 MHz) so that each state can be seen. Every button is passed
// through a two-flip-flop synchronizer; a press (rising edge) is remembered
// until the next slow tick, where it counts once, so a button held down
// inserts a single coin and a short press is not lost.
//
// Display: in ENOUGH and VEND2 all four digits show 8 and all eight LEDs
// light; in VEND1 display and LEDs are dark; in the GOT states the two
// right-hand digits show the money inserted in decimal cents (00, 05, 10,
// 15, 20) and the LEDs are dark. Outputs are active low like the board's
// display.
//
// The button assignment, the 8888/LED flash in ENOUGH and VEND2 and the
// dark VEND1 follow the lab text; the tick rate, the press capture and the
// money display are this design's choices.
module vending_machine
  import lab26_pkg::*;
#(
  parameter int unsigned TICK_BITS  = 24,    // slow tick every 2^TICK_BITS cycles
  parameter int unsigned SCAN_BIT   = 16,    // counter bits that scan the digits
  parameter bit          VEND_FLASH = 1'b0   // two-flash VEND1/VEND2 sequence
) (
  input  logic        clk,
  input  logic        rst,      // synchronous, active high
  input  logic [3:0]  btn,      // [0] nickel, [1] dime, [2] quarter, [3] clear
  output logic [7:0]  led,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  output logic [3:0]  an_n,
  output vend_state_t state     // for observation
);
  logic [TICK_BITS-1:0] count;
  logic                 step;
  logic [3:0]           sync1, sync2, prev, pending, press;
  logic                 flash;
  logic [3:0]           tens, ones;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
  assign step = &count;

  // Synchronize, detect presses, hold them until the next step.
  assign press = sync2 & ~prev;
  always_ff @(posedge clk) begin
    if (rst) begin
      sync1   <= '0;
      sync2   <= '0;
      prev    <= '0;
      pending <= '0;
    end else begin
      sync1   <= btn;
      sync2   <= sync1;
      prev    <= sync2;
      pending <= step ? '0 : (pending | press);
    end
  end

  vending_fsm #(.VEND_FLASH(VEND_FLASH)) u_fsm (
    .clk     (clk),
    .rst     (rst),
    .step    (step),
    .clear   (pending[3] | press[3]),
    .nickel  (pending[0] | press[0]),
    .dime    (pending[1] | press[1]),
    .quarter (pending[2] | press[2]),
    .state   (state),
    .flash   (flash)
  );

  always_comb begin
    unique case (state)
      GOT5:    begin tens = 4'd0; ones = 4'd5; end
      GOT10:   begin tens = 4'd1; ones = 4'd0; end
      GOT15:   begin tens = 4'd1; ones = 4'd5; end
      GOT20:   begin tens = 4'd2; ones = 4'd0; end
      default: begin tens = 4'd0; ones = 4'd0; end
    endcase
  end

  assign led = {8{flash}};

  seg7_mux u_disp (
    .sel   (count[SCAN_BIT+1:SCAN_BIT]),
    .digit (flash ? {4{4'h8}} : {4'h0, 4'h0, tens, ones}),
    .blank (flash ? 4'b0000 : (state == VEND1) ? 4'b1111 : 4'b1100),
    .dp    (4'b0000),
    .seg_n (seg_n),
    .dp_n  (dp_n),
    .an_n  (an_n)
  );

  initial begin
    assert (SCAN_BIT + 2 <= TICK_BITS) else $error("SCAN_BIT too large for TICK_BITS");
  end
endmodule
