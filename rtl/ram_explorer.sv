// ram_explorer: a 256 x 8 RAM that a person can read and write by hand with
// the board's buttons, switches and display.
//
// A free-running counter divides the 50 MHz clock; the ~3 Hz "slow tick"
// (one clock cycle every 2^TICK_BITS cycles) is the clock enable of all
// user actions, and two counter bits below it scan the display digits.
// On each slow tick:
//   btn[0] held : the address steps up by one
//   btn[1] held : the address steps down by one
//   btn[2] held : the address jumps to the switch value sw
//   btn[3] held : sw is written into the RAM at the current address
// (buttons 0..2 in that priority, see ram_addr_ctrl; button 3 may be held
// with any of them, and then writes at the address before it moves). The
// RAM is read all the time: the LEDs show the word at the current address,
// the two left digits show the address and the two right digits the word,
// in hex. The left-hand decimal point is lit for the second half of every
// slow-tick period, so it blinks once per tick.
//
// Behaviour, the 2^24 division and the display contents follow the lab
// text. Using the board clock with an enable (rather than clocking the
// address register and RAM with the slow clock), the blink phase, the scan
// bits and the 24-bit counter width (the lab's synthesis report lists a
// 26-bit counter, whose top two bits this design does not need) are this
// design's choices.
module ram_explorer #(
  parameter int unsigned TICK_BITS = 24,   // slow tick every 2^TICK_BITS cycles
  parameter int unsigned SCAN_BIT  = 16    // counter bits [SCAN_BIT+1:SCAN_BIT] scan digits
) (
  input  logic       clk,
  input  logic       rst,      // synchronous, active high
  input  logic [7:0] sw,
  input  logic [3:0] btn,
  output logic [7:0] led,
  output logic [6:0] seg_n,
  output logic       dp_n,
  output logic [3:0] an_n,
  output logic [7:0] ram_address,  // for observation
  output logic       slow_tick     // for observation
);
  logic [TICK_BITS-1:0] count;
  logic [7:0]           ram_dataout;
  logic                 ram_write;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

  assign slow_tick = &count;
  assign ram_write = btn[3] & slow_tick;

  ram_addr_ctrl u_addr (
    .clk     (clk),
    .rst     (rst),
    .en      (slow_tick),
    .btn     (btn[2:0]),
    .sw      (sw),
    .address (ram_address)
  );

  ram256x8 u_ram (
    .dataout     (ram_dataout),
    .clock       (clk),
    .writeenable (ram_write),
    .address     (ram_address),
    .datain      (sw)
  );

  assign led = ram_dataout;

  seg7_mux u_disp (
    .sel   (count[SCAN_BIT+1:SCAN_BIT]),
    .digit ({ram_address[7:4], ram_address[3:0], ram_dataout[7:4], ram_dataout[3:0]}),
    .blank (4'b0000),
    .dp    ({count[TICK_BITS-1], 3'b000}),
    .seg_n (seg_n),
    .dp_n  (dp_n),
    .an_n  (an_n)
  );

  initial begin
    assert (SCAN_BIT + 2 <= TICK_BITS) else $error("SCAN_BIT too large for TICK_BITS");
  end
endmodule
