// lab26_top: the four designs of the lab side by side on one 50 MHz clock.
// On the real board only one of them is loaded at a time and they share the
// same pins; here each has its own ports, prefixed p1_ .. p4_, named after
// the board signals they would drive (jc/jd connector pins, led, seg, dp,
// an, sw, btn).
//
//  p1  fixed-cycle traffic signal (traffic_light): north/south lamps on
//      jc[1..3], east/west lamps on jd[1..3], as red, yellow, green.
//  p2  traffic signal with WALK phase (traffic_light_walk): same lamps,
//      blue WALK lamp on jc[4]. The walk request comes from a latch set by
//      btn[3] and cleared during the walk phase (WALK_FROM_BUTTON = 1), or
//      directly from slide switch sw[7] (WALK_FROM_BUTTON = 0). While a walk
//      is requested, the right-hand decimal point is lit.
//  p3  interactive 256 x 8 RAM (ram_explorer).
//  p4  vending machine (vending_machine).
//
// Both traffic signals step once per SEC_DIV clock cycles (one second at
// 50 MHz); the RAM and the vending machine act once every 2^TICK_BITS cycles
// (~3 Hz). The pin assignments for the lamps follow the lab's suggestion;
// the order red, yellow, green within a connector and the reset input are
// this design's choices. All display outputs are active low; LED and lamp
// outputs are active high.
module lab26_top
  import lab26_pkg::*;
#(
  parameter int unsigned SEC_DIV          = CLK_HZ, // cycles per traffic step
  parameter int unsigned TICK_BITS        = 24,     // RAM / vending tick = 2^TICK_BITS cycles
  parameter int unsigned SCAN_BIT         = 16,     // display scan counter bit
  parameter bit          WALK_FROM_BUTTON = 1'b1,   // p2 walk request: 1 latch on btn[3], 0 sw[7]
  parameter bit          VEND_FLASH       = 1'b0    // p4 VEND1/VEND2 two-flash extension
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high

  // Part 1: fixed-cycle traffic signal
  output logic [3:1] p1_jc,      // north/south: [1] red, [2] yellow, [3] green
  output logic [3:1] p1_jd,      // east/west:   [1] red, [2] yellow, [3] green

  // Part 2: traffic signal with WALK phase
  input  logic [7:7] p2_sw,      // walk request switch
  input  logic [3:3] p2_btn,     // WALK button
  output logic [4:1] p2_jc,      // north/south lamps, [4] blue WALK lamp
  output logic [3:1] p2_jd,      // east/west lamps
  output logic       p2_dp_n,    // walk-requested indicator, active low
  output logic [3:0] p2_an_n,    // digit anodes (right digit on), active low

  // Part 3: interactive RAM
  input  logic [7:0] p3_sw,
  input  logic [3:0] p3_btn,
  output logic [7:0] p3_led,
  output logic [6:0] p3_seg_n,
  output logic       p3_dp_n,
  output logic [3:0] p3_an_n,

  // Part 4: vending machine
  input  logic [3:0] p4_btn,
  output logic [7:0] p4_led,
  output logic [6:0] p4_seg_n,
  output logic       p4_dp_n,
  output logic [3:0] p4_an_n
);
  // ---------------- Part 1 ----------------
  logic  p1_tick;
  logic [7:0] p1_count;
  lamp_t p1_ew, p1_ns;

  tick_gen #(.DIV(SEC_DIV)) u_p1_tick (.clk(clk), .rst(rst), .tick(p1_tick));

  traffic_light u_p1 (
    .clk      (clk),
    .rst      (rst),
    .tick     (p1_tick),
    .count1Hz (p1_count),
    .ew       (p1_ew),
    .ns       (p1_ns)
  );

  assign p1_jc = {p1_ns.green, p1_ns.yellow, p1_ns.red};
  assign p1_jd = {p1_ew.green, p1_ew.yellow, p1_ew.red};

  // ---------------- Part 2 ----------------
  logic  p2_tick, p2_latched, p2_walk_req, p2_walk;
  logic [7:0] p2_count;
  logic [3:0] p2_ticks;
  lamp_t p2_ew, p2_ns;

  tick_gen #(.DIV(SEC_DIV)) u_p2_tick (.clk(clk), .rst(rst), .tick(p2_tick));

  walk_request_latch u_p2_latch (
    .clk (clk),
    .rst (rst),
    .set (p2_btn[3]),
    .clr (p2_ticks[3]),
    .q   (p2_latched)
  );

  assign p2_walk_req = WALK_FROM_BUTTON ? p2_latched : p2_sw[7];

  traffic_light_walk u_p2 (
    .clk      (clk),
    .rst      (rst),
    .tick     (p2_tick),
    .walk_req (p2_walk_req),
    .count1Hz (p2_count),
    .ticks    (p2_ticks),
    .ew       (p2_ew),
    .ns       (p2_ns),
    .walk     (p2_walk)
  );

  assign p2_jc   = {p2_walk, p2_ns.green, p2_ns.yellow, p2_ns.red};
  assign p2_jd   = {p2_ew.green, p2_ew.yellow, p2_ew.red};
  assign p2_dp_n = ~p2_walk_req;
  assign p2_an_n = 4'b1110;

  // ---------------- Part 3 ----------------
  logic [7:0] p3_address;
  logic       p3_tick;

  ram_explorer #(.TICK_BITS(TICK_BITS), .SCAN_BIT(SCAN_BIT)) u_p3 (
    .clk         (clk),
    .rst         (rst),
    .sw          (p3_sw),
    .btn         (p3_btn),
    .led         (p3_led),
    .seg_n       (p3_seg_n),
    .dp_n        (p3_dp_n),
    .an_n        (p3_an_n),
    .ram_address (p3_address),
    .slow_tick   (p3_tick)
  );

  // ---------------- Part 4 ----------------
  vend_state_t p4_state;

  vending_machine #(.TICK_BITS(TICK_BITS), .SCAN_BIT(SCAN_BIT), .VEND_FLASH(VEND_FLASH)) u_p4 (
    .clk   (clk),
    .rst   (rst),
    .btn   (p4_btn),
    .led   (p4_led),
    .seg_n (p4_seg_n),
    .dp_n  (p4_dp_n),
    .an_n  (p4_an_n),
    .state (p4_state)
  );
endmodule
