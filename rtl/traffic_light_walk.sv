// traffic_light_walk: traffic signal with a pedestrian WALK phase that is
// entered only when someone is waiting.
//
// As in traffic_light, an 8-bit counter count1Hz advances on every "tick"
// enable and its low bits are the phase, now four bits wide: phases 0..7
// are the car cycle and phases 8..15 the walk phase (all cars red, blue
// lamp lit). The next-count rule makes the walk phase conditional:
//
//   count1Hz_next = (count1Hz == 7 && !walk_req) || count1Hz == 15
//                   ? 0 : count1Hz + 1
//
// so from north/south yellow (7) the signal goes to WALK (8) if walk_req is
// high at that tick, and back to east/west green (0) otherwise; after eight
// walk phases it returns to 0. The counter therefore never leaves 0..15.
//
// Timing: walk_req is sampled on the clock edge at which tick is high and
// count1Hz == 7. Reset clears the count. The rule and the table follow the
// lab text; the synchronous reset is this design's choice.
module traffic_light_walk
  import lab26_pkg::*;
(
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic       tick,      // advance one phase (1 Hz enable)
  input  logic       walk_req,  // a pedestrian is waiting
  output logic [7:0] count1Hz,  // seconds counter, 0..15
  output logic [3:0] ticks,     // current phase
  output lamp_t      ew,        // east/west lamps
  output lamp_t      ns,        // north/south lamps
  output logic       walk       // blue WALK lamp
);
  logic [7:0] count1Hz_next;

  always_comb begin
    if ((count1Hz == 8'd7 && !walk_req) || count1Hz == 8'd15)
      count1Hz_next = 8'd0;
    else
      count1Hz_next = count1Hz + 8'd1;
  end

  always_ff @(posedge clk) begin
    if (rst)       count1Hz <= '0;
    else if (tick) count1Hz <= count1Hz_next;
  end

  assign ticks = count1Hz[3:0];

  traffic_lamp_decode u_decode (
    .ticks (ticks),
    .ew    (ew),
    .ns    (ns),
    .walk  (walk)
  );

  // The next-count rule keeps the counter inside the 16 phases.
  a_in_range: assert property (@(posedge clk) disable iff (rst) count1Hz < 8'd16);
endmodule
