// traffic_light: the simplest traffic signal, an eight-phase cycle driven
// straight from a counter instead of an explicit state register.
//
// An 8-bit counter count1Hz advances by one on every "tick" enable (once per
// second on the board) and wraps from 255 to 0. Its low three bits are the
// phase "ticks", decoded by traffic_lamp_decode: three seconds of east/west
// green, one of east/west yellow, three of north/south green, one of
// north/south yellow, then the cycle repeats every 8 ticks.
//
// Timing: count1Hz changes on the clock edge at which tick is high; the
// lamps follow combinationally from the new count. Reset clears the count,
// i.e. starts with east/west green. The counter width, the use of its low
// three bits and the lamp table follow the lab text; the synchronous reset
// is this design's choice.
module traffic_light
  import lab26_pkg::*;
(
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic       tick,      // advance one phase (1 Hz enable)
  output logic [7:0] count1Hz,  // free-running seconds counter
  output lamp_t      ew,        // east/west lamps
  output lamp_t      ns         // north/south lamps
);
  logic [2:0] ticks;
  logic       walk_unused;

  always_ff @(posedge clk) begin
    if (rst)       count1Hz <= '0;
    else if (tick) count1Hz <= count1Hz + 8'd1;
  end

  assign ticks = count1Hz[2:0];

  traffic_lamp_decode u_decode (
    .ticks ({1'b0, ticks}),
    .ew    (ew),
    .ns    (ns),
    .walk  (walk_unused)
  );
endmodule
