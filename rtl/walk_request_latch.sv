// walk_request_latch: remembers that a pedestrian pressed the WALK button
// until the walk phase has come, so that a short press is not lost.
//
// Behaves as a set/reset flip-flop clocked by the board clock: "set" (the
// button) makes q high, "clr" (ticks[3], high during the walk phase) makes q
// low; clear wins when both are high, so a press during the walk phase is
// taken as served by that phase. q changes on the clock edge after set or
// clr is seen. The lab text asks for an SR latch set by the button and
// reset by ticks[3]; building it as a clocked flip-flop (no level-sensitive
// latch in the fabric) and giving clear priority are this design's choices.
module walk_request_latch (
  input  logic clk,
  input  logic rst,   // synchronous, active high
  input  logic set,   // WALK button, active high
  input  logic clr,   // walk phase in progress
  output logic q      // walk requested
);
  always_ff @(posedge clk) begin
    if (rst || clr) q <= 1'b0;
    else if (set)   q <= 1'b1;
  end
endmodule
