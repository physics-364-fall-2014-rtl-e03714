// tick_gen: clock-enable generator. Divides the 50 MHz board clock by DIV
// and produces a one-cycle "tick" pulse once every DIV clock cycles, so that
// slow logic (a once-per-second counter, a ~3 Hz user interface) can run on
// the fast clock with an enable instead of on a derived clock.
//
// A modulo-DIV counter counts up every cycle; tick is high during the cycle
// in which the counter holds DIV-1, and the counter returns to 0 on the next
// edge. The first tick after reset therefore comes in cycle DIV-1 (counting
// the first cycle after reset as cycle 0), and then every DIV cycles.
//
// The default DIV gives the 1 Hz rate of the lab's once-per-second counter.
// Using an enable rather than a divided clock is this design's choice.
module tick_gen #(
  parameter int unsigned DIV = lab26_pkg::CLK_HZ   // clock cycles per tick
) (
  input  logic clk,
  input  logic rst,    // synchronous, active high
  output logic tick    // one-cycle pulse every DIV cycles
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  localparam logic [W-1:0] LAST = W'(DIV - 1);

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || cnt == LAST) cnt <= '0;
    else                    cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == LAST);
endmodule
