// traffic_lamp_decode: turns the 4-bit phase counter "ticks" of the traffic
// signal into lamp outputs. Purely combinational.
//
//   ticks   east/west  north/south  walk
//   0..2    green      red          off
//   3       yellow     red          off
//   4..6    red        green        off
//   7       red        yellow       off
//   8..15   red        red          on
//
// The table is the one of the lab text. The fixed-cycle signal uses only
// rows 0..7 (its ticks[3] is tied to 0); the signal with a pedestrian
// phase uses all sixteen.
module traffic_lamp_decode
  import lab26_pkg::*;
(
  input  logic [3:0] ticks,
  output lamp_t      ew,     // east/west head
  output lamp_t      ns,     // north/south head
  output logic       walk    // blue pedestrian lamp
);
  always_comb begin
    ew   = '{red: 1'b1, yellow: 1'b0, green: 1'b0};
    ns   = '{red: 1'b1, yellow: 1'b0, green: 1'b0};
    walk = 1'b0;
    if (ticks < 4'd3) begin
      ew = '{red: 1'b0, yellow: 1'b0, green: 1'b1};
    end else if (ticks == 4'd3) begin
      ew = '{red: 1'b0, yellow: 1'b1, green: 1'b0};
    end else if (ticks < 4'd7) begin
      ns = '{red: 1'b0, yellow: 1'b0, green: 1'b1};
    end else if (ticks == 4'd7) begin
      ns = '{red: 1'b0, yellow: 1'b1, green: 1'b0};
    end else begin
      walk = 1'b1;
    end
  end
endmodule
