// ram_addr_ctrl: the 8-bit RAM address register of the interactive RAM and
// the button logic that moves it.
//
// On every clock edge at which "en" (the ~3 Hz tick) is high the register
// loads its next value, chosen with this priority:
//   btn[0] held : address + 1      (step up, wraps 255 -> 0)
//   btn[1] held : address - 1      (step down, wraps 0 -> 255)
//   btn[2] held : sw               (jump to the switch value)
//   otherwise   : address          (hold)
// The adder and subtractor share one 8-bit add/subtract unit. Buttons are
// levels: holding one down keeps stepping once per tick. The priority and
// the operations follow the lab text; the synchronous reset to address 0 is
// this design's choice.
module ram_addr_ctrl (
  input  logic       clk,
  input  logic       rst,      // synchronous, active high
  input  logic       en,       // update enable (slow tick)
  input  logic [2:0] btn,      // [0] up, [1] down, [2] load
  input  logic [7:0] sw,       // value to load
  output logic [7:0] address
);
  logic [7:0] address_next;

  always_comb begin
    if (btn[0])      address_next = address + 8'd1;
    else if (btn[1]) address_next = address - 8'd1;
    else if (btn[2]) address_next = sw;
    else             address_next = address;
  end

  always_ff @(posedge clk) begin
    if (rst)     address <= '0;
    else if (en) address <= address_next;
  end
endmodule
