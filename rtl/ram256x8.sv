// ram256x8: 256-word by 8-bit random-access memory with separate data-in
// and data-out buses.
//
// Reading is asynchronous: dataout always shows the word stored at the
// current address. Writing is synchronous: if writeenable is high at a
// rising clock edge, datain is stored at address, and dataout shows the new
// word from that edge on. The port list and behaviour follow the lab text;
// an FPGA tool maps this onto a block or distributed RAM. Contents start at
// zero, as FPGA memories do after configuration (this design's choice).
module ram256x8 (
  output logic [7:0] dataout,      // contents at address
  input  logic       clock,
  input  logic       writeenable,  // store datain at the next rising edge
  input  logic [7:0] address,
  input  logic [7:0] datain
);
  logic [7:0] memory [256];

  initial begin
    for (int i = 0; i < 256; i++) memory[i] = '0;
  end

  assign dataout = memory[address];

  always_ff @(posedge clock) begin
    if (writeenable) memory[address] <= datain;
  end
endmodule
