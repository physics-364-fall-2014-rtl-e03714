// tb_ram256x8: fills the RAM, then runs random reads and writes against an
// array model. Checks that reads are asynchronous (a new address shows its
// word without a clock edge), that a write appears from its clock edge on,
// and that nothing is written while writeenable is low.
module tb_ram256x8;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0] addr = '0, din = '0, dout;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  ram256x8 dut (.dataout(dout), .clock(clk), .writeenable(we), .address(addr), .datain(din));

  always #5 clk = ~clk;

  task automatic check_read(input logic [7:0] a);
    addr = a;
    #1;
    checks++;
    if (dout !== model[a]) begin
      failures++; $display("FAIL read addr %02h: got %02h expected %02h", a, dout, model[a]);
    end
  endtask

  initial begin
    @(negedge clk);
    // contents start at zero
    for (int a = 0; a < 256; a += 37) begin model[a] = '0; check_read(8'(a)); end
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      model[a] = 8'(a * 7 + 3);
      addr = 8'(a); din = model[a]; we = 1'b1;
      @(negedge clk);
    end
    we = 1'b0;
    for (int a = 0; a < 256; a++) check_read(8'(a));
    for (int i = 0; i < 2000; i++) begin
      addr = 8'($urandom); din = 8'($urandom); we = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL before edge addr %02h", addr); end
      @(posedge clk);
      if (we) model[addr] = din;
      @(negedge clk);
      checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL after edge addr %02h got %02h exp %02h", addr, dout, model[addr]); end
    end
    we = 1'b0;
    for (int a = 0; a < 256; a++) check_read(8'(a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
