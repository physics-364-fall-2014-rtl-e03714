// tb_tick_gen: checks that tick_gen pulses exactly once every DIV cycles,
// one cycle wide, with the first pulse in cycle DIV-1 after reset, for two
// small dividers (5 and 7) and the trivial divider 1.
module tb_tick_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic t5, t7, t1;
  int checks = 0, failures = 0;
  int cyc = 0;

  tick_gen #(.DIV(5)) u5 (.clk(clk), .rst(rst), .tick(t5));
  tick_gen #(.DIV(7)) u7 (.clk(clk), .rst(rst), .tick(t7));
  tick_gen #(.DIV(1)) u1 (.clk(clk), .rst(rst), .tick(t1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // cycle 0 ends at the first rising edge that sees reset low
    for (cyc = 0; cyc < 200; cyc++) begin
      check(t5 == ((cyc % 5) == 4), $sformatf("DIV=5 tick=%0b", t5));
      check(t7 == ((cyc % 7) == 6), $sformatf("DIV=7 tick=%0b", t7));
      check(t1 == 1'b1, "DIV=1 tick");
      @(negedge clk);
    end
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
