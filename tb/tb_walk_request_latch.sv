// tb_walk_request_latch: random set/clear stimulus against a model of a
// clocked set/reset flip-flop with clear priority; also checks that a
// one-cycle press is held until cleared.
module tb_walk_request_latch;
  logic clk = 1'b0, rst = 1'b1, set = 1'b0, clr = 1'b0, q;
  logic model;
  int checks = 0, failures = 0;
  int held = 0;

  walk_request_latch dut (.clk(clk), .rst(rst), .set(set), .clr(clr), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    model = 1'b0;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL after reset q=%b", q); end
    // one-cycle press, held for 20 cycles, then cleared
    set = 1'b1; @(negedge clk); set = 1'b0;
    repeat (20) begin
      checks++; if (q !== 1'b1) begin failures++; $display("FAIL press not held"); end
      @(negedge clk);
    end
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL clear"); end
    // random
    for (int i = 0; i < 500; i++) begin
      set = 1'($urandom_range(0, 3) == 0);
      clr = 1'($urandom_range(0, 4) == 0);
      @(negedge clk);
      model = clr ? 1'b0 : (set ? 1'b1 : model);
      if (model) held++;
      checks++;
      if (q !== model) begin failures++; $display("FAIL random step %0d q=%b model=%b", i, q, model); end
    end
    checks++;
    if (held == 0) begin failures++; $display("FAIL random test never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
