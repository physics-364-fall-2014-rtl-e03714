// tb_traffic_light_walk: steps the signal with a random walk request and
// compares counter and lamps with a model of the 16-phase table and the
// conditional jump from phase 7. Counts walk phases taken and skipped and
// fails if either never happened. Checks the walk phase lasts 8 steps.
module tb_traffic_light_walk;
  import lab26_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0, walk_req = 1'b0;
  logic [7:0] count1Hz;
  logic [3:0] ticks;
  lamp_t ew, ns;
  logic walk;
  int checks = 0, failures = 0;
  int model = 0, taken = 0, skipped = 0, walk_len = 0;

  traffic_light_walk dut (.clk(clk), .rst(rst), .tick(tick), .walk_req(walk_req),
                          .count1Hz(count1Hz), .ticks(ticks), .ew(ew), .ns(ns), .walk(walk));

  always #5 clk = ~clk;

  task automatic compare(string when);
    lamp_t e_ew, e_ns;
    e_ew = '{red: model >= 4, yellow: model == 3, green: model < 3};
    e_ns = '{red: model < 4 || model >= 8, yellow: model == 7, green: model >= 4 && model < 7};
    checks++;
    if (count1Hz != 8'(model) || ticks != 4'(model) || ew != e_ew || ns != e_ns ||
        walk != (model >= 8)) begin
      failures++;
      $display("FAIL %s: model=%0d count=%0d ew=%b ns=%b walk=%b", when, model, count1Hz, ew, ns, walk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    compare("reset");
    for (int s = 0; s < 600; s++) begin
      walk_req = 1'($urandom_range(0, 1));
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      if (model == 7) begin
        if (walk_req) taken++; else skipped++;
      end
      if (model >= 8) walk_len++;
      if (model == 15) begin
        checks++;
        if (walk_len != 8) begin failures++; $display("FAIL walk lasted %0d", walk_len); end
        walk_len = 0;
      end
      model = ((model == 7 && !walk_req) || model == 15) ? 0 : model + 1;
      compare("step");
      walk_req = ~walk_req;      // must not matter between enables
      @(negedge clk);
      compare("hold");
    end
    checks++;
    if (taken == 0 || skipped == 0) begin
      failures++; $display("FAIL walk taken %0d skipped %0d", taken, skipped);
    end
    $display("walk phases taken=%0d skipped=%0d", taken, skipped);
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
