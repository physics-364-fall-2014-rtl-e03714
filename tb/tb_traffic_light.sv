// tb_traffic_light: drives the 1 Hz enable every third clock and checks the
// seconds counter (including its 255 -> 0 wrap) and both lamp heads against
// an independent model of the eight-phase cycle for 300 steps. Also checks
// that nothing moves between enables.
module tb_traffic_light;
  import lab26_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0;
  logic [7:0] count1Hz;
  lamp_t ew, ns;
  int checks = 0, failures = 0;
  int secs = 0;

  traffic_light dut (.clk(clk), .rst(rst), .tick(tick), .count1Hz(count1Hz), .ew(ew), .ns(ns));

  always #5 clk = ~clk;

  task automatic expect_state(int s);
    int ph = s % 8;
    lamp_t e_ew, e_ns;
    e_ew = '{red: ph >= 4, yellow: ph == 3, green: ph < 3};
    e_ns = '{red: ph < 4, yellow: ph == 7, green: ph >= 4 && ph < 7};
    checks++;
    if (count1Hz != 8'(s) || ew != e_ew || ns != e_ns) begin
      failures++;
      $display("FAIL second %0d: count=%0d ew=%b ns=%b", s, count1Hz, ew, ns);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_state(0);
    for (secs = 1; secs <= 300; secs++) begin
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      expect_state(secs);           // moved on the enabled edge
      @(negedge clk);
      @(negedge clk);
      expect_state(secs);           // and holds without enable
    end
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
