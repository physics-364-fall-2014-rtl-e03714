// tb_lab26_full: the top at its real rates (50 MHz clock, one traffic step
// per second, RAM and vending steps every 2^24 cycles). In 17 simulated
// seconds it checks, in the middle of every second, the lamps of both
// traffic signals through a whole cycle of the fixed signal and a whole
// cycle of the walk signal with its walk phase; meanwhile it writes and
// reads back a RAM word and buys a can with a quarter.
module tb_lab26_full;
  localparam longint SEC    = 50_000_000;
  localparam longint PERIOD = 1 << 24;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:1] p1_jc, p1_jd, p2_jd;
  logic [4:1] p2_jc;
  logic [7:7] p2_sw = '0;
  logic [3:3] p2_btn = '0;
  logic p2_dp_n, p3_dp_n, p4_dp_n;
  logic [3:0] p2_an_n, p3_an_n, p4_an_n;
  logic [7:0] p3_sw = '0, p3_led, p4_led;
  logic [3:0] p3_btn = '0, p4_btn = '0;
  logic [6:0] p3_seg_n, p4_seg_n;
  int checks = 0, failures = 0;
  int walk_seconds = 0;
  bit ram_done = 0, vend_done = 0;

  lab26_top dut (
    .clk(clk), .rst(rst),
    .p1_jc(p1_jc), .p1_jd(p1_jd),
    .p2_sw(p2_sw), .p2_btn(p2_btn), .p2_jc(p2_jc), .p2_jd(p2_jd), .p2_dp_n(p2_dp_n), .p2_an_n(p2_an_n),
    .p3_sw(p3_sw), .p3_btn(p3_btn), .p3_led(p3_led), .p3_seg_n(p3_seg_n), .p3_dp_n(p3_dp_n), .p3_an_n(p3_an_n),
    .p4_btn(p4_btn), .p4_led(p4_led), .p4_seg_n(p4_seg_n), .p4_dp_n(p4_dp_n), .p4_an_n(p4_an_n));

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic logic [3:1] ew_pins(int ph);   // {green, yellow, red}
    return {ph < 3, ph == 3, ph >= 4};
  endfunction
  function automatic logic [3:1] ns_pins(int ph);
    return {ph >= 4 && ph < 7, ph == 7, ph < 4 || ph >= 8};
  endfunction

  // Wait until just after the next 2^24-cycle step. Steps take effect at
  // the rising edges numbered PERIOD-1, 2*PERIOD-1, ... counting from 0 at
  // the first edge that sees reset low (time t0). Plain delays keep the
  // simulation fast: nothing else wakes up between steps.
  localparam longint T = 20;   // clock period in ns
  longint t0;
  task automatic next_step();
    longint n = (longint'($time) - t0) / T;   // edges since t0
    longint k = ((n + 1) / PERIOD) + 1;       // next step still to come
    #(t0 + (k * PERIOD - 1) * T - longint'($time) + T / 2);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    t0 = longint'($time) + T / 2;
    fork
      begin : traffic
        // request a walk before the first north/south yellow ends
        p2_btn[3] = 1'b1; repeat (10) @(negedge clk); p2_btn[3] = 1'b0;
        for (int s = 0; s < 17; s++) begin
          int ph2;
          #(SEC / 2 * T);
          ph2 = s % 16;
          check(p1_jd == ew_pins(s % 8) && p1_jc == ns_pins(s % 8),
                $sformatf("part 1 second %0d: jc=%b jd=%b", s, p1_jc, p1_jd));
          check(p2_jd == ew_pins(ph2) && p2_jc == {ph2 >= 8, ns_pins(ph2)},
                $sformatf("part 2 second %0d: jc=%b jd=%b", s, p2_jc, p2_jd));
          if (p2_jc[4]) walk_seconds++;
          check(p2_dp_n == (s >= 8), "walk requested indicator");
          #(SEC / 2 * T);
        end
      end
      begin : ram
        p3_btn = 4'b0100; p3_sw = 8'h07; next_step();          // address 07
        p3_btn = 4'b1000; p3_sw = 8'd49; next_step();          // write 49
        p3_btn = 4'b0001; next_step();                         // step up
        p3_btn = 4'b0010; next_step();                         // step down
        p3_btn = 4'b0000;
        check(p3_led == 8'd49, $sformatf("RAM readback %0d", p3_led));
        ram_done = 1;
      end
      begin : vend
        p4_btn[2] = 1'b1; repeat (10) @(negedge clk); p4_btn[2] = 1'b0;
        next_step();
        check(p4_led == 8'hFF, "ENOUGH after a quarter");
        next_step();
        check(p4_led == 8'h00, "back to GOT0");
        vend_done = 1;
      end
    join
    check(walk_seconds == 8, $sformatf("walk phase lasted %0d s", walk_seconds));
    check(ram_done && vend_done, "RAM or vending sequence incomplete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(18 * SEC * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
