// tb_lab26_top: end-to-end run of all four designs at reduced rates
// (traffic step every 4 cycles, RAM/vending step every 16 cycles, display
// scan every cycle) with the vending-machine two-flash extension on. A
// second copy of the top takes the walk request from the slide switch.
//
// Every cycle both traffic signals are compared pin by pin with a model of
// the phase tables and the walk rule. The RAM design stores and reads back
// the squares of 0..9; the vending machine takes nickels, dimes, a quarter
// and a clear. Each mechanism is counted, and one that never happened is a
// failure: the fixed cycle wrapping, walk taken, walk skipped, walk request
// latched and cleared, walk request from the switch, address up / down /
// load, RAM write, each coin, clear, ENOUGH, VEND1, VEND2.
module tb_lab26_top;
  localparam int SEC = 4;
  localparam int TB  = 4;
  localparam int PERIOD = 1 << TB;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:1] p1_jc, p1_jd, p2_jd, q2_jd, q1_jc, q1_jd;
  logic [4:1] p2_jc, q2_jc;
  logic [7:7] p2_sw = '0, q2_sw = '0;
  logic [3:3] p2_btn = '0;
  logic p2_dp_n, q2_dp_n;
  logic [3:0] p2_an_n, q2_an_n;
  logic [7:0] p3_sw = '0, p3_led, q3_led;
  logic [3:0] p3_btn = '0, p3_an_n, q3_an_n;
  logic [6:0] p3_seg_n, q3_seg_n;
  logic p3_dp_n, q3_dp_n;
  logic [3:0] p4_btn = '0, p4_an_n, q4_an_n;
  logic [7:0] p4_led, q4_led;
  logic [6:0] p4_seg_n, q4_seg_n;
  logic p4_dp_n, q4_dp_n;
  int checks = 0, failures = 0;

  lab26_top #(.SEC_DIV(SEC), .TICK_BITS(TB), .SCAN_BIT(0), .WALK_FROM_BUTTON(1'b1), .VEND_FLASH(1'b1)) dut (
    .clk(clk), .rst(rst),
    .p1_jc(p1_jc), .p1_jd(p1_jd),
    .p2_sw(p2_sw), .p2_btn(p2_btn), .p2_jc(p2_jc), .p2_jd(p2_jd), .p2_dp_n(p2_dp_n), .p2_an_n(p2_an_n),
    .p3_sw(p3_sw), .p3_btn(p3_btn), .p3_led(p3_led), .p3_seg_n(p3_seg_n), .p3_dp_n(p3_dp_n), .p3_an_n(p3_an_n),
    .p4_btn(p4_btn), .p4_led(p4_led), .p4_seg_n(p4_seg_n), .p4_dp_n(p4_dp_n), .p4_an_n(p4_an_n));

  // Second copy: walk request straight from sw[7]; only its Part 2 is checked.
  lab26_top #(.SEC_DIV(SEC), .TICK_BITS(TB), .SCAN_BIT(0), .WALK_FROM_BUTTON(1'b0), .VEND_FLASH(1'b0)) dut_sw (
    .clk(clk), .rst(rst),
    .p1_jc(q1_jc), .p1_jd(q1_jd),
    .p2_sw(q2_sw), .p2_btn(p2_btn), .p2_jc(q2_jc), .p2_jd(q2_jd), .p2_dp_n(q2_dp_n), .p2_an_n(q2_an_n),
    .p3_sw(p3_sw), .p3_btn(4'b0000), .p3_led(q3_led), .p3_seg_n(q3_seg_n), .p3_dp_n(q3_dp_n), .p3_an_n(q3_an_n),
    .p4_btn(4'b0000), .p4_led(q4_led), .p4_seg_n(q4_seg_n), .p4_dp_n(q4_dp_n), .p4_an_n(q4_an_n));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  // ---------------- models of the two traffic signals ----------------
  int n = 0;                 // rising edges since reset
  int m1 = 0;                // Part 1 seconds count (mod 256)
  int m2 = 0, q2 = 0;        // Part 2 phases
  bit lat = 0;               // Part 2 walk request latch
  int c_wrap = 0, c_taken = 0, c_skip = 0, c_latch = 0, c_latch_clr = 0, c_sw_walk = 0, c_dp = 0;

  always @(posedge clk) begin
    if (rst) begin
      n <= 0; m1 <= 0; m2 <= 0; q2 <= 0; lat <= 0;
    end else begin
      n <= n + 1;
      if (n % SEC == SEC - 1) begin
        m1 <= (m1 + 1) % 256;
        if (m1 == 255) c_wrap++;
        m2 <= ((m2 == 7 && !lat) || m2 == 15) ? 0 : m2 + 1;
        if (m2 == 7) begin if (lat) c_taken++; else c_skip++; end
        q2 <= ((q2 == 7 && !q2_sw[7]) || q2 == 15) ? 0 : q2 + 1;
        if (q2 == 7 && q2_sw[7]) c_sw_walk++;
      end
      if (m2 >= 8) begin if (lat) c_latch_clr++; lat <= 0; end
      else if (p2_btn[3]) begin if (!lat) c_latch++; lat <= 1; end
    end
  end

  function automatic logic [3:1] ew_pins(int ph);   // {green, yellow, red}
    return {ph < 3, ph == 3, ph >= 4};
  endfunction
  function automatic logic [3:1] ns_pins(int ph);
    return {ph >= 4 && ph < 7, ph == 7, ph < 4 || ph >= 8};
  endfunction

  always @(negedge clk) if (!rst) begin
    check(p1_jd == ew_pins(m1 % 8) && p1_jc == ns_pins(m1 % 8),
          $sformatf("part 1 phase %0d: jc=%b jd=%b", m1 % 8, p1_jc, p1_jd));
    check(p2_jd == ew_pins(m2) && p2_jc == {m2 >= 8, ns_pins(m2)},
          $sformatf("part 2 phase %0d: jc=%b jd=%b", m2, p2_jc, p2_jd));
    check(p2_dp_n == !lat, "walk requested indicator");
    if (!p2_dp_n) c_dp++;
    check(q2_jd == ew_pins(q2) && q2_jc == {q2 >= 8, ns_pins(q2)},
          $sformatf("part 2 (switch) phase %0d: jc=%b jd=%b", q2, q2_jc, q2_jd));
  end

  // ---------------- Parts 3 and 4 ----------------
  int c_up = 0, c_down = 0, c_load = 0, c_write = 0;
  int c_nickel = 0, c_dime = 0, c_quarter = 0, c_clear = 0, c_enough = 0, c_vend1 = 0, c_vend2 = 0;

  // Wait until just after the next RAM / vending step.
  task automatic next_step();
    while (n % PERIOD != PERIOD - 1) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic ram_op(logic [3:0] b, logic [7:0] s);
    p3_btn = b; p3_sw = s;
    next_step();
    p3_btn = '0;
    if (b[0]) c_up++;
    if (b[1]) c_down++;
    if (b[2]) c_load++;
    if (b[3]) c_write++;
  endtask

  task automatic coin(int b);
    p4_btn[b] = 1'b1;
    repeat (3) @(negedge clk);
    p4_btn[b] = 1'b0;
    next_step();
    case (b) 0: c_nickel++; 1: c_dime++; 2: c_quarter++; default: c_clear++; endcase
  endtask

  // After the paying step: ENOUGH (lit), VEND1 (dark), VEND2 (lit), GOT0.
  task automatic expect_dispense();
    check(p4_led == 8'hFF, "ENOUGH leds");
    if (p4_led == 8'hFF) c_enough++;
    next_step();
    check(p4_led == 8'h00 && p4_seg_n == 7'h7F, "VEND1 dark");
    if (p4_led == 8'h00 && p4_seg_n == 7'h7F) c_vend1++;
    next_step();
    check(p4_led == 8'hFF && p4_seg_n == 7'h00, "VEND2 shows 8");
    if (p4_led == 8'hFF) c_vend2++;
    next_step();
    check(p4_led == 8'h00, "back to GOT0");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // Part 3: store squares, read them back going down then up
    for (int i = 0; i < 10; i++) begin
      ram_op(4'b0100, 8'(i));
      ram_op(4'b1000, 8'(i * i));
      check(p3_led == 8'(i * i), $sformatf("RAM readback at %0d: %0d", i, p3_led));
    end
    for (int i = 8; i >= 0; i--) begin
      ram_op(4'b0010, 8'h00);
      check(p3_led == 8'(i * i), $sformatf("RAM step down to %0d: %0d", i, p3_led));
    end
    for (int i = 1; i < 10; i++) begin
      ram_op(4'b0001, 8'h00);
      check(p3_led == 8'(i * i), $sformatf("RAM step up to %0d: %0d", i, p3_led));
    end

    // Part 4: nickels; dime+dime+nickel; quarter; clear
    repeat (4) coin(0);
    check(p4_led == 8'h00, "no flash at 20 cents");
    coin(0);
    expect_dispense();
    coin(1); coin(1); coin(0);
    expect_dispense();
    coin(2);
    expect_dispense();
    coin(1); coin(3);
    coin(2);
    expect_dispense();

    // Part 2: press the walk button now and then while the signals run
    q2_sw[7] = 1'b0;
    for (int k = 0; k < 12; k++) begin
      repeat (SEC * 10) @(negedge clk);
      if (k % 3 != 2) begin
        p2_btn[3] = 1'b1; @(negedge clk); p2_btn[3] = 1'b0;
      end
      q2_sw[7] = 1'($urandom_range(0, 1));
    end
    // let Part 1 wrap its 8-bit counter
    while (c_wrap == 0) @(negedge clk);
    repeat (SEC * 20) @(negedge clk);

    check(c_wrap > 0,        "part 1 counter never wrapped");
    check(c_taken > 0,       "walk phase never taken");
    check(c_skip > 0,        "walk phase never skipped");
    check(c_latch > 0,       "walk request never latched");
    check(c_latch_clr > 0,   "walk request never cleared");
    check(c_dp > 0,          "walk indicator never lit");
    check(c_sw_walk > 0,     "switch walk request never used");
    check(c_up > 0 && c_down > 0 && c_load > 0 && c_write > 0, "RAM operation missing");
    check(c_nickel > 0 && c_dime > 0 && c_quarter > 0 && c_clear > 0, "coin missing");
    check(c_enough == 4 && c_vend1 == 4 && c_vend2 == 4, "dispense sequence missing");
    $display("wrap=%0d walk_taken=%0d walk_skipped=%0d latched=%0d latch_cleared=%0d sw_walk=%0d",
             c_wrap, c_taken, c_skip, c_latch, c_latch_clr, c_sw_walk);
    $display("up=%0d down=%0d load=%0d write=%0d nickel=%0d dime=%0d quarter=%0d clear=%0d enough=%0d vend1=%0d vend2=%0d",
             c_up, c_down, c_load, c_write, c_nickel, c_dime, c_quarter, c_clear, c_enough, c_vend1, c_vend2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
