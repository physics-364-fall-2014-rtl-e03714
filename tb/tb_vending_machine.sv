// tb_vending_machine: the board-level vending machine with a 16-cycle step
// and the VEND1/VEND2 extension. Presses buttons as a person would (short
// presses between steps, a button held over several steps) and checks after
// each step the state, the LEDs and all four display digits: money in
// decimal cents in the GOT states, 8888 with all LEDs lit in ENOUGH and
// VEND2, everything dark in VEND1.
module tb_vending_machine;
  import lab26_pkg::*;
  localparam int PERIOD = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] btn = '0, an_n;
  logic [7:0] led;
  logic [6:0] seg_n;
  logic dp_n;
  vend_state_t state;
  int checks = 0, failures = 0;
  int n_enough = 0, n_vend2 = 0;

  vending_machine #(.TICK_BITS(4), .SCAN_BIT(0), .VEND_FLASH(1'b1)) dut (
    .clk(clk), .rst(rst), .btn(btn), .led(led), .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n), .state(state));

  always #5 clk = ~clk;

  string glyph [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg"};

  function automatic logic [6:0] mask(string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // The machine steps once every PERIOD cycles after reset; this counter
  // follows the same schedule.
  int tb_cnt = 0;
  always @(posedge clk) tb_cnt <= rst ? 0 : (tb_cnt + 1) % PERIOD;

  // Wait for the next step to take effect.
  task automatic next_step();
    while (tb_cnt != PERIOD - 1) @(negedge clk);
    @(negedge clk);
  endtask

  // Expected display: -1 = blank digit, else the decimal digit shown.
  task automatic expect_all(vend_state_t s, int cents);
    int want [4];
    bit lit = (s == ENOUGH || s == VEND2);
    check(state == s, $sformatf("state %s expected %s", state.name(), s.name()));
    check(led == (lit ? 8'hFF : 8'h00), $sformatf("led %02h in %s", led, s.name()));
    if (lit)             want = '{8, 8, 8, 8};
    else if (s == VEND1) want = '{-1, -1, -1, -1};
    else                 want = '{cents % 10, cents / 10, -1, -1};  // index 0 = right digit
    for (int c = 0; c < 4; c++) begin
      for (int d = 0; d < 4; d++) if (an_n == ~(4'b0001 << d)) begin
        check(seg_n == (want[d] < 0 ? 7'h7F : ~mask(glyph[want[d]])),
              $sformatf("digit %0d in %s shows %b", d, s.name(), seg_n));
        check(dp_n == 1'b1, "decimal point lit");
      end
      @(negedge clk);
    end
    if (s == ENOUGH) n_enough++;
    if (s == VEND2)  n_vend2++;
  endtask

  task automatic tap(int b);
    btn[b] = 1'b1;
    repeat (3) @(negedge clk);
    btn[b] = 1'b0;
  endtask

  task automatic dispense();
    expect_all(ENOUGH, 0);
    next_step(); expect_all(VEND1, 0);
    next_step(); expect_all(VEND2, 0);
    next_step(); expect_all(GOT0, 0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    expect_all(GOT0, 0);
    // five short nickel presses
    for (int i = 1; i <= 4; i++) begin
      tap(0); next_step(); expect_all(vend_state_t'(i), 5 * i);
    end
    tap(0); next_step();
    dispense();
    // a dime held for three steps counts once
    btn[1] = 1'b1;
    next_step(); expect_all(GOT10, 10);
    next_step(); expect_all(GOT10, 10);
    next_step(); expect_all(GOT10, 10);
    btn[1] = 1'b0;
    repeat (4) @(negedge clk);
    // a second dime, then a nickel -> 25
    tap(1); next_step(); expect_all(GOT20, 20);
    tap(0); next_step();
    dispense();
    // a quarter alone
    tap(2); next_step();
    dispense();
    // no presses: stays
    repeat (2) begin next_step(); expect_all(GOT0, 0); end
    // the clear button from GOT15
    tap(1); next_step(); tap(0); next_step(); expect_all(GOT15, 15);
    tap(3); next_step(); expect_all(GOT0, 0);
    check(n_enough == 3 && n_vend2 == 3, "dispense count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
