// tb_vending_fsm: two copies of the state machine, without and with the
// VEND1/VEND2 extension, get the same random coins, clears and step
// enables; each is compared with a model that keeps the money in cents.
// Also walks fixed sequences (5 nickels, dime+dime+nickel, one quarter,
// overpayment 20+10) and counts that every transition kind happened.
module tb_vending_fsm;
  import lab26_pkg::*;
  logic clk = 1'b0, rst = 1'b1, step = 1'b0, clear = 1'b0;
  logic nickel = 1'b0, dime = 1'b0, quarter = 1'b0;
  vend_state_t st0, st1;
  logic fl0, fl1;
  int checks = 0, failures = 0;
  int m0, m1;   // model states as numbers 0..7
  int n_enough = 0, n_vend = 0, n_clear = 0, n_over = 0;

  vending_fsm #(.VEND_FLASH(1'b0)) dut0 (.clk(clk), .rst(rst), .step(step), .clear(clear),
    .nickel(nickel), .dime(dime), .quarter(quarter), .state(st0), .flash(fl0));
  vending_fsm #(.VEND_FLASH(1'b1)) dut1 (.clk(clk), .rst(rst), .step(step), .clear(clear),
    .nickel(nickel), .dime(dime), .quarter(quarter), .state(st1), .flash(fl1));

  always #5 clk = ~clk;

  function automatic int next_state(int s, bit ext);
    int coin = quarter ? 25 : dime ? 10 : nickel ? 5 : 0;
    if (clear) return 0;
    if (s <= 4) begin
      if (s * 5 + coin >= 25) return 5;
      return (s * 5 + coin) / 5;
    end
    if (s == 5) return ext ? 6 : 0;
    if (s == 6) return 7;
    return 0;
  endfunction

  task automatic do_step(bit n, bit d, bit q, bit c, bit en);
    nickel = n; dime = d; quarter = q; clear = c; step = en;
    if (en) begin
      int nx0 = next_state(m0, 1'b0), nx1 = next_state(m1, 1'b1);
      if (nx0 == 5 && m0 != 5) n_enough++;
      if (m0 <= 4 && !c && (m0 * 5 + (q ? 25 : d ? 10 : n ? 5 : 0)) > 25) n_over++;
      if (c && m0 != 0) n_clear++;
      if (nx1 == 6) n_vend++;
      m0 = nx0; m1 = nx1;
    end
    @(negedge clk);
    step = 1'b0; nickel = 0; dime = 0; quarter = 0; clear = 0;
    checks++;
    if (int'(st0) != m0 || int'(st1) != m1 || fl0 != (m0 == 5 || m0 == 7) || fl1 != (m1 == 5 || m1 == 7)) begin
      failures++;
      $display("FAIL %0t: st0=%0d exp %0d  st1=%0d exp %0d  flash %b %b", $time, st0, m0, st1, m1, fl0, fl1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    m0 = 0; m1 = 0;
    // five nickels, then ENOUGH -> GOT0 / VEND1 -> VEND2 -> GOT0
    repeat (5) do_step(1, 0, 0, 0, 1);
    repeat (3) do_step(0, 0, 0, 0, 1);
    // dime, dime, nickel
    do_step(0, 1, 0, 0, 1); do_step(0, 1, 0, 0, 1); do_step(1, 0, 0, 0, 1);
    repeat (3) do_step(0, 0, 0, 0, 1);
    // quarter
    do_step(0, 0, 1, 0, 1);
    repeat (3) do_step(0, 0, 0, 0, 1);
    // 20 cents then a dime: overpayment still ENOUGH
    repeat (2) do_step(0, 1, 0, 0, 1); do_step(0, 1, 0, 0, 1);
    repeat (3) do_step(0, 0, 0, 0, 1);
    // coins without step enable do nothing
    do_step(1, 1, 1, 0, 0);
    // clear from GOT15
    do_step(0, 1, 0, 0, 1); do_step(1, 0, 0, 0, 1); do_step(0, 0, 0, 1, 1);
    // random
    for (int i = 0; i < 3000; i++)
      do_step(1'($urandom_range(0, 2) == 0), 1'($urandom_range(0, 3) == 0),
              1'($urandom_range(0, 9) == 0), 1'($urandom_range(0, 19) == 0),
              1'($urandom_range(0, 3) != 0));
    checks++;
    if (n_enough == 0 || n_vend == 0 || n_clear == 0 || n_over == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("enough=%0d vend=%0d clear=%0d overpay=%0d", n_enough, n_vend, n_clear, n_over);
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
