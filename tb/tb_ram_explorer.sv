// tb_ram_explorer: runs the interactive RAM with a 16-cycle slow tick and
// plays the exercise of storing the squares of 0..9 at addresses 00..09:
// jump to an address (btn[2]), write the square (btn[3]), then walk back
// over the addresses with step-up (btn[0]) and step-down (btn[1]) and read
// them on the LEDs and on the four display digits. Also checks that a held
// button acts once per slow tick, that nothing happens between ticks, and
// that the left decimal point blinks.
module tb_ram_explorer;
  localparam int TICK_BITS = 4;
  localparam int PERIOD    = 1 << TICK_BITS;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] sw = '0, led, ram_address;
  logic [3:0] btn = '0, an_n;
  logic [6:0] seg_n;
  logic dp_n, slow_tick;
  int checks = 0, failures = 0;
  logic [7:0] model_mem [256];
  logic [7:0] model_addr;
  int n_up = 0, n_down = 0, n_load = 0, n_write = 0, dp_on = 0, dp_off = 0;

  ram_explorer #(.TICK_BITS(TICK_BITS), .SCAN_BIT(0)) dut (
    .clk(clk), .rst(rst), .sw(sw), .btn(btn), .led(led), .seg_n(seg_n), .dp_n(dp_n),
    .an_n(an_n), .ram_address(ram_address), .slow_tick(slow_tick));

  always #5 clk = ~clk;

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] mask(string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Hold a button combination across exactly one slow tick, then release.
  task automatic press(input logic [3:0] b, input logic [7:0] s);
    btn = b; sw = s;
    while (!slow_tick) @(negedge clk);
    @(negedge clk);
    btn = '0;
    if (b[3]) begin model_mem[model_addr] = s; n_write++; end
    if (b[0])      begin model_addr = model_addr + 8'd1; n_up++;   end
    else if (b[1]) begin model_addr = model_addr - 8'd1; n_down++; end
    else if (b[2]) begin model_addr = s;                 n_load++; end
  endtask

  // Check LEDs and, over four cycles, all four digits of the display.
  task automatic check_outputs();
    logic [3:0] want [4];
    logic [3:0] seen;
    want[3] = model_addr[7:4]; want[2] = model_addr[3:0];
    want[1] = model_mem[model_addr][7:4]; want[0] = model_mem[model_addr][3:0];
    check(ram_address == model_addr, $sformatf("address %02h expected %02h", ram_address, model_addr));
    check(led == model_mem[model_addr], $sformatf("led %02h expected %02h", led, model_mem[model_addr]));
    seen = '0;
    for (int c = 0; c < 4; c++) begin
      for (int d = 0; d < 4; d++) begin
        if (an_n == ~(4'b0001 << d)) begin
          seen[d] = 1'b1;
          check(seg_n == ~mask(glyph[want[d]]),
                $sformatf("digit %0d shows %b expected %h", d, seg_n, want[d]));
        end
      end
      @(negedge clk);
    end
    check(seen == 4'b1111, "not every digit scanned");
  endtask

  always @(negedge clk) if (!rst && an_n == 4'b0111) begin
    if (!dp_n) dp_on++; else dp_off++;
  end

  initial begin
    for (int a = 0; a < 256; a++) model_mem[a] = '0;
    model_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    check_outputs();
    // store the squares
    for (int i = 0; i < 10; i++) begin
      press(4'b0100, 8'(i));            // jump to address i
      check_outputs();
      press(4'b1000, 8'(i * i));        // write i*i there
      check_outputs();
    end
    // walk back down from 9 to 0 and up again, reading each square
    for (int i = 9; i > 0; i--) begin
      press(4'b0010, 8'h00);
      check_outputs();
    end
    for (int i = 0; i < 9; i++) begin
      press(4'b0001, 8'h00);
      check_outputs();
    end
    // a held button steps once per tick: 3 periods -> 3 steps
    while (!slow_tick) @(negedge clk);
    @(negedge clk);
    btn = 4'b0001;
    repeat (3 * PERIOD) @(negedge clk);
    btn = 4'b0000;
    model_addr = model_addr + 8'd3;
    n_up += 3;
    check_outputs();
    // no action without buttons
    repeat (3 * PERIOD) @(negedge clk);
    check_outputs();
    // wrap from 00 downwards
    press(4'b0100, 8'h00);
    press(4'b0010, 8'h00);
    check_outputs();
    check(dp_on > 0 && dp_off > 0, $sformatf("left decimal point not blinking (%0d/%0d)", dp_on, dp_off));
    check(n_up > 0 && n_down > 0 && n_load > 0 && n_write > 0, "an action never happened");
    $display("up=%0d down=%0d load=%0d write=%0d", n_up, n_down, n_load, n_write);
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
