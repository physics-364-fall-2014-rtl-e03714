// tb_ram_addr_ctrl: random buttons, switches and enables against a model of
// the up / down / load / hold priority; checks wrap-around both ways and
// that every operation happened.
module tb_ram_addr_ctrl;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [2:0] btn = '0;
  logic [7:0] sw = '0, address;
  logic [7:0] model;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_load = 0, n_hold = 0, n_wrap = 0;

  ram_addr_ctrl dut (.clk(clk), .rst(rst), .en(en), .btn(btn), .sw(sw), .address(address));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    model = '0;
    checks++; if (address !== 8'd0) begin failures++; $display("FAIL reset"); end
    // step down from 0 wraps to 255, step up wraps back
    en = 1'b1; btn = 3'b010; @(negedge clk);
    checks++; if (address !== 8'hFF) begin failures++; $display("FAIL down-wrap %02h", address); end
    btn = 3'b001; @(negedge clk);
    checks++; if (address !== 8'h00) begin failures++; $display("FAIL up-wrap %02h", address); end
    n_wrap = 2;
    for (int i = 0; i < 3000; i++) begin
      btn = 3'($urandom);
      sw  = 8'($urandom);
      en  = 1'($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (en) begin
        if (btn[0])      begin model = model + 8'd1; n_up++;   end
        else if (btn[1]) begin model = model - 8'd1; n_down++; end
        else if (btn[2]) begin model = sw;           n_load++; end
        else                                         n_hold++;
      end
      checks++;
      if (address !== model) begin
        failures++; $display("FAIL step %0d btn=%b en=%b got %02h expected %02h", i, btn, en, address, model);
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_load == 0 || n_hold == 0) begin failures++; $display("FAIL coverage"); end
    $display("up=%0d down=%0d load=%0d hold=%0d wraps=%0d", n_up, n_down, n_load, n_hold, n_wrap);
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
