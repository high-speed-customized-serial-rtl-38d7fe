// tb_uart_enable_gen: self-checking test of the UART enable generator.
//
// The testbench pulses baud_tick every 10 cycles. With nothing to send no
// tx_enable may appear. After a send_data request the next tick must come
// out as tx_enable (one cycle later), ticks must keep passing while
// tx_active is high, and stop once it falls. A request arriving in the same
// cycle as a tick is honoured at once.
module tb_uart_enable_gen;
  logic clk = 1'b0, rst, baud_tick, send_data, tx_active, tx_enable;
  int checks = 0, failures = 0;
  int n_en = 0, tickc = 0;

  uart_enable_gen dut (.clk, .rst, .baud_tick, .send_data, .tx_active, .tx_enable);

  always #10 clk = ~clk;
  always @(negedge clk) if (tx_enable) n_en++;
  always @(posedge clk) begin
    tickc <= (tickc == 9) ? 0 : tickc + 1;
  end
  assign baud_tick = (tickc == 9);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    rst = 1'b1; send_data = 1'b0; tx_active = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (50) @(negedge clk);
    check(n_en == 0, "no enable while idle");
    // request away from a tick
    wait (tickc == 3); @(negedge clk);
    send_data = 1'b1; @(negedge clk); send_data = 1'b0;
    n0 = n_en;
    wait (baud_tick); @(negedge clk);
    check(!tx_enable && n_en == n0, "no enable before the tick");
    @(negedge clk);
    check(tx_enable, "enable the cycle after the tick");
    @(negedge clk);
    check(!tx_enable && n_en == n0 + 1, "exactly one enable for the request");
    // transmitter active: ticks pass
    tx_active = 1'b1;
    n0 = n_en;
    repeat (100) @(negedge clk);
    check(n_en == n0 + 10, $sformatf("ticks pass while active, %0d", n_en - n0));
    tx_active = 1'b0;
    n0 = n_en;
    repeat (100) @(negedge clk);
    check(n_en == n0, "ticks blocked when idle");
    // request in the tick cycle
    wait (tickc == 8); @(negedge clk);
    wait (tickc == 9); @(negedge clk);
    send_data = 1'b1; @(negedge clk); send_data = 1'b0;
    check(tx_enable, "request in the tick cycle");
    @(negedge clk); #1;
    n0 = n_en;
    repeat (30) @(negedge clk);
    check(n_en == n0, "no extra enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
