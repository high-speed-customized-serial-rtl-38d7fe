// tb_uart_baud_gen: self-checking test of the baud generator at 50 MHz and
// 9600 baud.
//
// Measures the spacing of baud_tick and tick16 pulses over several bit
// times: 50e6/9600 rounds to 5208 cycles, 50e6/(16*9600) rounds to 326.
// Every pulse must be one cycle wide.
module tb_uart_baud_gen;
  localparam int EXP_BAUD = 5208, EXP_OS = 326;

  logic clk = 1'b0, rst, baud_tick, tick16;
  int checks = 0, failures = 0;
  longint cyc = 0, last_b = -1, last_o = -1;
  int nb = 0, no = 0;

  uart_baud_gen dut (.clk, .rst, .baud_tick, .tick16);

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic pb = 1'b0, po = 1'b0;
  always @(posedge clk) begin
    #1;
    cyc++;
    if (!rst) begin
      if (baud_tick) begin
        if (last_b >= 0) check(cyc - last_b == EXP_BAUD, $sformatf("baud spacing %0d", cyc - last_b));
        check(!pb, "baud tick one cycle wide");
        last_b = cyc; nb++;
      end
      if (tick16) begin
        if (last_o >= 0) check(cyc - last_o == EXP_OS, $sformatf("x16 spacing %0d", cyc - last_o));
        check(!po, "x16 tick one cycle wide");
        last_o = cyc; no++;
      end
    end
    pb = baud_tick; po = tick16;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (5 * EXP_BAUD + 10) @(posedge clk);
    check(nb == 5, $sformatf("5 baud ticks, got %0d", nb));
    check(no >= 79 && no <= 80, $sformatf("about 80 x16 ticks, got %0d", no));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
