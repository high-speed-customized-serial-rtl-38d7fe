// tb_uart: self-checking test of the complete UART at 50 MHz and 9600 baud.
//
// TxD is looped back to RxD. The four byte patterns 11111111, 00001111,
// 01010101, 10101010 and a few random bytes are sent, with parity off and
// on; each must come back on rx_d with data_rx_done and no error. The
// testbench also times the start bit on TxD: it must last one bit time,
// 5208 system clock cycles (50e6/9600 rounded), and the frame must start
// within one bit time of send_data.
module tb_uart;
  localparam int BITC = 5208;

  logic       clk = 1'b0, rst, parity_en, parity_odd, rxd, txd;
  logic [7:0] tx_data, rx_d;
  logic       send_data, tx_busy, tx_done, data_rx_done, parity_err, frame_err;
  logic       baud_clock, clock_16;
  int checks = 0, failures = 0, n_rx = 0, n_err = 0;
  longint cyc = 0, t_fall, t_rise, t_send;

  uart dut (.clk, .rst, .parity_en, .parity_odd, .rxd, .txd, .tx_data, .send_data,
            .tx_busy, .tx_done, .rx_d, .data_rx_done, .parity_err, .frame_err,
            .baud_clock, .clock_16);

  assign rxd = txd;
  always #10 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (data_rx_done) n_rx++;
    if (parity_err || frame_err) n_err++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [7:0] b, input logic pe, input logic po);
    int r0;
    r0 = n_rx;
    @(negedge clk);
    parity_en = pe; parity_odd = po; tx_data = b; send_data = 1'b1; t_send = cyc;
    @(negedge clk) send_data = 1'b0;
    @(negedge txd) t_fall = cyc;
    @(posedge txd or posedge data_rx_done);
    t_rise = cyc;
    if (b[0]) check(t_rise - t_fall == BITC, $sformatf("start bit %0d cycles", t_rise - t_fall));
    check(t_fall - t_send <= BITC + 2, "frame starts within one bit time");
    wait (n_rx == r0 + 1);
    check(rx_d == b, $sformatf("loopback %h got %h", b, rx_d));
    wait (!tx_busy);
    repeat (BITC) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; send_data = 1'b0; tx_data = '0; parity_en = 1'b0; parity_odd = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    xfer(8'hFF, 1'b0, 1'b0);
    xfer(8'h0F, 1'b1, 1'b0);
    xfer(8'h55, 1'b1, 1'b1);
    xfer(8'hAA, 1'b0, 1'b0);
    xfer(8'h99, 1'b1, 1'b0);
    xfer(8'h01, 1'b0, 1'b0);
    check(n_err == 0, "no receive errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
