// tb_uart_rx: self-checking test of the UART receiver.
//
// The testbench supplies tick16 every 4 cycles, so a bit lasts 64 cycles,
// and drives RxD with frames it builds itself: random bytes with parity
// off, even and odd; a frame with a wrong parity bit (parity_err, no
// data_rx_done); a frame with a low stop bit (frame_err); and a short low
// glitch on an idle line, which must not start a frame.
module tb_uart_rx;
  localparam int TICK = 4, BIT = 16 * TICK;

  logic       clk = 1'b0, rst, tick16, rxd, parity_en, parity_odd;
  logic [7:0] rx_data;
  logic       data_rx_done, parity_err, frame_err;
  int checks = 0, failures = 0, tcnt = 0;
  int n_done = 0, n_perr = 0, n_ferr = 0;

  uart_rx dut (.clk, .rst, .tick16, .rxd, .parity_en, .parity_odd, .rx_data,
               .data_rx_done, .parity_err, .frame_err);

  always #10 clk = ~clk;
  always @(posedge clk) begin
    tcnt <= (tcnt == TICK - 1) ? 0 : tcnt + 1;
    if (data_rx_done) n_done++;
    if (parity_err)   n_perr++;
    if (frame_err)    n_ferr++;
  end
  assign tick16 = (tcnt == TICK - 1);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one frame; bad_par flips the parity bit, bad_stop sends stop = 0
  task automatic send(input logic [7:0] b, input logic pe, input logic po,
                      input bit bad_par, input bit bad_stop);
    logic bits[$];
    bits.push_back(1'b0);
    for (int i = 0; i < 8; i++) bits.push_back(b[i]);
    if (pe) bits.push_back((^b) ^ po ^ bad_par);
    bits.push_back(!bad_stop);
    parity_en = pe; parity_odd = po;
    foreach (bits[i]) begin
      @(negedge clk) rxd = bits[i];
      repeat (BIT - 1) @(negedge clk);
    end
    @(negedge clk) rxd = 1'b1;
    repeat (2 * BIT) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    int d0, p0, f0;
    rst = 1'b1; rxd = 1'b1; parity_en = 1'b0; parity_odd = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 15; k++) begin
      b = (k == 0) ? 8'hFF : (k == 1) ? 8'h0F : (k == 2) ? 8'h55 : (k == 3) ? 8'hAA : 8'($urandom());
      d0 = n_done; p0 = n_perr; f0 = n_ferr;
      send(b, 1'(k % 3 != 0), 1'(k % 3 == 2), 1'b0, 1'b0);
      check(n_done == d0 + 1 && n_perr == p0 && n_ferr == f0, $sformatf("frame %0d accepted", k));
      check(rx_data == b, $sformatf("frame %0d data %h expected %h", k, rx_data, b));
    end
    d0 = n_done; p0 = n_perr; f0 = n_ferr;
    send(8'h3C, 1'b1, 1'b0, 1'b1, 1'b0);
    check(n_done == d0 && n_perr == p0 + 1, "wrong parity reported");
    check(rx_data != 8'h3C, "wrong-parity byte not stored");
    send(8'h3C, 1'b1, 1'b1, 1'b1, 1'b0);
    check(n_done == d0 && n_perr == p0 + 2, "wrong odd parity reported");
    d0 = n_done; f0 = n_ferr;
    send(8'hC3, 1'b0, 1'b0, 1'b0, 1'b1);
    check(n_done == d0 && n_ferr == f0 + 1, "low stop bit reported");
    d0 = n_done; p0 = n_perr; f0 = n_ferr;
    @(negedge clk) rxd = 1'b0;
    repeat (BIT / 4) @(negedge clk);
    rxd = 1'b1;
    repeat (3 * BIT) @(negedge clk);
    check(n_done == d0 && n_perr == p0 && n_ferr == f0, "glitch ignored");
    send(8'h96, 1'b0, 1'b0, 1'b0, 1'b0);
    check(rx_data == 8'h96 && n_done == d0 + 1, "frame after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
