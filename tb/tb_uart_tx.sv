// tb_uart_tx: self-checking test of the UART transmitter.
//
// The testbench supplies tx_enable itself, one pulse every 16 cycles, so a
// bit lasts 16 cycles. For random bytes, with parity off, even and odd, it
// waits for the start bit on TxD, samples each bit in its middle and checks
// start 0, data LSB first, the parity bit when enabled, stop 1, the width
// of every bit, and that done pulses once per frame. A send_data while busy
// must be ignored.
module tb_uart_tx;
  localparam int BIT = 16;

  logic       clk = 1'b0, rst;
  logic [7:0] tx_data;
  logic       send_data, tx_enable, parity_en, parity_odd;
  logic       txd, tx_active, busy, done;
  int checks = 0, failures = 0, n_done = 0, encnt = 0;
  longint cyc = 0;

  uart_tx dut (.clk, .rst, .tx_data, .send_data, .tx_enable, .parity_en, .parity_odd,
               .txd, .tx_active, .busy, .done);

  always #10 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    encnt <= (encnt == BIT - 1) ? 0 : encnt + 1;
    if (done) n_done++;
  end
  assign tx_enable = (encnt == BIT - 1);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [7:0] b, input logic pe, input logic po, input bit poke);
    longint t_start;
    logic   exp_bits[$];
    int     nd;
    exp_bits.push_back(1'b0);
    for (int i = 0; i < 8; i++) exp_bits.push_back(b[i]);
    if (pe) exp_bits.push_back((^b) ^ po);
    exp_bits.push_back(1'b1);
    nd = n_done;
    @(negedge clk);
    parity_en = pe; parity_odd = po; tx_data = b; send_data = 1'b1;
    @(negedge clk);
    send_data = 1'b0; tx_data = ~b;
    check(busy, "busy after send_data");
    @(negedge txd);
    t_start = cyc;
    for (int i = 0; i < exp_bits.size(); i++) begin
      repeat (BIT / 2) @(posedge clk);
      #1 check(txd == exp_bits[i], $sformatf("byte %h bit %0d", b, i));
      if (poke && i == 3) begin
        @(negedge clk) send_data = 1'b1; tx_data = 8'h00;
        @(negedge clk) send_data = 1'b0;
        repeat (BIT / 2 - 2) @(posedge clk);
      end else
        repeat (BIT / 2) @(posedge clk);
    end
    // line back to idle, a frame is exactly (bits) * BIT cycles long
    wait (!busy);
    check(cyc - t_start >= exp_bits.size() * BIT && cyc - t_start <= exp_bits.size() * BIT + 2,
          $sformatf("frame length %0d", cyc - t_start));
    @(posedge clk); #1;
    check(n_done == nd + 1, "one done per frame");
    check(txd == 1'b1, "idle high");
  endtask

  initial begin
    rst = 1'b1; send_data = 1'b0; tx_data = '0; parity_en = 1'b0; parity_odd = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(txd == 1'b1 && !busy, "idle after reset");
    frame(8'hFF, 1'b0, 1'b0, 1'b0);
    frame(8'h0F, 1'b1, 1'b0, 1'b0);
    frame(8'h55, 1'b1, 1'b1, 1'b0);
    frame(8'hAA, 1'b0, 1'b0, 1'b1);
    for (int k = 0; k < 12; k++) frame(8'($urandom()), 1'(k % 2), 1'(k / 6), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
