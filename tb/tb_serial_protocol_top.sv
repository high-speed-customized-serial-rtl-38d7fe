// tb_serial_protocol_top: end-to-end test of the whole design at its default
// parameters (50 MHz, 9600 baud, 13 us link clock).
//
// The testbench plays two parts outside the RTL. As the host PC it sends
// bytes on RxD at 9600 baud and decodes the bytes coming back on TxD. As
// the processor firmware it collects four received bytes into a 32-bit word
// (first byte most significant), writes it into the data buffer, orders a
// send, waits for the serial-to-parallel unit's word and sends its four
// bytes back to the PC. Three words go round, with parity off, even and odd;
// one frame with a wrong parity bit is injected and must be rejected (the
// firmware ignores it and the PC resends). A second send order while the
// link is busy must be dropped.
//
// On the link it checks 32 CLK pulses per word, each high 195 cycles within
// a 650-cycle period, 3 byte gaps of 32 us, STB 8 us after the last bit for
// 28 us, and that the word seen by the receiver is the one written. Each
// mechanism (UART receive and send, parity check, parity error, buffer
// write and read, byte gap, STB, word capture, dropped order) is counted
// and must have happened at least once.
module tb_serial_protocol_top;
  localparam int BITC = 5208;               // 50e6 / 9600, as the UART counts
  localparam int PERIOD = 650, HIGH = 195, GAP = 1600, SDLY = 400, SW = 1400;

  logic        clk = 1'b0, rst;
  logic        rxd, txd, parity_en, parity_odd, baud_clock, clock_16;
  logic [7:0]  uart_rx_data, uart_tx_data;
  logic        uart_rx_done, uart_parity_err, uart_frame_err, uart_send, uart_tx_busy;
  logic        buf_wr_en, send_req, send_busy, send_dropped, send_done;
  logic [3:0]  buf_wr_addr, send_addr;
  logic [31:0] buf_wr_data, par_data;
  logic        par_valid, par_err, ser_clk, ser_stb, ser_di;

  serial_protocol_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- counters
  int n_rx_frames = 0, n_tx_frames = 0, n_parity_frames = 0, n_parity_err = 0;
  int n_buf_wr = 0, n_sends = 0, n_gaps = 0, n_stb = 0, n_words = 0, n_dropped = 0;
  int n_frame_err = 0, n_par_err = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (uart_rx_done)    n_rx_frames++;
      if (uart_parity_err) n_parity_err++;
      if (uart_frame_err)  n_frame_err++;
      if (buf_wr_en)       n_buf_wr++;
      if (dut.u_ctrl.rd_en) n_sends++;
      if (par_valid)       n_words++;
      if (par_err)         n_par_err++;
      if (send_dropped)    n_dropped++;
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------- link timing check
  longint rise_t[$], fall_t[$];
  longint stb_r, stb_f;
  logic   pclk = 1'b0, pstb = 1'b0;
  always @(posedge clk) begin
    #1;
    if (ser_clk && !pclk) rise_t.push_back(cyc);
    if (!ser_clk && pclk) fall_t.push_back(cyc);
    if (ser_stb && !pstb) begin
      stb_r = cyc;
      n_stb++;
      checks++;
      if (fall_t.size() != 32) begin
        failures++;
        $display("FAIL %0d CLK pulses before STB", fall_t.size());
      end else begin
        for (int i = 0; i < 32; i++) begin
          checks++;
          if (fall_t[i] - rise_t[i] != HIGH ||
              (i % 8 != 0 && rise_t[i] - rise_t[i-1] != PERIOD)) begin
            failures++;
            $display("FAIL CLK pulse %0d timing", i);
          end
          if (i % 8 == 0 && i > 0) begin
            n_gaps++;
            check(rise_t[i] - fall_t[i-1] == GAP + PERIOD - HIGH, "32 us byte gap");
          end
        end
        check(stb_r - fall_t[31] == SDLY, "STB 8 us after the last bit");
      end
      rise_t.delete(); fall_t.delete();
    end
    if (!ser_stb && pstb) begin
      stb_f = cyc;
      check(stb_f - stb_r == SW, "STB held 28 us");
    end
    pclk = ser_clk; pstb = ser_stb;
  end

  // -------------------------------------------------------------- host PC
  logic [7:0] pc_rx_q[$];

  task automatic pc_send(input logic [7:0] b, input logic pe, input logic po, input bit bad_par);
    logic bits[$];
    bits.push_back(1'b0);
    for (int i = 0; i < 8; i++) bits.push_back(b[i]);
    if (pe) bits.push_back((^b) ^ po ^ bad_par);
    bits.push_back(1'b1);
    if (pe) n_parity_frames++;
    foreach (bits[i]) begin
      rxd = bits[i];
      repeat (BITC) @(negedge clk);
    end
    rxd = 1'b1;
    repeat (BITC) @(negedge clk);
  endtask

  // receiver on TxD, sampling in the middle of each bit
  always begin
    logic [7:0] b;
    logic       pb;
    @(negedge txd);
    repeat (BITC / 2) @(negedge clk);
    if (txd == 1'b0) begin
      for (int i = 0; i < 8; i++) begin
        repeat (BITC) @(negedge clk);
        b[i] = txd;
      end
      if (parity_en) begin
        repeat (BITC) @(negedge clk);
        pb = txd;
        check(pb == ((^b) ^ parity_odd), "parity bit on TxD");
      end
      repeat (BITC) @(negedge clk);
      check(txd == 1'b1, "stop bit on TxD");
      pc_rx_q.push_back(b);
      n_tx_frames++;
    end
  end

  // ------------------------------------------------ processor firmware model
  task automatic fw_word(input logic [3:0] addr, output logic [31:0] w);
    for (int i = 0; i < 4; i++) begin
      @(posedge clk iff uart_rx_done);
      w = {w[23:0], uart_rx_data};
    end
    @(negedge clk);
    buf_wr_en = 1'b1; buf_wr_addr = addr; buf_wr_data = w;
    @(negedge clk);
    buf_wr_en = 1'b0;
    send_req = 1'b1; send_addr = addr;
    @(negedge clk);
    send_req = 1'b0;
  endtask

  task automatic fw_return(input logic [31:0] w);
    for (int i = 3; i >= 0; i--) begin
      @(negedge clk iff !uart_tx_busy);
      uart_tx_data = w[8*i +: 8]; uart_send = 1'b1;
      @(negedge clk);
      uart_send = 1'b0;
    end
  endtask

  // ------------------------------------------------------------- scenario
  logic [31:0] words[3] = '{32'hFF0F55AA, 32'hA2345678, 32'h99887766};

  initial begin
    logic [31:0] w_fw;
    int w0, s0;
    rst = 1'b1; rxd = 1'b1; parity_en = 1'b0; parity_odd = 1'b0;
    uart_tx_data = '0; uart_send = 1'b0; buf_wr_en = 1'b0; buf_wr_addr = '0;
    buf_wr_data = '0; send_req = 1'b0; send_addr = '0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (BITC) @(negedge clk);

    for (int k = 0; k < 3; k++) begin
      parity_en  = (k != 0);
      parity_odd = (k == 2);
      w0 = n_words;
      fork
        begin
          // host sends the word MSB byte first; before word 1 a corrupted frame
          if (k == 1) pc_send(8'h5A, 1'b1, 1'b0, 1'b1);
          for (int i = 3; i >= 0; i--) pc_send(words[k][8*i +: 8], parity_en, parity_odd, 1'b0);
        end
        fw_word(4'(k * 3 + 2), w_fw);
      join
      check(w_fw == words[k], $sformatf("firmware assembled %h", w_fw));
      check(send_busy, "link busy after send order");
      if (k == 2) begin
        // a second order while the link is busy
        repeat (1000) @(negedge clk);
        s0 = n_sends;
        send_req = 1'b1; send_addr = 4'd0;
        @(negedge clk) send_req = 1'b0;
        repeat (4) @(negedge clk);
        check(n_sends == s0, "order while busy not executed");
      end
      @(posedge clk iff par_valid);
      check(par_data == words[k], $sformatf("word over the link %h expected %h", par_data, words[k]));
      @(posedge clk iff send_done);
      fw_return(par_data);
      wait (pc_rx_q.size() == 4);
      repeat (BITC) @(negedge clk);
      for (int i = 3; i >= 0; i--) begin
        logic [7:0] b;
        b = pc_rx_q.pop_front();
        check(b == words[k][8*i +: 8], $sformatf("byte back at the host %h expected %h", b, words[k][8*i +: 8]));
      end
      check(n_words == w0 + 1, "one word per send");
    end

    // every mechanism must have happened
    check(n_rx_frames == 12,   $sformatf("UART frames received: %0d", n_rx_frames));
    check(n_tx_frames == 12,   $sformatf("UART frames sent: %0d", n_tx_frames));
    check(n_parity_frames > 0, "parity frames");
    check(n_parity_err == 1,   $sformatf("parity errors detected: %0d", n_parity_err));
    check(n_frame_err == 0,    "no framing errors");
    check(n_buf_wr == 3,       "buffer writes");
    check(n_sends == 3,        "buffer reads for sending");
    check(n_gaps == 9,         $sformatf("byte gaps: %0d", n_gaps));
    check(n_stb == 3,          "STB pulses");
    check(n_words == 3 && n_par_err == 0, "words captured");
    check(n_dropped == 1,      "dropped send order");
    $display("mechanisms: rx=%0d tx=%0d parity_frames=%0d parity_err=%0d buf_wr=%0d sends=%0d gaps=%0d stb=%0d words=%0d dropped=%0d",
             n_rx_frames, n_tx_frames, n_parity_frames, n_parity_err, n_buf_wr, n_sends,
             n_gaps, n_stb, n_words, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
