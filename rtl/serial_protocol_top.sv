// serial_protocol_top: FPGA side of the customised serial link.
//
// A host sends bytes over RS232 to the UART; the processor (outside this
// module) assembles four of them into a 32-bit word, writes it into the data
// buffer and orders a send. The send controller reads the word, loads the
// parallel-to-serial unit and starts the clock generating unit, which drives
// the link: CLK (13 us period, 3/10 duty), DI (MSB first, four bytes with
// 32 us gaps) and STB (8 us after the last byte, 28 us long). The
// serial-to-parallel unit listens to the same three lines and rebuilds the
// word, which the processor returns to the host through the UART.
//
// The processor is not part of this RTL: its side of each block is a port
// here (UART byte interface, buffer write port, send order, received word).
// Everything runs on the one 50 MHz system clock with a synchronous,
// active-high reset. The buffer's asynchronous read output is left unused:
// the link takes the registered one. Parameter defaults are the protocol's numbers; the
// UART rate and clock frequency can be overridden for faster simulation.
module serial_protocol_top
  import serial_pkg::*;
#(
  parameter int unsigned CLK_HZ    = SYS_CLK_HZ,
  parameter int unsigned BAUD      = UART_BAUD,
  parameter int unsigned ADDR_W    = BUF_ADDR_W,
  parameter int unsigned PERIOD    = CLK_PERIOD_CYC,
  parameter int unsigned HIGH      = CLK_HIGH_CYC,
  parameter int unsigned GAP       = BYTE_GAP_CYC,
  parameter int unsigned STB_DELAY = STB_DELAY_CYC,
  parameter int unsigned STB_WIDTH = STB_WIDTH_CYC
) (
  input  logic              clk,
  input  logic              rst,
  // RS232 side
  input  logic              rxd,
  output logic              txd,
  input  logic              parity_en,
  input  logic              parity_odd,
  output logic              baud_clock,
  output logic              clock_16,
  // processor side of the UART
  output logic [7:0]        uart_rx_data,
  output logic              uart_rx_done,
  output logic              uart_parity_err,
  output logic              uart_frame_err,
  input  logic [7:0]        uart_tx_data,
  input  logic              uart_send,
  output logic              uart_tx_busy,
  // processor side of the data buffer and link
  input  logic              buf_wr_en,
  input  logic [ADDR_W-1:0] buf_wr_addr,
  input  logic [WORD_W-1:0] buf_wr_data,
  input  logic              send_req,
  input  logic [ADDR_W-1:0] send_addr,
  output logic              send_busy,
  output logic              send_dropped,
  output logic              send_done,
  // received word
  output logic [WORD_W-1:0] par_data,
  output logic              par_valid,
  output logic              par_err,
  // serial link
  output logic              ser_clk,
  output logic              ser_stb,
  output logic              ser_di
);

  logic              rd_en, load, start, cg_busy, shift, di_en;
  logic [ADDR_W-1:0] rd_addr;
  logic [WORD_W-1:0] rd_adata, rd_sdata;
  logic              tx_done_unused;

  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst, .parity_en, .parity_odd, .rxd, .txd,
    .tx_data(uart_tx_data), .send_data(uart_send), .tx_busy(uart_tx_busy),
    .tx_done(tx_done_unused),
    .rx_d(uart_rx_data), .data_rx_done(uart_rx_done),
    .parity_err(uart_parity_err), .frame_err(uart_frame_err),
    .baud_clock, .clock_16
  );

  data_buffer #(.DATA_W(WORD_W), .ADDR_W(ADDR_W)) u_buffer (
    .wr_clk(clk), .wr_en(buf_wr_en), .wr_addr(buf_wr_addr), .wr_data(buf_wr_data),
    .rd_clk(clk), .rd_rst(rst), .rd_en, .rd_addr, .rd_adata, .rd_sdata
  );

  send_ctrl #(.ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst, .send_req, .send_addr, .link_busy(cg_busy),
    .rd_en, .rd_addr, .load, .start, .busy(send_busy), .dropped(send_dropped)
  );

  clock_gen #(
    .PERIOD(PERIOD), .HIGH(HIGH), .GAP(GAP), .STB_DELAY(STB_DELAY),
    .STB_WIDTH(STB_WIDTH), .BYTES(BYTES_PER_WORD)
  ) u_clkgen (
    .clk, .rst, .start, .ser_clk, .stb(ser_stb), .shift, .di_en,
    .busy(cg_busy), .done(send_done)
  );

  p2s #(.WIDTH(WORD_W)) u_p2s (
    .clk, .rst, .load, .pdata(rd_sdata), .shift, .out_en(di_en), .di(ser_di)
  );

  s2p #(.WIDTH(WORD_W)) u_s2p (
    .clk, .rst, .ser_clk, .ser_di, .ser_stb, .pdata(par_data), .valid(par_valid),
    .err(par_err)
  );

endmodule
