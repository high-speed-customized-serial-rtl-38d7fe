// uart: the UART of the design, built from its four parts: baud generator,
// enable generator, transmitter and receiver.
//
// The baud generator divides the system clock into a bit-rate tick
// (baud_clock) and a 16x tick (clock_16). The enable generator turns the bit
// tick into the transmitter's enable while a byte is waiting or on the line.
// The transmitter sends tx_data on TxD when send_data is pulsed while
// tx_busy is low; the receiver turns frames on RxD into rx_d with
// data_rx_done. parity_en and parity_odd play the part of the configuration
// register. All signals are in the system clock domain; baud_clock and
// clock_16 are brought out as one-cycle tick pulses.
module uart
  import serial_pkg::*;
#(
  parameter int unsigned CLK_HZ = SYS_CLK_HZ,
  parameter int unsigned BAUD   = UART_BAUD
) (
  input  logic       clk,
  input  logic       rst,
  // configuration
  input  logic       parity_en,
  input  logic       parity_odd,
  // serial lines
  input  logic       rxd,
  output logic       txd,
  // transmit side
  input  logic [7:0] tx_data,
  input  logic       send_data,
  output logic       tx_busy,
  output logic       tx_done,
  // receive side
  output logic [7:0] rx_d,
  output logic       data_rx_done,
  output logic       parity_err,
  output logic       frame_err,
  // rate ticks
  output logic       baud_clock,
  output logic       clock_16
);

  logic tx_enable, tx_active;

  uart_baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .OVERSAMPLE(UART_OVERSAMPLE)) u_baud (
    .clk, .rst, .baud_tick(baud_clock), .tick16(clock_16)
  );

  uart_enable_gen u_enable (
    .clk, .rst, .baud_tick(baud_clock), .send_data(send_data && !tx_busy),
    .tx_active, .tx_enable
  );

  uart_tx u_tx (
    .clk, .rst, .tx_data, .send_data, .tx_enable, .parity_en, .parity_odd,
    .txd, .tx_active, .busy(tx_busy), .done(tx_done)
  );

  uart_rx u_rx (
    .clk, .rst, .tick16(clock_16), .rxd, .parity_en, .parity_odd,
    .rx_data(rx_d), .data_rx_done, .parity_err, .frame_err
  );

endmodule
