// uart_baud_gen: baud generator of the UART, a clock divider.
//
// Two free-running counters divide the system clock: baud_tick pulses once
// per bit time (CLK_HZ/BAUD, rounded: 5208 cycles, 9600.6 Hz at 50 MHz) and
// tick16 pulses 16 times per bit time (CLK_HZ/(16*BAUD), rounded: 326
// cycles) for the receiver's oversampling. The ticks are one-cycle enables
// in the system clock domain rather than derived clocks, so the rest of the
// UART stays on one clock. Rates follow the UART description; rounding and
// the enable form are this design's choices.
module uart_baud_gen
  import serial_pkg::*;
#(
  parameter int unsigned CLK_HZ     = SYS_CLK_HZ,
  parameter int unsigned BAUD       = UART_BAUD,
  parameter int unsigned OVERSAMPLE = UART_OVERSAMPLE
) (
  input  logic clk,
  input  logic rst,
  output logic baud_tick,
  output logic tick16
);

  localparam int unsigned DIV_BAUD = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned DIV_OS   = (CLK_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned BW       = $clog2(DIV_BAUD);
  localparam int unsigned OW       = (DIV_OS > 1) ? $clog2(DIV_OS) : 1;

  logic [BW-1:0] bcnt;
  logic [OW-1:0] ocnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt      <= '0;
      ocnt      <= '0;
      baud_tick <= 1'b0;
      tick16    <= 1'b0;
    end else begin
      baud_tick <= (bcnt == BW'(DIV_BAUD - 1));
      tick16    <= (ocnt == OW'(DIV_OS - 1));
      bcnt      <= (bcnt == BW'(DIV_BAUD - 1)) ? '0 : bcnt + BW'(1);
      ocnt      <= (ocnt == OW'(DIV_OS - 1))   ? '0 : ocnt + OW'(1);
    end
  end

  initial assert (DIV_BAUD >= 2 && DIV_OS >= 2) else $error("uart_baud_gen: clock too slow for this baud rate");

endmodule
