// serial_pkg: constants and types shared by the serial link and the UART.
//
// System clock is 50 MHz. The link timing below follows the protocol:
// CLK period 13 us with a 3/10 duty cycle, 32 us idle between bytes,
// STB raised 8 us after the fourth byte and held for 28 us. The cycle
// counts are those times at 50 MHz (20 ns per cycle). The UART runs at
// 9600 baud with a 16x receive clock. Buffer depth, parity sense and the
// state encodings are this design's choices.
package serial_pkg;

  localparam int unsigned SYS_CLK_HZ    = 50_000_000;

  // serial link, in system clock cycles
  localparam int unsigned CLK_PERIOD_CYC = 650;   // 13 us
  localparam int unsigned CLK_HIGH_CYC   = 195;   // 3/10 of the period
  localparam int unsigned BYTE_GAP_CYC   = 1600;  // 32 us between bytes
  localparam int unsigned STB_DELAY_CYC  = 400;   // 8 us after the last byte
  localparam int unsigned STB_WIDTH_CYC  = 1400;  // 28 us STB pulse

  localparam int unsigned WORD_W         = 32;    // one transfer
  localparam int unsigned BYTE_W         = 8;
  localparam int unsigned BYTES_PER_WORD = WORD_W / BYTE_W;

  localparam int unsigned BUF_ADDR_W     = 4;     // 16 words, one LUT RAM deep

  // UART
  localparam int unsigned UART_BAUD       = 9600;
  localparam int unsigned UART_OVERSAMPLE = 16;

  // transmitter and receiver state machines (names as in the protocol text)
  typedef enum logic [3:0] {
    U_IDLE, U_START,
    U_DATA0, U_DATA1, U_DATA2, U_DATA3, U_DATA4, U_DATA5, U_DATA6, U_DATA7,
    U_PARITY, U_STOP
  } uart_state_e;

  // clock generating unit phases
  typedef enum logic [2:0] {
    CG_IDLE, CG_LOW, CG_HIGH, CG_GAP, CG_STB_WAIT, CG_STB_ON
  } clkgen_state_e;

endpackage
