// uart_rx: UART receiver with 16x oversampling.
//
// RxD passes a two-flop synchroniser. In IDLE the receiver waits for the
// line to go low (start bit). It then counts tick16 enables: after 8 it
// checks the line is still low (middle of the start bit, otherwise it was a
// glitch and it returns to IDLE), and from there takes one sample every 16
// ticks, near the middle of each bit: DATA0..DATA7 (LSB first), PARITY when
// parity_en is set, and STOP. When the stop bit is 1 and the parity matches,
// rx_data is updated and data_rx_done pulses for one cycle; a parity
// mismatch pulses parity_err and a low stop bit pulses frame_err instead,
// and the byte is dropped. The state sequence, LSB-first order and parity
// check follow the receiver description; the start-bit check, even parity
// by default and the error outputs are this design's choices.
module uart_rx
  import serial_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16,
  input  logic       rxd,
  input  logic       parity_en,
  input  logic       parity_odd,
  output logic [7:0] rx_data,
  output logic       data_rx_done,
  output logic       parity_err,
  output logic       frame_err
);

  uart_state_e state;
  logic [1:0]  rxd_s;
  logic [3:0]  ticks;
  logic [7:0]  shreg;
  logic        par_bit;
  logic        bit_in;

  assign bit_in = rxd_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      rxd_s        <= 2'b11;
      state        <= U_IDLE;
      ticks        <= '0;
      shreg        <= '0;
      par_bit      <= 1'b0;
      rx_data      <= '0;
      data_rx_done <= 1'b0;
      parity_err   <= 1'b0;
      frame_err    <= 1'b0;
    end else begin
      rxd_s        <= {rxd_s[0], rxd};
      data_rx_done <= 1'b0;
      parity_err   <= 1'b0;
      frame_err    <= 1'b0;
      unique case (state)
        U_IDLE: begin
          ticks <= '0;
          if (!bit_in) state <= U_START;
        end
        U_START: if (tick16) begin
          ticks <= ticks + 4'd1;
          if (ticks == 4'd7) begin
            ticks <= '0;
            state <= bit_in ? U_IDLE : U_DATA0;
          end
        end
        U_DATA0, U_DATA1, U_DATA2, U_DATA3, U_DATA4, U_DATA5, U_DATA6, U_DATA7:
          if (tick16) begin
            ticks <= ticks + 4'd1;
            if (ticks == 4'd15) begin
              shreg <= {bit_in, shreg[7:1]};
              if (state != U_DATA7)  state <= uart_state_e'(state + 4'd1);
              else if (parity_en)    state <= U_PARITY;
              else                   state <= U_STOP;
            end
          end
        U_PARITY: if (tick16) begin
          ticks <= ticks + 4'd1;
          if (ticks == 4'd15) begin
            par_bit <= bit_in;
            state   <= U_STOP;
          end
        end
        U_STOP: if (tick16) begin
          ticks <= ticks + 4'd1;
          if (ticks == 4'd15) begin
            state <= U_IDLE;
            if (!bit_in)
              frame_err <= 1'b1;
            else if (parity_en && (par_bit != ((^shreg) ^ parity_odd)))
              parity_err <= 1'b1;
            else begin
              rx_data      <= shreg;
              data_rx_done <= 1'b1;
            end
          end
        end
        default: state <= U_IDLE;
      endcase
    end
  end

endmodule
