// uart_tx: UART transmitter.
//
// Frame: start bit 0, data bits 0..7 LSB first, an optional parity bit, stop
// bit 1; the line idles at 1. send_data, while busy is low, captures tx_data.
// The state machine then waits in IDLE until tx_enable (the bit-rate enable
// from the enable generator) and walks START, DATA0..DATA7, PARITY (only when
// parity_en is set) and STOP, one state per tx_enable; each state drives its
// bit on txd from the cycle after the tx_enable that entered it. done pulses
// when STOP ends. The frame and the state sequence follow the transmitter
// description; even parity by default (parity_odd selects odd) and the
// capture handshake are this design's choices.
module uart_tx
  import serial_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] tx_data,
  input  logic       send_data,
  input  logic       tx_enable,
  input  logic       parity_en,
  input  logic       parity_odd,
  output logic       txd,
  output logic       tx_active,   // a frame is on the line
  output logic       busy,        // byte captured or frame on the line
  output logic       done
);

  uart_state_e state, state_n;
  logic [7:0]  data;
  logic        loaded;
  logic        txd_n;

  always_comb begin
    state_n = state;
    if (tx_enable) begin
      unique case (state)
        U_IDLE:   if (loaded) state_n = U_START;
        U_START:  state_n = U_DATA0;
        U_DATA0, U_DATA1, U_DATA2, U_DATA3, U_DATA4, U_DATA5, U_DATA6:
                  state_n = uart_state_e'(state + 4'd1);
        U_DATA7:  state_n = parity_en ? U_PARITY : U_STOP;
        U_PARITY: state_n = U_STOP;
        U_STOP:   state_n = U_IDLE;
        default:  state_n = U_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state_n)
      U_START:  txd_n = 1'b0;
      U_DATA0:  txd_n = data[0];
      U_DATA1:  txd_n = data[1];
      U_DATA2:  txd_n = data[2];
      U_DATA3:  txd_n = data[3];
      U_DATA4:  txd_n = data[4];
      U_DATA5:  txd_n = data[5];
      U_DATA6:  txd_n = data[6];
      U_DATA7:  txd_n = data[7];
      U_PARITY: txd_n = (^data) ^ parity_odd;
      default:  txd_n = 1'b1;   // IDLE and STOP
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= U_IDLE;
      data   <= '0;
      loaded <= 1'b0;
      txd    <= 1'b1;
      done   <= 1'b0;
    end else begin
      state <= state_n;
      txd   <= txd_n;
      done  <= (state == U_STOP) && (state_n == U_IDLE);
      if (send_data && !busy) begin
        data   <= tx_data;
        loaded <= 1'b1;
      end else if (state == U_IDLE && state_n == U_START) begin
        loaded <= 1'b0;
      end
    end
  end

  assign tx_active = (state != U_IDLE);
  assign busy      = tx_active || loaded;

endmodule
