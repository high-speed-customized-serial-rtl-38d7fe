// clock_gen: clock generating unit of the serial link.
//
// From the 50 MHz system clock it builds the link timing for one word:
// BYTES bytes of 8 bits each, one CLK period per bit, an idle gap between
// bytes, then STB after a delay. Each bit period starts with CLK low for
// PERIOD-HIGH cycles and ends with CLK high for HIGH cycles, so the duty
// cycle is HIGH/PERIOD (3/10 by default). At the end of every bit (the CLK
// falling edge) a one-cycle shift strobe tells the parallel-to-serial unit
// to present the next bit, so DI is stable around the CLK rising edge where
// a receiver samples it. di_en is high while bytes are on the wire; during
// byte gaps and the STB phase DI is forced low by the shift unit.
//
// Interface: start (one cycle, ignored while busy) begins a word. busy is
// high from the cycle after start until STB has fallen; done pulses for one
// cycle then. ser_clk and stb are registered outputs. The period, duty cycle,
// gap, STB delay and STB width follow the protocol; the phase order inside a
// bit (low then high) and active-high STB are this design's choices.
module clock_gen
  import serial_pkg::*;
#(
  parameter int unsigned PERIOD    = CLK_PERIOD_CYC,
  parameter int unsigned HIGH      = CLK_HIGH_CYC,
  parameter int unsigned GAP       = BYTE_GAP_CYC,
  parameter int unsigned STB_DELAY = STB_DELAY_CYC,
  parameter int unsigned STB_WIDTH = STB_WIDTH_CYC,
  parameter int unsigned BYTES     = BYTES_PER_WORD
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic ser_clk,   // CLK line
  output logic stb,       // STB line (serial_en)
  output logic shift,     // advance the shift register by one bit
  output logic di_en,     // bytes are being sent
  output logic busy,
  output logic done
);

  localparam int unsigned LOW = PERIOD - HIGH;
  localparam int unsigned CW  = $clog2(GAP + PERIOD + STB_DELAY + STB_WIDTH + 1);
  localparam int unsigned BW  = (BYTES > 1) ? $clog2(BYTES) : 1;

  clkgen_state_e   state, state_n;
  logic [CW-1:0]   cnt, cnt_n;
  logic [2:0]      bit_idx, bit_idx_n;
  logic [BW-1:0]   byte_idx, byte_idx_n;
  logic            shift_n, done_n;

  always_comb begin
    state_n    = state;
    cnt_n      = cnt - CW'(1);
    bit_idx_n  = bit_idx;
    byte_idx_n = byte_idx;
    shift_n    = 1'b0;
    done_n     = 1'b0;
    unique case (state)
      CG_IDLE: begin
        cnt_n = cnt;
        if (start) begin
          state_n    = CG_LOW;
          cnt_n      = CW'(LOW - 1);
          bit_idx_n  = '0;
          byte_idx_n = '0;
        end
      end
      CG_LOW: if (cnt == '0) begin
        state_n = CG_HIGH;
        cnt_n   = CW'(HIGH - 1);
      end
      CG_HIGH: if (cnt == '0) begin
        shift_n   = 1'b1;
        bit_idx_n = bit_idx + 3'd1;
        if (bit_idx != 3'd7) begin
          state_n = CG_LOW;
          cnt_n   = CW'(LOW - 1);
        end else if (byte_idx != BW'(BYTES - 1)) begin
          byte_idx_n = byte_idx + BW'(1);
          state_n    = CG_GAP;
          cnt_n      = CW'(GAP - 1);
        end else begin
          state_n = CG_STB_WAIT;
          cnt_n   = CW'(STB_DELAY - 1);
        end
      end
      CG_GAP: if (cnt == '0) begin
        state_n = CG_LOW;
        cnt_n   = CW'(LOW - 1);
      end
      CG_STB_WAIT: if (cnt == '0) begin
        state_n = CG_STB_ON;
        cnt_n   = CW'(STB_WIDTH - 1);
      end
      CG_STB_ON: if (cnt == '0) begin
        state_n = CG_IDLE;
        done_n  = 1'b1;
      end
      default: state_n = CG_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= CG_IDLE;
      cnt      <= '0;
      bit_idx  <= '0;
      byte_idx <= '0;
      ser_clk  <= 1'b0;
      stb      <= 1'b0;
      shift    <= 1'b0;
      di_en    <= 1'b0;
      done     <= 1'b0;
    end else begin
      state    <= state_n;
      cnt      <= cnt_n;
      bit_idx  <= bit_idx_n;
      byte_idx <= byte_idx_n;
      ser_clk  <= (state_n == CG_HIGH);
      stb      <= (state_n == CG_STB_ON);
      di_en    <= (state_n == CG_LOW) || (state_n == CG_HIGH);
      shift    <= shift_n;
      done     <= done_n;
    end
  end

  assign busy = (state != CG_IDLE);

  // the timing must fit the counter and leave a low phase in every bit
  initial begin
    assert (HIGH > 0 && HIGH < PERIOD) else $error("clock_gen: HIGH must lie inside PERIOD");
    assert (GAP > 0 && STB_DELAY > 0 && STB_WIDTH > 0) else $error("clock_gen: zero-length phase");
  end

endmodule
