// uart_enable_gen: enable generator between the baud generator and the
// transmitter.
//
// It takes the baud tick as its enable input and passes it on as tx_enable
// only while there is something to transmit: from a send_data request (held
// in a pending flag until the next baud tick) until the transmitter is idle
// again. The first tx_enable after a request starts the frame, so the start
// bit is aligned with the bit grid. The pending flag is this design's
// choice; the role of the block follows the UART description.
module uart_enable_gen (
  input  logic clk,
  input  logic rst,
  input  logic baud_tick,
  input  logic send_data,   // request for a new frame
  input  logic tx_active,   // transmitter is between START and STOP
  output logic tx_enable
);

  logic pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending   <= 1'b0;
      tx_enable <= 1'b0;
    end else begin
      tx_enable <= baud_tick && (pending || send_data || tx_active);
      if (baud_tick)      pending <= 1'b0;
      else if (send_data) pending <= 1'b1;
    end
  end

endmodule
