// send_ctrl: sequences one send order of the serial link.
//
// When the processor issues send_req with an address while the link is idle,
// the controller pulses rd_en for one cycle to read that word from the data
// buffer's registered port. In the next cycle the word is on rd_sdata; the
// controller then pulses load (parallel-to-serial unit) and start (clock
// generating unit) together. busy covers the whole send until the clock
// generating unit reports done; a send_req while busy is dropped and
// counted on dropped. The order of events follows the send sequence of the
// protocol; the one-cycle handshakes are this design's choices.
module send_ctrl #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              send_req,
  input  logic [ADDR_W-1:0] send_addr,
  input  logic              link_busy,   // clock generating unit busy
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              load,
  output logic              start,
  output logic              busy,
  output logic              dropped
);

  logic reading;   // rd_en was issued last cycle

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_en   <= 1'b0;
      rd_addr <= '0;
      reading <= 1'b0;
      load    <= 1'b0;
      start   <= 1'b0;
      dropped <= 1'b0;
    end else begin
      rd_en   <= 1'b0;
      load    <= 1'b0;
      start   <= 1'b0;
      dropped <= 1'b0;
      reading <= rd_en;
      if (send_req) begin
        if (busy) dropped <= 1'b1;
        else begin
          rd_en   <= 1'b1;
          rd_addr <= send_addr;
        end
      end
      if (reading) begin
        load  <= 1'b1;
        start <= 1'b1;
      end
    end
  end

  assign busy = rd_en || reading || load || start || link_busy;

endmodule
