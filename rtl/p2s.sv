// p2s: parallel-to-serial conversion unit (PISO shift register).
//
// A word from the data buffer is loaded with load; every shift strobe from
// the clock generating unit moves the register one place towards the MSB,
// so DI carries the word's most significant bit first. As 4 bytes of 8 bits
// this sends byte 3 (bits 31..24) first, each byte MSB first. While the
// output control out_en is low, DI is held at 0, as in the conversion unit
// of the protocol; the register is loaded rather than rotated, since each
// word is sent once. load wins over shift in the same cycle.
//
// Timing: DI is a registered output and changes on the clock edge after a
// shift strobe or a change of out_en.
module p2s #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] pdata,
  input  logic             shift,
  input  logic             out_en,
  output logic             di
);

  logic [WIDTH-1:0] sreg;

  always_ff @(posedge clk) begin
    if (rst)        sreg <= '0;
    else if (load)  sreg <= pdata;
    else if (shift) sreg <= {sreg[WIDTH-2:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (rst) di <= 1'b0;
    else     di <= out_en ? (load ? pdata[WIDTH-1] : (shift ? sreg[WIDTH-2] : sreg[WIDTH-1])) : 1'b0;
  end

endmodule
