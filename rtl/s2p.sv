// s2p: serial-to-parallel conversion unit (SIPO) for the CLK/DI/STB link.
//
// The three link lines are brought into the system clock domain with
// two-flop synchronisers, since in general they come from another device.
// On each rising edge of CLK the DI bit is shifted in at the LSB, so the
// first bit received ends up as the MSB, matching the sender. The rising
// edge of STB marks the end of a word: if exactly WIDTH bits arrived, pdata
// is updated and valid pulses for one cycle; otherwise err pulses and the
// bits are dropped. The bit counter restarts after each STB.
//
// Latency: valid is high after the third system clock edge following the rise
// of STB on the wire (two synchroniser stages and one output register).
// Sampling on the rising edge of CLK, and the length check, are this
// design's choices.
module s2p #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ser_clk,
  input  logic             ser_di,
  input  logic             ser_stb,
  output logic [WIDTH-1:0] pdata,
  output logic             valid,
  output logic             err
);

  localparam int unsigned NW = $clog2(WIDTH + 2);

  logic [2:0]        clk_s, stb_s;   // [0],[1] synchroniser, [2] previous value
  logic [1:0]        di_s;
  logic [WIDTH-1:0]  sreg;
  logic [NW-1:0]     nbits;
  logic              clk_rise, stb_rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s <= '0;
      stb_s <= '0;
      di_s  <= '0;
    end else begin
      clk_s <= {clk_s[1:0], ser_clk};
      stb_s <= {stb_s[1:0], ser_stb};
      di_s  <= {di_s[0], ser_di};
    end
  end

  assign clk_rise = clk_s[1] && !clk_s[2];
  assign stb_rise = stb_s[1] && !stb_s[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg  <= '0;
      nbits <= '0;
      pdata <= '0;
      valid <= 1'b0;
      err   <= 1'b0;
    end else begin
      valid <= 1'b0;
      err   <= 1'b0;
      if (stb_rise) begin
        if (nbits == NW'(WIDTH)) begin
          pdata <= sreg;
          valid <= 1'b1;
        end else begin
          err <= 1'b1;
        end
        nbits <= '0;
      end else if (clk_rise) begin
        sreg <= {sreg[WIDTH-2:0], di_s[1]};
        if (nbits != NW'(WIDTH + 1)) nbits <= nbits + NW'(1);
      end
    end
  end

endmodule
