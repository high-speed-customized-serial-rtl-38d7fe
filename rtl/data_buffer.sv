// data_buffer: dual-port RAM that holds the 32-bit words waiting to be sent.
//
// Write port: on a WR_CLK rising edge with WR_EN high, WR_DATA is stored at
// WR_ADDR; with WR_EN low the write port is closed. Read port: RD_aDATA is the
// word at RD_ADDR without a clock (distributed-RAM style asynchronous read),
// RD_sDATA is the same word registered on an RD_CLK rising edge with RD_EN
// high and held otherwise. The port list follows the principle diagram of
// the buffer unit; RD_sDATA is the output used by the link, one RD_CLK cycle
// after RD_EN. Depth (16 words) is this design's choice. The memory itself
// has no reset; RD_sDATA clears to zero on rd_rst.
module data_buffer #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 4
) (
  // write side
  input  logic              wr_clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  // read side
  input  logic              rd_clk,
  input  logic              rd_rst,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_adata,
  output logic [DATA_W-1:0] rd_sdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_adata = mem[rd_addr];

  always_ff @(posedge rd_clk) begin
    if (rd_rst)     rd_sdata <= '0;
    else if (rd_en) rd_sdata <= mem[rd_addr];
  end

endmodule
