// tb_data_buffer: self-checking test of the dual-port data buffer.
//
// Writes random words to every address, tries writes with WR_EN low (which
// must leave the memory alone), then reads every address through both read
// outputs: RD_aDATA must show the word at once, RD_sDATA one RD_CLK edge
// after RD_EN and must hold while RD_EN is low. A reference array in the
// testbench gives the expected words.
module tb_data_buffer;
  localparam int unsigned DW = 32, AW = 4, DEPTH = 2**AW;

  logic          clk = 1'b0, rst;
  logic          wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_adata, rd_sdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  data_buffer #(.DATA_W(DW), .ADDR_W(AW)) dut (
    .wr_clk(clk), .wr_en, .wr_addr, .wr_data,
    .rd_clk(clk), .rd_rst(rst), .rd_en, .rd_addr, .rd_adata, .rd_sdata
  );

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; wr_en = 1'b0; rd_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(rd_sdata == '0, "rd_sdata cleared by reset");
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = $urandom();
      ref_mem[a] = wr_data;
      @(posedge clk); #1;
    end
    // writes with the port closed
    for (int a = 0; a < DEPTH; a += 3) begin
      wr_en = 1'b0; wr_addr = AW'(a); wr_data = ~ref_mem[a];
      @(posedge clk); #1;
    end
    // asynchronous read
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = AW'(a); #1;
      check(rd_adata == ref_mem[a], $sformatf("rd_adata at %0d", a));
    end
    // synchronous read
    for (int a = DEPTH - 1; a >= 0; a--) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(posedge clk); #1;
      check(rd_sdata == ref_mem[a], $sformatf("rd_sdata at %0d: %h vs %h", a, rd_sdata, ref_mem[a]));
      // hold while RD_EN is low
      rd_en = 1'b0; rd_addr = AW'(a + 1);
      @(posedge clk); #1;
      check(rd_sdata == ref_mem[a], $sformatf("rd_sdata held at %0d", a));
    end
    // write then read back the same address the next cycle
    wr_en = 1'b1; wr_addr = 4'd5; wr_data = 32'hA2345678; ref_mem[5] = wr_data;
    @(posedge clk); #1;
    wr_en = 1'b0; rd_en = 1'b1; rd_addr = 4'd5;
    @(posedge clk); #1;
    check(rd_sdata == 32'hA2345678, "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
