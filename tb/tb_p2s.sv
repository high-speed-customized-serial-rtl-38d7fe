// tb_p2s: self-checking test of the parallel-to-serial shift register.
//
// Loads words (the four byte patterns 11111111, 00001111, 01010101,
// 10101010 as one word, then random words), shifts them out with out_en
// high and checks DI bit by bit, MSB first, one clock after each strobe.
// Also checks DI is 0 whenever out_en is low, that load wins over shift,
// and that idle cycles between strobes keep DI steady.
module tb_p2s;
  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst, load, shift, out_en, di;
  logic [W-1:0] pdata;
  int checks = 0, failures = 0;

  p2s #(.WIDTH(W)) dut (.clk, .rst, .load, .pdata, .shift, .out_en, .di);

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_word(input logic [W-1:0] w, input int idle);
    load = 1'b1; pdata = w; out_en = 1'b1; shift = 1'b0;
    @(posedge clk); #1;
    load = 1'b0; pdata = ~w;
    check(di == w[W-1], "first bit after load");
    for (int b = W - 1; b >= 0; b--) begin
      repeat (idle) begin
        @(posedge clk); #1;
        check(di == w[b], $sformatf("bit %0d steady", b));
      end
      if (b > 0) begin
        shift = 1'b1;
        @(posedge clk); #1;
        shift = 1'b0;
        check(di == w[b-1], $sformatf("bit %0d of %h", b - 1, w));
      end
    end
    out_en = 1'b0;
    @(posedge clk); #1;
    check(di == 1'b0, "DI low when output disabled");
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; shift = 1'b0; out_en = 1'b0; pdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    send_word(32'hFF0F55AA, 2);
    for (int i = 0; i < 8; i++) send_word($urandom(), i % 3);
    // output control low: DI stays 0 while shifting
    load = 1'b1; pdata = 32'hFFFFFFFF; out_en = 1'b0;
    @(posedge clk); #1;
    load = 1'b0;
    for (int i = 0; i < 4; i++) begin
      shift = 1'b1;
      @(posedge clk); #1;
      check(di == 1'b0, "DI low while out_en low");
    end
    // load has priority over shift
    load = 1'b1; shift = 1'b1; out_en = 1'b1; pdata = 32'h80000000;
    @(posedge clk); #1;
    load = 1'b0; shift = 1'b0;
    check(di == 1'b1, "load wins over shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
