// tb_s2p: self-checking test of the serial-to-parallel unit.
//
// The testbench drives CLK, DI and STB itself with a shortened protocol
// (bit period 12 cycles, 4 high, DI changing on the falling edge, gaps
// between bytes, STB after the last byte) and checks that each 32-bit word
// comes out on pdata with one valid pulse, on the third clock edge after STB rises. A
// word cut short by one bit and one with an extra bit must give err and no
// valid.
module tb_s2p;
  localparam int W = 32, LOWC = 8, HIGHC = 4, GAPC = 20;

  logic         clk = 1'b0, rst;
  logic         ser_clk, ser_di, ser_stb, valid, err;
  logic [W-1:0] pdata;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  longint cyc = 0, stb_t, valid_t;

  s2p #(.WIDTH(W)) dut (.clk, .rst, .ser_clk, .ser_di, .ser_stb, .pdata, .valid, .err);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (valid) begin n_valid++; valid_t = cyc; end
    if (err)   n_err++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive nbits bits of w (MSB of a W-bit word first), then STB
  task automatic drive_word(input logic [W-1:0] w, input int nbits);
    for (int i = 0; i < nbits; i++) begin
      @(negedge clk);
      ser_di = (i < W) ? w[W-1-i] : 1'b1;
      repeat (LOWC) @(negedge clk);
      ser_clk = 1'b1;
      repeat (HIGHC) @(negedge clk);
      ser_clk = 1'b0;
      if (i % 8 == 7) begin
        ser_di = 1'b0;
        repeat (GAPC) @(negedge clk);
      end
    end
    repeat (10) @(negedge clk);
    ser_stb = 1'b1;
    stb_t = cyc;
    repeat (30) @(negedge clk);
    ser_stb = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    logic [W-1:0] w;
    int v0, e0;
    rst = 1'b1; ser_clk = 1'b0; ser_di = 1'b0; ser_stb = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 10; k++) begin
      w = (k == 0) ? 32'hFF0F55AA : (k == 1) ? 32'hA2345678 : $urandom();
      v0 = n_valid; e0 = n_err;
      drive_word(w, W);
      check(n_valid == v0 + 1 && n_err == e0, $sformatf("one valid for word %0d", k));
      check(pdata == w, $sformatf("word %0d: got %h expected %h", k, pdata, w));
      check(valid_t - stb_t == 3, $sformatf("valid latency %0d", valid_t - stb_t));
    end
    w = pdata;
    v0 = n_valid; e0 = n_err;
    drive_word(32'h12345678, W - 1);
    check(n_valid == v0 && n_err == e0 + 1, "short word gives err");
    check(pdata == w, "short word leaves pdata");
    v0 = n_valid; e0 = n_err;
    drive_word(32'h12345678, W + 1);
    check(n_valid == v0 && n_err == e0 + 1, "long word gives err");
    drive_word(32'hCAFEF00D, W);
    check(pdata == 32'hCAFEF00D, "recovers after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
