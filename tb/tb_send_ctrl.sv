// tb_send_ctrl: self-checking test of the send controller.
//
// A send order must read the addressed word (rd_en for one cycle with the
// order's address), then pulse load and start together two cycles later,
// and stay busy while the link is busy. Orders that arrive while busy are
// dropped with a dropped pulse and cause no read. The link is modelled by
// a counter that stays busy for a fixed time after start.
module tb_send_ctrl;
  localparam int AW = 4, LINK_CYC = 40;

  logic          clk = 1'b0, rst;
  logic          send_req, link_busy, rd_en, load, start, busy, dropped;
  logic [AW-1:0] send_addr, rd_addr;
  int checks = 0, failures = 0;
  int n_rd = 0, n_start = 0, n_drop = 0, link_cnt = 0;
  longint cyc = 0, rd_t, start_t, load_t;
  logic [AW-1:0] last_addr;

  send_ctrl #(.ADDR_W(AW)) dut (
    .clk, .rst, .send_req, .send_addr, .link_busy, .rd_en, .rd_addr,
    .load, .start, .busy, .dropped
  );

  always #10 clk = ~clk;

  // link model and event recorder
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) link_cnt <= 0;
    else if (start) link_cnt <= LINK_CYC;
    else if (link_cnt > 0) link_cnt <= link_cnt - 1;
    if (rd_en)   begin n_rd++; rd_t = cyc; last_addr = rd_addr; end
    if (start)   begin n_start++; start_t = cyc; end
    if (load)    load_t = cyc;
    if (dropped) n_drop++;
  end
  assign link_busy = (link_cnt != 0);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic order(input logic [AW-1:0] a);
    @(negedge clk);
    send_req = 1'b1; send_addr = a;
    @(negedge clk);
    send_req = 1'b0; send_addr = ~a;
  endtask

  initial begin
    int r0, s0, d0;
    rst = 1'b1; send_req = 1'b0; send_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(!busy, "idle after reset");
    for (int k = 0; k < 6; k++) begin
      r0 = n_rd; s0 = n_start; d0 = n_drop;
      order(AW'(k * 5 + 1));
      check(busy, "busy after order");
      repeat (5) @(negedge clk);
      check(n_rd == r0 + 1 && last_addr == AW'(k * 5 + 1), $sformatf("read of address %0d", k * 5 + 1));
      check(n_start == s0 + 1 && start_t - rd_t == 2 && load_t == start_t, "load and start two cycles after rd_en");
      // an order while busy is dropped
      order(AW'(3));
      repeat (2) @(negedge clk);
      check(n_drop == d0 + 1 && n_rd == r0 + 1, "order while busy dropped");
      wait (!busy);
      check(cyc - start_t >= LINK_CYC, "busy covers the link");
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
