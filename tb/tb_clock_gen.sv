// tb_clock_gen: self-checking test of the clock generating unit at the
// protocol's timing (50 MHz system clock).
//
// Sends two words. For each it records, in system clock cycles, every edge
// of CLK and STB and every shift strobe, and compares them with the times
// worked out from the protocol: 32 CLK periods of 650 cycles (13 us) with
// 195 high (3/10), 1600 idle cycles (32 us) plus the low phase of the next
// bit between bytes, STB rising 400 cycles (8 us) after the last CLK
// falling edge and staying high 1400 cycles (28 us). A start issued while
// busy must not disturb the word in flight.
module tb_clock_gen;
  localparam int PERIOD = 650, HIGH = 195, GAP = 1600, SDLY = 400, SW = 1400;
  localparam int LOW = PERIOD - HIGH;

  logic clk = 1'b0, rst, start;
  logic ser_clk, stb, shift, di_en, busy, done;
  int checks = 0, failures = 0;
  longint cyc = 0;

  clock_gen dut (.clk, .rst, .start, .ser_clk, .stb, .shift, .di_en, .busy, .done);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge recorder, sampled after each rising edge of the system clock
  longint rise_t[$], fall_t[$], shift_t[$], stb_r[$], stb_f[$], done_t[$];
  longint en_cnt;
  logic   pclk = 1'b0, pstb = 1'b0;
  always @(posedge clk) begin
    #1;
    if (ser_clk && !pclk) rise_t.push_back(cyc);
    if (!ser_clk && pclk) fall_t.push_back(cyc);
    if (stb && !pstb)     stb_r.push_back(cyc);
    if (!stb && pstb)     stb_f.push_back(cyc);
    if (shift)            shift_t.push_back(cyc);
    if (done)             done_t.push_back(cyc);
    if (di_en)            en_cnt++;
    if (stb) begin
      checks++;
      if (ser_clk || di_en) begin failures++; $display("FAIL CLK or DI active during STB"); end
    end
    pclk = ser_clk; pstb = stb;
  end

  task automatic run_word(input bit poke_start);
    longint t0, t_bit;
    rise_t.delete(); fall_t.delete(); shift_t.delete();
    stb_r.delete(); stb_f.delete(); done_t.delete(); en_cnt = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;              // first cycle of the first bit (CLK low phase)
    check(busy, "busy after start");
    if (poke_start) begin
      repeat (3000) @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    wait (done_t.size() == 1);
    @(negedge clk);
    check(!busy, "idle after done");
    check(rise_t.size() == 32 && fall_t.size() == 32, $sformatf("32 CLK pulses, got %0d", rise_t.size()));
    check(shift_t.size() == 32, "32 shift strobes");
    check(en_cnt == 32 * PERIOD, $sformatf("DI enabled for 32 bit times, got %0d", en_cnt));
    for (int i = 0; i < rise_t.size() && i < 32; i++) begin
      t_bit = t0 + (i / 8) * (8 * PERIOD + GAP) + (i % 8) * PERIOD;
      check(rise_t[i] == t_bit + LOW,  $sformatf("rise %0d at %0d, expected %0d", i, rise_t[i] - t0, t_bit + LOW - t0));
      check(fall_t[i] == t_bit + PERIOD, $sformatf("fall %0d at %0d", i, fall_t[i] - t0));
      check(fall_t[i] - rise_t[i] == HIGH, "high phase 3/10 of the period");
      check(shift_t[i] == fall_t[i], "shift strobe with the CLK falling edge");
      if (i % 8 == 0 && i > 0)
        check(rise_t[i] - fall_t[i-1] == GAP + LOW, "byte gap");
    end
    check(stb_r.size() == 1 && stb_f.size() == 1, "one STB pulse");
    if (stb_r.size() == 1 && stb_f.size() == 1 && fall_t.size() == 32) begin
      check(stb_r[0] - fall_t[31] == SDLY, $sformatf("STB delay %0d", stb_r[0] - fall_t[31]));
      check(stb_f[0] - stb_r[0] == SW, $sformatf("STB width %0d", stb_f[0] - stb_r[0]));
      check(done_t[0] == stb_f[0], "done with the STB falling edge");
      // whole word: 32 bits, 3 gaps, STB delay and width
      check(stb_f[0] - t0 == 32 * PERIOD + 3 * GAP + SDLY + SW, "word duration 548 us");
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(!ser_clk && !stb && !busy, "idle after reset");
    run_word(1'b0);
    repeat (10) @(negedge clk);
    run_word(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
