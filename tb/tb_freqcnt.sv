// tb_freqcnt: end-to-end testbench of the frequency counter at its default
// size (2.000 MHz clock, 2000-clock gate, one-flip-flop synchronizers).
//
// A signal generator model drives S1_1 with a square wave whose period is a
// whole number of clocks and whose phase is random. For each test the
// testbench presses Start (PB1), releases it either during the gate or 50
// clocks into WAIT, and reads the two displays back through an independent
// table of segment letters. The expected reading is the number of rising edges of the input
// in the 1 ms gate, modulo 100: exactly 2000/P when the period P divides
// 2000, otherwise either of the two nearest whole numbers.
//
// Per measurement it checks: two clocks from the press to COUNT, COUNT
// lasting exactly 2000 clocks, the old reading held on the displays while
// counting, the new reading one clock after WAIT starts, WAIT lasting
// while Start is held, IDLE two clocks after release, and a one-hot LED bar
// in every cycle. It also presses Reset (PB4) in mid-count and checks that
// the controller returns to IDLE at once and the displays clear to 00.
// Each mechanism is counted and one that never happened is a failure:
// start press, gate time-out, data store, wait for release, short press
// (released before the gate ends), tens carry, count wrap past 99, and
// master reset.
`timescale 1ns/1ps
module tb_freqcnt;

  localparam int GATE = 2000;

  logic CLK0 = 1'b0, PB1 = 1'b1, PB4 = 1'b0, S1_1 = 1'b0;
  logic [6:0] DIS1, DIS2;
  logic BAR1_1, BAR1_2, BAR1_3;

  int checks = 0, failures = 0;
  int n_press = 0, n_timeup = 0, n_store = 0, n_held = 0, n_short = 0;
  int n_carry = 0, n_wrap = 0, n_reset = 0;
  int shown = 0;                  // reading the displays should show

  int period = 0;                 // generator period in clocks, 0 = off
  int phase  = 0;

  freqcnt dut (.*);

  always #250 CLK0 = ~CLK0;       // 2.000 MHz

  // Signal generator: changes S1_1 at the falling clock edge
  always @(negedge CLK0) begin
    if (period == 0) S1_1 <= 1'b0;
    else begin
      phase = (phase + 1) % period;
      S1_1 <= (phase < period / 2);
    end
  end

  // Independent decode of the displays: the segment letters of each numeral
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic logic [6:0] to_bits(string s);
    logic [6:0] b = '0;
    foreach (s[i]) b[s[i] - "a"] = 1'b1;
    return b;
  endfunction

  function automatic int digit_of(logic [6:0] seg);
    for (int v = 0; v < 10; v++) if (seg == to_bits(lit[v])) return v;
    return -1;
  endfunction

  function automatic int reading();
    int t = digit_of(DIS1), u = digit_of(DIS2);
    return (t < 0 || u < 0) ? -1 : 10 * t + u;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) fail($sformatf("%s: expected %0d got %0d", what, exp, got));
  endtask

  // LED bar must be one-hot in every cycle once out of reset
  always @(posedge CLK0) if (PB4) begin
    #1;
    checks++;
    if ($countones({BAR1_1, BAR1_2, BAR1_3}) != 1)
      fail($sformatf("LED bar not one-hot: %b%b%b", BAR1_1, BAR1_2, BAR1_3));
  end

  // One measurement with generator period p; Start is held for hold clocks
  task automatic measure(int p, int hold);
    int lat, cnt, waitlen, got, lo, hi;
    period = p;
    phase  = $urandom_range(0, (p > 0) ? p - 1 : 0);
    repeat (5) @(negedge CLK0);
    expect_eq(BAR1_1, 1, "IDLE before press");
    PB1 = 1'b0;
    lat = 0;
    while (!BAR1_2) begin
      @(posedge CLK0); #1 lat++;
      if (lat > 10) break;
    end
    expect_eq(lat, 2, "clocks from press to COUNT");
    if (lat == 2) n_press++;
    cnt = 0;
    while (BAR1_2) begin
      cnt++;
      if (cnt == hold) begin @(negedge CLK0) PB1 = 1'b1; end
      if (cnt % 97 == 0) expect_eq(reading(), shown, "old reading held while counting");
      @(posedge CLK0); #1;
      if (cnt > GATE + 10) break;
    end
    expect_eq(cnt, GATE, "clocks in COUNT");
    expect_eq(BAR1_3, 1, "WAIT after gate time");
    if (cnt == GATE && BAR1_3) begin
      n_timeup++;
      if (PB1) n_short++;
    end
    // new reading is in the register one clock after WAIT starts
    @(posedge CLK0); #1;
    if (p == 0) begin lo = 0; hi = 0; end
    else begin lo = GATE / p; hi = (GATE % p == 0) ? lo : lo + 1; end
    got = reading();
    checks++;
    if (got != lo % 100 && got != hi % 100)
      fail($sformatf("period %0d: reading %0d, expected %0d or %0d (mod 100)", p, got, lo, hi));
    else begin
      n_store++;
      if (got >= 10) n_carry++;
      if (lo >= 100) n_wrap++;
    end
    shown = got;
    // stay in WAIT while Start is held
    waitlen = 0;
    while (!PB1 && BAR1_3) begin
      @(posedge CLK0); #1 waitlen++;
      expect_eq(BAR1_3, 1, "WAIT while Start held");
      if (waitlen == 50) begin @(negedge CLK0) PB1 = 1'b1; end
    end
    if (waitlen == 50) n_held++;
    PB1 = 1'b1;
    repeat (2) @(posedge CLK0);
    #1 expect_eq(BAR1_1, 1, "IDLE two clocks after release");
    expect_eq(reading(), shown, "reading kept in IDLE");
  endtask

  int periods [] = '{80, 250, 40, 16, 2, 0, 21, 20, 23, 1000, 80};

  initial begin
    repeat (3) @(negedge CLK0);
    #37 PB4 = 1'b1;               // release reset between clock edges
    @(posedge CLK0); #1;
    expect_eq(BAR1_1, 1, "IDLE after reset");
    expect_eq(reading(), 0, "display after reset");
    foreach (periods[i])
      measure(periods[i], (i % 3 == 0) ? 500 : GATE + 100);
    // Master reset in mid-count
    period = 80;
    @(negedge CLK0) PB1 = 1'b0;
    repeat (700) @(posedge CLK0);
    #100 PB4 = 1'b0;
    #1;
    expect_eq(BAR1_1, 1, "IDLE at once on reset");
    expect_eq(BAR1_2, 0, "COUNT cleared by reset");
    expect_eq(reading(), 0, "display cleared by reset");
    if (BAR1_1 && !BAR1_2 && reading() == 0) n_reset++;
    PB1 = 1'b1;
    @(negedge CLK0) PB4 = 1'b1;
    shown = 0;
    measure(80, 300);

    if (n_press == 0)  fail("Start never pressed");
    if (n_timeup == 0) fail("gate never timed out");
    if (n_store == 0)  fail("no data store");
    if (n_held == 0)   fail("never waited for release");
    if (n_short == 0)  fail("no short press");
    if (n_carry == 0)  fail("no tens carry");
    if (n_wrap == 0)   fail("count never wrapped past 99");
    if (n_reset == 0)  fail("no master reset");
    checks += 8;
    $display("mechanisms: press=%0d timeup=%0d store=%0d held=%0d short=%0d carry=%0d wrap=%0d reset=%0d",
             n_press, n_timeup, n_store, n_held, n_short, n_carry, n_wrap, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge CLK0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
