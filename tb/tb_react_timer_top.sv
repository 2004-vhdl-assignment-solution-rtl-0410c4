// tb_react_timer_top: end-to-end run of both reaction timers in the top,
// at full size, each on its own clock and buttons, in parallel.
// Timer 1: Start after a random time, delay of 4-8 s, Stop after a random
//   reaction time (value = clocks / 2), then a run to 9999 with no Stop, then
//   Stop during the delay (counting never starts).
// Timer 2: Start held a random time (blank display, scrambled digits), delay
//   of 4-8 s to the 9999 -> 0000 wrap that turns the display on, Stop after
//   a random reaction time, a run to 9999 with no Stop, and Stop while blank
//   (re-scramble, display stays off until a new wrap).
// Every mechanism is counted and a mechanism that never happened is a
// failure. Segments are checked against glyphs built from lit-segment lists.
module tb_react_timer_top;
  import react_timer_pkg::*;

  logic t1_clk = 0, t1_rst, t1_start_n, t1_stop_n;
  logic t2_clk = 0, t2_rst, t2_start_n, t2_stop_n;
  seg_t [3:0] t1_seg, t2_seg;
  digits_t t1_digits, t2_digits;
  logic t1_running, t2_show, t2_halt;
  int checks = 0, failures = 0;
  // mechanism counters
  int t1_start = 0, t1_rollover = 0, t1_stop = 0, t1_max = 0, t1_early = 0;
  int t2_scramble = 0, t2_show_on = 0, t2_stop = 0, t2_max = 0, t2_early = 0;

  react_timer_top dut (.*);

  always #244 t1_clk = ~t1_clk;
  always #250 t2_clk = ~t2_clk;

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic seg_t glyph(string segs);
    seg_t s = '1;
    for (int i = 0; i < segs.len(); i++) s[6 - (segs[i] - "a")] = 1'b0;
    return s;
  endfunction

  function automatic digits_t to_bcd(int v);
    digits_t d;
    for (int i = 0; i < 4; i++) begin d[i] = digit_t'(v % 10); v /= 10; end
    return d;
  endfunction

  function automatic int value(digits_t d);
    return 1000 * d[3] + 100 * d[2] + 10 * d[1] + d[0];
  endfunction

  function automatic bit shows(seg_t [3:0] s, int v);
    bit ok = 1;
    for (int i = 0; i < 4; i++) ok &= (s[i] == glyph(lit[int'(to_bcd(v)[i])]));
    return ok;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: t1 %h run %b | t2 %h show %b halt %b at %0t", what,
               t1_digits, t1_running, t2_digits, t2_show, t2_halt, $time);
    end
  endtask

  task automatic tick1(int n = 1); repeat (n) @(posedge t1_clk); #1; endtask
  task automatic tick2(int n = 1); repeat (n) @(posedge t2_clk); #1; endtask

  // ---------------- timer 1 ----------------
  task automatic t1_start_and_wait(int hold, output int w);
    t1_start_n = 0; tick1(hold); t1_start_n = 1;
    check(t1_digits == 0 && shows(t1_seg, 0) && !t1_running, "t1 cleared by Start");
    t1_start++;
    w = 0;
    while (!t1_running && w < 20000) begin tick1(); w++; end
    check(t1_running, "t1 started");
    t1_rollover++;
  endtask

  task automatic run_timer1;
    int w, k;
    tick1($urandom_range(1, 16383));
    t1_start_and_wait($urandom_range(1, 40), w);
    check(w >= 8192 && w <= 16384, "t1 delay 4-8 s");
    k = $urandom_range(200, 4000);
    tick1(k);
    t1_stop_n = 0; tick1(); t1_stop_n = 1;
    tick1(1000);
    check(!t1_running && t1_digits == to_bcd((k + 1) / 2) && shows(t1_seg, (k + 1) / 2), "t1 reaction time held");
    t1_stop++;
    t1_start_and_wait(3, w);
    tick1(20000);
    check(!t1_running && t1_digits == 16'h9999 && shows(t1_seg, 9999), "t1 halted on 9999");
    t1_max++;
    t1_start_n = 0; tick1(3); t1_start_n = 1;
    tick1(50);
    t1_stop_n = 0; tick1(); t1_stop_n = 1;
    tick1(17000);
    check(!t1_running && t1_digits == 0, "t1 Stop during delay: never starts");
    t1_early++;
  endtask

  // ---------------- timer 2 ----------------
  task automatic t2_scramble_and_wait(bit use_stop, int hold, output int w);
    if (use_stop) t2_stop_n = 0; else t2_start_n = 0;
    tick2(hold);
    check(!t2_show && t2_seg == {4{SEG_DASH}} && t2_digits[3] >= 2 && t2_digits[3] <= 5,
          "t2 blank and scrambled");
    t2_scramble++;
    t2_start_n = 1; t2_stop_n = 1;
    w = 0;
    while (!t2_show && w < 20000) begin tick2(); w++; end
    check(t2_show && t2_digits == 0 && shows(t2_seg, 0), "t2 display on at 0000");
    t2_show_on++;
  endtask

  task automatic run_timer2;
    int w, k, v;
    t2_scramble_and_wait(0, $urandom_range(4, 3000), w);
    check(w >= 8000 && w <= 16400, "t2 delay 4-8 s");
    k = $urandom_range(200, 4000);
    tick2(k);
    t2_stop_n = 0; tick2(2); t2_stop_n = 1;
    v = value(t2_digits);
    check(t2_halt && v >= k / 2 - 1 && v <= k / 2 + 1, "t2 Stop halts near k/2");
    tick2(1000);
    check(value(t2_digits) == v && shows(t2_seg, v), "t2 reaction time held");
    t2_stop++;
    t2_scramble_and_wait(0, 9, w);
    tick2(20002);
    check(t2_halt && t2_digits == 16'h9999 && shows(t2_seg, 9999), "t2 halted on 9999");
    t2_max++;
    t2_start_n = 0; tick2(5); t2_start_n = 1;
    tick2(300);
    t2_scramble_and_wait(1, 77, w);
    check(w >= 8000 && w <= 16400, "t2 delay after early Stop");
    t2_early++;
  endtask

  initial begin
    t1_rst = 1; t2_rst = 1;
    t1_start_n = 1; t1_stop_n = 1; t2_start_n = 1; t2_stop_n = 1;
    tick1(2); tick2(2);
    t1_rst = 0; t2_rst = 0;
    fork
      run_timer1();
      run_timer2();
    join
    check(t1_start > 0, "t1 Start happened");
    check(t1_rollover > 0, "t1 rollover start happened");
    check(t1_stop > 0, "t1 Stop hold happened");
    check(t1_max > 0, "t1 9999 halt happened");
    check(t1_early > 0, "t1 Stop during delay happened");
    check(t2_scramble > 0, "t2 scramble happened");
    check(t2_show_on > 0, "t2 display switch-on happened");
    check(t2_stop > 0, "t2 Stop halt happened");
    check(t2_max > 0, "t2 9999 halt happened");
    check(t2_early > 0, "t2 Stop while blank happened");
    $display("t1: start %0d rollover %0d stop %0d max %0d early %0d", t1_start, t1_rollover, t1_stop, t1_max, t1_early);
    $display("t2: scramble %0d show %0d stop %0d max %0d early %0d", t2_scramble, t2_show_on, t2_stop, t2_max, t2_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge t1_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
