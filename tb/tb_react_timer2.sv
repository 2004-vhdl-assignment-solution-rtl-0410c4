// tb_react_timer2: end-to-end test of reaction timer 2 (single shared
// counter) at its full size, 2.048 kHz clock.
// Scenarios, each with its own counter of how often it happened:
//  1. Start held for a random time: display blanked to "----" and digits
//     scrambled; the top digit ends in 2..5.
//  2. After release the blank counter counts at one step per two clocks; the
//     display comes on showing 0000 after the number of clocks predicted
//     from the digits left at release (a model of the decade increment), and
//     this delay is between 4 and 8 s (8000-16400 clocks).
//  3. Stop after a random reaction time: halt within two clocks, value held
//     and equal to the number of steps since the display came on.
//  4. No Stop: 9999 is reached and held.
//  5. Stop pressed while the display is blank: counter is re-scrambled, the
//     display stays blank and comes on only after a new count to 9999.
module tb_react_timer2;
  import react_timer_pkg::*;

  logic clk = 0, rst, start_n, stop_n;
  seg_t [3:0] seg;
  digits_t digits;
  logic show, halt;
  int checks = 0, failures = 0;
  int n_random = 0, n_show = 0, n_stop = 0, n_max = 0, n_early = 0;

  react_timer2 dut (.clk, .rst, .start_n, .stop_n, .seg, .digits, .show, .halt);

  always #244 clk = ~clk;   // period 488 time units, ~2.048 kHz at 1 us units

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

  // Decade increment of the digits from position i upward: a 9 becomes 0
  // and passes the step on, any other value (hex included) adds one.
  function automatic digits_t bump(digits_t d, int i);
    if (i == 4) return d;
    if (d[i] == 4'd9) begin d[i] = 0; return bump(d, i + 1); end
    d[i] = d[i] + 4'd1;
    return d;
  endfunction

  // Steps needed to get from d to the 9999 -> 0000 wrap.
  function automatic int steps_to_wrap(digits_t d);
    int n = 0;
    do begin d = bump(d, 0); n++; end while (d != 16'h0000 && n < 100000);
    return n;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: digits %h show %b halt %b at %0t", what, digits, show, halt, $time);
    end
  endtask

  task automatic check_blank(string what);
    bit ok = !show;
    for (int i = 0; i < 4; i++) ok &= (seg[i] == glyph("g"));
    check(ok, what);
  endtask

  task automatic check_display(int v, string what);
    bit ok = show && (digits == to_bcd(v));
    for (int i = 0; i < 4; i++) ok &= (seg[i] == glyph(lit[int'(to_bcd(v)[i])]));
    check(ok, what);
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Scramble with Start (or early Stop), then wait for the display.
  task automatic scramble_and_wait(bit use_stop, int hold);
    int w, expect_steps;
    if (use_stop) stop_n = 0; else start_n = 0;
    tick(hold);
    check_blank("blank while scrambling");
    check(!halt, "not halted while scrambling");
    check(digits[3] >= 2 && digits[3] <= 5, "top digit in 2..5");
    n_random++;
    start_n = 1; stop_n = 1;
    expect_steps = steps_to_wrap(digits);
    w = 0;
    while (!show && w < 20000) begin
      tick(); w++;
      if (!show) check_blank("blank during delay");
    end
    check(show, "display came on");
    check(w >= 2 * expect_steps - 1 && w <= 2 * expect_steps + 1,
          $sformatf("delay %0d clocks for %0d steps", w, expect_steps));
    check(w >= 8000 && w <= 16400, $sformatf("delay %0d clocks is 4-8 s", w));
    check_display(0, "display starts at 0000");
    n_show++;
  endtask

  initial begin
    int k, v;
    rst = 1; start_n = 1; stop_n = 1;
    tick(2);
    rst = 0;
    tick(2);
    // 1-3: random hold, random reaction time, Stop
    for (int r = 0; r < 4; r++) begin
      scramble_and_wait(0, $urandom_range(4, 3000));
      k = $urandom_range(200, 4000);
      tick(k);
      v = 1000 * digits[3] + 100 * digits[2] + 10 * digits[1] + digits[0];
      check(v >= k / 2 - 1 && v <= k / 2 + 1, $sformatf("count %0d after %0d clocks", v, k));
      stop_n = 0; tick(2); stop_n = 1;
      check(halt, "Stop halts");
      v = 1000 * digits[3] + 100 * digits[2] + 10 * digits[1] + digits[0];
      tick(3000);
      check_display(v, "reaction time held");
      n_stop++;
    end
    // 4: no Stop
    scramble_and_wait(0, 7);
    tick(19997);
    check(!halt || digits == 16'h9999, "not halted before 9999");
    tick(4);
    check(halt, "halted on 9999");
    check_display(9999, "9999 shown");
    tick(20000);
    check_display(9999, "9999 held");
    n_max++;
    // 5: Stop while blank re-scrambles
    start_n = 0; tick(10); start_n = 1;
    tick(500);
    check_blank("blank during delay");
    scramble_and_wait(1, 123);
    n_early++;
    check(n_random > 0 && n_show > 0 && n_stop > 0 && n_max > 0 && n_early > 0, "all scenarios");
    $display("scramble %0d show %0d stop %0d max %0d early-stop %0d", n_random, n_show, n_stop, n_max, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
