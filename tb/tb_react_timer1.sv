// tb_react_timer1: end-to-end test of reaction timer 1 at its full size
// (14 bit random counter, 2.048 kHz clock = one clock per 0.488 ms).
// Scenarios, each with its own counter of how often it happened:
//  1. Start after a random time from reset: display cleared, then counting
//     begins 4-8 s later (8193..16384 clocks after the last Start clock).
//  2. Counting runs at one step per two clocks; Stop after a random wait
//     holds exactly floor((k + 1) / 2), k being clocks since counting
//     began (the first step comes one clock after the run flag rises).
//  3. No Stop: the display reaches 9999 within 19998 clocks, halts there and
//     a later counter rollover does not restart it.
//  4. Stop before the delay is over: counting never starts.
// Segment outputs are compared with glyphs built from lit-segment lists.
module tb_react_timer1;
  import react_timer_pkg::*;

  logic clk = 0, rst, start_n, stop_n;
  seg_t [3:0] seg;
  digits_t digits;
  logic running;
  int checks = 0, failures = 0;
  int n_start = 0, n_rollover = 0, n_stop = 0, n_max = 0, n_early = 0;

  react_timer1 dut (.clk, .rst, .start_n, .stop_n, .seg, .digits, .running);

  always #244 clk = ~clk;   // period 488 time units, ~2.048 kHz at 1 us units

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic seg_t glyph(int v);
    seg_t s = '1;
    for (int i = 0; i < lit[v].len(); i++) s[6 - (lit[v][i] - "a")] = 1'b0;
    return s;
  endfunction

  function automatic digits_t to_bcd(int v);
    digits_t d;
    for (int i = 0; i < 4; i++) begin d[i] = digit_t'(v % 10); v /= 10; end
    return d;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: digits %h running %b at %0t", what, digits, running, $time);
    end
  endtask

  task automatic check_display(int v, string what);
    bit ok = (digits == to_bcd(v));
    for (int i = 0; i < 4; i++) ok &= (seg[i] == glyph(int'(to_bcd(v)[i])));
    check(ok, what);
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Press Start for 'hold' clocks; return clocks from release to run start.
  task automatic start_and_wait(int hold, output int wait_clocks);
    start_n = 0;
    tick(hold);
    check_display(0, "display cleared by Start");
    check(!running, "not running while Start held");
    n_start++;
    start_n = 1;
    wait_clocks = 0;
    while (!running && wait_clocks < 20000) begin tick(); wait_clocks++; end
    check(running, "display started");
    n_rollover++;
  endtask

  initial begin
    int w, k;
    rst = 1; start_n = 1; stop_n = 1;
    tick(2);
    rst = 0;
    tick(2);
    check_display(0, "reset");
    // 1 + 2: random start time, random reaction time, Stop
    for (int r = 0; r < 3; r++) begin
      tick($urandom_range(1, 16383));
      start_and_wait($urandom_range(1, 40), w);
      check(w >= 8192 && w <= 16384, $sformatf("delay %0d clocks is 4-8 s", w));
      check_display(0, "counting starts from 0000");
      k = $urandom_range(200, 4000);
      tick(k);
      check_display((k + 1) / 2, $sformatf("count after %0d clocks", k));
      stop_n = 0; tick(); stop_n = 1;
      check(!running, "Stop halts");
      tick(3000);
      check_display((k + 1) / 2, "reaction time held");
      n_stop++;
    end
    // 3: no Stop, halt on 9999
    start_and_wait(5, w);
    tick(19998);
    check_display(9999, "reached 9999 after 19998 clocks");
    check(running, "still running at 9999");
    tick(2);
    check(!running, "halted on 9999");
    tick(20000);
    check_display(9999, "9999 held past a rollover");
    n_max++;
    // 4: Stop during the delay
    start_n = 0; tick(3); start_n = 1;
    tick(100);
    stop_n = 0; tick(); stop_n = 1;
    tick(17000);
    check(!running, "Stop during delay: never starts");
    check_display(0, "display stays 0000");
    n_early++;
    check(n_start > 0 && n_rollover > 0 && n_stop > 0 && n_max > 0 && n_early > 0, "all scenarios");
    $display("start %0d rollover %0d stop %0d max %0d early-stop %0d", n_start, n_rollover, n_stop, n_max, n_early);
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
