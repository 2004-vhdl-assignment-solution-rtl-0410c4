// tb_waveform_sequences: replays short reference sequences of both timers,
// clock by clock.
// Timer 1 with the 7 bit short counter (COUNT_W = 7, 64-clock delay window):
//   - the display advances every second clock (0437, 0438) and Stop
//     freezes it on the next clock;
//   - Start pressed while the counter reads 84: the counter continues 21,
//     22, 23, 24 and the display is cleared; counting restarts 105 clocks
//     after the last Start clock (24 -> 127 -> 0, then one clock).
// Timer 2 at full size, Start held from reset for 20 clocks:
//   - per clock, digit 3 reads 1,2,3,4,5,2,3,4,5,..., digit 2 1..9,0,...,
//     digit 1 1..15,0,..., digit 0 15,14,...; after 20 clocks 4,0,4,C;
//   - after release digit 0 steps C, D, E, F, 0 (no carry) every 2 clocks;
//   - the wrap from 9999 gives 0000 with the display switched on, and the
//     next step is 0001.
module tb_waveform_sequences;
  import react_timer_pkg::*;

  logic clk = 0, rst, s1_n, p1_n, s2_n, p2_n;
  seg_t [3:0] seg1, seg2;
  digits_t d1, d2;
  logic run1, show2, halt2;
  int checks = 0, failures = 0;

  react_timer1 #(.COUNT_W(7)) t1 (.clk, .rst, .start_n(s1_n), .stop_n(p1_n),
                                  .seg(seg1), .digits(d1), .running(run1));
  react_timer2 t2 (.clk, .rst, .start_n(s2_n), .stop_n(p2_n),
                   .seg(seg2), .digits(d2), .show(show2), .halt(halt2));

  always #244 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: t1 count %0d digits %h run %b | t2 %h show %b at %0t",
               what, t1.count, d1, run1, d2, show2, $time);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    int c;
    rst = 1; s1_n = 1; p1_n = 1; s2_n = 1; p2_n = 1;
    tick();
    rst = 0;
    // ---- timer 2: Start held from reset for 20 clocks
    s2_n = 0;
    for (int k = 1; k <= 20; k++) begin
      tick();
      check(d2[3] == ((k <= 5) ? k : 2 + (k - 2) % 4) && d2[2] == k % 10 &&
            d2[1] == k % 16 && d2[0] == (16 - k % 16) % 16 && !show2,
            $sformatf("t2 scramble clock %0d", k));
    end
    check(d2 == 16'h404C, "t2 left at 4,0,4,C");
    s2_n = 1;
    // digit 0 then steps C, D, E, F, 0, 1 once every two clocks, no carry
    begin
      digit_t seen [$];
      digit_t prev;
      int gap;
      prev = d2[0];
      gap = 0;
      for (int i = 0; i < 11; i++) begin
        tick(); gap++;
        check(d2[3:1] == 12'h404, "t2 upper digits stay 4,0,4");
        if (d2[0] != prev) begin
          seen.push_back(d2[0]);
          if (seen.size() > 1) check(gap == 2, "t2 steps every two clocks");
          gap = 0;
          prev = d2[0];
        end
      end
      check(seen.size() >= 5 && seen[0] == 4'hD && seen[1] == 4'hE && seen[2] == 4'hF &&
            seen[3] == 4'h0 && seen[4] == 4'h1, "t2 digit 0 sequence D,E,F,0,1");
    end
    // ---- timer 1, short counter: run to 0438, Stop, then Start at count 84
    s1_n = 0; tick(); s1_n = 1;
    while (!run1) tick();
    tick(873);
    check(d1 == 16'h0437, "t1 display 0437");
    tick(2);
    check(d1 == 16'h0438, "t1 display 0438");
    p1_n = 0; tick(); p1_n = 1;
    tick(50);
    check(d1 == 16'h0438 && !run1, "t1 Stop freezes 0438");
    while (t1.count != 84) tick();
    s1_n = 0; tick();
    check(t1.count == 21 && d1 == 16'h0000 && !run1, "t1 84 -> 21, display cleared");
    for (int i = 22; i <= 24; i++) begin
      tick();
      check(t1.count == 7'(i), $sformatf("t1 count %0d while Start held", i));
    end
    s1_n = 1;
    c = 0;
    while (!run1) begin tick(); c++; end
    check(c == 105, $sformatf("t1 delay %0d clocks from count 24 (expect 105)", c));
    for (int i = 1; i <= 16; i++) begin
      tick();
      check(d1 == to_bcd4((i + 1) / 2), $sformatf("t1 display after %0d clocks", i));
    end
    // ---- timer 2: the wrap from 9999 switches the display on at 0000
    while (!show2) begin
      check(seg2 == {4{SEG_DASH}}, "t2 blank before the wrap");
      tick();
    end
    check(d2 == 16'h0000, "t2 display on at 0000");
    while (d2 == 16'h0000) tick();
    check(d2 == 16'h0001 && show2, "t2 next step 0001");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic digits_t to_bcd4(int v);
    digits_t d;
    for (int i = 0; i < 4; i++) begin d[i] = digit_t'(v % 10); v /= 10; end
    return d;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
