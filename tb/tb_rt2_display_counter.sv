// tb_rt2_display_counter: timer 2's shared counter.
//  - randomise from 0000: the sequence of the first 20 steps must be digit 3
//    1,2,3,4,5,2,3,4,5,...; digit 2 1..9,0,1..; digit 1 1..15,0,..; digit 0
//    15,14,..,0,15,.. (worked out by hand from the per-digit rules);
//  - count mode on BCD values: next value = (value + 1) mod 10000, computed
//    with integer arithmetic, including 9999 -> 0000;
//  - count mode on hex digits: C -> D without carry, F -> 0 without carry;
//  - hold when neither input is set; randomise wins over count.
module tb_rt2_display_counter;
  import react_timer_pkg::*;

  logic clk = 0, rst, randomize, count_en;
  digits_t digits;
  int checks = 0, failures = 0;

  rt2_display_counter dut (.clk, .rst, .randomize, .count_en, .digits);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: digits %h", what, digits);
    end
  endtask

  function automatic int to_int(digits_t d);
    return d[3] * 1000 + d[2] * 100 + d[1] * 10 + d[0];
  endfunction

  function automatic digits_t to_bcd(int v);
    digits_t d;
    for (int i = 0; i < 4; i++) begin d[i] = digit_t'(v % 10); v /= 10; end
    return d;
  endfunction

  // One clock with the given mode inputs.
  task automatic step(bit r, bit c);
    randomize = r; count_en = c;
    @(posedge clk); #1;
    randomize = 0; count_en = 0;
  endtask

  initial begin
    int exp_v;
    rst = 1; randomize = 0; count_en = 0;
    @(posedge clk); #1;
    rst = 0;
    check(digits == 16'h0000, "reset");
    // randomising sequence from 0000
    for (int k = 1; k <= 20; k++) begin
      int e3, e2;
      step(1, 1);
      e3 = (k <= 5) ? k : 2 + (k - 2) % 4;
      e2 = k % 10;
      check(digits[3] == e3 && digits[2] == e2 && digits[1] == (k % 16) &&
            digits[0] == ((16 - k % 16) % 16), $sformatf("randomise step %0d", k));
    end
    // from 0000 count through every value to 9999 and wrap
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int v = 1; v <= 10000; v++) begin
      step(0, 1);
      exp_v = v % 10000;
      if (v % 97 == 0 || v >= 9990 || v <= 20)
        check(digits == to_bcd(exp_v), $sformatf("count to %0d", exp_v));
      else if (digits != to_bcd(exp_v)) check(0, $sformatf("count to %0d", exp_v));
    end
    // hold
    repeat (5) step(0, 0);
    check(digits == 16'h0000, "hold");
    // hex digits: randomise 4 steps from 0000 -> 4,4,4,C; then count
    repeat (4) step(1, 0);
    check(digits == 16'h444C, "randomise to 444C");
    step(0, 1); check(digits == 16'h444D, "C -> D");
    step(0, 1); step(0, 1); check(digits == 16'h444F, "to F");
    step(0, 1); check(digits == 16'h4440, "F -> 0 without carry");
    // randomise wins over count
    step(1, 1); check(digits == 16'h555F, "randomise priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
