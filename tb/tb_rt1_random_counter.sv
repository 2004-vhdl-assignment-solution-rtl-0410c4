// tb_rt1_random_counter: the free-running counter, at the 14 bit default and
// at the 7 bit short size. Checks
//  - a full period: from 0 the counter is back at 0 after exactly 2^14
//    clocks (8 s at 2.048 kHz), at_zero only there, tick = bit 0;
//  - clear_msb: the new value is (old + 1) with the top bit 0, e.g. with the
//    7 bit counter 84 becomes 21 (1010100 + 1 = 1010101 -> 0010101);
//  - after a clear the rollover comes between 2^13 and 2^14 clocks later;
//  - random clear / count stimulus against an integer model.
module tb_rt1_random_counter;
  logic clk = 0, rst;
  logic clr14, clr7;
  logic [13:0] count14;
  logic [6:0]  count7;
  logic z14, t14, z7, t7;
  int checks = 0, failures = 0;

  rt1_random_counter dut14 (.clk, .rst, .clear_msb(clr14), .count(count14), .at_zero(z14), .tick(t14));
  rt1_random_counter #(.COUNT_W(7)) dut7 (.clk, .rst, .clear_msb(clr7), .count(count7), .at_zero(z7), .tick(t7));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: count14 %0d count7 %0d", what, count14, count7);
    end
  endtask

  initial begin
    int m14, m7, n, zeros;
    rst = 1; clr14 = 0; clr7 = 0;
    @(posedge clk); #1;
    rst = 0;
    check(count14 == 0 && z14 && count7 == 0 && z7, "reset");
    // one full period of the 14 bit counter
    zeros = 0;
    for (int i = 1; i <= 16384; i++) begin
      @(posedge clk); #1;
      if (z14) zeros++;
      if (i % 1024 == 0 || i == 16384)
        check(count14 == 14'(i) && t14 == i[0] && t7 == count7[0], "period");
    end
    check(zeros == 1 && z14, "single rollover per 8 s");
    // reach 84 on the 7 bit counter, then clear its MSB: 21
    while (count7 != 84) begin @(posedge clk); #1; end
    clr7 = 1;
    @(posedge clk); #1; clr7 = 0;
    check(count7 == 21, "84 -> 21 on MSB clear");
    // after a clear the next rollover of the 14 bit counter is 4-8 s away
    repeat ($urandom_range(0, 16383)) @(posedge clk);
    #1; clr14 = 1;
    @(posedge clk); #1; clr14 = 0;
    n = 0;
    while (!z14) begin @(posedge clk); #1; n++; end
    check(n == 0 || (n >= 8193 && n <= 16383), "rollover 4 to 8 s after clear");
    // random stimulus against a model
    m14 = count14; m7 = count7;
    for (int i = 0; i < 5000; i++) begin
      clr14 = ($urandom_range(0, 7) == 0);
      clr7  = ($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      m14 = (m14 + 1) % 16384; if (clr14) m14 = m14 % 8192;
      m7  = (m7 + 1) % 128;    if (clr7)  m7  = m7 % 64;
      check(count14 == 14'(m14) && count7 == 7'(m7) && z14 == (m14 == 0) && t7 == m7[0], "random");
    end
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
