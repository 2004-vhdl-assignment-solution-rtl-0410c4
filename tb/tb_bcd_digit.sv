// tb_bcd_digit: random clear / increment stimulus against an integer model
// (value modulo 10). Checks the digit after every clock edge and the
// combinational carry before it, and that a digit counts 0..9 back to 0 in
// exactly ten enabled clocks.
module tb_bcd_digit;
  import react_timer_pkg::*;

  logic clk = 0, rst, clr, inc;
  digit_t digit;
  logic carry_out;
  int checks = 0, failures = 0, cycles = 0;
  int model;

  bcd_digit dut (.clk, .rst, .clr, .inc, .digit, .carry_out);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: digit %0d model %0d", what, digit, model);
    end
  endtask

  initial begin
    rst = 1; clr = 0; inc = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    check(digit == 0, "reset");
    // ten increments wrap back to 0, carry exactly on the tenth
    for (int i = 0; i < 10; i++) begin
      inc = 1; #1;
      check(carry_out == (i == 9), "carry");
      @(posedge clk); #1;
      model = (model + 1) % 10;
      check(digit == model, "count");
    end
    check(digit == 0, "wrap");
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom_range(0, 15) == 0);
      inc = $urandom_range(0, 1);
      #1;
      check(carry_out == (inc && model == 9), "carry random");
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (inc) model = (model + 1) % 10;
      check(digit == model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
