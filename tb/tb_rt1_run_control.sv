// tb_rt1_run_control: timer 1's flag logic against a reference model of the
// five prioritised rules (rollover, Start, Stop, 9999, count), under random
// button, rollover, tick and max inputs. Also counts that every rule fired.
module tb_rt1_run_control;
  logic clk = 0, rst;
  logic start_n, stop_n, at_zero, tick, max;
  logic run, wait_ran, inc, clear_disp, clear_msb;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  rt1_run_control dut (.clk, .rst, .start_n, .stop_n, .at_zero, .tick, .max,
                       .run, .wait_ran, .inc, .clear_disp, .clear_msb);

  always #5 clk = ~clk;

  initial begin
    bit m_run, m_wait, e_inc, e_clr;
    rst = 1; start_n = 1; stop_n = 1; at_zero = 0; tick = 0; max = 0;
    @(posedge clk); #1;
    rst = 0; m_run = 0; m_wait = 0;
    for (int i = 0; i < 20000; i++) begin
      start_n = ($urandom_range(0, 9) != 0);
      stop_n  = ($urandom_range(0, 9) != 0);
      at_zero = ($urandom_range(0, 5) == 0);
      tick    = $urandom_range(0, 1);
      max     = ($urandom_range(0, 7) == 0);
      #1;
      e_inc = 0; e_clr = 0;
      if (at_zero && m_wait)         begin m_run = 1; seen[0]++; end
      else if (!start_n)             begin m_wait = 1; m_run = 0; e_clr = 1; seen[1]++; end
      else if (!stop_n)              begin m_run = 0; m_wait = 0; seen[2]++; end
      else if (m_run && tick && max) begin m_run = 0; m_wait = 0; seen[3]++; end
      else if (m_run && tick)        begin e_inc = 1; seen[4]++; end
      checks++;
      if (inc !== e_inc || clear_disp !== e_clr || clear_msb !== e_clr) begin
        failures++;
        $display("FAIL step %0d: inc %b/%b clear %b%b/%b", i, inc, e_inc, clear_disp, clear_msb, e_clr);
      end
      @(posedge clk); #1;
      checks++;
      if (run !== m_run || wait_ran !== m_wait) begin
        failures++;
        $display("FAIL step %0d: run %b/%b wait %b/%b", i, run, m_run, wait_ran, m_wait);
      end
    end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("rule %0d never fired", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
