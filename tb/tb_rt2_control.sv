// tb_rt2_control: timer 2's controller against a reference model of its
// rules (randomise on Start or early Stop, hold on halt or clk1 = 0, halt on
// Stop, halt on 9999 with display on, otherwise count and switch the display
// on at the 9999 wrap), under random buttons and max. Also checks that clk1
// toggles every clock and that every rule fired.
module tb_rt2_control;
  logic clk = 0, rst;
  logic start_n, stop_n, max;
  logic show, halt, clk1, randomize, count_en;
  int checks = 0, failures = 0;
  int seen [6] = '{0, 0, 0, 0, 0, 0};

  rt2_control dut (.clk, .rst, .start_n, .stop_n, .max,
                   .show, .halt, .clk1, .randomize, .count_en);

  always #5 clk = ~clk;

  initial begin
    bit m_show, m_halt, m_clk1, e_rnd, e_cnt;
    rst = 1; start_n = 1; stop_n = 1; max = 0;
    @(posedge clk); #1;
    rst = 0; m_show = 0; m_halt = 0; m_clk1 = 0;
    for (int i = 0; i < 20000; i++) begin
      start_n = ($urandom_range(0, 15) != 0);
      stop_n  = ($urandom_range(0, 9) != 0);
      max     = ($urandom_range(0, 5) == 0);
      #1;
      e_rnd = 0; e_cnt = 0;
      if (!start_n || (!stop_n && !m_show)) begin e_rnd = 1; m_halt = 0; m_show = 0; seen[0]++; end
      else if (m_halt || !m_clk1)           seen[1]++;
      else if (!stop_n)                     begin m_halt = 1; seen[2]++; end
      else if (max && m_show)               begin m_halt = 1; seen[3]++; end
      else begin
        e_cnt = 1; seen[4]++;
        if (max) begin m_show = 1; seen[5]++; end
      end
      m_clk1 = !m_clk1;
      checks++;
      if (randomize !== e_rnd || count_en !== e_cnt) begin
        failures++;
        $display("FAIL step %0d: randomize %b/%b count_en %b/%b", i, randomize, e_rnd, count_en, e_cnt);
      end
      @(posedge clk); #1;
      checks++;
      if (show !== m_show || halt !== m_halt || clk1 !== m_clk1) begin
        failures++;
        $display("FAIL step %0d: show %b/%b halt %b/%b clk1 %b/%b", i, show, m_show, halt, m_halt, clk1, m_clk1);
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
