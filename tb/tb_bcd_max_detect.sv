// tb_bcd_max_detect: the detector must flag exactly the value 9999.
// Walks every 16 bit digit pattern (all BCD and hex mixtures) and compares
// with the packed value 16'h9999.
module tb_bcd_max_detect;
  import react_timer_pkg::*;

  digits_t digits;
  logic    max;
  int checks = 0, failures = 0, hits = 0;

  bcd_max_detect dut (.digits, .max);

  initial begin
    for (int v = 0; v < 65536; v++) begin
      digits = digits_t'(v);
      #1;
      checks++;
      if (max) hits++;
      if (max !== (v == 'h9999)) begin
        failures++;
        $display("FAIL digits %h: max %b", v, max);
      end
    end
    if (hits != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
