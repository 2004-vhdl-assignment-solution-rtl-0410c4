// bcd_max_detect: "maximum count" detector of a four-digit display.
//
// max is 1 exactly when every digit holds 9 (the display reads 9999). Each
// digit is compared with the full bit pattern 1001, so hex values A-F never
// count as 9. Both timers use it: timer 1 to halt at 9999, timer 2 to end the
// random delay (display switched on) and later to halt at 9999.
//
// Ports: digits (four 4 bit digits), max. Purely combinational.
module bcd_max_detect
  import react_timer_pkg::*;
(
  input  digits_t digits,
  output logic    max
);

  always_comb begin
    max = 1'b1;
    for (int i = 0; i < 4; i++)
      if (digits[i] != DIGIT_MAX) max = 1'b0;
  end

endmodule
