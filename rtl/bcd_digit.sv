// bcd_digit: one decade counter of timer 1's display.
//
// On each rising clock edge: clr loads 0 (it wins over counting); otherwise,
// when inc is 1, the digit advances by one and a 9 becomes 0. carry_out is
// combinational, inc & (digit == 9): it tells the next, more significant
// digit to advance on the same edge, so four of these chained form the
// 0000-9999 display counter. The decade behaviour (9 -> 0 on the next input)
// follows the reaction-timer design; the clr/inc/carry interface is this
// implementation's own partitioning. rst is a synchronous power-on reset to 0
// (the design itself has no reset).
//
// Ports: clk, rst, clr, inc, digit (4 bit), carry_out. Latency: one clock.
module bcd_digit
  import react_timer_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  logic   inc,
  output digit_t digit,
  output logic   carry_out
);

  assign carry_out = inc && (digit == DIGIT_MAX);

  always_ff @(posedge clk) begin
    if (rst || clr)
      digit <= '0;
    else if (inc)
      digit <= (digit == DIGIT_MAX) ? '0 : digit + 4'd1;
  end

endmodule
