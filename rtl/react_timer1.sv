// react_timer1: reaction timer, first solution (separate delay and display
// counters).
//
// The user presses Start, waits for the display to begin counting, then
// presses Stop as fast as possible; the display then holds the reaction time
// in milliseconds (0000-9999).
//
// How it works. rt1_random_counter runs from power-up and rolls over every
// 8 s. Start clears the display, clears the counter's MSB (so the next
// rollover is 4-8 s away) and arms the wait_ran flag in rt1_run_control. At
// the rollover the run flag is set and the four chained bcd_digit decade
// counters advance on every second clock (bit 0 of the random counter, a
// divide-by-2), i.e. at 1.024 kHz from the 2.048 kHz clock. Stop clears run
// and the display holds; without Stop the display stops at 9999
// (bcd_max_detect). Each digit drives a seven_seg decoder.
//
// Interface: clk (2.048 kHz), rst (synchronous power-on reset, this
// implementation's addition), start_n / stop_n (active-low buttons, sampled
// on the rising clock edge; no debouncing, as in the design), seg[3:0]
// (active-low segment patterns, seg[0] the least significant digit) and the
// raw digits for observation. The structure, widths and rates follow the
// reaction-timer design; the partitioning into sub-modules is this
// implementation's own. 32 flip-flops: 14 counter, 16 display, 2 flags.
// Of the random counter only the zero flag and bit 0 are used here, and the
// last digit's carry is never needed because the count halts at 9999; lint
// reports those bits (and wait_ran) as unused, which is expected.
module react_timer1
  import react_timer_pkg::*;
#(
  parameter int unsigned COUNT_W = 14   // random counter width (7 = design's short test counter)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start_n,
  input  logic          stop_n,
  output seg_t [3:0]    seg,
  output digits_t       digits,
  output logic          running
);

  logic [COUNT_W-1:0] count;
  logic at_zero, tick, max;
  logic wait_ran, inc, clear_disp, clear_msb;
  logic [4:0] carry;                  // carry[i] advances digit i

  rt1_random_counter #(.COUNT_W(COUNT_W)) u_random (
    .clk, .rst, .clear_msb, .count, .at_zero, .tick
  );

  rt1_run_control u_ctrl (
    .clk, .rst, .start_n, .stop_n, .at_zero, .tick, .max,
    .run(running), .wait_ran, .inc, .clear_disp, .clear_msb
  );

  assign carry[0] = inc;

  for (genvar i = 0; i < 4; i++) begin : g_digit
    bcd_digit u_digit (
      .clk, .rst, .clr(clear_disp), .inc(carry[i]),
      .digit(digits[i]), .carry_out(carry[i+1])
    );
    seven_seg u_seg (.hex_in(digits[i]), .seg_n(seg[i]));
  end

  bcd_max_detect u_max (.digits, .max);

endmodule
