// react_timer2: reaction timer, second solution (one shared counter).
//
// Same use as timer 1 - press Start, wait, press Stop when the display comes
// on, read the reaction time in milliseconds - but built from a single
// four-digit counter instead of a delay counter plus a display counter.
//
// How it works. While Start is held, rt2_display_counter scrambles its digits
// at the full 2.048 kHz rate with the display blanked to "----"
// (seven_seg_blank). How long Start was held decides the value left behind:
// the top digit is between 2 and 5. After release the counter counts as a
// decade counter at 1.024 kHz (rt2_control's clk1 divide-by-2), still
// blanked, so it reaches 9999 after 4-8 s. The wrap 9999 -> 0000 switches the
// display on (show) and the same counter now times the reaction from 0000.
// Stop sets halt and the display holds; with no Stop the counter halts at
// 9999 (bcd_max_detect). Stop pressed while the display is still blank
// restarts the randomisation.
//
// Interface: clk (2.048 kHz), rst (synchronous power-on reset, this
// implementation's addition), start_n / stop_n (active low, sampled on the
// rising edge), seg[3:0] (active-low segments, seg[0] least significant
// digit), plus digits, show and halt for observation. Behaviour, widths and
// rates follow the reaction-timer design; the split into modules is this
// implementation's own. 19 flip-flops: 16 digit bits, clk1, show, halt.
// clk1 is consumed inside rt2_control only, so it is unused at this level.
module react_timer2
  import react_timer_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start_n,
  input  logic       stop_n,
  output seg_t [3:0] seg,
  output digits_t    digits,
  output logic       show,
  output logic       halt
);

  logic max, clk1, randomize, count_en;

  rt2_control u_ctrl (
    .clk, .rst, .start_n, .stop_n, .max,
    .show, .halt, .clk1, .randomize, .count_en
  );

  rt2_display_counter u_count (
    .clk, .rst, .randomize, .count_en, .digits
  );

  bcd_max_detect u_max (.digits, .max);

  for (genvar i = 0; i < 4; i++) begin : g_seg
    seven_seg_blank u_seg (.show, .hex_in(digits[i]), .seg_n(seg[i]));
  end

endmodule
