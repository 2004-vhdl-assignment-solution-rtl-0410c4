// seven_seg_blank: seven-segment decoder with a display-on input (timer 2).
//
// When show is 1 the digit is decoded exactly as by seven_seg (hex glyphs,
// active low, {a,b,c,d,e,f,g}). When show is 0 the digit is replaced by a
// single dash (only segment g lit), which is how timer 2 hides its counter
// while that counter is producing the random delay. The dash pattern and the
// on/off behaviour follow the reaction-timer design; reusing seven_seg for the
// glyphs is this implementation's choice.
//
// Ports: show (1 = show digit), hex_in (4 bit), seg_n (7 bit active low).
// Purely combinational.
module seven_seg_blank
  import react_timer_pkg::*;
(
  input  logic   show,
  input  digit_t hex_in,
  output seg_t   seg_n
);

  seg_t glyph;

  seven_seg u_glyph (.hex_in(hex_in), .seg_n(glyph));

  assign seg_n = show ? glyph : SEG_DASH;

endmodule
