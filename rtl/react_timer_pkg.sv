// react_timer_pkg: types and constants shared by the two reaction timers.
//
// A display value is four BCD digits, digit 0 the least significant
// (milliseconds) and digit 3 the most significant (seconds). Segment patterns
// are active low (0 lights a segment) and ordered {a,b,c,d,e,f,g}: bit 6 is
// segment a, bit 0 is segment g, as on the CPLD board the timers target.
package react_timer_pkg;

  typedef logic [3:0] digit_t;           // one BCD (or, transiently, hex) digit
  typedef digit_t [3:0] digits_t;        // digits_t[0] = least significant digit
  typedef logic [6:0] seg_t;             // {a,b,c,d,e,f,g}, active low

  localparam digit_t DIGIT_MAX = 4'd9;   // last value of a decade digit

  // Pattern shown by a blanked digit: only the middle segment g is lit ("-").
  localparam seg_t SEG_DASH = 7'b111_1110;

endpackage
