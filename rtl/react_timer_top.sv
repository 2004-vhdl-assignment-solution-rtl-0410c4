// react_timer_top: both reaction-timer solutions side by side.
//
// The two timers do the same job in different ways and do not share logic:
// timer 1 (react_timer1) keeps a free-running 14 bit random-delay counter
// next to a four-digit display counter; timer 2 (react_timer2) uses one
// four-digit counter for both, blanking the display during the delay. Each
// has its own 2.048 kHz clock, synchronous reset, active-low Start and Stop
// buttons and four active-low seven-segment outputs (t?_seg[0] = least
// significant digit, segment order {a,b,c,d,e,f,g}); the digit values and
// status flags are brought out for observation. Putting both in one top is
// this implementation's choice; on the board each is a CPLD design of its own.
module react_timer_top
  import react_timer_pkg::*;
(
  // timer 1
  input  logic       t1_clk,
  input  logic       t1_rst,
  input  logic       t1_start_n,
  input  logic       t1_stop_n,
  output seg_t [3:0] t1_seg,
  output digits_t    t1_digits,
  output logic       t1_running,
  // timer 2
  input  logic       t2_clk,
  input  logic       t2_rst,
  input  logic       t2_start_n,
  input  logic       t2_stop_n,
  output seg_t [3:0] t2_seg,
  output digits_t    t2_digits,
  output logic       t2_show,
  output logic       t2_halt
);

  react_timer1 u_timer1 (
    .clk(t1_clk), .rst(t1_rst), .start_n(t1_start_n), .stop_n(t1_stop_n),
    .seg(t1_seg), .digits(t1_digits), .running(t1_running)
  );

  react_timer2 u_timer2 (
    .clk(t2_clk), .rst(t2_rst), .start_n(t2_start_n), .stop_n(t2_stop_n),
    .seg(t2_seg), .digits(t2_digits), .show(t2_show), .halt(t2_halt)
  );

endmodule
