// rt1_random_counter: timer 1's free-running random-delay counter.
//
// A COUNT_W bit up-counter that advances on every clock edge for as long as
// the circuit is powered. Clocked at 2.048 kHz, the 14 bit default rolls over
// every 2^14 / 2048 = 8 s. When clear_msb is 1 (Start pressed) the counter
// still advances, but the most significant bit of the new value is forced to
// 0; the other bits are untouched. The next rollover is therefore between half
// a period (4 s) and a full period (8 s) away, and where in that range depends
// on when Start was pressed relative to power-up: that is the random delay.
//
// Outputs: count (the value), at_zero (count == 0: the rollover has just
// happened) and tick (count bit 0). tick is 1 on every second clock, which is
// the divide-by-2 stage: the display advances on it at 1.024 kHz, i.e. once
// per millisecond of the nominal 2 kHz clock.
//
// Follows the reaction-timer design: the 14 bit width, the MSB clear and the
// use of bit 0 as the divide-by-2. COUNT_W = 7 gives the short counter the
// design uses for simulation. rst (synchronous, to 0) is this
// implementation's addition; on the board the counter starts from its
// power-up state.
module rt1_random_counter #(
  parameter int unsigned COUNT_W = 14
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear_msb,
  output logic [COUNT_W-1:0] count,
  output logic               at_zero,
  output logic               tick
);

  logic [COUNT_W-1:0] next;

  always_comb begin
    next = count + 1'b1;
    if (clear_msb) next[COUNT_W-1] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= next;
  end

  assign at_zero = (count == '0);
  assign tick    = count[0];

endmodule
