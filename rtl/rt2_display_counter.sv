// rt2_display_counter: timer 2's single four-digit counter.
//
// Timer 2 uses one counter both to make the random delay and to measure the
// reaction time. On each rising clock edge it does one of three things:
//
//   randomize = 1 (Start held): every digit steps on its own at the full
//     clock rate, with no carries between digits:
//       digit 3: +1 while below 5, otherwise reloads 2 (cycles 2,3,4,5)
//       digit 2: +1 while below 9, otherwise 0        (cycles 0..9)
//       digit 1: +1 modulo 16 (counts up in hex)
//       digit 0: -1 modulo 16 (counts down in hex)
//     The value left when Start is released is therefore random: digit 3 is
//     2..5, so counting on from there to 9999 at 1 kHz takes 4 to 8 s.
//   count_en = 1: a decade increment of the whole number. A digit that reads
//     9 becomes 0 and carries into the next; any other value, including the
//     hex values A-F that randomisation can leave in digits 0 and 1, simply
//     adds one (F wraps to 0 without a carry). 9999 wraps to 0000.
//   neither: hold.
// randomize has priority over count_en.
//
// The four randomisation rules and the 9999 -> 0000 wrap follow the
// reaction-timer design. rst (synchronous, all digits 0) is this
// implementation's addition.
//
// Ports: clk, rst, randomize, count_en, digits (digits[0] least significant).
module rt2_display_counter
  import react_timer_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    randomize,
  input  logic    count_en,
  output digits_t digits
);

  localparam digit_t MSD_LOW  = 4'd2;   // digit 3 reload value (8 s to 9999)
  localparam digit_t MSD_HIGH = 4'd5;   // digit 3 top value (4 s to 9999)

  digits_t rnd, inc;

  // Randomising step: independent per digit.
  always_comb begin
    rnd[3] = (digits[3] < MSD_HIGH) ? digits[3] + 4'd1 : MSD_LOW;
    rnd[2] = (digits[2] < DIGIT_MAX) ? digits[2] + 4'd1 : 4'd0;
    rnd[1] = digits[1] + 4'd1;
    rnd[0] = digits[0] - 4'd1;
  end

  // Decade increment: a digit advances when every lower digit reads 9.
  always_comb begin
    logic carry;
    carry = 1'b1;
    for (int i = 0; i < 4; i++) begin
      if (!carry)                       inc[i] = digits[i];
      else if (digits[i] == DIGIT_MAX)  inc[i] = 4'd0;
      else begin
        inc[i] = digits[i] + 4'd1;
        carry  = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)            digits <= '0;
    else if (randomize) digits <= rnd;
    else if (count_en)  digits <= inc;
  end

endmodule
