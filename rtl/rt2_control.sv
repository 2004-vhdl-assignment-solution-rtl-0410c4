// rt2_control: timer 2's controller (Clk1, ShowDisp and Halt).
//
// State:
//   clk1 - toggles on every clock edge: the divide-by-2 that makes the
//          display count at 1.024 kHz from the 2.048 kHz clock.
//   show - ShowDisp: display on (1) or blanked to "----" (0).
//   halt - Halt: display counter stopped.
// Every clock edge applies the first rule that matches (buttons active low):
//   1. Start pressed, or Stop pressed while the display is blank:
//        randomize = 1; halt <= 0; show <= 0.
//        (Pressing Stop before the display shows is cheating: it restarts
//        the random delay.)
//   2. halt, or clk1 = 0           : hold.
//   3. Stop pressed (display on)   : halt <= 1 (reaction time held).
//   4. max & show                  : halt <= 1 (no Stop: halt on 9999).
//   5. otherwise                   : count_en = 1; and if max & !show,
//        show <= 1: the counter is wrapping 9999 -> 0000, which ends the
//        random delay, so timing starts from 0000 with the display on.
// The rules and their order follow the reaction-timer design. rst
// (synchronous: clk1, show and halt to 0) is this implementation's addition.
//
// Ports: clk, rst, start_n, stop_n, max (counter reads 9999); outputs show,
// halt, clk1, randomize, count_en (the last two combinational, acting on the
// same edge).
module rt2_control (
  input  logic clk,
  input  logic rst,
  input  logic start_n,
  input  logic stop_n,
  input  logic max,
  output logic show,
  output logic halt,
  output logic clk1,
  output logic randomize,
  output logic count_en
);

  typedef enum logic [2:0] {
    R_RANDOM, R_HOLD, R_STOP, R_MAX, R_COUNT
  } rule_e;

  rule_e rule;

  always_comb begin
    if (!start_n || (!stop_n && !show)) rule = R_RANDOM;
    else if (halt || !clk1)             rule = R_HOLD;
    else if (!stop_n)                   rule = R_STOP;
    else if (max && show)               rule = R_MAX;
    else                                rule = R_COUNT;
  end

  assign randomize = (rule == R_RANDOM);
  assign count_en  = (rule == R_COUNT);

  always_ff @(posedge clk) begin
    if (rst) begin
      clk1 <= 1'b0;
      show <= 1'b0;
      halt <= 1'b0;
    end else begin
      clk1 <= !clk1;
      unique case (rule)
        R_RANDOM: begin
          halt <= 1'b0;
          show <= 1'b0;
        end
        R_STOP, R_MAX: halt <= 1'b1;
        R_COUNT: if (max) show <= 1'b1;
        default: ;
      endcase
    end
  end

endmodule
