// rt1_run_control: timer 1's run flags (set / clear Display_Run).
//
// Two flags decide what timer 1 does:
//   wait_ran - armed by Start: the next rollover of the random counter ends
//              the random delay.
//   run      - the display counter is running (RunDisp).
// Every clock edge applies the first rule that matches:
//   1. at_zero & wait_ran      : run <= 1 (random delay over, start timing)
//   2. Start pressed           : wait_ran <= 1, run <= 0; clear_disp and
//                                clear_msb are 1 (display to 0000, counter
//                                MSB cleared)
//   3. Stop pressed            : run <= 0, wait_ran <= 0
//   4. run & tick & max        : run <= 0, wait_ran <= 0 (halt on 9999)
//   5. run & tick              : inc is 1 (display advances by one)
// Buttons are active low, as on the board. inc, clear_disp and clear_msb are
// combinational and act on the same edge as the flag update.
//
// The rule order and flag meanings follow the reaction-timer design. wait_ran
// is deliberately not cleared by rule 1, as in the design: if Stop is never
// pressed and 9999 is never reached, a later rollover sets run again (that
// cannot happen in practice because rule 4 fires after ~10 s). rst
// (synchronous, both flags 0) is this implementation's addition.
module rt1_run_control (
  input  logic clk,
  input  logic rst,
  input  logic start_n,     // Start button, 0 = pressed
  input  logic stop_n,      // Stop button, 0 = pressed
  input  logic at_zero,     // random counter has just rolled over
  input  logic tick,        // 1 kHz divide-by-2 tick
  input  logic max,         // display reads 9999
  output logic run,         // RunDisp
  output logic wait_ran,    // WaitRan
  output logic inc,         // advance the display this edge
  output logic clear_disp,  // clear the display this edge
  output logic clear_msb    // clear the random counter's MSB this edge
);

  typedef enum logic [2:0] {
    R_ROLLOVER, R_START, R_STOP, R_MAX, R_COUNT, R_IDLE
  } rule_e;

  rule_e rule;

  always_comb begin
    if (at_zero && wait_ran)    rule = R_ROLLOVER;
    else if (!start_n)          rule = R_START;
    else if (!stop_n)           rule = R_STOP;
    else if (run && tick && max) rule = R_MAX;
    else if (run && tick)       rule = R_COUNT;
    else                        rule = R_IDLE;
  end

  assign inc        = (rule == R_COUNT);
  assign clear_disp = (rule == R_START);
  assign clear_msb  = (rule == R_START);

  always_ff @(posedge clk) begin
    if (rst) begin
      run      <= 1'b0;
      wait_ran <= 1'b0;
    end else begin
      unique case (rule)
        R_ROLLOVER: run <= 1'b1;
        R_START: begin
          wait_ran <= 1'b1;
          run      <= 1'b0;
        end
        R_STOP, R_MAX: begin
          run      <= 1'b0;
          wait_ran <= 1'b0;
        end
        default: ;
      endcase
    end
  end

endmodule
