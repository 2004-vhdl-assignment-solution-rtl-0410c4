// seven_seg: hex digit to seven-segment decoder (timer 1 display driver).
//
// Purely combinational. Each of the sixteen input values maps to the usual
// 0-9, A, b, C, d, E, F glyph. Outputs are active low, in the order
// {a,b,c,d,e,f,g} (bit 6 = a ... bit 0 = g), which is the wiring of the
// reaction-timer board; e.g. "0" lights a..f and leaves g dark (7'b0000001).
// The glyph table follows the reaction-timer design; the table form is this
// implementation's own.
//
// Ports: hex_in (4 bit value), seg_n (7 bit active-low segments). No clock.
module seven_seg
  import react_timer_pkg::*;
(
  input  digit_t hex_in,
  output seg_t   seg_n
);

  always_comb begin
    unique case (hex_in)
      4'h0: seg_n = 7'b000_0001;
      4'h1: seg_n = 7'b100_1111;
      4'h2: seg_n = 7'b001_0010;
      4'h3: seg_n = 7'b000_0110;
      4'h4: seg_n = 7'b100_1100;
      4'h5: seg_n = 7'b010_0100;
      4'h6: seg_n = 7'b010_0000;
      4'h7: seg_n = 7'b000_1111;
      4'h8: seg_n = 7'b000_0000;
      4'h9: seg_n = 7'b000_0100;
      4'hA: seg_n = 7'b000_1000;
      4'hB: seg_n = 7'b110_0000;
      4'hC: seg_n = 7'b011_0001;
      4'hD: seg_n = 7'b100_0010;
      4'hE: seg_n = 7'b011_0000;
      4'hF: seg_n = 7'b011_1000;
    endcase
  end

endmodule
