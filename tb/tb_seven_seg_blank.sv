// tb_seven_seg_blank: exhaustive check of the blanking seven-segment decoder.
// With show = 1 every hex value must give its glyph (built from the list of
// lit segments); with show = 0 every value must give the dash pattern, only
// segment g lit.
module tb_seven_seg_blank;
  import react_timer_pkg::*;

  logic   show;
  digit_t hex_in;
  seg_t   seg_n;
  int checks = 0, failures = 0;

  seven_seg_blank dut (.show, .hex_in, .seg_n);

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                      "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic seg_t glyph(string segs);
    seg_t s = '1;
    for (int i = 0; i < segs.len(); i++)
      s[6 - (segs[i] - "a")] = 1'b0;
    return s;
  endfunction

  initial begin
    for (int sh = 0; sh < 2; sh++)
      for (int v = 0; v < 16; v++) begin
        seg_t exp_s;
        show   = sh[0];
        hex_in = digit_t'(v);
        #1;
        exp_s = sh ? glyph(lit[v]) : glyph("g");
        checks++;
        if (seg_n !== exp_s) begin
          failures++;
          $display("FAIL show %0d hex %h: got %b expected %b", sh, v, seg_n, exp_s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
