// tb_seven_seg: exhaustive check of the hex to seven-segment decoder.
// The expected pattern of every glyph is built from the list of segments that
// must light (letters a-g), independently of the decoder's bit table, and
// compared after inverting to the active-low {a,b,c,d,e,f,g} order.
module tb_seven_seg;
  import react_timer_pkg::*;

  digit_t hex_in;
  seg_t   seg_n;
  int checks = 0, failures = 0;

  seven_seg dut (.hex_in, .seg_n);

  // Segments lit for each glyph 0-9, A, b, C, d, E, F.
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                      "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic seg_t expected(int v);
    seg_t s = '1;
    for (int i = 0; i < lit[v].len(); i++)
      s[6 - (lit[v][i] - "a")] = 1'b0;   // a is bit 6, g is bit 0
    return s;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      hex_in = digit_t'(v);
      #1;
      checks++;
      if (seg_n !== expected(v)) begin
        failures++;
        $display("FAIL hex %h: got %b expected %b", v, seg_n, expected(v));
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
