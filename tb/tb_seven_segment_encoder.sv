// Testbench for seven_segment_encoder: every glyph code is applied and the
// pattern compared with one built from the list of segments (a..g) each
// character lights.
module tb_seven_segment_encoder;
  import evm_pkg::*;

  int checks = 0, failures = 0;
  glyph_t glyph;
  seg_t   seg;

  seven_segment_encoder dut (.glyph(glyph), .seg(seg));

  // Segments lit by each glyph, written as letters.
  function automatic seg_t from_letters(string s);
    seg_t r = '0;
    for (int i = 0; i < s.len(); i++) r[6 - (s[i] - "a")] = 1'b1;
    return r;
  endfunction

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                      "abc", "abcdefg", "abcdfg", "", "", "", "", "adefg", ""};

  initial begin
    for (int g = 0; g < 16; g++) begin
      glyph = glyph_t'(g);
      #1;
      checks++;
      if (seg !== from_letters(lit[g])) begin
        failures++;
        $display("FAIL glyph %0d: seg=%b expected %b", g, seg, from_letters(lit[g]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
