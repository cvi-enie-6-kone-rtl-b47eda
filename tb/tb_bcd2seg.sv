// Self-checking testbench for bcd2seg.
//
// Applies all sixteen input codes and compares the decoder output with a
// reference written as the list of lit segment letters for each glyph
// (0-9, A, b, c, d, E, F), turned into the active-low a..g,dp bit
// pattern here. The decimal point must stay dark.
module tb_bcd2seg;
  import stopwatch_pkg::*;

  logic [3:0] bcd_in;
  seg_t       display;
  int         checks = 0, failures = 0;

  bcd2seg dut (.bcd_in(bcd_in), .display(display));

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "deg", "bcdeg", "adefg", "aefg"};

  function automatic seg_t expected(string lit);
    seg_t s = 8'hFF;
    for (int i = 0; i < lit.len(); i++) s[7 - (lit[i] - "a")] = 1'b0;
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bcd_in = 4'(v);
      #10;
      checks++;
      if (display !== expected(glyph[v])) begin
        failures++;
        $display("FAIL digit %h: got %b expected %b", v, display, expected(glyph[v]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
