// tb_hex_digit: all sixteen digits against the segment sets of a standard
// seven-segment font (segments a..g listed per digit), active low.
module tb_hex_digit;
  logic [3:0] hex;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  hex_digit dut (.hex, .seg);
  string segs [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [6:0] exp_on;
      string s;
      exp_on = '0;
      s = segs[i];
      for (int j = 0; j < s.len(); j++) exp_on[s[j] - "a"] = 1'b1;
      hex = 4'(i); #1;
      checks++;
      if (seg != ~exp_on) begin
        failures++;
        $display("FAIL: digit %h -> %b, expected %b", hex, seg, ~exp_on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
