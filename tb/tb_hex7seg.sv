// tb_hex7seg: checks all sixteen digit patterns against the segment sets
// of the usual hexadecimal font, listed here as segment letters.
module tb_hex7seg;
  logic [3:0] d;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;
  string font [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  hex7seg dut (.digit(d), .seg_n(seg_n));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] e;
    for (int k = 0; k < 16; k++) begin
      d = 4'(k); #1;
      e = '0;
      for (int j = 0; j < font[k].len(); j++) e[font[k][j] - "a"] = 1'b1;
      checks++;
      if (seg_n !== ~e) begin failures++; $display("FAIL digit %h: %b want %b", k, seg_n, ~e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
