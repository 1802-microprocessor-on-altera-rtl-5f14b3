// tb_hex7seg: checks all sixteen digit patterns.
//
// The expected patterns are written as the set of lit segments (a..g) of
// each character, then inverted for the active-low outputs.
module tb_hex7seg;
  logic [3:0] digit;
  logic [6:0] seg_n;

  hex7seg dut (.*);

  int checks = 0, failures = 0;
  // lit segments per digit, as strings of segment letters
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] expect_n;
      expect_n = 7'h7F;
      foreach (lit[v][k]) expect_n[lit[v][k] - "a"] = 1'b0;
      digit = v[3:0];
      #1;
      checks++;
      if (seg_n != expect_n) begin
        failures++;
        $display("FAIL digit %h: %b expected %b", v, seg_n, expect_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
