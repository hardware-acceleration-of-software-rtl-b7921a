// tb_hex7seg: self-checking testbench for hex7seg.
//
// For every hex digit the lit segments are given as letters (a = top, going
// clockwise to f, g = middle) and turned into the expected active-low pattern.
module tb_hex7seg;
  logic [3:0] nibble;
  logic [6:0] seg;
  int         checks = 0, failures = 0;

  hex7seg dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] pattern(string lit);
    logic [6:0] p = 7'h7F;
    for (int i = 0; i < lit.len(); i++) p[3'(lit[i] - "a")] = 1'b0;
    return p;
  endfunction

  initial begin
    static string lit[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    for (int d = 0; d < 16; d++) begin
      nibble = 4'(d);
      #1;
      checks++;
      if (seg != pattern(lit[d])) begin
        failures++;
        $display("FAIL: digit %h shows %b, expected %b", d, seg, pattern(lit[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
