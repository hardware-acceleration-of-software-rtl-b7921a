// tb_strstr_unit: self-checking testbench for strstr_unit.
//
// Runs the strstr rows of the published result table (position and cycle
// count) and random pairs over a small alphabet.
// Every check compares the unit with a reference model written here from the
// C library definition, including the number of clock cycles from the start
// pulse to the done pulse. A watchdog ends the run with a failure if the unit
// hangs. Ends with a TB_RESULT line.
module tb_strstr_unit;
  import str_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pack a string into N bytes, first character on top, NUL padded.
  function automatic logic [8*N-1:0] pack(string s);
    logic [8*N-1:0] v = '0;
    for (int i = 0; i < s.len() && i < int'(N); i++) v[8*N-1-8*i -: 8] = s[i];
    return v;
  endfunction

  // Random string over a small alphabet so that matches are common.
  function automatic string rnd_str(int maxlen);
    string alpha = "AaBbCc";
    string s = "";
    int len = $urandom_range(maxlen, 0);
    for (int i = 0; i < len; i++) s = {s, string'(alpha[$urandom_range(5, 0)])};
    return s;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic           start = 1'b0;
  logic [8*N-1:0] str1 = '0, str2 = '0;
  logic           done;
  logic [7:0]     result;

  // Present the operands with a one-cycle start pulse, wait for done and
  // return the result and the cycle count (1 = done on the edge after start).
  task automatic run(string a, string b, output logic [7:0] res, output int cyc);
    @(negedge clk);
    str1 = pack(a); str2 = pack(b); start = 1'b1;
    @(negedge clk);
    start = 1'b0; str1 = '0; str2 = '0;
    cyc = 1;
    while (!done && cyc < 50) begin @(negedge clk); cyc++; end
    res = result;
  endtask

  logic       found;
  logic [3:0] pos;
  strstr_unit dut (.*);

  task automatic one(string a, string b);
    logic [7:0] r; int c;
    int n = a.len(), m = b.len();
    int p_exp = -1, c_exp;
    for (int p = 0; p + m <= n; p++) if (a.substr(p, p + m - 1) == b || m == 0) begin p_exp = p; break; end
    c_exp = (p_exp >= 0) ? p_exp + 2 : ((m > n) ? 2 : n - m + 2);
    run(a, b, r, c);
    check(r == ((p_exp >= 0) ? 8'(48 + p_exp) : NOT_FOUND),
          $sformatf("strstr(%s,%s) = %c, expected position %0d", a, b, r, p_exp));
    check(found == (p_exp >= 0) && (p_exp < 0 || int'(pos) == p_exp), $sformatf("strstr(%s,%s) found/pos", a, b));
    check(c == c_exp, $sformatf("strstr(%s,%s) took %0d cycles, expected %0d", a, b, c, c_exp));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // Result table rows: 2, 5, 4, 3, 5, 4 cycles.
    one("ABCD", "A"); one("ABCD", "a"); one("ABCD", "CD"); one("ABCD", "BC");
    one("ABCDEF", "DE"); one("AbCd", "CD");
    one("ABCDEFGH", "GH"); one("AB", "ABC"); one("ABC", ""); one("AAAB", "AAB");
    repeat (400) one(rnd_str(8), rnd_str(3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
