// tb_strchr_unit: self-checking testbench for strchr_unit.
//
// Runs the strchr rows of the published result table (2 cycles each) and random
// strings, checking the yes/no answer and the fixed 2-cycle timing.
// Every check compares the unit with a reference model written here from the
// C library definition, including the number of clock cycles from the start
// pulse to the done pulse. A watchdog ends the run with a failure if the unit
// hangs. Ends with a TB_RESULT line.
module tb_strchr_unit;
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

  strchr_unit dut (.*);

  task automatic one(string a, string b);
    logic [7:0] r; int c;
    int idx_first = -1, idx_last = -1;
    logic [7:0] exp_r;
    for (int i = 0; i < a.len(); i++) if (b.len() > 0 && a[i] == b[0]) begin
      if (idx_first < 0) idx_first = i;
      idx_last = i;
    end
    exp_r = (idx_first >= 0) ? ASCII_1 : ASCII_0;
    run(a, b, r, c);
    check(r == exp_r, $sformatf("strchr(%s,%s) = %c, expected %c", a, b, r, exp_r));
    check(c == 2, $sformatf("strchr(%s,%s) took %0d cycles, expected 2", a, b, c));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    one("ABCD", "A"); one("ABCD", "a"); one("ABCD", "C"); one("ABCDB", "B");
    one("ABCDEF", "D"); one("AbCd", "d"); one("ABCDCC", "C"); one("ABCDCC", "F");
    one("ABCDC", "C"); one("ABCDEFGH", "H"); one("ABC", "");
    repeat (300) one(rnd_str(8), rnd_str(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
