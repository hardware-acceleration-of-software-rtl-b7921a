// tb_strupr_unit: self-checking testbench for strupr_unit.
//
// Runs the strupr rows of the published result table and random strings,
// checking every streamed character and one cycle per character.
// Every check compares the unit with a reference model written here from the
// C library definition, including the number of clock cycles from the start
// pulse to the done pulse. A watchdog ends the run with a failure if the unit
// hangs. Ends with a TB_RESULT line.
module tb_strupr_unit;
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
  logic [8*N-1:0] str1 = '0;
  logic           done, out_valid;
  logic [7:0]     out_char;
  string          got;

  strupr_unit dut (.*);

  always @(posedge clk) if (out_valid) got = {got, string'(out_char)};

  task automatic one(string a);
    int c;
    string exp_s = a.toupper();
    int exp_c = (a.len() == 0) ? 1 : a.len();
    got = "";
    @(negedge clk);
    str1 = pack(a); start = 1'b1;
    @(negedge clk);
    start = 1'b0; str1 = '0;
    c = 1;
    while (!done && c < 50) begin @(negedge clk); c++; end
    @(negedge clk);
    check(got == exp_s, $sformatf("strupr(%s) = '%s', expected '%s'", a, got, exp_s));
    check(c == exp_c, $sformatf("strupr(%s) took %0d cycles, expected %0d", a, c, exp_c));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    one("AbcD"); one("A"); one("Abcd"); one("ABcDe"); one("Ab"); one("AB");
    one("a1@[z{Z`"); one("ABCDEFGH"); one("");
    repeat (200) one(rnd_str(8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
