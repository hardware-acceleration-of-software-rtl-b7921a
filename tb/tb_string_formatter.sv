// tb_string_formatter: self-checking testbench for string_formatter.
//
// Feeds byte streams as the receiver FIFO would present them (with random
// idle cycles) and checks the assembled operands and the ready pulse: two
// framed strings for two-operand requests, one for single-operand ones,
// noise outside the frames ignored, strings longer than 8 characters cut to
// 8, empty strings, and a repeated STX restarting the string.
module tb_string_formatter;
  import str_pkg::*;
  localparam int unsigned N = 8;

  logic           clk = 1'b0, rst = 1'b1;
  logic           in_valid = 1'b0, two_strings = 1'b1;
  logic [7:0]     in_data = '0;
  logic           in_ready, str_ready, receiving;
  logic [8*N-1:0] str1, str2;
  int             checks = 0, failures = 0;
  int             ready_count = 0;

  always #5 clk = ~clk;

  string_formatter dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [8*N-1:0] pack(string s);
    logic [8*N-1:0] v = '0;
    for (int i = 0; i < s.len() && i < int'(N); i++) v[8*N-1-8*i -: 8] = s[i];
    return v;
  endfunction

  always @(posedge clk) if (str_ready && !rst) ready_count++;

  task automatic put(byte b);
    @(negedge clk);
    in_valid = 1'b1; in_data = b;
    @(negedge clk);
    in_valid = 1'b0;
    repeat ($urandom_range(2, 0)) @(negedge clk);
  endtask

  task automatic put_str(string s);
    put(STX);
    for (int i = 0; i < s.len(); i++) put(s[i]);
    put(ETX);
  endtask

  task automatic expect_strings(string a, string b, int n_ready);
    repeat (2) @(negedge clk);
    check(ready_count == n_ready, $sformatf("ready pulses %0d, expected %0d", ready_count, n_ready));
    check(str1 == pack(a), $sformatf("str1 for '%s'", a));
    check(str2 == pack(b), $sformatf("str2 for '%s'", b));
    check(!receiving, "receiving dropped");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    put_str("ABCDE"); 
    check(ready_count == 0 && receiving, "waits for the second string");
    put_str("AB");
    expect_strings("ABCDE", "AB", 1);
    put("x"); put(ETX); put_str("A"); put("j"); put("k"); put_str("a");
    expect_strings("A", "a", 2);
    put_str("ABCDEFGHIJK"); put_str("");
    expect_strings("ABCDEFGH", "", 3);
    put(STX); put("Q"); put("R"); put_str("XY"); put_str("Z");
    expect_strings("XY", "Z", 4);
    two_strings = 1'b0;
    put_str("AbcD");
    expect_strings("AbcD", "", 5);
    for (int k = 0; k < 40; k++) begin
      automatic string a = "", b = "";
      automatic int la = $urandom_range(10, 0), lb = $urandom_range(10, 0);
      for (int i = 0; i < la; i++) a = {a, string'(8'($urandom_range(126, 32)))};
      for (int i = 0; i < lb; i++) b = {b, string'(8'($urandom_range(126, 32)))};
      two_strings = k[0];
      put_str(a);
      if (two_strings) put_str(b);
      expect_strings(a, two_strings ? b : "", 6 + k);
    end
    check(in_ready, "always ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
