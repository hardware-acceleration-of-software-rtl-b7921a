// tb_string_accel_top: end-to-end testbench for the string accelerator.
//
// Plays the host PC: for each request it selects the function, sends
// STX string1 ETX [STX string2 ETX] over the serial line at 115200 baud
// (434 clocks per bit, every parameter of the top at its default) and decodes
// the reply from the transmit line. Requests are the rows of the published
// result tables for all nine functions plus extra cases. Each reply is
// compared with a C-library reference model written here, and the operation's
// cycle count (op_cycles, the on-chip equivalent of the oscilloscope
// measurement) with the timing the design specifies, and the serial link time
// (10 bit times per byte, 434 clocks per bit) before the operation starts. It also checks that the
// two probe pins rise for every operation and what the displays show, and counts how often each mechanism
// occurred: every function, early exit of strcasecmp on a mismatch, strstr
// found and not found, '!' for an absent character, a multi-character burst
// through the transmit FIFO, strings cut to 8 characters, one- and
// two-operand framing. A mechanism that never occurred counts as a failure.
module tb_string_accel_top;
  import str_pkg::*;

  localparam int BIT = 434;
  localparam int N   = 8;

  logic        clk = 1'b0, rst = 1'b1;
  func_e       func_sel = F_STRCMP;
  logic        uart_rxd = 1'b1;
  logic        uart_txd, probe_start, probe_done;
  logic [15:0] op_cycles;
  logic [6:0]  hex_lo, hex_hi, hex_rx_lo, hex_rx_hi;
  int          checks = 0, failures = 0;
  byte         reply[$];

  // Mechanism counters.
  int n_func[9];
  int n_early_exit = 0, n_found = 0, n_not_found = 0, n_bang = 0;
  int n_burst = 0, n_truncated = 0, n_one_operand = 0, n_two_operand = 0;
  int n_probe_start = 0, n_probe_done = 0;

  always #5 clk = ~clk;

  string_accel_top dut (.*);

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc_now = 0, t_probe_start = 0, t_probe_done = 0, t_first_reply = 0;
  always @(posedge clk) cyc_now++;
  always @(posedge probe_start) begin n_probe_start++; t_probe_start = cyc_now; end
  always @(posedge probe_done)  begin n_probe_done++;  t_probe_done = cyc_now; end
  always @(negedge uart_txd) if (t_first_reply < t_probe_start) t_first_reply = cyc_now;

  // ---------------- host serial port ----------------
  task automatic send_byte(byte b);
    logic [9:0] frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = frame[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  initial begin : host_rx
    forever begin
      byte b;
      @(negedge uart_txd);
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (BIT) @(posedge clk);
      check(uart_txd == 1'b1, "reply stop bit");
      reply.push_back(b);
    end
  end

  // Active-low 7-segment pattern (bit 6 = g ... bit 0 = a) from the lit segments.
  function automatic logic [6:0] seg7(logic [7:0] d);
    string lit[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    logic [6:0] p = 7'h7F;
    for (int i = 0; i < lit[d[3:0]].len(); i++) p[3'(lit[d[3:0]][i] - "a")] = 1'b0;
    return p;
  endfunction

  // ---------------- reference model ----------------
  function automatic string cut(string s);
    return (s.len() > N) ? s.substr(0, N - 1) : s;
  endfunction

  function automatic string fold(byte c);
    string s = string'(c);
    return s.toupper();
  endfunction

  // Expected reply and cycle count of one request.
  task automatic model(func_e f, string a, string b, output string exp, output int cyc);
    int n = a.len(), m = b.len();
    int first = -1, last = -1, p_found = -1;
    for (int i = 0; i < n; i++) if (m > 0 && a[i] == b[0]) begin
      if (first < 0) first = i;
      last = i;
    end
    for (int p = 0; p + m <= n; p++) if (m == 0 || a.substr(p, p + m - 1) == b) begin p_found = p; break; end
    case (f)
      F_STRCMP:     begin exp = (a == b) ? "1" : "0"; cyc = 1; end
      F_STRCASECMP: begin
        exp = (a.toupper() == b.toupper()) ? "1" : "0";
        cyc = N;
        for (int k = 0; k < N; k++) begin
          byte ca = (k < n) ? a[k] : 8'h00, cb = (k < m) ? b[k] : 8'h00;
          byte na = (k + 1 < n) ? a[k+1] : 8'h00, nb = (k + 1 < m) ? b[k+1] : 8'h00;
          if (fold(ca) != fold(cb) || (na == 0 && nb == 0)) begin cyc = k + 1; break; end
        end
      end
      F_STRSTR: begin
        exp = (p_found >= 0) ? string'(8'(48 + p_found)) : "!";
        cyc = (p_found >= 0) ? p_found + 2 : ((m > n) ? 2 : n - m + 2);
      end
      F_STRCHR:     begin exp = (first >= 0) ? "1" : "0"; cyc = 2; end
      F_STRCHR_POS: begin exp = (first >= 0) ? string'(8'(48 + first)) : "!"; cyc = 2; end
      F_STRRCHR:    begin exp = (last >= 0) ? string'(8'(48 + last)) : "!"; cyc = 2; end
      F_STRUPR:     begin exp = a.toupper(); cyc = (n == 0) ? 1 : n; end
      F_STRLWR:     begin exp = a.tolower(); cyc = (n == 0) ? 1 : n; end
      default:      begin exp = string'(8'(48 + n)); cyc = (n == 0) ? 1 : n; end
    endcase
  endtask

  // ---------------- one request ----------------
  task automatic request(func_e f, string a, string b = "");
    string exp, got = "";
    int    cyc, ps0, pd0, n_bytes;
    longint t0, t_in;
    string a8 = cut(a), b8 = cut(b);
    bit    two = needs_two(f);
    if (!two) b8 = "";
    model(f, a8, b8, exp, cyc);
    @(negedge clk);
    func_sel = f;
    ps0 = n_probe_start; pd0 = n_probe_done;
    reply.delete();
    t0 = cyc_now;
    send_byte(STX);
    foreach (a[i]) send_byte(a[i]);
    send_byte(ETX);
    if (two) begin
      send_byte(STX);
      foreach (b[i]) send_byte(b[i]);
      send_byte(ETX);
    end
    // Wait for the whole reply (plus one byte time to catch extra bytes).
    repeat ((exp.len() + 2) * 10 * BIT) @(posedge clk);
    foreach (reply[i]) got = {got, string'(reply[i])};
    check(got == exp, $sformatf("%s('%s','%s') replied '%s', expected '%s'", f.name(), a, b, got, exp));
    check(int'(op_cycles) == cyc, $sformatf("%s('%s','%s') took %0d cycles, expected %0d", f.name(), a, b, op_cycles, cyc));
    check(n_probe_start == ps0 + 1 && n_probe_done == pd0 + 1, $sformatf("%s probe edges", f.name()));
    // Displays: last byte sent, and the ETX that closed the request.
    check({hex_hi, hex_lo} == {seg7(8'(exp[exp.len()-1]) >> 4), seg7(8'(exp[exp.len()-1]) & 8'h0F)},
          "result display");
    check({hex_rx_hi, hex_rx_lo} == {seg7(8'h0), seg7(8'h3)}, "received-byte display");
    // Link time: each received byte costs 10 bit times (86.8 us at 115200 baud);
    // the operation starts within the last stop bit and the reply's start bit
    // follows the first result character within a few clocks.
    n_bytes = a.len() + 2;
    if (two) n_bytes += b.len() + 2;
    t_in = longint'(n_bytes) * 10 * longint'(BIT);
    check(t_probe_start - t0 >= t_in - longint'(BIT) && t_probe_start - t0 <= t_in + 20,
          $sformatf("operation started %0d clocks after the request began, %0d of link time", t_probe_start - t0, t_in));
    check(t_first_reply > t_probe_start && t_first_reply <= t_probe_done + 10,
          $sformatf("reply began %0d clocks after completion", t_first_reply - t_probe_done));
    n_func[f]++;
    if (two) n_two_operand++; else n_one_operand++;
    if (a.len() > N || (two && b.len() > N)) n_truncated++;
    if (f == F_STRCASECMP && exp == "0" && cyc < N) n_early_exit++;
    if (f == F_STRSTR && exp != "!") n_found++;
    if (f == F_STRSTR && exp == "!") n_not_found++;
    if (f inside {F_STRCHR_POS, F_STRRCHR} && exp == "!") n_bang++;
    if (exp.len() > 1) n_burst++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (100) @(posedge clk);
    // Rows of the published result tables.
    request(F_STRCMP, "A", "A");          request(F_STRCMP, "B", "A");
    request(F_STRCMP, "ABCDEFGH", "ABCDEFGH"); request(F_STRCMP, "ABCDEFGH", "AABBCEDF");
    request(F_STRCMP, "AB", "ABCDE");     request(F_STRCMP, "ABCD", "ABCD");
    request(F_STRCASECMP, "A", "a");      request(F_STRCASECMP, "ABCDEFG", "ABcDEFg");
    request(F_STRCASECMP, "ABCDEFG", "AABBCED"); request(F_STRCASECMP, "Abcde", "AB");
    request(F_STRCASECMP, "Abcd", "abcd");
    request(F_STRUPR, "AbcD");  request(F_STRUPR, "ABcDe"); request(F_STRUPR, "A");
    request(F_STRLWR, "AbcD");  request(F_STRLWR, "AB");
    request(F_STRLEN, "A");     request(F_STRLEN, "ABcDe"); request(F_STRLEN, "ABCDEFGH");
    request(F_STRCHR, "ABCD", "A");   request(F_STRCHR, "ABCD", "a"); request(F_STRCHR, "AbCd", "d");
    request(F_STRCHR_POS, "ABCDB", "B"); request(F_STRCHR_POS, "ABCD", "a");
    request(F_STRSTR, "ABCD", "A");   request(F_STRSTR, "ABCD", "a");  request(F_STRSTR, "ABCD", "CD");
    request(F_STRSTR, "ABCD", "BC");  request(F_STRSTR, "ABCDEF", "DE"); request(F_STRSTR, "AbCd", "CD");
    request(F_STRRCHR, "ABCDCC", "C"); request(F_STRRCHR, "ABCDCC", "F"); request(F_STRRCHR, "ABCD", "A");
    // Longer than the 8-character operand registers.
    request(F_STRLEN, "ABCDEFGHIJ");  request(F_STRCMP, "ABCDEFGHX", "ABCDEFGHY");
    $display("mechanisms: functions %p, strcasecmp early exit %0d, strstr found %0d / not found %0d,",
             n_func, n_early_exit, n_found, n_not_found);
    $display("  '!' replies %0d, multi-byte replies %0d, truncated %0d, one-/two-operand %0d/%0d",
             n_bang, n_burst, n_truncated, n_one_operand, n_two_operand);
    for (int f = 0; f < 9; f++) check(n_func[f] > 0, $sformatf("function %0d never ran", f));
    check(n_early_exit > 0, "no strcasecmp early exit");
    check(n_found > 0 && n_not_found > 0, "strstr outcomes");
    check(n_bang > 0, "no not-found reply");
    check(n_burst > 0, "no multi-byte reply");
    check(n_truncated > 0, "no truncated string");
    check(n_one_operand > 0 && n_two_operand > 0, "operand framings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
