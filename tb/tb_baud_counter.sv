// tb_baud_counter: self-checking testbench for baud_counter.
//
// With the published counts (bit = 434 clocks), checks that after `clear`
// drops the mid-bit pulse comes 217 clocks and the bit-boundary pulse 434
// clocks later, that pulses then repeat every 434 clocks, that `frame_done`
// follows the 10th bit boundary by one clock and recurs every 10 bits, and
// that nothing pulses while `clear` is held.
module tb_baud_counter;
  localparam int BIT = 434;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b1;
  logic tick, half_tick, frame_done;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  int   tick_t[$], half_t[$], done_t[$];

  always #5 clk = ~clk;

  baud_counter dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Edge count since clear was released; pulses are logged by the edge that set them.
  always @(posedge clk) begin
    cyc++;
    #1;
    if (tick)       tick_t.push_back(cyc);
    if (half_tick)  half_t.push_back(cyc);
    if (frame_done) done_t.push_back(cyc);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (1000) @(posedge clk);
    check(tick_t.size() == 0 && half_t.size() == 0 && done_t.size() == 0, "pulses while clear");
    @(negedge clk);
    clear = 1'b0;
    cyc = 0;
    repeat (2 * 10 * BIT + 50) @(posedge clk);
    #2;
    check(half_t.size() == 20, $sformatf("%0d mid-bit pulses, expected 20", half_t.size()));
    check(tick_t.size() == 20, $sformatf("%0d bit pulses, expected 20", tick_t.size()));
    for (int i = 0; i < half_t.size(); i++)
      check(half_t[i] == 217 + i * BIT, $sformatf("half_tick %0d at %0d", i, half_t[i]));
    for (int i = 0; i < tick_t.size(); i++)
      check(tick_t[i] == BIT * (i + 1), $sformatf("tick %0d at %0d", i, tick_t[i]));
    check(done_t.size() == 2, $sformatf("%0d frame_done pulses, expected 2", done_t.size()));
    if (done_t.size() == 2) begin
      check(done_t[0] == 10 * BIT + 1, $sformatf("frame_done at %0d", done_t[0]));
      check(done_t[1] == 20 * BIT + 1, $sformatf("second frame_done at %0d", done_t[1]));
    end
    // Clear stops and zeroes everything again.
    @(negedge clk);
    clear = 1'b1;
    tick_t.delete(); half_t.delete(); done_t.delete();
    repeat (2000) @(posedge clk);
    check(tick_t.size() == 0 && half_t.size() == 0 && done_t.size() == 0, "pulses after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
