// tb_timing_probe: self-checking testbench for timing_probe.
//
// Starts operations of several lengths and checks the cycle count, that
// probe_start rises one clock after the start and probe_done one clock after
// the completion, and that `arm` drops both pins for the next request.
module tb_timing_probe;
  logic        clk = 1'b0, rst = 1'b1;
  logic        arm = 1'b0, op_start = 1'b0, op_done = 1'b0;
  logic        probe_start, probe_done;
  logic [15:0] cycles;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  timing_probe dut (.*);

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

  // An operation whose done comes `len` clocks after its start.
  task automatic op(int len);
    @(negedge clk); arm = 1'b1;
    @(negedge clk); arm = 1'b0;
    check(!probe_start && !probe_done, "pins dropped by arm");
    op_start = 1'b1;
    @(negedge clk); op_start = 1'b0;
    check(probe_start && !probe_done, "probe_start after start");
    repeat (len - 1) begin
      @(negedge clk);
      check(!probe_done, "probe_done early");
    end
    op_done = 1'b1;
    @(negedge clk); op_done = 1'b0;
    check(probe_done && probe_start, "probe_done after done");
    check(int'(cycles) == len, $sformatf("cycles %0d, expected %0d", cycles, len));
    repeat (5) @(negedge clk);
    check(int'(cycles) == len && probe_done, "held until next request");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    op(1); op(2); op(8); op(5);
    repeat (20) op($urandom_range(30, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
