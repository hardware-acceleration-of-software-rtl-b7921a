// tb_uart_rx: self-checking testbench for uart_rx.
//
// Drives 8N1 frames onto the line the way a PC's UART would, back to back and
// with gaps, with bit periods 2% short and long as well as exact, in bursts of
// 100 bytes with no gap between frames, and reads
// the FIFO. Checks every byte and its order, that bytes wait in the FIFO until
// popped, and that nothing is received from an idle line.
module tb_uart_rx;
  localparam int BIT = 434;

  logic       clk = 1'b0, rst = 1'b1;
  logic       rxd = 1'b1, rd_en = 1'b0;
  logic [7:0] rd_data;
  logic       valid;
  int         checks = 0, failures = 0;
  byte        sent[$];

  always #5 clk = ~clk;

  uart_rx dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    // Long gap-free bursts, exact and 2% fast: start detection must not drift.
    for (int i = 0; i < 100; i++) send(8'($urandom));
    drain();
    for (int i = 0; i < 100; i++) send(8'($urandom), BIT * 98 / 100);
    repeat (2 * BIT) @(posedge clk);
    drain();
    check(sent.size() == 0, "all bytes received (long bursts)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(byte b, int period = BIT);
    logic [9:0] frame = {1'b1, b, 1'b0};
    sent.push_back(b);
    for (int i = 0; i < 10; i++) begin
      rxd = frame[i];
      repeat (period) @(posedge clk);
    end
  endtask

  task automatic drain();
    while (valid) begin
      @(negedge clk);
      check(sent.size() > 0 && rd_data == sent[0], $sformatf("received %02h", rd_data));
      if (sent.size() > 0) void'(sent.pop_front());
      rd_en = 1'b1;
      @(negedge clk);
      rd_en = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5000) @(posedge clk);
    check(!valid, "nothing from idle line");
    // Back to back, exact rate; read afterwards (bytes wait in the FIFO).
    for (int i = 0; i < 8; i++) send(8'($urandom));
    send(8'h02); send(8'h03); send(8'h00); send(8'hFF);
    repeat (BIT) @(posedge clk);
    check(valid, "bytes waiting");
    drain();
    check(sent.size() == 0, "all bytes received");
    // Slow and fast senders with idle gaps.
    for (int i = 0; i < 10; i++) begin
      send(8'($urandom), (i % 2 != 0) ? BIT * 102 / 100 : BIT * 98 / 100);
      repeat ($urandom_range(3 * BIT, 0)) @(posedge clk);
    end
    repeat (2 * BIT) @(posedge clk);
    drain();
    check(sent.size() == 0, "all bytes received (rate offsets)");
    // Long gap-free bursts, exact and 2% fast: start detection must not drift.
    for (int i = 0; i < 100; i++) send(8'($urandom));
    drain();
    for (int i = 0; i < 100; i++) send(8'($urandom), BIT * 98 / 100);
    repeat (2 * BIT) @(posedge clk);
    drain();
    check(sent.size() == 0, "all bytes received (long bursts)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
