// tb_uart_tx: self-checking testbench for uart_tx.
//
// Writes bursts of bytes in consecutive clocks (as the case-conversion units
// do) and decodes the serial line the way a PC's UART would: on each falling
// edge it samples the middle of every bit. Checks the start bit, the 8 data
// bits LSB first, the stop bit, the byte order, the bit period of 434 clocks
// (115200 baud at 50 MHz) and that the line idles high.
module tb_uart_tx;
  localparam int BIT = 434;

  logic       clk = 1'b0, rst = 1'b1;
  logic       wr_en = 1'b0;
  logic [7:0] wr_data = '0;
  logic       txd, busy;
  logic [7:0] fifo_space;
  int         checks = 0, failures = 0;
  byte        sent[$];
  int         got = 0;

  always #5 clk = ~clk;

  uart_tx dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Line receiver model.
  initial begin : rx_model
    forever begin
      byte b;
      int  t0, t1;
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = txd;
      end
      repeat (BIT) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      check(sent.size() > 0 && b == sent[0], $sformatf("byte %0d: got %02h", got, b));
      if (sent.size() > 0) void'(sent.pop_front());
      got++;
    end
  end

  // Bit period: time between the falling edge of the start bit and the first
  // later edge whose position is known (byte 8'hAA toggles every bit).
  task automatic measure_period();
    int n = 0;
    @(negedge txd);
    @(posedge txd);                  // end of start bit (bit 0 of 0xAA is 0)
    while (txd == 1'b1) begin @(posedge clk); n++; end
    check(n >= BIT - 2 && n <= BIT + 2, $sformatf("bit period %0d clocks", n));
  endtask

  task automatic push(byte d);
    @(negedge clk);
    wr_en = 1'b1; wr_data = d;
    sent.push_back(d);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(posedge clk);
    check(txd == 1'b1 && !busy, "idle line high");
    fork
      measure_period();
      push(8'hAA);
    join
    wait (got == 1);
    // A burst written in consecutive clocks.
    @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      wr_en = 1'b1; wr_data = 8'("HELLO!" >> (8 * (5 - i)));
      sent.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 1'b0;
    check(fifo_space >= 8'd122 && busy, "burst queued");
    repeat (20) push(8'($urandom));
    wait (got == 27);
    repeat (2 * BIT) @(posedge clk);
    check(txd == 1'b1 && !busy && fifo_space == 8'd128, "idle after burst");
    check(sent.size() == 0, "all bytes sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
