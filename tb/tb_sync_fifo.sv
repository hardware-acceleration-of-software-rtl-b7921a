// tb_sync_fifo: self-checking testbench for sync_fifo.
//
// Random pushes and pops against a queue model, at the published size
// (128 x 8). Checks the show-ahead head word, empty, full and the word count
// every cycle, fills the FIFO to full (a further push is dropped) and drains
// it (a further pop is ignored).
module tb_sync_fifo;
  logic       clk = 1'b0, rst = 1'b1;
  logic       wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  logic       empty, full;
  logic [7:0] used;
  int         checks = 0, failures = 0;
  byte        model[$];

  always #5 clk = ~clk;

  sync_fifo dut (.*);

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

  // One clock with the given controls; the model follows the same rules.
  task automatic step(bit w, bit r, byte d);
    @(negedge clk);
    wr_en = w; rd_en = r; wr_data = d;
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == 128), "full flag");
    check(int'(used) == model.size(), $sformatf("used %0d, model %0d", used, model.size()));
    if (model.size() > 0) check(rd_data == model[0], "head word");
    @(posedge clk);
    begin
      int n_before = model.size();         // a push is refused when full, even with a pop
      if (r && n_before > 0) void'(model.pop_front());
      if (w && n_before < 128) model.push_back(d);
    end
    #1;
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (2000) step(1'($urandom_range(1, 0)), 1'($urandom_range(1, 0)), 8'($urandom));
    repeat (140) step(1'b1, 1'b0, 8'($urandom));           // to full and beyond
    check(full && model.size() == 128, "filled");
    repeat (60) step(1'b1, 1'b1, 8'($urandom));            // full: pop only
    repeat (140) step(1'b0, 1'b1, 8'h00);                  // drain and beyond
    check(empty, "drained");
    repeat (500) step($urandom_range(3, 0) != 0, $urandom_range(3, 0) == 0, 8'($urandom));
    step(1'b0, 1'b0, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
