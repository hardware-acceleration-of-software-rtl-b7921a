// uart_tx: RS-232 transmitter (8N1, LSB first) with a result FIFO.
//
// Bytes written with `wr_en` queue in a sync_fifo, so a function unit may
// produce several result characters back to back (one per clock) while the
// line drains them at the baud rate in the order written. When idle and the
// FIFO holds a byte, the byte is popped into a 9-bit shift register together
// with a 0 start bit in bit 0. Each baud tick shifts the register right and
// fills a 1 from the top, so after the 8 data bits the line sees the 1 stop
// bit; the bit counter ends the frame after 10 bit times and the next byte
// may start. The line output is registered and idles high. Frame timing comes
// from baud_counter: every bit lasts BAUD_TICK_COUNT+1 clocks.
//
// The FIFO, the shift register sending LSB first and the bit counter
// follow the original design. The shift-register width and the busy and
// fifo_space outputs are this design's choices.
module uart_tx #(
  parameter int unsigned BAUD_COUNTER_WIDTH   = 9,
  parameter int unsigned BAUD_TICK_COUNT      = 433,
  parameter int unsigned HALF_BAUD_TICK_COUNT = 216,
  parameter int unsigned DEPTH                = 128,
  parameter int unsigned WIDTH                = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             txd,
  output logic             busy,
  output logic [7:0]       fifo_space
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic             sending;
  logic [WIDTH:0]   shreg;          // {data, start bit}
  logic             tick, frame_done;
  logic [WIDTH-1:0] head;
  logic             fifo_empty, fifo_full;
  logic [AW:0]      fifo_used;

  wire load = !sending && !fifo_empty && !frame_done;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en   (wr_en),
    .wr_data (wr_data),
    .rd_en   (load),
    .rd_data (head),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .used    (fifo_used)
  );

  baud_counter #(
    .BAUD_COUNTER_WIDTH  (BAUD_COUNTER_WIDTH),
    .BAUD_TICK_COUNT     (BAUD_TICK_COUNT),
    .HALF_BAUD_TICK_COUNT(HALF_BAUD_TICK_COUNT),
    .TOTAL_DATA_WIDTH    (WIDTH + 2)
  ) u_cnt (
    .clk, .rst,
    .clear      (!sending),
    .tick       (tick),
    .half_tick  (),
    .frame_done (frame_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sending <= 1'b0;
      shreg   <= '1;
      txd     <= 1'b1;
    end else begin
      if (frame_done)  sending <= 1'b0;
      else if (load)   sending <= 1'b1;

      if (load)        shreg <= {head, 1'b0};
      else if (tick)   shreg <= {1'b1, shreg[WIDTH:1]};

      txd <= sending ? shreg[0] : 1'b1;
    end
  end

  assign busy       = sending || !fifo_empty;
  assign fifo_space = 8'((AW+1)'(DEPTH) - fifo_used);

endmodule
