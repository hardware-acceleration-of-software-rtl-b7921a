// uart_rx: RS-232 receiver (8N1, LSB first) with a character FIFO.
//
// The line passes a two-flop synchroniser. While idle, a low level (the start
// bit) starts a frame: the baud counter is released from zero and the line is
// sampled at every mid-bit point (HALF_BAUD_TICK_COUNT clocks into each bit),
// shifting the samples into a 10-bit register from the top. After the 10th
// sample (the middle of the stop bit) the register holds {stop, d7..d0,
// start}; the 8 data bits are pushed into a sync_fifo and the receiver returns
// to idle at once. Ending the frame at the stop-bit sample rather than at the
// end of the stop bit (where the bit counter would end it) keeps the receiver
// ready for a start bit that follows with no gap: otherwise its start
// detection would slip a few clocks further behind with every back-to-back
// byte, and a long enough burst would be sampled off centre. Start and stop bits are
// discarded and the stop bit is not checked. The FIFO is read with show-ahead
// semantics: `rd_data` is valid while `valid` is high, `rd_en` pops it.
module uart_rx #(
  parameter int unsigned BAUD_COUNTER_WIDTH   = 9,
  parameter int unsigned BAUD_TICK_COUNT      = 433,
  parameter int unsigned HALF_BAUD_TICK_COUNT = 216,
  parameter int unsigned DEPTH                = 128,
  parameter int unsigned WIDTH                = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rxd,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             valid
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [1:0]       sync;
  logic             receiving;
  logic [WIDTH+1:0] shreg;          // {stop, data, start}
  logic             half_tick;
  logic [3:0]       nsamples;
  logic             got_frame;
  logic             fifo_empty, fifo_full;
  logic [AW:0]      fifo_used;

  wire line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end

  baud_counter #(
    .BAUD_COUNTER_WIDTH  (BAUD_COUNTER_WIDTH),
    .BAUD_TICK_COUNT     (BAUD_TICK_COUNT),
    .HALF_BAUD_TICK_COUNT(HALF_BAUD_TICK_COUNT),
    .TOTAL_DATA_WIDTH    (WIDTH + 2)
  ) u_cnt (
    .clk, .rst,
    .clear      (!receiving),
    .tick       (),
    .half_tick  (half_tick),
    .frame_done ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      receiving <= 1'b0;
      shreg     <= '0;
      nsamples  <= '0;
      got_frame <= 1'b0;
    end else begin
      got_frame <= 1'b0;
      if (!receiving) begin
        nsamples <= '0;
        if (line == 1'b0) receiving <= 1'b1;
      end else if (half_tick) begin
        shreg    <= {line, shreg[WIDTH+1:1]};
        nsamples <= nsamples + 1'b1;
        if (nsamples == 4'(WIDTH + 1)) begin     // stop bit sampled
          receiving <= 1'b0;
          got_frame <= 1'b1;
        end
      end
    end
  end

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en   (got_frame),
    .wr_data (shreg[WIDTH:1]),
    .rd_en   (rd_en),
    .rd_data (rd_data),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .used    (fifo_used)
  );

  assign valid = !fifo_empty;

endmodule
