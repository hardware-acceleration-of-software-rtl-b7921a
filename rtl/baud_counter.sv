// baud_counter: baud-rate timing for the serial transmitter and receiver.
//
// A free-running counter divides the system clock down to the bit rate: it
// counts 0..BAUD_TICK_COUNT and wraps, so one bit lasts BAUD_TICK_COUNT+1
// clocks (434 clocks = 8.68 us = 115200 baud at the board's 50 MHz clock).
// `tick` pulses for one clock when the counter wraps (the bit boundary, used by
// the transmitter to shift), `half_tick` when it passes HALF_BAUD_TICK_COUNT
// (mid-bit, used by the receiver to sample). A bit counter counts ticks; when
// it reaches TOTAL_DATA_WIDTH (start + 8 data + stop = 10) `frame_done` pulses
// and the bit counter restarts. Both counters are held at zero while `clear`
// is high, so a frame's timing starts from the clock after `clear` drops.
// The counter widths and counts follow the design's published parameters;
// all three outputs are registered, i.e. they appear one clock after the
// count that causes them.
//
// The counter widths and counts (9 bits, 433, 216, 10 bits per frame) are
// the original design's. Registered outputs and the synchronous `clear` are this
// design's choices.
module baud_counter #(
  parameter int unsigned BAUD_COUNTER_WIDTH   = 9,
  parameter int unsigned BAUD_TICK_COUNT      = 433,
  parameter int unsigned HALF_BAUD_TICK_COUNT = 216,
  parameter int unsigned TOTAL_DATA_WIDTH     = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  output logic tick,
  output logic half_tick,
  output logic frame_done
);

  logic [BAUD_COUNTER_WIDTH-1:0] baud_cnt;
  logic [3:0]                    bit_cnt;

  wire at_tick = (baud_cnt == BAUD_COUNTER_WIDTH'(BAUD_TICK_COUNT));
  wire at_half = (baud_cnt == BAUD_COUNTER_WIDTH'(HALF_BAUD_TICK_COUNT));
  wire at_end  = (bit_cnt == 4'(TOTAL_DATA_WIDTH));

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      baud_cnt <= '0;
      bit_cnt  <= '0;
    end else begin
      baud_cnt <= at_tick ? '0 : baud_cnt + 1'b1;
      if (at_end)       bit_cnt <= '0;
      else if (at_tick) bit_cnt <= bit_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tick       <= 1'b0;
      half_tick  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      tick       <= at_tick && !clear;
      half_tick  <= at_half && !clear;
      frame_done <= at_end && !clear;
    end
  end

endmodule
