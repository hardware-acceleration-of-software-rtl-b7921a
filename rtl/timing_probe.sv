// timing_probe: start/finish marker pins for measuring an operation.
//
// Two output pins are meant for an oscilloscope: `probe_start` rises on the
// clock after the string operation is started and `probe_done` on the clock
// after it completes, so the time between the two rising edges is the
// operation's run time. Both pins drop when the next request begins to arrive
// (`arm`), giving each operation fresh edges. The same interval is counted on
// chip in clock cycles: `cycles` holds the count of the last operation (1 for
// a one-cycle operation) and saturates at its maximum.
//
// The two pins that rise at the start and at the end of an operation follow
// the original design. The cycle counter and the clearing of the pins when a
// new request arrives are this design's choices.
module timing_probe #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             arm,
  input  logic             op_start,
  input  logic             op_done,
  output logic             probe_start,
  output logic             probe_done,
  output logic [CNT_W-1:0] cycles
);

  logic running;

  always_ff @(posedge clk) begin
    if (rst) begin
      probe_start <= 1'b0;
      probe_done  <= 1'b0;
      running     <= 1'b0;
      cycles      <= '0;
    end else begin
      if (op_start) begin
        probe_start <= 1'b1;
        probe_done  <= 1'b0;
        running     <= 1'b1;
        cycles      <= CNT_W'(1);
      end else if (running) begin
        if (op_done) begin
          probe_done <= 1'b1;
          running    <= 1'b0;
        end else if (cycles != '1) begin
          cycles <= cycles + 1'b1;
        end
      end else if (arm) begin
        probe_start <= 1'b0;
        probe_done  <= 1'b0;
      end
    end
  end

endmodule
