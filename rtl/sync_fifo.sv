// sync_fifo: single-clock first-in first-out buffer with show-ahead read.
//
// Holds DEPTH words of WIDTH bits in a register array addressed by a write and
// a read pointer. The word at the head is always present on `rd_data` while
// `empty` is low; `rd_en` pops it at the next clock edge. A write when full and
// a read when empty are ignored. `used` counts the words held. The serial
// receiver and transmitter each use one (128 x 8), in the place where the
// original FPGA build used the vendor's single-clock FIFO; the array and
// pointers are this design's own implementation of that function.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      used
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign empty   = (used == '0);
  assign full    = (used == (AW+1)'(DEPTH));
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
      used <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   used <= used + 1'b1;
        2'b01:   used <= used - 1'b1;
        default: used <= used;
      endcase
    end
  end

  // A full FIFO never loses its count, an empty one never goes negative.
  assert property (@(posedge clk) disable iff (rst) used <= (AW+1)'(DEPTH));

endmodule
