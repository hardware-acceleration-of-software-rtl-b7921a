// strcmp_unit: case-sensitive string equality in one clock cycle.
//
// The two N-character operand registers are XOR-ed bit by bit; the strings are
// equal exactly when every XOR bit is 0 (the NUL padding past the end of each
// string takes part, so strings of different lengths differ). On the clock edge
// that sees `start`, `result` is loaded with '1' for equal or '0' for unequal
// and `done` pulses: the operation takes 1 cycle, as the design specifies.
module strcmp_unit
  import str_pkg::*;
#(
  parameter int unsigned N = MAX_CHARS
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [8*N-1:0] str1,
  input  logic [8*N-1:0] str2,
  output logic           done,
  output logic [7:0]     result
);

  wire [8*N-1:0] diff = str1 ^ str2;

  always_ff @(posedge clk) begin
    if (rst) begin
      done   <= 1'b0;
      result <= ASCII_0;
    end else begin
      done <= start;
      if (start) result <= (diff == '0) ? ASCII_1 : ASCII_0;
    end
  end

endmodule
