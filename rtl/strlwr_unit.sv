// strlwr_unit: converts string1 to lower case, one character per clock cycle.
//
// Lower- and upper-case ASCII letters differ only in bit 5, so a letter in
// 'A'..'Z' has that bit set and every other character passes unchanged.
// The first character is converted on the edge that sees `start` (taken from
// the operand input); the rest of the string is kept in a register that
// shifts one character per cycle. Each cycle that produces a character raises
// `out_valid` with it on `out_char`, for the transmit FIFO. `done` pulses with
// the last character, so a string of L characters takes L cycles ("AbcD":
// 4). An empty string ends in cycle 1 with no character. A new `start` while
// busy is ignored.
//
// The one-character-per-cycle conversion on bit 5 and its timing follow the
// original design. Streaming each character straight to the transmitter is
// this design's choice.
module strlwr_unit
  import str_pkg::*;
#(
  parameter int unsigned N = MAX_CHARS
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [8*N-1:0] str1,
  output logic           done,
  output logic           out_valid,
  output logic [7:0]     out_char
);

  logic [8*N-1:0] rest;
  logic           busy;

  wire [8*N-1:0] cur   = busy ? rest : str1;
  wire [7:0]     ch    = cur[8*N-1 -: 8];
  wire [7:0]     nxt   = cur[8*N-9 -: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_char  <= '0;
      rest      <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      if (busy || start) begin
        out_valid <= (ch != 8'h00);
        out_char  <= to_lower(ch);
        rest      <= cur << 8;
        if (ch == 8'h00 || nxt == 8'h00) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          busy <= 1'b1;
        end
      end
    end
  end

endmodule
