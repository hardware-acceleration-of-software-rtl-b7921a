// strchr_unit: is char1 present anywhere in string1 ('1') or not ('0').
//
// N compare blocks (char_match_array) check every character position of
// string1 against char1 at once, whatever the string length. Cycle 1: the
// edge that sees `start` registers the N match bits. Cycle 2: the bits are
// OR-ed together and the answer is registered with a `done` pulse. The
// comparison is case sensitive. Total: 2 cycles for any string.
//
// The parallel compare blocks, the OR of their outputs and the 2-cycle
// timing follow the original design. The register stages are this design's
// choice.
module strchr_unit
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

  logic [N-1:0] match, match_q;
  logic         stage1;

  char_match_array #(.N(N)) u_cmp (.str1(str1), .ch(str2[8*N-1 -: 8]), .match(match));

  always_ff @(posedge clk) begin
    if (rst) begin
      stage1  <= 1'b0;
      match_q <= '0;
      done    <= 1'b0;
      result  <= ASCII_0;
    end else begin
      stage1 <= start;
      if (start) match_q <= match;
      done <= stage1;
      if (stage1) result <= (|match_q) ? ASCII_1 : ASCII_0;
    end
  end

endmodule
