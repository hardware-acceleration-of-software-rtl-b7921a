// strchr_pos_unit: index of the first occurrence of char1 in string1.
//
// N compare blocks (char_match_array) check all positions of string1 at once.
// Cycle 1: the edge that sees `start` registers the N match bits. Cycle 2: a
// priority encoder picks the lowest-index set bit and the answer is
// registered with a `done` pulse. `result` is the ASCII digit of the 0-based
// index ("ABCDC", 'C' gives '2'), or '!' if char1 is absent. Case sensitive.
//
// The parallel compare blocks and the 2-cycle timing follow the original
// design. The priority encoder and the ASCII encoding of the index are this
// design's choices.
module strchr_pos_unit
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
  logic [7:0]   first;

  char_match_array #(.N(N)) u_cmp (.str1(str1), .ch(str2[8*N-1 -: 8]), .match(match));

  // Priority from the first compare block.
  always_comb begin
    first = NOT_FOUND;
    for (int i = N-1; i >= 0; i--) begin
      if (match_q[i]) first = digit(i);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      stage1  <= 1'b0;
      match_q <= '0;
      done    <= 1'b0;
      result  <= NOT_FOUND;
    end else begin
      stage1 <= start;
      if (start) match_q <= match;
      done <= stage1;
      if (stage1) result <= first;
    end
  end

endmodule
