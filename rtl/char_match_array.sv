// char_match_array: N parallel character compare blocks.
//
// Block i lines character i of string1 up with char1 (the first character of
// the second operand) and flags a match when the two are equal. NUL padding
// past the end of string1 never matches. Bit i of `match` belongs to
// character i (index 0 = first character). Purely combinational; the
// strchr, strchr_pos and strrchr units register its output.
//
// The original has one shift-and-XOR compare block per character. An
// equality test per slot computes the same thing. Ignoring NUL padding is this
// design's choice.
module char_match_array
  import str_pkg::*;
#(
  parameter int unsigned N = MAX_CHARS
) (
  input  logic [8*N-1:0] str1,
  input  logic [7:0]     ch,
  output logic [N-1:0]   match
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      match[i] = (str1[8*N-1-8*i -: 8] == ch) && (ch != 8'h00);
    end
  end

endmodule
