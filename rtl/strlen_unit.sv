// strlen_unit: length of string1, one character per clock cycle.
//
// A working copy, string3, starts empty and gains the next character of
// string1 every cycle. As soon as string3 OR string1 equals string3, string3
// already holds every non-NUL character, and the number of characters
// appended is the length. The first character is appended on the edge that
// sees `start`, so a string of L characters ends in cycle L ("ABCDEFGH": 8);
// an empty string ends in cycle 1 with length 0. `result` is the ASCII digit
// '0'+L and `done` pulses with it. A new `start` while busy is ignored.
//
// The string3 OR-compare method and its L-cycle timing follow the
// original design. The empty-string case (1 cycle, result '0') is this
// design's choice.
module strlen_unit
  import str_pkg::*;
#(
  parameter int unsigned N = MAX_CHARS,
  localparam int unsigned CW = $clog2(N) + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [8*N-1:0] str1,
  output logic           done,
  output logic [7:0]     result
);

  logic [8*N-1:0] s1, str3, keep;
  logic [CW-1:0]  cnt;
  logic           busy;

  // Next value of string3: string3 with character k of string1 appended.
  logic [8*N-1:0] src, str3_next;
  logic [CW-1:0]  k;

  always_comb begin
    src  = busy ? s1 : str1;
    k    = busy ? cnt : '0;
    keep = {8'hFF, {(8*N-8){1'b0}}} >> (8*k);      // slot of character k
    str3_next = (busy ? str3 : '0) | (src & keep);  // append character k
  end

  wire complete = ((str3_next | src) == str3_next);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      str3   <= '0;
      result <= ASCII_0;
    end else begin
      done <= 1'b0;
      if (start && !busy && str1 == '0) begin
        done   <= 1'b1;
        result <= ASCII_0;
      end else if (busy || start) begin
        if (!busy) s1 <= str1;
        str3 <= str3_next;
        if (complete) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= digit(32'(k) + 1);
        end else begin
          busy <= 1'b1;
          cnt  <= k + 1'b1;
        end
      end
    end
  end

endmodule
