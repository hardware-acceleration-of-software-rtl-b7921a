// strcasecmp_unit: case-insensitive string equality, one character per cycle.
//
// The unit walks both strings from the first character. In each cycle it
// compares one pair of characters with the case of letters ignored (both are
// folded to upper case, i.e. bit 5 of a letter does not count). It stops with
// '0' at the first pair that differs, and with '1' when the pair matched and
// both strings end right after it (next characters both NUL, or N reached).
// The pair at index k is decided in cycle k+1 after `start`: the first pair is
// compared on the very edge that sees `start` (from the operand inputs), later
// pairs from the captured copies. So "A"/"a" takes 1 cycle, "Abcd"/"abcd" 4,
// "ABCDEFG"/"AABBCED" 2 (mismatch at index 1) and "Abcde"/"AB" 3 (index 2
// holds 'c' against NUL). `done` pulses with the result. Two empty strings are
// equal ('1' in 1 cycle). A new `start` while busy is ignored.
// The character-by-character walk and the cycle counts follow the original
// design. Two points are this design's choices. Only letters are folded; the
// original description ignores bit 5 of every character. And the seven-letter
// pair "ABCDEFG"/"ABcDEFg" takes 7 cycles, where the original's table gives 8.
module strcasecmp_unit
  import str_pkg::*;
#(
  parameter int unsigned N = MAX_CHARS,   // at least 2
  localparam int unsigned IW = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [8*N-1:0] str1,
  input  logic [8*N-1:0] str2,
  output logic           done,
  output logic [7:0]     result
);

  logic [8*N-1:0] s1, s2;
  logic [IW-1:0]  idx;
  logic           busy;

  // Operands and index seen by the comparator this cycle.
  logic [8*N-1:0] a, b, ra, rb;
  logic [IW-1:0]  k;
  logic [7:0]     ca, cb, na, nb;
  logic           last, differ, active;

  always_comb begin
    a  = busy ? s1 : str1;
    b  = busy ? s2 : str2;
    k  = busy ? idx : '0;
    ra = a << (8*k);                 // character k moved to the top byte
    rb = b << (8*k);
    ca = ra[8*N-1 -: 8];
    cb = rb[8*N-1 -: 8];
    na = ra[8*N-9 -: 8];             // character k+1 (NUL past the end)
    nb = rb[8*N-9 -: 8];
    last = (32'(k) == N-1);
    differ = (to_upper(ca) != to_upper(cb));
    active = busy || start;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      idx    <= '0;
      result <= ASCII_0;
    end else begin
      done <= 1'b0;
      if (active) begin
        if (!busy) begin
          s1 <= str1;
          s2 <= str2;
        end
        if (differ) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= ASCII_0;
        end else if (last || (na == 8'h00 && nb == 8'h00)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= ASCII_1;
        end else begin
          busy <= 1'b1;
          idx  <= k + 1'b1;
        end
      end
    end
  end

endmodule
