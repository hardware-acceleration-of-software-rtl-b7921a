// str_pkg: types and constants shared by the string accelerator.
//
// Strings travel between blocks as packed vectors of N bytes with the first
// character in the most significant byte and unused trailing bytes set to NUL,
// the packing the 64-bit (8 character) operand registers of the design use.
// Results are ASCII characters so that they can be sent to the host as they
// are: '1'/'0' for yes/no answers, '0'+k for a position or length k, and '!'
// for "character not found". STX (0x02) and ETX (0x03) frame each string on
// the serial link. The function select code is this design's own encoding.
//
// The 8-character operands, the STX/ETX framing and the '!' not-found
// character follow the original design. The function numbering is this
// design's choice.
package str_pkg;

  localparam int unsigned CHAR_W    = 8;
  localparam int unsigned MAX_CHARS = 8;      // 64-bit operand registers

  localparam logic [7:0] STX       = 8'h02;
  localparam logic [7:0] ETX       = 8'h03;
  localparam logic [7:0] ASCII_0   = 8'h30;   // '0' : false / digit base
  localparam logic [7:0] ASCII_1   = 8'h31;   // '1' : true
  localparam logic [7:0] NOT_FOUND = 8'h21;   // '!' : character not found

  // Which string function the accelerator runs for the next request.
  typedef enum logic [3:0] {
    F_STRCMP     = 4'd0,
    F_STRCASECMP = 4'd1,
    F_STRSTR     = 4'd2,
    F_STRCHR     = 4'd3,
    F_STRCHR_POS = 4'd4,
    F_STRRCHR    = 4'd5,
    F_STRUPR     = 4'd6,
    F_STRLWR     = 4'd7,
    F_STRLEN     = 4'd8
  } func_e;

  // Functions that take two operands (string1 and string2/char1).
  function automatic logic needs_two(func_e f);
    return !(f inside {F_STRUPR, F_STRLWR, F_STRLEN});
  endfunction

  function automatic logic is_upper(logic [7:0] c);
    return (c >= 8'd65) && (c <= 8'd90);
  endfunction

  function automatic logic is_lower(logic [7:0] c);
    return (c >= 8'd97) && (c <= 8'd122);
  endfunction

  // Case conversion flips bit 5, the only bit in which the two cases differ.
  function automatic logic [7:0] to_upper(logic [7:0] c);
    return is_lower(c) ? (c & 8'hDF) : c;
  endfunction

  function automatic logic [7:0] to_lower(logic [7:0] c);
    return is_upper(c) ? (c | 8'h20) : c;
  endfunction

  // ASCII digit for a small count or index.
  function automatic logic [7:0] digit(int unsigned k);
    return ASCII_0 + 8'(k);
  endfunction

endpackage
