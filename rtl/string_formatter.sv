// string_formatter: turns the received byte stream into operand strings.
//
// The host frames every string as STX <characters> ETX. This block consumes
// one received byte per clock (show-ahead FIFO interface: `in_ready` is always
// high and pops the byte it sees while `in_valid`). Outside a frame it waits
// for STX and ignores anything else. Inside a frame it stores characters left
// to right into an N-character register (first character in the top byte,
// the rest NUL), drops characters beyond the N-th, and restarts the string on
// a repeated STX. On ETX the string is complete: for a two-operand function
// (`two_strings` high) the first string is held as string1 and a second frame
// is awaited for string2; otherwise, or after the second frame, `str1`/`str2`
// are updated together and `str_ready` pulses for one clock. `receiving` is
// high from the first STX of a request until that pulse.
//
// STX/ETX framing and the two-string request follow the original design.
// Truncation to N characters, restart on a repeated STX and single-string
// requests for the one-operand functions are this design's choices.
module string_formatter
  import str_pkg::*;
#(
  parameter int unsigned N = MAX_CHARS,
  localparam int unsigned IW = $clog2(N) + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [7:0]     in_data,
  output logic           in_ready,
  input  logic           two_strings,
  output logic [8*N-1:0] str1,
  output logic [8*N-1:0] str2,
  output logic           str_ready,
  output logic           receiving
);

  typedef enum logic {WAIT_STX, COLLECT} state_e;

  state_e         state;
  logic [8*N-1:0] cur, first;
  logic [IW-1:0]  idx;
  logic           second;          // collecting the second string

  assign in_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= WAIT_STX;
      cur       <= '0;
      first     <= '0;
      idx       <= '0;
      second    <= 1'b0;
      str1      <= '0;
      str2      <= '0;
      str_ready <= 1'b0;
      receiving <= 1'b0;
    end else begin
      str_ready <= 1'b0;
      if (in_valid) begin
        unique case (state)
          WAIT_STX: if (in_data == STX) begin
            state     <= COLLECT;
            cur       <= '0;
            idx       <= '0;
            receiving <= 1'b1;
          end
          COLLECT: begin
            if (in_data == STX) begin
              cur <= '0;
              idx <= '0;
            end else if (in_data == ETX) begin
              state <= WAIT_STX;
              if (two_strings && !second) begin
                first  <= cur;
                second <= 1'b1;
              end else begin
                str1      <= second ? first : cur;
                str2      <= second ? cur : '0;
                second    <= 1'b0;
                str_ready <= 1'b1;
                receiving <= 1'b0;
              end
            end else if (32'(idx) < N) begin
              cur[8*N-1-8*idx -: 8] <= in_data;
              idx <= idx + 1'b1;
            end
          end
        endcase
      end
    end
  end

endmodule
