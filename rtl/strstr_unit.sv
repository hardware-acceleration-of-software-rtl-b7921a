// strstr_unit: position of the first occurrence of string2 in string1.
//
// The unit is split, as the design describes it, into a datapath of shifter
// and comparator and a controller state machine. The shifter moves string2
// (m characters) right by p character positions, together with a mask of its
// m character slots; the comparator reports a match when string1 equals the
// shifted string2 in every masked slot. The controller waits in S_IDLE until
// the operands are ready (`start`), spends that first cycle capturing them and
// measuring both lengths, then in S_SCAN tries one position per cycle,
// p = 0, 1, ..., n-m. It stops at the first match or after the last position.
// Timing: a match at position p ends in cycle p+2 after `start`; no match
// ends in cycle n-m+2 (cycle 2 if string2 is longer than string1). An empty
// string2 matches at position 0. Outputs: `found`, `pos` (index of the match)
// and `result`, the ASCII character sent to the host: '0'+p, or '!' when
// string2 does not occur. `done` pulses with them.
//
// The controller/datapath split, the one-shift-per-state search and the
// cycle counts follow the original design. The length measurement, the mask,
// the '!' reply and the extra found/pos outputs are this design's choices.
module strstr_unit
  import str_pkg::*;
#(
  parameter int unsigned N = MAX_CHARS,
  localparam int unsigned PW = $clog2(N) + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [8*N-1:0] str1,
  input  logic [8*N-1:0] str2,
  output logic           done,
  output logic [7:0]     result,
  output logic           found,
  output logic [PW-1:0]  pos
);

  typedef enum logic {S_IDLE, S_SCAN} state_e;

  // Number of characters before the first NUL.
  function automatic logic [PW-1:0] str_length(logic [8*N-1:0] s);
    logic [PW-1:0] len = '0;
    logic          seen_nul = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (s[8*N-1-8*i -: 8] == 8'h00) seen_nul = 1'b1;
      if (!seen_nul) len = len + 1'b1;
    end
    return len;
  endfunction

  state_e         state;
  logic [8*N-1:0] s1, s2, mask2;
  logic [PW-1:0]  n, m, p;

  // ---------------- datapath: shifter and comparator ----------------
  logic [8*N-1:0] shifted, shifted_mask;
  logic           match;

  always_comb begin
    shifted      = s2 >> (8*p);
    shifted_mask = mask2 >> (8*p);
    match        = (((s1 ^ shifted) & shifted_mask) == '0);
  end

  // ---------------- controller ----------------
  wire last_pos = ({1'b0, p} + {1'b0, m}) >= {1'b0, n};

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      found  <= 1'b0;
      pos    <= '0;
      p      <= '0;
      result <= NOT_FOUND;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          s1 <= str1;
          s2 <= str2;
          n  <= str_length(str1);
          m  <= str_length(str2);
          for (int i = 0; i < N; i++)
            mask2[8*N-1-8*i -: 8] <= (i < int'(str_length(str2))) ? 8'hFF : 8'h00;
          p     <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (match && !(m > n)) begin
            done   <= 1'b1;
            found  <= 1'b1;
            pos    <= p;
            result <= digit(int'(p));
            state  <= S_IDLE;
          end else if (last_pos) begin
            done   <= 1'b1;
            found  <= 1'b0;
            pos    <= '0;
            result <= NOT_FOUND;
            state  <= S_IDLE;
          end else begin
            p <= p + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
