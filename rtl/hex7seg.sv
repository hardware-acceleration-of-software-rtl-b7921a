// hex7seg: hexadecimal digit decoder for an active-low 7-segment display.
//
// Maps a 4-bit value to the segments g..a (bit 6 = g, bit 0 = a) of a
// common-anode display such as those on the prototyping board, a segment being
// lit when its bit is 0 ("0" -> 7'b1000000). Purely combinational. The board
// shows received characters and results as two hex digits with two of these.
//
// The original shows characters on the board's 7-segment displays. The
// segment patterns are the usual ones for such displays, chosen here.
module hex7seg (
  input  logic [3:0] nibble,
  output logic [6:0] seg
);

  always_comb begin
    unique case (nibble)
      4'h0: seg = 7'b1000000;
      4'h1: seg = 7'b1111001;
      4'h2: seg = 7'b0100100;
      4'h3: seg = 7'b0110000;
      4'h4: seg = 7'b0011001;
      4'h5: seg = 7'b0010010;
      4'h6: seg = 7'b0000010;
      4'h7: seg = 7'b1111000;
      4'h8: seg = 7'b0000000;
      4'h9: seg = 7'b0010000;
      4'hA: seg = 7'b0001000;
      4'hB: seg = 7'b0000011;
      4'hC: seg = 7'b1000110;
      4'hD: seg = 7'b0100001;
      4'hE: seg = 7'b0000110;
      4'hF: seg = 7'b0001110;
    endcase
  end

endmodule
