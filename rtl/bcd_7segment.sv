// bcd_7segment: drives one seven-segment digit from a BCD value.
//
// Seven_Segment[0..6] are segments a..g (a top, then clockwise, g middle),
// active low as on the common-anode displays of the board the CPU was built
// on: a 0 lights the segment. BCD values 10-15 are not digits and leave the
// display dark. The port names are the design's; segment order, polarity and
// the blank code are this design's choices. The ascending range [0:6]
// keeps the index equal to the segment number 0..6 used on the board pins.
//
// Interface: BCDin[3:0] in; Seven_Segment[0:6] out.
// Timing: purely combinational.
module bcd_7segment (
  input  logic [3:0] BCDin,
  output logic [0:6] Seven_Segment
);

  logic [0:6] lit;  // 1 = segment on, order a b c d e f g

  always_comb begin
    unique case (BCDin)
      4'd0:    lit = 7'b1111110;
      4'd1:    lit = 7'b0110000;
      4'd2:    lit = 7'b1101101;
      4'd3:    lit = 7'b1111001;
      4'd4:    lit = 7'b0110011;
      4'd5:    lit = 7'b1011011;
      4'd6:    lit = 7'b1011111;
      4'd7:    lit = 7'b1110000;
      4'd8:    lit = 7'b1111111;
      4'd9:    lit = 7'b1111011;
      default: lit = 7'b0000000;
    endcase
    Seven_Segment = ~lit;
  end

endmodule
