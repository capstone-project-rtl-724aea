// bin2bcd: converts an 8-bit unsigned binary number (0-255) into three
// decimal digits in BCD: bcd1 ones, bcd2 tens, bcd3 hundreds. For 123 it
// gives bcd3 = 1, bcd2 = 2, bcd1 = 3.
//
// Built with the shift-and-add-3 ("double dabble") method: the binary bits
// are shifted into the BCD digits one at a time, most significant first, and
// before each shift every digit that is 5 or more has 3 added so that it
// carries correctly into the next decimal digit. The port names and the
// order of the digits are the design's; the conversion method is this
// design's choice.
//
// Interface: bin[7:0] in; bcd1, bcd2, bcd3 [3:0] out.
// Timing: purely combinational.
module bin2bcd (
  input  logic [7:0] bin,
  output logic [3:0] bcd1,
  output logic [3:0] bcd2,
  output logic [3:0] bcd3
);

  always_comb begin
    logic [11:0] digits;  // {hundreds, tens, ones}
    digits = '0;
    for (int i = 7; i >= 0; i--) begin
      if (digits[3:0]  >= 4'd5) digits[3:0]  = digits[3:0]  + 4'd3;
      if (digits[7:4]  >= 4'd5) digits[7:4]  = digits[7:4]  + 4'd3;
      if (digits[11:8] >= 4'd5) digits[11:8] = digits[11:8] + 4'd3;
      digits = {digits[10:0], bin[i]};
    end
    bcd1 = digits[3:0];
    bcd2 = digits[7:4];
    bcd3 = digits[11:8];
  end

endmodule
