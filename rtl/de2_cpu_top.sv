// de2_cpu_top: the complete 8-bit multiplexer CPU with its switch, LED and
// seven-segment I/O, as wired on a DE2-class FPGA board.
//
// Operation is manual and has no clock. An operand is set on switches 7..0
// and stored by raising switch 10 (register A) or switch 11 (register B);
// each register keeps its value after its switch is lowered. Switches 17..14
// give the opcode. The ALU-CU (alu_code) computes the result combinationally.
// Each 8-bit value is shown twice: in binary on LEDs and in decimal on
// seven-segment digits through a binary-to-BCD decoder.
//
//   register A: LEDR[7:0],   decimal tens/ones on HEX5/HEX4
//   register B: LEDR[17:10], decimal tens/ones on HEX7/HEX6
//   result O:   LEDG[7:0],   decimal hundreds/tens/ones on HEX2/HEX1/HEX0
//
// Only two digits are available for each operand, so an operand above 99 is
// shown by its last two decimal digits (the hundreds digit of its decoder is
// not wired), while its LEDs and the computation use all 8 bits. This
// wiring, the switch assignment and the LED and display groups follow the
// design. Switches 8, 9, 12 and 13 are unused; LEDR[9:8] are driven off;
// HEX3 is not used and has no port. The shift distance N of the ALU is 1.
//
// Interface: SW[17:0] switches; LEDR[17:0] red LEDs, LEDG[7:0] green LEDs;
// HEXk[0:6] segments a..g of display k, active low (ascending range so that
// the index is the board's segment number).
// Timing: no clock; registers are latches transparent while their switch is
// up, all other logic is combinational.
module de2_cpu_top
  import cpu_pkg::*;
(
  input  logic [17:0] SW,
  output logic [17:0] LEDR,
  output logic [7:0]  LEDG,
  output logic [0:6]  HEX0,
  output logic [0:6]  HEX1,
  output logic [0:6]  HEX2,
  output logic [0:6]  HEX4,
  output logic [0:6]  HEX5,
  output logic [0:6]  HEX6,
  output logic [0:6]  HEX7
);

  data_t      reg_a, reg_b, result;
  logic [3:0] a_ones, a_tens, a_hund;
  logic [3:0] b_ones, b_tens, b_hund;
  logic [3:0] o_ones, o_tens, o_hund;

  // operand registers, enable tied high
  register8 #(.WIDTH(DATA_W)) inst10 (
    .i(SW[7:0]), .s(SW[10]), .e(1'b1), .o(reg_a)
  );
  register8 #(.WIDTH(DATA_W)) inst11 (
    .i(SW[7:0]), .s(SW[11]), .e(1'b1), .o(reg_b)
  );

  // ALU and control unit
  alu_code #(.N(1)) inst (
    .A(reg_a), .B(reg_b), .OP(SW[17:14]), .O(result)
  );

  // decimal decoders
  bin2bcd inst2 (.bin(reg_a),  .bcd1(a_ones), .bcd2(a_tens), .bcd3(a_hund));
  bin2bcd inst3 (.bin(reg_b),  .bcd1(b_ones), .bcd2(b_tens), .bcd3(b_hund));
  bin2bcd inst1 (.bin(result), .bcd1(o_ones), .bcd2(o_tens), .bcd3(o_hund));

  // seven-segment drivers
  bcd_7segment inst4  (.BCDin(o_ones), .Seven_Segment(HEX0));
  bcd_7segment inst5  (.BCDin(o_tens), .Seven_Segment(HEX1));
  bcd_7segment inst6  (.BCDin(o_hund), .Seven_Segment(HEX2));
  bcd_7segment inst7  (.BCDin(a_ones), .Seven_Segment(HEX4));
  bcd_7segment inst8  (.BCDin(a_tens), .Seven_Segment(HEX5));
  bcd_7segment inst12 (.BCDin(b_ones), .Seven_Segment(HEX6));
  bcd_7segment inst13 (.BCDin(b_tens), .Seven_Segment(HEX7));

  assign LEDR = {reg_b, 2'b00, reg_a};
  assign LEDG = result;

  // hundreds digits of the operand decoders and the unused switches are
  // left open, as on the board
  logic unused_ok;
  assign unused_ok = ^{a_hund, b_hund, SW[9:8], SW[13:12]};

endmodule
