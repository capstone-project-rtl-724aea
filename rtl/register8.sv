// register8: the 8-bit operand register that holds A or B for the CPU.
//
// The CPU runs without a clock: operands are set on the board switches and
// loaded by turning on the register's select switch. The register therefore
// is a level-sensitive latch. While s and e are both 1 it is transparent and
// o follows i; when s returns to 0 it keeps the last value. In the board
// design e is tied to 1 and s is the operand's select switch. The port names
// i, o, s, e are the design's; reading s as "store" and e as an enable that
// gates it, and building the register as a latch, are this design's choices,
// since the design has no clock. The latch is intended and is the reason for
// the latch warning tools give on this module.
//
// Interface: i data in, s store, e enable, o stored value.
// Timing: transparent latch; o holds while s & e is 0. The content is
// undefined until the first store.
module register8 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] i,
  input  logic             s,
  input  logic             e,
  output logic [WIDTH-1:0] o
);

  always_latch begin
    if (s && e) o = i;
  end

endmodule
