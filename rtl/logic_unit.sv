// logic_unit: the six bitwise logic operations of the CPU on two WIDTH-bit
// operands, all computed at once: AND, OR, XOR, NOR, NAND, XNOR.
//
// Interface: a, b operands; one result per operation.
// Timing: purely combinational, one gate level.
module logic_unit #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y_and,
  output logic [WIDTH-1:0] y_or,
  output logic [WIDTH-1:0] y_xor,
  output logic [WIDTH-1:0] y_nor,
  output logic [WIDTH-1:0] y_nand,
  output logic [WIDTH-1:0] y_xnor
);

  always_comb begin
    y_and  = a & b;
    y_or   = a | b;
    y_xor  = a ^ b;
    y_nor  = ~(a | b);
    y_nand = ~(a & b);
    y_xnor = ~(a ^ b);
  end

endmodule
