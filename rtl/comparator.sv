// comparator: unsigned magnitude and equality comparison of two WIDTH-bit
// operands, for the CPU's "A > B" and "A = B" operations.
//
// gt is found by scanning from the most significant bit: the first bit where
// the operands differ decides, and a is greater if its bit there is 1. eq is
// the AND of the bitwise XNORs. Operands are read as unsigned numbers
// (0-255), the range the CPU accepts and displays.
//
// Interface: a, b operands; gt = (a > b), eq = (a == b).
// Timing: purely combinational.
module comparator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             gt,
  output logic             eq
);

  always_comb begin
    logic decided;
    gt      = 1'b0;
    decided = 1'b0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      if (!decided && (a[i] != b[i])) begin
        gt      = a[i];
        decided = 1'b1;
      end
    end
    eq = &(a ~^ b);
  end

endmodule
