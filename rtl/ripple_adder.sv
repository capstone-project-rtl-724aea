// ripple_adder: WIDTH-bit ripple-carry adder with carry in and carry out.
//
// A chain of full adders, bit 0 first. The ALU uses one copy for addition
// (cin = 0) and a second copy for subtraction, where the subtrahend is fed in
// inverted with cin = 1 so that A + ~B + 1 = A - B in two's complement. The
// ripple-carry structure is this design's choice; only the adder's function
// and the two's-complement subtraction are given.
//
// Interface: a, b operands, cin carry in; sum, cout carry out.
// Timing: purely combinational, WIDTH full-adder delays.
module ripple_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;  // carry into each bit position

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[WIDTH];

endmodule
