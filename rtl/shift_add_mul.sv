// shift_add_mul: WIDTH x WIDTH multiplier giving the low WIDTH bits of a * b,
// built only from left shifts of a and additions/subtractions.
//
// The multiplier b is written as a sum of signed powers of two by radix-2
// Booth recoding: digit i is b[i-1] - b[i] (with b[-1] = 0), so a run of ones
// from bit j up to bit k becomes 2^(k+1) - 2^j (for example 11 = 8 + 4 - 1 is
// recoded as 16 - 4 - 1). For every nonzero digit the copy of a shifted left
// by i is added or subtracted. The digit at position WIDTH only adds a
// multiple of 2^WIDTH, which does not reach the kept WIDTH bits, and is left
// out. Multiplying by shifting and adding/subtracting is the design's method;
// the Booth recoding that picks the terms is this module's choice.
//
// Interface: a, b unsigned operands; p = (a * b) mod 2^WIDTH.
// Timing: purely combinational.
module shift_add_mul #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p
);

  always_comb begin
    logic [WIDTH-1:0] acc;
    logic             prev;
    acc  = '0;
    prev = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      if (b[i] && !prev)      acc = acc - (a << i);  // start of a run of ones
      else if (!b[i] && prev) acc = acc + (a << i);  // end of a run of ones
      prev = b[i];
    end
    p = acc;
  end

endmodule
