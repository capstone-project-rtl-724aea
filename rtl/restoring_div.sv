// restoring_div: WIDTH-bit unsigned integer divider, q = a / b, r = a % b.
//
// Restoring long division unrolled into combinational logic: WIDTH stages,
// each shifts the next dividend bit (most significant first) into the partial
// remainder, trial-subtracts the divisor, and keeps the difference and sets
// the quotient bit when it does not go negative. Only the operation "integer
// division" is given for this unit; the algorithm is this design's choice.
// Division by zero is not defined for the CPU; this structure then returns
// q = all ones (255) and r = a, which is what the circuit naturally gives.
//
// Interface: a dividend, b divisor; q quotient, r remainder.
// Timing: purely combinational, WIDTH subtractor stages.
module restoring_div #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] r
);

  always_comb begin
    logic [WIDTH:0] part;  // partial remainder, one guard bit
    logic [WIDTH:0] diff;
    part = '0;
    q    = '0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      part = {part[WIDTH-1:0], a[i]};
      diff = part - {1'b0, b};
      if (!diff[WIDTH]) begin  // no borrow: divisor fits
        part = diff;
        q[i] = 1'b1;
      end
    end
    r = part[WIDTH-1:0];
  end

endmodule
