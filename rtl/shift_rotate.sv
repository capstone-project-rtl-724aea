// shift_rotate: the four shift and rotate operations of the CPU, applied to
// operand a by a fixed distance N that is a parameter of the ALU, not an
// operand (the ALU's second operand is not used by these operations).
//
// shl / shr are logical shifts that fill with zeros; rol / ror move the bits
// that leave one end in at the other. N defaults to 1. Zero fill for the
// shifts and the rotate distance taken modulo WIDTH are this design's choices.
//
// Interface: a operand; shl, shr, rol, ror results.
// Timing: purely combinational (wiring only).
module shift_rotate #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned N     = 1
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] shl,
  output logic [WIDTH-1:0] shr,
  output logic [WIDTH-1:0] rol,
  output logic [WIDTH-1:0] ror
);

  localparam int unsigned R = N % WIDTH;  // effective rotate distance

  always_comb begin
    shl = a << N;
    shr = a >> N;
    for (int i = 0; i < WIDTH; i++) begin
      rol[(i + R) % WIDTH]         = a[i];
      ror[(i + WIDTH - R) % WIDTH] = a[i];
    end
  end

endmodule
