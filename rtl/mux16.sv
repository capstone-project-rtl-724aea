// mux16: 16-to-1 multiplexer written as the AND-OR gate network that serves
// as the CPU's control unit.
//
// Each data input d[k] is gated by an AND term whose four select literals are
// S3..S0 taken true or inverted so that the term is 1 only when s == k; the
// sixteen AND outputs are ORed into y. With any other select value an AND
// term is 0 (X & 0 = 0) and adds nothing to the OR (X | 0 = X). This is the
// gate structure of the design's control unit, one 5-input AND gate per data
// input. The gates are repeated for every bit of a WIDTH-bit word; the
// single-bit default is the gate-level drawing, the ALU uses WIDTH = 8.
//
// Interface: d[0..15] data inputs, s[3:0] select (the opcode), y output.
// Timing: purely combinational.
module mux16 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d [16],
  input  logic [3:0]       s,
  output logic [WIDTH-1:0] y
);

  logic [3:0]       s_n;     // inverted select lines
  logic [15:0]      term_en; // 4-input select part of each AND gate
  logic [WIDTH-1:0] gated [16];

  assign s_n = ~s;

  // Select part of the AND gate of input k: bit j of k picks S_j or ~S_j.
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      term_en[k] = (k[3] ? s[3] : s_n[3]) &
                   (k[2] ? s[2] : s_n[2]) &
                   (k[1] ? s[1] : s_n[1]) &
                   (k[0] ? s[0] : s_n[0]);
    end
  end

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      gated[k] = d[k] & {WIDTH{term_en[k]}};
    end
  end

  // 16-input OR gate
  always_comb begin
    y = '0;
    for (int k = 0; k < 16; k++) y |= gated[k];
  end

  // exactly one AND gate is open for every select value
  always_comb assert ($onehot(term_en));

endmodule
