// alu_code: the combined arithmetic logic unit and control unit of the 8-bit
// CPU.
//
// The main idea of the design is that no operation is decoded before it is
// computed. Every one of the 16 operations has its own unit, all of them work
// on operands A and B at the same time, and the control unit is nothing more
// than a 16-to-1 multiplexer (mux16) whose select lines are the 4-bit opcode:
// multiplexer input Dk carries the result of the operation with opcode k.
// The units are an adder, a second adder used as a subtractor (A + ~B + 1),
// a shift-and-add/subtract multiplier, a divider, the shift/rotate unit, the
// logic unit and the comparator. The two comparisons give 1 or 0 in bit 0 of
// the result. The opcode table and the port list (A, B, OP, O and the shift
// distance N, default 1) are the design's; the internal algorithms of the
// divider, the adder and the multiplier's recoding are this implementation's
// choices, described in their own modules.
//
// Interface: A, B 8-bit operands, OP opcode (cpu_pkg::opcode_e values),
// O 8-bit result. No flags (zero, carry, negative, overflow) are produced.
// Timing: purely combinational; O follows A, B and OP after the delay of the
// slowest unit (the divider) plus the multiplexer.
module alu_code
  import cpu_pkg::*;
#(
  parameter int unsigned N = 1  // number of bits shifted or rotated
) (
  input  data_t          A,
  input  data_t          B,
  input  logic [3:0]     OP,
  output data_t          O
);

  data_t d [NUM_OPS];  // multiplexer inputs, indexed by opcode

  data_t sum, diff, prod, quot, rem;
  data_t shl, shr, rol, ror;
  data_t y_and, y_or, y_xor, y_nor, y_nand, y_xnor;
  logic  gt, eq;
  logic  add_cout, sub_cout;

  ripple_adder #(.WIDTH(DATA_W)) u_add (
    .a(A), .b(B), .cin(1'b0), .sum(sum), .cout(add_cout)
  );

  ripple_adder #(.WIDTH(DATA_W)) u_sub (
    .a(A), .b(~B), .cin(1'b1), .sum(diff), .cout(sub_cout)
  );

  shift_add_mul #(.WIDTH(DATA_W)) u_mul (.a(A), .b(B), .p(prod));

  restoring_div #(.WIDTH(DATA_W)) u_div (.a(A), .b(B), .q(quot), .r(rem));

  shift_rotate #(.WIDTH(DATA_W), .N(N)) u_shift (
    .a(A), .shl(shl), .shr(shr), .rol(rol), .ror(ror)
  );

  logic_unit #(.WIDTH(DATA_W)) u_logic (
    .a(A), .b(B), .y_and(y_and), .y_or(y_or), .y_xor(y_xor),
    .y_nor(y_nor), .y_nand(y_nand), .y_xnor(y_xnor)
  );

  comparator #(.WIDTH(DATA_W)) u_cmp (.a(A), .b(B), .gt(gt), .eq(eq));

  // The CPU has no flags register: the carry outputs and the remainder are
  // computed by the units but not used.
  logic unused_ok;
  assign unused_ok = ^{add_cout, sub_cout, rem};

  always_comb begin
    d[OP_ADD]  = sum;
    d[OP_SUB]  = diff;
    d[OP_MUL]  = prod;
    d[OP_DIV]  = quot;
    d[OP_SHL]  = shl;
    d[OP_SHR]  = shr;
    d[OP_ROL]  = rol;
    d[OP_ROR]  = ror;
    d[OP_AND]  = y_and;
    d[OP_OR]   = y_or;
    d[OP_XOR]  = y_xor;
    d[OP_NOR]  = y_nor;
    d[OP_NAND] = y_nand;
    d[OP_XNOR] = y_xnor;
    d[OP_GT]   = data_t'(gt);
    d[OP_EQ]   = data_t'(eq);
  end

  // control unit
  mux16 #(.WIDTH(DATA_W)) u_cu (.d(d), .s(OP), .y(O));

endmodule
