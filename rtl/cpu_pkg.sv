// cpu_pkg: types and constants shared by the 8-bit multiplexer CPU.
//
// The CPU has an 8-bit datapath and a 4-bit opcode that names one of 16
// operations. The opcode values are the instruction set of the design and
// each one is also the select code of the 16-to-1 output multiplexer: data
// input Dk of the multiplexer carries the result of the operation whose
// opcode equals k. The encoding below is the design's instruction set; the
// enum names are this package's own.
package cpu_pkg;

  localparam int unsigned DATA_W   = 8;  // operand and result width
  localparam int unsigned OPCODE_W = 4;  // opcode width, 16 operations
  localparam int unsigned NUM_OPS  = 1 << OPCODE_W;

  typedef logic [DATA_W-1:0] data_t;

  typedef enum logic [OPCODE_W-1:0] {
    OP_ADD  = 4'b0000,  // A + B, modulo 256
    OP_SUB  = 4'b0001,  // A - B, modulo 256
    OP_MUL  = 4'b0010,  // low 8 bits of A * B
    OP_DIV  = 4'b0011,  // A / B, unsigned, truncated
    OP_SHL  = 4'b0100,  // A shifted left by N
    OP_SHR  = 4'b0101,  // A shifted right (logical) by N
    OP_ROL  = 4'b0110,  // A rotated left by N
    OP_ROR  = 4'b0111,  // A rotated right by N
    OP_AND  = 4'b1000,
    OP_OR   = 4'b1001,
    OP_XOR  = 4'b1010,
    OP_NOR  = 4'b1011,
    OP_NAND = 4'b1100,
    OP_XNOR = 4'b1101,
    OP_GT   = 4'b1110,  // 1 if A > B (unsigned), else 0
    OP_EQ   = 4'b1111   // 1 if A = B, else 0
  } opcode_e;

endpackage
