// mips_pkg: types and constants shared by the mini-MIPS processor.
// Holds the instruction encodings of the supported subset (lw, sw, beq and the
// R-type add, sub, and, or, slt), the ALU operation codes and the bundle of
// control signals the decoder hands to the datapath. The opcode and function
// values are the standard MIPS ones; the ALU code layout (bit 2 = invert B and
// carry in, bits 1:0 = output select) is this design's own choice.
package mips_pkg;

  // Primary opcodes, instruction bits [31:26]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function codes, instruction bits [5:0]
  typedef enum logic [5:0] {
    FN_ADD = 6'h20,
    FN_SUB = 6'h22,
    FN_AND = 6'h24,
    FN_OR  = 6'h25,
    FN_SLT = 6'h2A
  } funct_e;

  // ALU control F: F[2] inverts B and sets the adder carry-in,
  // F[1:0] selects the output (0 AND, 1 OR, 2 adder, 3 sign of the sum).
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

  // Datapath control bundle produced by the decoder
  typedef struct packed {
    logic    reg_write;   // write the register bank this cycle
    logic    reg_dst_rd;  // 1: destination is rd (R-type), 0: rt (lw)
    logic    alu_src_imm; // 1: ALU B = sign-extended immediate, 0: register rt
    alu_op_e alu_op;      // ALU F code
    logic    mem_write;   // sw
    logic    mem_to_reg;  // lw: write back the memory output
    logic    branch;      // beq
  } ctrl_t;

endpackage
