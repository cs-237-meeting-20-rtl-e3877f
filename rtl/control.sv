// control: instruction decoder of the mini-MIPS processor.
// From the opcode (and, for R-type, the function code) it produces the
// control bundle ctrl_t: lw reads memory at rs + imm and writes rt; sw writes
// rt to memory at rs + imm; beq subtracts rt from rs and branches on zero;
// add, sub, and, or, slt write rd with the ALU result of rs and rt. Any other
// opcode or function code gives all-inactive controls, i.e. a no-op.
// Interface: opcode, funct in; ctl out. Purely combinational.
// The per-instruction behaviour follows the lecture's pseudo-code of the
// processor; the signal set and the encodings are this design's own choice.
module control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctl
);

  always_comb begin
    ctl = '{reg_write: 1'b0, reg_dst_rd: 1'b0, alu_src_imm: 1'b0,
            alu_op: ALU_ADD, mem_write: 1'b0, mem_to_reg: 1'b0, branch: 1'b0};
    unique case (opcode)
      OP_LW: begin
        ctl.reg_write   = 1'b1;
        ctl.alu_src_imm = 1'b1;
        ctl.mem_to_reg  = 1'b1;
      end
      OP_SW: begin
        ctl.alu_src_imm = 1'b1;
        ctl.mem_write   = 1'b1;
      end
      OP_BEQ: begin
        ctl.alu_op = ALU_SUB;
        ctl.branch = 1'b1;
      end
      OP_RTYPE: begin
        ctl.reg_dst_rd = 1'b1;
        ctl.reg_write  = 1'b1;
        unique case (funct)
          FN_ADD:  ctl.alu_op = ALU_ADD;
          FN_SUB:  ctl.alu_op = ALU_SUB;
          FN_AND:  ctl.alu_op = ALU_AND;
          FN_OR:   ctl.alu_op = ALU_OR;
          FN_SLT:  ctl.alu_op = ALU_SLT;
          default: ctl.reg_write = 1'b0;
        endcase
      end
      default: ;
    endcase
  end

endmodule
