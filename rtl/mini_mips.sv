// mini_mips: single-cycle processor for a subset of the MIPS instruction set:
// lw, sw, beq and the R-type add, sub, and, or, slt.
// Every clock cycle executes one whole instruction: the instruction memory
// gives IR = MEM[PC]; IR is sliced into its fields (the immediate
// sign-extended) and the decoder turns opcode and function code into control
// signals; the register bank reads rs and rt; the ALU computes rs + imm (lw/sw address),
// rs - rt (beq, tested with the ALU's Zero output) or the R-type result; the
// data memory is read or written; and on the clock edge the register bank,
// the data memory and the PC (PC+4, or PC+4+4*imm for a taken beq) update
// together. Separate instruction and data memories let the fetch and the
// data access happen in the same cycle.
// Interface: clk, rst (synchronous: PC = 0, registers = 0); a program-load
// port into the instruction memory (imem_we, imem_waddr, imem_wdata; hold
// rst while loading); the PC and the data-memory write bus are outputs for
// observation. One instruction per clock, no stalls. The shift-amount
// field (IR[10:6]), the ALU carry out and PC+4 are not needed by this
// subset: IR[10:6] is unused and the other two are left unconnected.
// The components and the per-instruction behaviour follow the lecture; the
// steering multiplexers, the control signals, the memory sizes and the
// program-load port are this design's own choices. rs is the base register
// of lw/sw and rt the data register, as in the MIPS I-type format.
module mini_mips
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_AW = 8,
  parameter int unsigned DMEM_AW = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  logic [31:0]        imem_wdata,
  output logic [31:0]        pc,
  output logic               dmem_we,
  output logic [31:0]        dmem_addr,
  output logic [31:0]        dmem_wdata
);

  logic [31:0] ir;
  logic [5:0]  opcode, funct;
  logic [4:0]  rs, rt, rd, wa;  // IR[10:6] (shift amount) is not used
  logic [31:0] imm_sext, br_offset;
  ctrl_t       ctl;
  logic [31:0] rs_val, rt_val, alu_b, alu_y, mem_rd, wb_data;
  logic        alu_zero, take_branch;

  imem #(.AW(IMEM_AW)) u_imem (
    .clk(clk), .addr(pc), .instr(ir),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // instruction fields: opcode[31:26] rs[25:21] rt[20:16] rd[15:11]
  // shamt[10:6] (unused by this subset) funct[5:0] imm[15:0]
  assign opcode    = ir[31:26];
  assign rs        = ir[25:21];
  assign rt        = ir[20:16];
  assign rd        = ir[15:11];
  assign funct     = ir[5:0];
  assign imm_sext  = {{16{ir[15]}}, ir[15:0]};
  assign br_offset = {imm_sext[29:0], 2'b00};   // 4 * sign-extend(imm)

  control u_ctl (.opcode(opcode), .funct(funct), .ctl(ctl));

  assign wa      = ctl.reg_dst_rd ? rd : rt;
  assign wb_data = ctl.mem_to_reg ? mem_rd : alu_y;

  regfile #(.NREGS(32), .W(32)) u_rf (
    .clk(clk), .rst(rst), .ra1(rs), .ra2(rt), .wa(wa),
    .we(ctl.reg_write & ~rst), .wd(wb_data), .rd1(rs_val), .rd2(rt_val)
  );

  assign alu_b = ctl.alu_src_imm ? imm_sext : rt_val;

  alu #(.W(32)) u_alu (
    .a(rs_val), .b(alu_b), .f(ctl.alu_op),
    .y(alu_y), .carry_out(), .zero(alu_zero)
  );

  assign dmem_we    = ctl.mem_write & ~rst;
  assign dmem_addr  = alu_y;
  assign dmem_wdata = rt_val;

  dmem #(.AW(DMEM_AW)) u_dmem (
    .clk(clk), .we(dmem_we), .addr(alu_y), .wd(rt_val), .rd(mem_rd)
  );

  assign take_branch = ctl.branch & alu_zero;

  pc_unit u_pc (
    .clk(clk), .rst(rst), .en(1'b1), .take_branch(take_branch),
    .br_offset(br_offset), .pc(pc), .pc_plus4()
  );

  // The PC only ever moves by multiples of 4 from 0, so it stays word aligned.
  pc_aligned: assert property (@(posedge clk) disable iff (rst) pc[1:0] == 2'b00)
    else $error("mini_mips: PC %h is not word aligned", pc);

endmodule
