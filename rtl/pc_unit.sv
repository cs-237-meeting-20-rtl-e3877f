// pc_unit: the 32-bit program counter and its next-value logic.
// pc_plus4 = pc + 4 always; when take_branch is 1 the next PC is
// pc_plus4 + br_offset (the branch offset is already scaled by 4), otherwise
// pc_plus4. The PC register loads the next value on each rising clock edge
// with en = 1; rst (synchronous) sets it to 0.
// Interface: clk, rst, en, take_branch, br_offset in; pc, pc_plus4 out.
// The 32-bit register with enable and the two additions follow the lecture's
// fetch loop ("PC = PC + 4" then "PC = OFFSET + PC" for a taken beq); the
// reset value 0 is this design's own choice.
module pc_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        take_branch,
  input  logic [31:0] br_offset,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);

  logic [31:0] pc_next;

  assign pc_plus4 = pc + 32'd4;
  assign pc_next  = take_branch ? (pc_plus4 + br_offset) : pc_plus4;

  en_reg #(.W(32)) u_pc (.clk(clk), .rst(rst), .en(en), .d(pc_next), .q(pc));

endmodule
