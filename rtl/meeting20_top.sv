// meeting20_top: the two synchronous designs side by side.
// u_cpu is the single-cycle mini-MIPS processor (lw, sw, beq, add, sub, and,
// or, slt) with its instruction-memory load port and its data-memory write
// bus brought out; u_gcd is the synchronous repeated-subtraction GCD circuit
// with its RESET, inputs, registers and 'equal' flag brought out. They are
// independent circuits and share only the clock.
// Interface: clk; processor: rst, imem_we, imem_waddr, imem_wdata in, pc,
// dmem_we, dmem_addr, dmem_wdata out; GCD: gcd_reset, gcd_x_in, gcd_y_in
// in, gcd_x, gcd_y, gcd_equal out. Timing is that of each block.
module meeting20_top #(
  parameter int unsigned IMEM_AW = 8,
  parameter int unsigned DMEM_AW = 8,
  parameter int unsigned GCD_W   = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  logic [31:0]        imem_wdata,
  output logic [31:0]        pc,
  output logic               dmem_we,
  output logic [31:0]        dmem_addr,
  output logic [31:0]        dmem_wdata,
  input  logic               gcd_reset,
  input  logic [GCD_W-1:0]   gcd_x_in,
  input  logic [GCD_W-1:0]   gcd_y_in,
  output logic [GCD_W-1:0]   gcd_x,
  output logic [GCD_W-1:0]   gcd_y,
  output logic               gcd_equal
);

  mini_mips #(.IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW)) u_cpu (
    .clk(clk), .rst(rst),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata)
  );

  gcd #(.W(GCD_W)) u_gcd (
    .clk(clk), .reset(gcd_reset), .x_in(gcd_x_in), .y_in(gcd_y_in),
    .x(gcd_x), .y(gcd_y), .equal(gcd_equal)
  );

endmodule
