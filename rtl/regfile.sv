// regfile: bank of NREGS registers of W bits with two read ports and one
// write port, as one MIPS instruction reads up to two registers and writes
// one. Reads are combinational from ra1/ra2; a write of wd to register wa
// happens on the rising clock edge when we is 1, so the new value is visible
// from the next cycle. Register 0 always reads 0 and ignores writes (the MIPS
// convention). rst (synchronous) clears every register.
// Interface: clk, rst, ra1, ra2, wa, we, wd in; rd1, rd2 out.
// Three addresses, two data outputs, one data input, clock and write enable
// follow the lecture; the zero register and the reset are this design's own.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  input  logic [AW-1:0] wa,
  input  logic          we,
  input  logic [W-1:0]  wd,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
