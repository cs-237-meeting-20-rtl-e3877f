// imem: instruction memory of 2**AW 32-bit words.
// The processor reads one word combinationally at the byte address 'addr'
// (its PC); bits [1:0] are ignored and the address wraps above bit AW+1.
// The memory is separate from the data memory so that an instruction fetch
// and a data access can happen in the same cycle. A clocked load port
// (we, waddr, wdata) fills the memory with a program before the processor
// runs; it is this design's own addition, as is the size.
// Interface: clk, addr, we, waddr, wdata in; instr out.// Lint reports the unused address bits [31:AW+2] and [1:0]: they are
// ignored on purpose (word access, wrap-around).
module imem #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   instr,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = mem[addr[AW+1:2]];

endmodule
