// dmem: data memory of 2**AW 32-bit words with one input bus and one output
// bus. The address is a byte address but access is by whole words: bits
// [1:0] are ignored and the address wraps above bit AW+1. The output bus
// shows the addressed word combinationally; on a rising clock edge with
// we = 1 the input bus is written to the addressed word.
// Interface: clk, we, addr, wd in; rd out. Reads take no clock, writes one.
// The buses, clock and write enable follow the lecture; the size is this
// design's own choice. Contents are not reset.// Lint reports the unused address bits [31:AW+2] and [1:0]: they are
// ignored on purpose (word access, wrap-around).
module dmem #(
  parameter int unsigned AW = 8
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wd;
  end

  assign rd = mem[addr[AW+1:2]];

endmodule
