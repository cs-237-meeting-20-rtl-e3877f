// alu: the processor's 32-bit arithmetic and logic unit.
// Operand B passes through an inverter/multiplexer pair into a W-bit
// adder whose carry-in is the same invert bit, so F[2]=1 turns the adder into
// a subtractor (A + ~B + 1). Bitwise AND and OR of A and B, the adder sum and
// the sum's sign bit zero-extended to W bits (set-less-than) feed a 4-input
// output multiplexer selected by F[1:0]. Zero is the NOR of all output bits;
// carry_out is the adder's carry.
// Interface: a, b, f in; y, carry_out, zero out. Purely combinational.
// The structure (NOT-B mux, carry-in, AND/OR/adder/extend mux, NOR zero
// detector) follows the lecture's ALU drawing; the assignment of F bits and
// the use of the plain sign bit for slt (no overflow correction) are this
// design's own choices.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   f,
  output logic [W-1:0] y,
  output logic         carry_out,
  output logic         zero
);

  logic         b_inv;
  logic [W-1:0] b_sel;
  logic [W-1:0] sum;
  logic [W-1:0] slt_ext;

  assign b_inv = f[2];
  assign b_sel = b_inv ? ~b : b;
  assign {carry_out, sum} = {1'b0, a} + {1'b0, b_sel} + {{W{1'b0}}, b_inv};
  assign slt_ext = {{(W-1){1'b0}}, sum[W-1]};

  always_comb begin
    unique case (f[1:0])
      2'd0:    y = a & b_sel;
      2'd1:    y = a | b_sel;
      2'd2:    y = sum;
      default: y = slt_ext;
    endcase
  end

  assign zero = ~|y;

endmodule
