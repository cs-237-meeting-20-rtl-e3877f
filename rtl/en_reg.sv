// en_reg: register with a load enable.
// All registers of a synchronous circuit share one clock; instead of gating
// the clock, a register that should hold its value sees en = 0 and keeps q.
// On a rising clock edge q takes d when en is 1. rst (synchronous, active
// high) clears q and has priority over en.
// Interface: clk, rst, en, d in; q out. One clock from d to q.
// The enable input follows the lecture's synchronous design practice; the
// synchronous reset is this design's own addition.
module en_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
