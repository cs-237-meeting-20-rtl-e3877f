// gcd: synchronous greatest-common-divisor circuit (repeated subtraction).
// Two W-bit registers X and Y share the clock. A comparator produces X > Y
// and X < Y; subtractors produce X - Y and Y - X. In front of each register a
// multiplexer picks the external input while reset is 1 and the difference
// otherwise, and each register's enable is (its comparator output OR reset).
// So on reset both registers load x_in / y_in, and afterwards each clock edge
// replaces only the larger of the two by the difference. When X == Y both
// enables are 0, the registers hold, and both hold the GCD; 'equal' says so.
// Interface: clk, reset, x_in, y_in in; x, y, equal out.
// Timing: one subtraction per clock; equal rises after as many cycles as the
// subtraction algorithm takes steps. A zero input never reaches equal.
// The structure (muxes, enables, comparator, two subtractors, one clock)
// follows the lecture's corrected GCD circuit; the unsigned comparison and the
// 'equal' output are this design's own choices.
module gcd #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] x_in,
  input  logic [W-1:0] y_in,
  output logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         equal
);

  logic         x_gt_y, x_lt_y;
  logic [W-1:0] x_minus_y, y_minus_x;
  logic [W-1:0] x_next, y_next;
  logic         x_en, y_en;

  // comparator
  assign x_gt_y = (x > y);
  assign x_lt_y = (x < y);
  assign equal  = (x == y);

  // subtractors
  assign x_minus_y = x - y;
  assign y_minus_x = y - x;

  // input multiplexers, selected by reset
  assign x_next = reset ? x_in : x_minus_y;
  assign y_next = reset ? y_in : y_minus_x;

  // enables: "X > Y or RESET", "X < Y or RESET"
  assign x_en = x_gt_y | reset;
  assign y_en = x_lt_y | reset;

  en_reg #(.W(W)) u_x (.clk(clk), .rst(1'b0), .en(x_en), .d(x_next), .q(x));
  en_reg #(.W(W)) u_y (.clk(clk), .rst(1'b0), .en(y_en), .d(y_next), .q(y));

endmodule
