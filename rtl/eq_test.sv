// EQ: equality test of two W-bit words, eq = (x == y).
//
// The bitwise XNOR is free; the W results are combined by a tree of AND4
// cells (and_tree), giving a multiplicative depth of ceil(log4 W).
//
// Interface: x, y (W bits) in; eq out. Combinational.
module eq_test #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         eq
);
  and_tree #(.N(W)) u_tree (.a(~(x ^ y)), .y(eq));
endmodule
