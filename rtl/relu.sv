// ReLU of a two's-complement value held as two additive shares,
// y = max(x0 + x1, 0) modulo 2^W.
//
// In mixed-protocol machine-learning inference, activations arrive as
// arithmetic shares; the Boolean circuit receives both shares. ADD_CLF forms
// the value and BitExt extracts its sign in parallel, so the sign is not
// delayed by the sum bits; one AND level then zeroes negative values. The
// share-based interface is this design's reading of how the block is used.
//
// Interface: x0, x1 (W bits) in; y (W bits) out. Combinational.
module relu #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  output logic [W-1:0] y
);
  logic [W:0] sum;
  logic       neg;

  add_clf #(.W(W)) u_add  (.x(x0), .y(x1), .s(sum));
  bit_ext #(.W(W)) u_sign (.x(x0), .y(x1), .msb(neg));

  assign y = sum[W-1:0] & {W{~neg}};
endmodule
