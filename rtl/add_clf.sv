// ADD_CLF: depth-optimized W-bit adder with carry out.
//
// Generate g = x & y costs one AND level, the radix-4 prefix network adds
// ceil(log4 W) levels, and the sum bits s[i] = x[i] ^ y[i] ^ carry[i] are
// free, giving a multiplicative depth of ceil(log4 W) + 1 as the design
// specifies for its adder. Because g[i] and p[i] = x[i] ^ y[i] are never both
// set, all OR operations of a carry-lookahead adder become XORs.
//
// Interface: x, y (W bits) in; s (W+1 bits, s[W] = carry out) out.
// Combinational.
module add_clf #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W:0]   s
);
  logic [W-1:0] g, p, gg, gp;

  assign g = x & y;
  assign p = x ^ y;

  prefix4 #(.W(W)) u_prefix (.g(g), .p(p), .gg(gg), .gp(gp));

  // Carry into bit i is the group generate of bits [i-1:0].
  assign s[0] = p[0];
  for (genvar i = 1; i < W; i++) begin : g_sum
    assign s[i] = p[i] ^ gg[i-1];
  end
  assign s[W] = gg[W-1];
endmodule
