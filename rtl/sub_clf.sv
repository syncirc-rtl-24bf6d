// SUB_CLF: depth-optimized W-bit subtractor.
//
// Computes x + ~y + 1 on the same radix-4 prefix network as the adder. The
// carry-in of 1 is folded into bit 0: its generate becomes x0 | ~y0, written
// as the single AND ~(~x0 & y0), and its propagate becomes 0, so the depth
// stays ceil(log4 W) + 1.
//
// Interface: x, y (W bits) in; d (W+1 bits) out with d[W-1:0] = x - y mod 2^W
// and d[W] = carry out, which is 1 exactly when x >= y (unsigned). The
// restoring divider uses d[W] as its quotient bit. Combinational.
module sub_clf #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W:0]   d
);
  logic [W-1:0] yn, g, p, pc, gg, gp;

  assign yn = ~y;
  assign p  = x ^ yn;

  always_comb begin
    g  = x & yn;
    pc = p;
    g[0]  = ~(~x[0] & y[0]);
    pc[0] = 1'b0;
  end

  prefix4 #(.W(W)) u_prefix (.g(g), .p(pc), .gg(gg), .gp(gp));

  assign d[0] = ~p[0];
  for (genvar i = 1; i < W; i++) begin : g_diff
    assign d[i] = p[i] ^ gg[i-1];
  end
  assign d[W] = gg[W-1];
endmodule
