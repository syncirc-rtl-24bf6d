// COMP: depth-optimized unsigned greater-than comparator, gt = (x > y).
//
// Works recursively like the 2-bit -> 4-bit -> 8-bit composition of the
// reference 8-bit comparator, but merges four groups per level because the
// gate layer offers AND gates of fan-in 4. Per bit: gt = x & ~y (one AND) and
// eq = ~(x ^ y) (free). Four groups, most significant first, merge as
//   GT = gt3 ^ eq3 gt2 ^ eq3 eq2 gt1 ^ eq3 eq2 eq1 gt0,  EQ = eq3 eq2 eq1 eq0
// where the XORed terms are mutually exclusive. Depth: ceil(log4 W) + 1.
// Widths that are not a power of four are padded with equal (zero) bits.
//
// Interface: x, y (W bits) in; gt out. Combinational.
module comp_gt #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         gt
);
  import syncirc_pkg::*;

  localparam int unsigned L  = clog4(W);
  localparam int unsigned WP = 4 ** L;

  logic [WP-1:0] lgt [L+1];
  logic [WP-1:0] leq [L+1];

  // Padding bits beyond W compare equal.
  assign lgt[0] = WP'(x) & ~WP'(y);
  assign leq[0] = ~WP'(x ^ y);

  for (genvar k = 0; k < L; k++) begin : g_lvl
    localparam int unsigned CNT = WP / (4 ** (k + 1));
    for (genvar j = 0; j < CNT; j++) begin : g_node
      assign lgt[k+1][j] = lgt[k][4*j+3]
                         ^ (leq[k][4*j+3] & lgt[k][4*j+2])
                         ^ (leq[k][4*j+3] & leq[k][4*j+2] & lgt[k][4*j+1])
                         ^ (leq[k][4*j+3] & leq[k][4*j+2] & leq[k][4*j+1] & lgt[k][4*j]);
      assign leq[k+1][j] = leq[k][4*j+3] & leq[k][4*j+2] & leq[k][4*j+1] & leq[k][4*j];
    end
    // Upper positions of this level are unused.
    if (CNT < WP) begin : g_fill
      assign lgt[k+1][WP-1:CNT] = '0;
      assign leq[k+1][WP-1:CNT] = '1;
    end
  end

  assign gt = lgt[L][0];
endmodule
