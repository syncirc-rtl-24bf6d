// Radix-4 parallel-prefix carry network shared by the adder, the subtractor
// and the bit-extraction block.
//
// Given per-bit generate g[i] and propagate p[i], it returns for every i the
// group generate gg[i] and group propagate gp[i] of bits [i:0]. It is a
// Sklansky (divide-and-conquer) prefix tree whose nodes merge up to four
// groups at once: at level k each position in the m-th quarter (m = 1..3) of
// a block of 4^(k+1) bits merges with the ends of the m quarters below it.
// The merged generate is written as an XOR of mutually exclusive AND terms,
// e.g. for m = 3:
//   G = G_i ^ P_i G_e2 ^ P_i P_e2 G_e1 ^ P_i P_e2 P_e1 G_e0
// so each level costs one AND of fan-in at most 4, and the whole network has
// ceil(log4 W) AND levels. The radix-4 structure is this design's reading of
// the depth the customized Ladner-Fischer adder is said to reach.
//
// Interface: g, p in; gg, gp out; all W bits. Combinational.
module prefix4 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic [W-1:0] gg,
  output logic [W-1:0] gp
);
  import syncirc_pkg::*;

  localparam int unsigned L = clog4(W);

  logic [W-1:0] lg [L+1];
  logic [W-1:0] lp [L+1];

  assign lg[0] = g;
  assign lp[0] = p;

  for (genvar k = 0; k < L; k++) begin : g_lvl
    localparam int unsigned SUB = 4 ** k;
    localparam int unsigned BLK = 4 * SUB;
    for (genvar i = 0; i < W; i++) begin : g_bit
      localparam int unsigned BASE = (i / BLK) * BLK;
      localparam int unsigned M    = (i - BASE) / SUB;
      // End positions of the quarters below this one.
      localparam int unsigned E0 = BASE + SUB - 1;
      localparam int unsigned E1 = BASE + 2 * SUB - 1;
      localparam int unsigned E2 = BASE + 3 * SUB - 1;
      if (M == 0) begin : g_pass
        assign lg[k+1][i] = lg[k][i];
        assign lp[k+1][i] = lp[k][i];
      end else if (M == 1) begin : g_m1
        assign lg[k+1][i] = lg[k][i] ^ (lp[k][i] & lg[k][E0]);
        assign lp[k+1][i] = lp[k][i] & lp[k][E0];
      end else if (M == 2) begin : g_m2
        assign lg[k+1][i] = lg[k][i] ^ (lp[k][i] & lg[k][E1])
                          ^ (lp[k][i] & lp[k][E1] & lg[k][E0]);
        assign lp[k+1][i] = lp[k][i] & lp[k][E1] & lp[k][E0];
      end else begin : g_m3
        assign lg[k+1][i] = lg[k][i] ^ (lp[k][i] & lg[k][E2])
                          ^ (lp[k][i] & lp[k][E2] & lg[k][E1])
                          ^ (lp[k][i] & lp[k][E2] & lp[k][E1] & lg[k][E0]);
        assign lp[k+1][i] = lp[k][i] & lp[k][E2] & lp[k][E1] & lp[k][E0];
      end
    end
  end

  assign gg = lg[L];
  assign gp = lp[L];
endmodule
