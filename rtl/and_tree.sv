// AND of N bits as a tree of AND4 cells, depth ceil(log4 N).
//
// Helper shared by the equality test and the set-intersection block. Missing
// leaves of the last group are tied to 1.
//
// Interface: a (N bits) in; y = &a out. Combinational.
module and_tree #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  output logic         y
);
  import syncirc_pkg::*;

  localparam int unsigned L  = clog4(N);
  localparam int unsigned NP = 4 ** L;

  logic [NP-1:0] lv [L+1];

  logic [N-1:0] an;

  // Padding leaves are 1.
  assign an    = ~a;
  assign lv[0] = ~NP'(an);

  for (genvar k = 0; k < L; k++) begin : g_lvl
    localparam int unsigned CNT = NP / (4 ** (k + 1));
    for (genvar j = 0; j < CNT; j++) begin : g_node
      sc_and #(.N(4)) u_and (.a(lv[k][4*j +: 4]), .y(lv[k+1][j]));
    end
    if (CNT < NP) begin : g_fill
      assign lv[k+1][NP-1:CNT] = '1;
    end
  end

  assign y = lv[L][0];
endmodule
