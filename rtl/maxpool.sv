// Maxpool: maximum of N signed (two's complement) W-bit values.
//
// A balanced tree of log2(N) levels; each node is a COMP and a 2:1 MUX. The
// signed comparison is the unsigned COMP on operands whose sign bits are
// inverted, which costs nothing. N that is not a power of two is padded with
// the most negative value.
//
// Interface: a[N] (W bits each) in; y = max out. Combinational.
module maxpool #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0] a,
  output logic [W-1:0]        y
);
  localparam int unsigned LOGN = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP   = 2 ** LOGN;
  localparam logic [W-1:0] MINV = W'(1) << (W - 1);

  logic [NP-1:0][W-1:0] lv [LOGN+1];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign lv[0][i] = a[i];
    end else begin : g_pad
      assign lv[0][i] = MINV;
    end
  end

  for (genvar k = 0; k < LOGN; k++) begin : g_lvl
    localparam int unsigned CNT = NP >> (k + 1);
    for (genvar j = 0; j < CNT; j++) begin : g_node
      logic [W-1:0] l, r;
      logic         gt;
      assign l = lv[k][2*j];
      assign r = lv[k][2*j+1];
      comp_gt #(.W(W)) u_cmp (.x(l ^ MINV), .y(r ^ MINV), .gt(gt));
      mux2    #(.W(W)) u_sel (.a0(r), .a1(l), .s(gt), .y(lv[k+1][j]));
    end
    for (genvar j = CNT; j < NP; j++) begin : g_fill
      assign lv[k+1][j] = MINV;
    end
  end

  assign y = lv[LOGN][0];
endmodule
