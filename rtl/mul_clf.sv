// MUL_CLF: W x W -> W-bit multiplier (product modulo 2^W).
//
// Three stages: the W partial products x & y[i], shifted by i, cost one AND
// level; a Wallace tree of carry-save rows (csa) reduces them to two words,
// one AND level per 3:2 row level; ADD_CLF adds the last two words. Bits above
// W-1 are dropped at every step, as the product is taken modulo 2^W like the
// integer arithmetic of the secure-computation frameworks this library
// serves. The carry-save reduction and the final prefix adder follow the
// building blocks the design lists; the Wallace row grouping is this design's.
//
// Interface: x, y (W bits) in; p (W bits) out. Combinational.
module mul_clf #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] p
);
  import syncirc_pkg::*;

  localparam int unsigned LEV = csa_levels(W);

  // Rows in use before level l.
  function automatic int unsigned rows_before(input int unsigned l);
    int unsigned m;
    m = W;
    for (int unsigned i = 0; i < l; i++) m = csa_rows_next(m);
    return m;
  endfunction

  logic [W-1:0] pp [W];   // partial products, already shifted

  for (genvar i = 0; i < W; i++) begin : g_pp
    assign pp[i] = (x & {W{y[i]}}) << i;
  end

  // Each level holds the rows it produces in its own array.
  for (genvar l = 0; l < LEV; l++) begin : g_lvl
    localparam int unsigned NIN  = rows_before(l);
    localparam int unsigned NGRP = NIN / 3;
    localparam int unsigned NOUT = 2 * NGRP + NIN % 3;
    logic [W-1:0] rin  [NIN];
    logic [W-1:0] rout [NOUT];
    if (l == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_lvl[l-1].rout;
    end
    for (genvar g = 0; g < NGRP; g++) begin : g_grp
      logic [W-1:0] co;
      csa #(.W(W)) u_csa (.a(rin[3*g]), .b(rin[3*g+1]), .c(rin[3*g+2]),
                          .s(rout[2*g]), .co(co));
      assign rout[2*g+1] = co << 1;
    end
    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign rout[2*NGRP+r] = rin[3*NGRP+r];
    end
  end

  logic [W-1:0] fin0, fin1;

  if (LEV == 0) begin : g_nolvl
    assign fin0 = pp[0];
    assign fin1 = (W >= 2) ? pp[W-1] : '0;
  end else begin : g_lvlout
    assign fin0 = g_lvl[LEV-1].rout[0];
    assign fin1 = g_lvl[LEV-1].rout[1];
  end

  logic [W:0] sum;

  // The carry out of the final adder lies above the W-bit product.
  add_clf #(.W(W)) u_add (.x(fin0), .y(fin1), .s(sum));

  assign p = sum[W-1:0];
endmodule
