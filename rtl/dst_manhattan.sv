// DST_M: Manhattan distance of two points in the plane,
// d = |p[0] - q[0]| + |p[1] - q[1]| for unsigned W-bit coordinates.
//
// Per axis, both differences p - q and q - p are formed by SUB_CLF in
// parallel; the carry out of p - q (1 when p >= q) selects the non-negative
// one through a 2:1 MUX. ADD_CLF adds the two axis distances with a carry
// out. The two-dimensional form is this design's reading of the block.
//
// Interface: p, q (2 coordinates of W bits) in; d (W+1 bits) out.
// Combinational.
module dst_manhattan #(
  parameter int unsigned W = 16
) (
  input  logic [1:0][W-1:0] p,
  input  logic [1:0][W-1:0] q,
  output logic [W:0]        d
);
  logic [1:0][W-1:0] ad;

  for (genvar k = 0; k < 2; k++) begin : g_axis
    logic [W:0] pq, qp;
    sub_clf #(.W(W)) u_pq (.x(p[k]), .y(q[k]), .d(pq));
    sub_clf #(.W(W)) u_qp (.x(q[k]), .y(p[k]), .d(qp));
    mux2    #(.W(W)) u_abs (.a0(qp[W-1:0]), .a1(pq[W-1:0]), .s(pq[W]), .y(ad[k]));
  end

  add_clf #(.W(W)) u_add (.x(ad[0]), .y(ad[1]), .s(d));
endmodule
