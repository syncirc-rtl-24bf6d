// PSI: set-intersection circuit by pairwise equality.
//
// For each element a[i] of set A the circuit tests equality against every
// element of set B with EQ blocks (N x N of them, all in parallel) and ORs
// the results. The OR is written as NOT-AND-NOT and uses the AND4 tree, so
// hit[i] has depth ceil(log4 W) + ceil(log4 N). The all-pairs construction and
// the set size are this design's choices; the design names the block only.
//
// Interface: a[N], b[N] (W bits each) in; hit[i] = (a[i] in B) out.
// Combinational.
module psi #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0] a,
  input  logic [N-1:0][W-1:0] b,
  output logic [N-1:0]        hit
);
  for (genvar i = 0; i < N; i++) begin : g_a
    logic [N-1:0] eq;
    logic         none;
    for (genvar j = 0; j < N; j++) begin : g_b
      eq_test #(.W(W)) u_eq (.x(a[i]), .y(b[j]), .eq(eq[j]));
    end
    and_tree #(.N(N)) u_or (.a(~eq), .y(none));
    assign hit[i] = ~none;
  end
endmodule
