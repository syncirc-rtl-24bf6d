// SORT: bitonic sorting network for N unsigned W-bit keys, ascending.
//
// The network has log2(N) (log2(N) + 1) / 2 stages (10 for N = 16); each stage
// is a column of N/2 independent compare-exchange units (COMP + MUX), so the
// circuit depth is the number of stages times the depth of one unit. The
// choice of the bitonic network is this design's; the design specifies a
// sorter of 16 keys of 16 bits built from its comparison and multiplexer
// blocks.
//
// Interface: a[N] (W bits each) in; y[N] out, y[0] the smallest. N must be a
// power of two. Combinational.
module sort_bitonic #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0][W-1:0] a,
  output logic [N-1:0][W-1:0] y
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned STAGES = LOGN * (LOGN + 1) / 2;

  if (N != 2 ** LOGN || N < 2) begin : g_bad_n
    $error("sort_bitonic: N must be a power of two, at least 2");
  end

  logic [N-1:0][W-1:0] st [STAGES+1];

  assign st[0] = a;

  // Phase kk merges bitonic runs of length K = 2^kk; step jj compares
  // elements J = 2^jj apart.
  for (genvar kk = 1; kk <= LOGN; kk++) begin : g_phase
    for (genvar jj = kk - 1; jj >= 0; jj--) begin : g_step
      localparam int unsigned S = kk * (kk - 1) / 2 + (kk - 1 - jj);
      localparam int unsigned K = 2 ** kk;
      localparam int unsigned J = 2 ** jj;
      for (genvar i = 0; i < N; i++) begin : g_el
        if ((i & J) == 0) begin : g_unit
          logic [W-1:0] lo, hi;
          cmp_swap #(.W(W)) u_cs (.a(st[S][i]), .b(st[S][i+J]), .lo(lo), .hi(hi));
          if ((i & K) == 0) begin : g_up
            assign st[S+1][i]   = lo;
            assign st[S+1][i+J] = hi;
          end else begin : g_down
            assign st[S+1][i]   = hi;
            assign st[S+1][i+J] = lo;
          end
        end
      end
    end
  end

  assign y = st[STAGES];
endmodule
