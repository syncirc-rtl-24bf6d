// MUX: N:1 multiplexer of W-bit words with depth ceil(log8 N).
//
// The select bits are consumed three at a time from the least significant
// end: each level is a row of depth-1 8:1 multiplexers (mux8); a last level
// with only one or two select bits left uses mux2 or mux4. N that is not a
// power of two is padded with zero words, so selecting beyond N-1 yields 0.
//
// Interface: a[N] (W bits each), s ($clog2(N) bits) in; y = a[s] out.
// Combinational.
module mux_n #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 32,
  localparam int unsigned S = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] a,
  input  logic [S-1:0]        s,
  output logic [W-1:0]        y
);
  localparam int unsigned NP     = 2 ** S;
  localparam int unsigned LEVELS = (S + 2) / 3;

  logic [NP-1:0][W-1:0] lv [LEVELS+1];

  assign lv[0] = (NP * W)'(a);

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned B0  = 3 * l;                          // first select bit
    localparam int unsigned B   = (S - B0 >= 3) ? 3 : (S - B0);   // bits used here
    localparam int unsigned CNT = NP >> (B0 + B);                 // outputs of level
    for (genvar j = 0; j < CNT; j++) begin : g_node
      if (B == 3) begin : g_m8
        mux8 #(.W(W)) u_mux (.a(lv[l][8*j +: 8]), .s(s[B0 +: 3]), .y(lv[l+1][j]));
      end else if (B == 2) begin : g_m4
        mux4 #(.W(W)) u_mux (.a(lv[l][4*j +: 4]), .s(s[B0 +: 2]), .y(lv[l+1][j]));
      end else begin : g_m2
        mux2 #(.W(W)) u_mux (.a0(lv[l][2*j]), .a1(lv[l][2*j+1]), .s(s[B0]), .y(lv[l+1][j]));
      end
    end
    if (CNT < NP) begin : g_fill
      assign lv[l+1][NP-1:CNT] = '0;
    end
  end

  assign y = lv[LEVELS][0];
endmodule
