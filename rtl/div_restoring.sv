// DIV: unsigned W-bit restoring divider, q = x / y.
//
// One stage per quotient bit, from the most significant down. Each stage
// shifts the next dividend bit into the partial remainder, subtracts the
// divisor with SUB_CLF (W+1 bits wide, so the shifted remainder never
// overflows) and takes the subtractor's carry out as the quotient bit: 1 when
// the remainder is at least the divisor. A 2:1 multiplexer then keeps either
// the difference or the old remainder. This is the subtract-and-select chain
// the design uses for division; the shift-in-one-bit arrangement of the
// remainder is this design's. Division by zero returns all ones, the natural
// result of the chain.
//
// Interface: x, y (W bits) in; q (W bits) and r = x mod y (W bits) out.
// Combinational.
module div_restoring #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] q,
  output logic [W-1:0] r
);
  // rem[i]: partial remainder before the stage that produces q[i-1]...
  logic [W-1:0] rem [W+1];

  assign rem[W] = '0;

  for (genvar i = W - 1; i >= 0; i--) begin : g_stage
    logic [W:0]   cur;
    logic [W+1:0] diff;
    assign cur = {rem[i+1], x[i]};
    sub_clf #(.W(W + 1)) u_sub (.x(cur), .y({1'b0, y}), .d(diff));
    assign q[i] = diff[W+1];
    mux2 #(.W(W)) u_sel (.a0(cur[W-1:0]), .a1(diff[W-1:0]), .s(q[i]), .y(rem[i]));
  end

  assign r = rem[0];
endmodule
