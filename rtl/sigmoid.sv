// Sigmoid approximation on a fixed-point value held as two additive shares.
//
// x = x0 + x1 (mod 2^W) is a two's-complement number with FRAC fractional
// bits. The piecewise-linear approximation common in secure machine learning
// is used:
//   y = 0          for x < -1/2
//   y = x + 1/2    for -1/2 <= x < 1/2
//   y = 1          for x >= 1/2
// ADD_CLF forms x; BitExt then gives the signs of x + 1/2 and x - 1/2, and a
// second ADD_CLF forms x + 1/2. A 4:1 MUX picks the result. The approximation
// and the fixed-point format are this design's choices; the values are
// assumed to satisfy |x| < 2^(W-2) so that x +- 1/2 does not wrap.
//
// Interface: x0, x1 (W bits) in; y (W bits, same format) out.
// Combinational.
module sigmoid #(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 12
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  output logic [W-1:0] y
);
  localparam logic [W-1:0] HALF  = W'(1) << (FRAC - 1);
  localparam logic [W-1:0] ONE   = W'(1) << FRAC;
  localparam logic [W-1:0] MHALF = -HALF;

  logic [W:0]   xs, xh;
  logic         below, above_n;   // x < -1/2 ; x < 1/2
  logic [3:0][W-1:0] choice;

  add_clf #(.W(W)) u_x    (.x(x0), .y(x1), .s(xs));
  bit_ext #(.W(W)) u_lo   (.x(xs[W-1:0]), .y(HALF),  .msb(below));
  bit_ext #(.W(W)) u_hi   (.x(xs[W-1:0]), .y(MHALF), .msb(above_n));
  add_clf #(.W(W)) u_xh   (.x(xs[W-1:0]), .y(HALF), .s(xh));

  // select = {below, above_n}: 00 -> 1, 01 -> x + 1/2, 1x -> 0
  assign choice[0] = ONE;
  assign choice[1] = xh[W-1:0];
  assign choice[2] = '0;
  assign choice[3] = '0;

  mux4 #(.W(W)) u_sel (.a(choice), .s({below, above_n}), .y(y));
endmodule
