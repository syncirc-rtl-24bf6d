// BitExt: extracts the most significant bit of x + y (mod 2^W) without
// computing the other sum bits.
//
// In mixed-protocol secure computation a value is held as two additive
// shares; its sign is the MSB of their sum. Only the carry into bit W-1 is
// needed, so the radix-4 prefix network runs over the low W-1 bits and the
// result is x[W-1] ^ y[W-1] ^ carry. Depth: ceil(log4 (W-1)) + 1.
//
// Interface: x, y (W bits, W >= 2) in; msb out. Combinational.
module bit_ext #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         msb
);
  logic [W-2:0] g, p, gg, gp;

  assign g = x[W-2:0] & y[W-2:0];
  assign p = x[W-2:0] ^ y[W-2:0];

  prefix4 #(.W(W-1)) u_prefix (.g(g), .p(p), .gg(gg), .gp(gp));

  assign msb = x[W-1] ^ y[W-1] ^ gg[W-2];
endmodule
