// 2:1 multiplexer of W-bit words with one AND level: y = a0 ^ (s & (a0 ^ a1)).
//
// Interface: a0, a1 (W bits), s in; y out. Combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a0,
  input  logic [W-1:0] a1,
  input  logic         s,
  output logic [W-1:0] y
);
  assign y = a0 ^ ({W{s}} & (a0 ^ a1));
endmodule
