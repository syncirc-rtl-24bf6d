// Carry-save adder (3:2 compressor row) for W-bit words.
//
// Reduces three addends to two without carry propagation: s = a ^ b ^ c and
// co = majority(a, b, c), where co has twice the weight of s. The majority is
// written (a & b) ^ (c & (a ^ b)); the two AND terms are never both 1, so the
// row costs one AND level. It is the reduction step of the multiplier.
//
// Interface: a, b, c in; s, co out (W bits each; shift co left by one before
// adding). Combinational.
module csa #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);
  logic [W-1:0] ab;

  assign ab = a ^ b;
  assign s  = ab ^ c;
  assign co = (a & b) ^ (c & ab);
endmodule
