// 8:1 multiplexer of W-bit words with a single AND level.
//
// Extends the 4:1 construction: the two upper select bits are decoded as
// literals inside each AND, so pair j = s[2:1] contributes
//   l2 l1 a[2j] ^ l2 l1 s0 (a[2j] ^ a[2j+1])
// with l2, l1 the true or complemented select bits. That is one AND3 and one
// AND4 per pair and bit, all at depth 1; the four pair terms are mutually
// exclusive and are XORed.
//
// Interface: a[8] (W bits each), s (3 bits) in; y = a[s] out. Combinational.
module mux8 #(
  parameter int unsigned W = 32
) (
  input  logic [7:0][W-1:0] a,
  input  logic [2:0]        s,
  output logic [W-1:0]      y
);
  logic [3:0][W-1:0] term;

  for (genvar j = 0; j < 4; j++) begin : g_pair
    logic [W-1:0] l2, l1, s0;
    assign l2 = {W{(j & 2) != 0 ? s[2] : ~s[2]}};
    assign l1 = {W{(j & 1) != 0 ? s[1] : ~s[1]}};
    assign s0 = {W{s[0]}};
    assign term[j] = (l2 & l1 & a[2*j]) ^ (l2 & l1 & s0 & (a[2*j] ^ a[2*j+1]));
  end

  assign y = term[0] ^ term[1] ^ term[2] ^ term[3];
endmodule
