// 4:1 multiplexer of W-bit words with a single AND level.
//
// Each pair (a0,a1) and (a2,a3) is selected by s0 as a_even ^ s0 (a_even ^
// a_odd), and the select literal of s1 is folded into the same AND:
//   y = ~s1 a0 ^ ~s1 s0 (a0 ^ a1) ^ s1 a2 ^ s1 s0 (a2 ^ a3)
// The four terms need two AND2 and two AND3 per bit, at depth 1, following the
// structure of the reference 4:1 multiplexer. Only one of the s1 halves can be
// non-zero, so their XOR is their OR.
//
// Interface: a[4] (W bits each), s (2 bits) in; y = a[s] out. Combinational.
module mux4 #(
  parameter int unsigned W = 32
) (
  input  logic [3:0][W-1:0] a,
  input  logic [1:0]        s,
  output logic [W-1:0]      y
);
  logic [W-1:0] s1n, s1, s0;

  assign s1n = {W{~s[1]}};
  assign s1  = {W{s[1]}};
  assign s0  = {W{s[0]}};

  assign y = (s1n & a[0]) ^ (s1n & s0 & (a[0] ^ a[1]))
           ^ (s1  & a[2]) ^ (s1  & s0 & (a[2] ^ a[3]));
endmodule
