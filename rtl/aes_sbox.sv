// AES S-box with multiplicative depth 3.
//
// S(x) = A(x^254) ^ 0x63, where x^254 is the inverse in GF(2^8) (0 maps to 0)
// and A is the AES affine bit matrix. x^254 = x^2 x^4 x^8 x^16 x^32 x^64 x^128:
// the seven powers are squarings, which are linear in GF(2^8) and free, and
// their product is a balanced tree of six field multiplications, each one
// level of AND2 gates. The tree has three levels, which matches the depth the
// design reports for its S-box. The exponentiation tree is this design's
// choice; the gate count is higher than a hand-optimized S-box circuit.
//
// Interface: x (8 bits) in; y = S(x) out. Combinational.
module aes_sbox (
  input  logic [7:0] x,
  output logic [7:0] y
);
  import syncirc_pkg::*;

  logic [7:0] x2, x4, x8, x16, x32, x64, x128;
  logic [7:0] m1a, m1b, m1c, m2a, m2b, inv;

  assign x2   = gf_sq(x);
  assign x4   = gf_sq(x2);
  assign x8   = gf_sq(x4);
  assign x16  = gf_sq(x8);
  assign x32  = gf_sq(x16);
  assign x64  = gf_sq(x32);
  assign x128 = gf_sq(x64);

  // Level 1
  assign m1a = gf_mul(x2, x4);
  assign m1b = gf_mul(x8, x16);
  assign m1c = gf_mul(x32, x64);
  // Level 2
  assign m2a = gf_mul(m1a, m1b);
  assign m2b = gf_mul(m1c, x128);
  // Level 3
  assign inv = gf_mul(m2a, m2b);

  // Affine map: b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
  function automatic logic [7:0] rotl8(input logic [7:0] v, input int unsigned n);
    return (v << n) | (v >> (8 - n));
  endfunction

  assign y = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
endmodule
