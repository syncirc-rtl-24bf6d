// Shared constants and helper functions for the depth-optimized building-block
// library. The library targets secret-sharing based secure computation, where
// XOR and NOT cost nothing and every AND gate (of fan-in 2, 3 or 4) costs one
// unit of multiplicative depth. All blocks are purely combinational.
//
// clog4(n) is the number of radix-4 levels a tree over n leaves needs; the
// blocks use it to size their prefix and reduction trees.
package syncirc_pkg;

  // ceil(log4(n)), with clog4(1) = 0.
  function automatic int unsigned clog4(input int unsigned n);
    int unsigned r, span;
    r = 0;
    span = 1;
    while (span < n) begin
      span = span * 4;
      r = r + 1;
    end
    return r;
  endfunction

  // Number of rows left after one level of 3:2 carry-save reduction.
  function automatic int unsigned csa_rows_next(input int unsigned n);
    return 2 * (n / 3) + (n % 3);
  endfunction

  // Number of 3:2 levels that bring n rows down to two.
  function automatic int unsigned csa_levels(input int unsigned n);
    int unsigned r, m;
    r = 0;
    m = n;
    while (m > 2) begin
      m = csa_rows_next(m);
      r = r + 1;
    end
    return r;
  endfunction

  // GF(2^8) arithmetic modulo the AES polynomial x^8 + x^4 + x^3 + x + 1.
  // gf_mul is bilinear (one level of AND2 gates followed by XORs); gf_sq and
  // gf_xtime are linear and therefore free.
  // Reduction of a 15-bit product: x^8..x^14 are replaced by their residues
  // 1B, 36, 6C, D8, AB, 4D, 9A.
  function automatic logic [7:0] gf_reduce(input logic [14:0] v);
    return v[7:0]
         ^ ({8{v[8]}}  & 8'h1B) ^ ({8{v[9]}}  & 8'h36) ^ ({8{v[10]}} & 8'h6C)
         ^ ({8{v[11]}} & 8'hD8) ^ ({8{v[12]}} & 8'hAB) ^ ({8{v[13]}} & 8'h4D)
         ^ ({8{v[14]}} & 8'h9A);
  endfunction

  // Carry-less 8 x 8 product, one row of AND2 gates per bit of b.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    return gf_reduce(({7'b0, a & {8{b[0]}}})       ^ ({6'b0, a & {8{b[1]}}, 1'b0})
                   ^ ({5'b0, a & {8{b[2]}}, 2'b0}) ^ ({4'b0, a & {8{b[3]}}, 3'b0})
                   ^ ({3'b0, a & {8{b[4]}}, 4'b0}) ^ ({2'b0, a & {8{b[5]}}, 5'b0})
                   ^ ({1'b0, a & {8{b[6]}}, 6'b0}) ^ ({a & {8{b[7]}}, 7'b0}));
  endfunction

  function automatic logic [7:0] gf_sq(input logic [7:0] a);
    return gf_reduce({a[7], 1'b0, a[6], 1'b0, a[5], 1'b0, a[4], 1'b0,
                      a[3], 1'b0, a[2], 1'b0, a[1], 1'b0, a[0]});
  endfunction

  function automatic logic [7:0] gf_xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // IEEE-754 binary32 fields.
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

endpackage
