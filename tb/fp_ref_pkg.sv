// Reference for the binary32 testbenches. Operands are widened exactly to
// double precision, the operation is done in double precision, and the result
// is rounded once to binary32 (to nearest, ties to even). For addition and
// multiplication this gives the correctly rounded binary32 result, because a
// double carries more than twice the binary32 precision plus two bits. The
// same number handling as the circuits is applied: subnormal operands count
// as zero, results below the normal range are flushed to a signed zero and
// every NaN is 0x7FC00000.
package fp_ref_pkg;

  function automatic real f2d(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) d = {f[31], 63'h0};
    else if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'h0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] d2f(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mant;
    logic        g, st, inc;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'h0};
    if (d[62:52] == 11'h000) return {d[63], 31'h0};
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b1, d[51:0]};
    g    = m[28];
    st   = (m[27:0] != 0);
    inc  = g & (st | m[29]);
    mant = {1'b0, m[52:29]} + 25'(inc);
    if (mant[24]) begin
      mant = mant >> 1;
      e++;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    if (e < 1) return {d[63], 31'h0};
    return {d[63], 8'(e), mant[22:0]};
  endfunction

  function automatic logic is_nan(input logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] != 0;
  endfunction

  // Random operand: mostly normal numbers, some with a chosen exponent, some
  // special values.
  function automatic logic [31:0] rand_fp(input int unsigned sel, input logic [7:0] exp_hint);
    logic [31:0] v;
    v = $urandom;
    case (sel % 16)
      0: v[30:23] = 8'h00;                      // zero or subnormal
      1: v = {v[31], 8'hFF, 23'h0};             // infinity
      2: v = {v[31], 8'hFF, v[22:0] | 23'h1};   // NaN
      3, 4, 5, 6: v[30:23] = exp_hint + 8'($urandom % 3);
      7: v[30:23] = 8'd1 + 8'($urandom % 4);   // near underflow
      8: v[30:23] = 8'd250 + 8'($urandom % 5); // near overflow
      default: ;
    endcase
    return v;
  endfunction

endpackage
