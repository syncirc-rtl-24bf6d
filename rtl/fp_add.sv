// FP_ADD: IEEE-754 binary32 addition (sub = 1 gives subtraction).
//
// Classic single-path adder: the operand of larger magnitude is put first,
// the other significand is aligned right with three extra bits (guard,
// round, sticky), the significands are added or subtracted, the result is
// normalized (one step right, or a leading-zero count to the left) and
// rounded to nearest, ties to even.
// Number handling, this design's choices in line with common hardware
// libraries for secure computation: subnormal inputs count as zero and
// results below the normal range are flushed to a signed zero; NaN results
// are the quiet NaN 0x7FC00000; an exact zero sum of opposite-signed values is
// +0. Subtraction (FP_SUB) is addition with the sign of b flipped.
//
// Interface: a, b (binary32), sub in; y (binary32) out. Combinational.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  import syncirc_pkg::*;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  fp32_t fa, fb, big, sml;
  logic  a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  // Leading-zero count of a 27-bit word (27 when it is zero).
  function automatic logic [4:0] lzc27(input logic [26:0] v);
    logic [4:0] n;
    n = 5'd27;
    for (int i = 0; i <= 26; i++) begin
      if (v[i]) n = 5'(26 - i);
    end
    return n;
  endfunction

  always_comb begin
    logic [23:0] mb, ms;
    logic [7:0]  d;
    logic [26:0] al, shifted;      // aligned smaller operand: {1.23 bits, G, R, S}
    logic        st;
    logic [27:0] sum;
    logic [26:0] norm;
    logic signed [10:0] e;
    logic [4:0]  lz;
    logic        eff_sub, rs, g, r, s, inc;
    logic [24:0] rounded;

    fa = a;
    fb = b;
    fb.sign = b[31] ^ sub;

    a_nan  = (fa.exp == 8'hFF) && (fa.frac != 0);
    b_nan  = (fb.exp == 8'hFF) && (fb.frac != 0);
    a_inf  = (fa.exp == 8'hFF) && (fa.frac == 0);
    b_inf  = (fb.exp == 8'hFF) && (fb.frac == 0);
    a_zero = (fa.exp == 8'h00);   // subnormals are treated as zero
    b_zero = (fb.exp == 8'h00);

    // Order by magnitude.
    if ({fb.exp, fb.frac} > {fa.exp, fa.frac}) begin
      big = fb;
      sml = fa;
    end else begin
      big = fa;
      sml = fb;
    end
    if (b_zero && !a_zero) begin
      big = fa;
      sml = fb;
    end else if (a_zero && !b_zero) begin
      big = fb;
      sml = fa;
    end

    mb = {1'b1, big.frac};
    ms = (sml.exp == 8'h00) ? 24'h0 : {1'b1, sml.frac};
    d  = big.exp - sml.exp;

    // Align with sticky.
    al = {ms, 3'b000};
    if (d >= 8'd27) begin
      shifted = '0;
      st      = (ms != 0);
    end else begin
      shifted = al >> d;
      st      = ((al & ((27'(1) << d) - 27'(1))) != 0);
    end
    shifted[0] = shifted[0] | st;

    eff_sub = big.sign ^ sml.sign;
    e       = 11'(big.exp);

    if (eff_sub) sum = {1'b0, mb, 3'b000} - {1'b0, shifted};
    else         sum = {1'b0, mb, 3'b000} + {1'b0, shifted};

    // Normalize.
    norm = '0;
    lz   = '0;
    if (sum[27]) begin
      norm = {sum[27:2], sum[1] | sum[0]};
      e    = e + 11'sd1;
    end else begin
      lz   = lzc27(sum[26:0]);
      norm = sum[26:0] << lz;
      e    = e - 11'(lz);
    end

    // Round to nearest even.
    g   = norm[2];
    r   = norm[1];
    s   = norm[0];
    inc = g & (r | s | norm[3]);
    rounded = {1'b0, norm[26:3]} + 25'(inc);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e       = e + 11'sd1;
    end
    rs = big.sign;

    if (a_nan || b_nan || (a_inf && b_inf && (fa.sign != fb.sign))) begin
      y = QNAN;
    end else if (a_inf) begin
      y = {fa.sign, 8'hFF, 23'h0};
    end else if (b_inf) begin
      y = {fb.sign, 8'hFF, 23'h0};
    end else if (a_zero && b_zero) begin
      y = {fa.sign & fb.sign, 31'h0};
    end else if (sum == 0) begin
      y = 32'h0;                                  // exact cancellation
    end else if (e >= 11'sd255) begin
      y = {rs, 8'hFF, 23'h0};                     // overflow
    end else if (e <= 11'sd0) begin
      y = {rs, 31'h0};                            // underflow, flushed
    end else begin
      y = {rs, e[7:0], rounded[22:0]};
    end
  end
endmodule
