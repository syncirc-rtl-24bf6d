// FP_MUL: IEEE-754 binary32 multiplication.
//
// The 24 x 24 significand product is formed by the library's MUL_CLF at 48
// bits (carry-save tree and depth-optimized adder); the exponent is
// ea + eb - 127. The 48-bit product is normalized by at most one position and
// rounded to nearest, ties to even, with guard and sticky bits.
// Number handling, this design's choice and the same as the adder: subnormal
// inputs count as zero, results below the normal range after rounding are
// flushed to a signed zero, NaN results are 0x7FC00000, inf x 0 is NaN.
// Squaring (FP_SQR) is this block with both inputs equal.
//
// Interface: a, b (binary32) in; y (binary32) out. Combinational.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  import syncirc_pkg::*;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  fp32_t fa, fb;
  logic [47:0] prod;

  assign fa = a;
  assign fb = b;

  mul_clf #(.W(48)) u_mul (.x({24'h0, 1'b1, fa.frac}), .y({24'h0, 1'b1, fb.frac}), .p(prod));

  always_comb begin
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, rs, g, st, inc;
    logic signed [10:0] e;
    logic [23:0] m;
    logic [24:0] rounded;

    a_nan  = (fa.exp == 8'hFF) && (fa.frac != 0);
    b_nan  = (fb.exp == 8'hFF) && (fb.frac != 0);
    a_inf  = (fa.exp == 8'hFF) && (fa.frac == 0);
    b_inf  = (fb.exp == 8'hFF) && (fb.frac == 0);
    a_zero = (fa.exp == 8'h00);
    b_zero = (fb.exp == 8'h00);
    rs     = fa.sign ^ fb.sign;

    e = 11'(fa.exp) + 11'(fb.exp) - 11'sd127;
    if (prod[47]) begin
      m  = prod[47:24];
      g  = prod[23];
      st = (prod[22:0] != 0);
      e  = e + 11'sd1;
    end else begin
      m  = prod[46:23];
      g  = prod[22];
      st = (prod[21:0] != 0);
    end
    inc     = g & (st | m[0]);
    rounded = {1'b0, m} + 25'(inc);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e       = e + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = QNAN;
    end else if (a_inf || b_inf) begin
      y = {rs, 8'hFF, 23'h0};
    end else if (a_zero || b_zero) begin
      y = {rs, 31'h0};
    end else if (e >= 11'sd255) begin
      y = {rs, 8'hFF, 23'h0};
    end else if (e <= 11'sd0) begin
      y = {rs, 31'h0};
    end else begin
      y = {rs, e[7:0], rounded[22:0]};
    end
  end
endmodule
