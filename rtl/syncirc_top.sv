// Top level of the depth-optimized building-block library.
//
// The library is a set of independent combinational circuits for secure
// computation, in three layers: gates (the AND4 cell and the LUT gate),
// basic blocks (adder, subtractor, carry-save adder, comparator, multiplexer,
// equality test, bit extraction, multiplier, divider, AES S-box) and advanced
// functions built from them (AES-128, sorting, Manhattan distance, ReLU,
// sigmoid, maxpool, set intersection, floating-point add and multiply).
// The blocks share no signals, so this top places one instance of each side
// by side and brings every port out under the block's name as prefix. The
// AND4 cell is reached through the equality test and the set-intersection
// block, the S-box through AES-128, the carry-save adder through the
// multiplier. Bit widths are the library's main configuration: 32-bit
// operands, 16 x 16-bit keys for sorting and distance, 16-bit division.
//
// Everything is combinational; there is no clock or reset.
module syncirc_top #(
  parameter int unsigned W      = 32,
  parameter int unsigned W_DIV  = 16,
  parameter int unsigned W_SORT = 16,
  parameter int unsigned N_SORT = 16,
  parameter int unsigned W_DST  = 16,
  parameter int unsigned N_MUX  = 8,
  parameter int unsigned N_POOL = 16,
  parameter int unsigned N_PSI  = 32,
  parameter int unsigned FRAC   = 12,
  parameter int unsigned DELTA  = 8,
  parameter int unsigned SIGMA  = 8,
  localparam int unsigned S_MUX = $clog2(N_MUX)
) (
  // Layer I: LUT gate
  input  logic [(2**DELTA)-1:0][SIGMA-1:0] lut_tbl,
  input  logic [DELTA-1:0]                 lut_x,
  output logic [SIGMA-1:0]                 lut_y,
  // Layer II
  input  logic [W-1:0]                add_x, add_y,
  output logic [W:0]                  add_s,
  input  logic [W-1:0]                sub_x, sub_y,
  output logic [W:0]                  sub_d,
  input  logic [W-1:0]                comp_x, comp_y,
  output logic                        comp_gt_o,
  input  logic [N_MUX-1:0][W-1:0]     mux_a,
  input  logic [S_MUX-1:0]            mux_s,
  output logic [W-1:0]                mux_y,
  input  logic [W-1:0]                eq_x, eq_y,
  output logic                        eq_o,
  input  logic [W-1:0]                bitext_x, bitext_y,
  output logic                        bitext_msb,
  input  logic [W-1:0]                mul_x, mul_y,
  output logic [W-1:0]                mul_p,
  input  logic [W_DIV-1:0]            div_x, div_y,
  output logic [W_DIV-1:0]            div_q, div_r,
  input  logic [7:0]                  sbox_x,
  output logic [7:0]                  sbox_y,
  // Layer III
  input  logic [127:0]                aes_key, aes_pt,
  output logic [127:0]                aes_ct,
  input  logic [N_SORT-1:0][W_SORT-1:0] sort_a,
  output logic [N_SORT-1:0][W_SORT-1:0] sort_y,
  input  logic [1:0][W_DST-1:0]       dst_p, dst_q,
  output logic [W_DST:0]              dst_d,
  input  logic [W-1:0]                relu_x0, relu_x1,
  output logic [W-1:0]                relu_y,
  input  logic [W-1:0]                sig_x0, sig_x1,
  output logic [W-1:0]                sig_y,
  input  logic [N_POOL-1:0][W-1:0]    pool_a,
  output logic [W-1:0]                pool_y,
  input  logic [N_PSI-1:0][W-1:0]     psi_a, psi_b,
  output logic [N_PSI-1:0]            psi_hit,
  input  logic [31:0]                 fadd_a, fadd_b,
  input  logic                        fadd_sub,
  output logic [31:0]                 fadd_y,
  input  logic [31:0]                 fmul_a, fmul_b,
  output logic [31:0]                 fmul_y
);
  sc_lut        #(.DELTA(DELTA), .SIGMA(SIGMA)) u_lut (.tbl(lut_tbl), .x(lut_x), .y(lut_y));

  add_clf       #(.W(W))       u_add    (.x(add_x), .y(add_y), .s(add_s));
  sub_clf       #(.W(W))       u_sub    (.x(sub_x), .y(sub_y), .d(sub_d));
  comp_gt       #(.W(W))       u_comp   (.x(comp_x), .y(comp_y), .gt(comp_gt_o));
  mux_n         #(.N(N_MUX), .W(W)) u_mux (.a(mux_a), .s(mux_s), .y(mux_y));
  eq_test       #(.W(W))       u_eq     (.x(eq_x), .y(eq_y), .eq(eq_o));
  bit_ext       #(.W(W))       u_bitext (.x(bitext_x), .y(bitext_y), .msb(bitext_msb));
  mul_clf       #(.W(W))       u_mul    (.x(mul_x), .y(mul_y), .p(mul_p));
  div_restoring #(.W(W_DIV))   u_div    (.x(div_x), .y(div_y), .q(div_q), .r(div_r));
  aes_sbox                     u_sbox   (.x(sbox_x), .y(sbox_y));

  aes_encrypt                  u_aes    (.key(aes_key), .pt(aes_pt), .ct(aes_ct));
  sort_bitonic  #(.N(N_SORT), .W(W_SORT)) u_sort (.a(sort_a), .y(sort_y));
  dst_manhattan #(.W(W_DST))   u_dst    (.p(dst_p), .q(dst_q), .d(dst_d));
  relu          #(.W(W))       u_relu   (.x0(relu_x0), .x1(relu_x1), .y(relu_y));
  sigmoid       #(.W(W), .FRAC(FRAC)) u_sig (.x0(sig_x0), .x1(sig_x1), .y(sig_y));
  maxpool       #(.N(N_POOL), .W(W)) u_pool (.a(pool_a), .y(pool_y));
  psi           #(.N(N_PSI), .W(W)) u_psi (.a(psi_a), .b(psi_b), .hit(psi_hit));
  fp_add                       u_fadd   (.a(fadd_a), .b(fadd_b), .sub(fadd_sub), .y(fadd_y));
  fp_mul                       u_fmul   (.a(fmul_a), .b(fmul_b), .y(fmul_y));
endmodule
