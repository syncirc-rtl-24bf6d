// End-to-end testbench of syncirc_top at its default sizes (32-bit
// arithmetic, 16 x 16-bit sorting, 16-bit division, 8 x 8 LUT gate, 8:1
// multiplexer, 16-input maxpool, 32-element set intersection). Every block
// is driven with random operands and checked against an independent model,
// and the testbench counts how often each behaviour the blocks are built to
// handle occurred: carry out, borrow, every multiplexer select, equal and
// unequal words, negative sums, product wrap-around, division by zero,
// duplicate sort keys, ReLU clipping, the three sigmoid regions, set hits and
// misses, floating-point cancellation, overflow, underflow and NaN. A
// behaviour that never occurred counts as a failure.
module tb_syncirc_top;
  timeunit 1ns; timeprecision 1ps;
  import aes_ref_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;

  typedef enum int {
    EV_CARRY, EV_BORROW, EV_GT, EV_EQ, EV_NEQ, EV_MSB, EV_MUL_WRAP, EV_DIV0,
    EV_SORT_DUP, EV_RELU_CLIP, EV_SIG_LO, EV_SIG_MID, EV_SIG_HI, EV_PSI_HIT,
    EV_PSI_MISS, EV_FP_CANCEL, EV_FP_OVF, EV_FP_UNF, EV_FP_NAN, EV_LUT, EV_AES,
    EV_NUM
  } event_e;
  int ev [EV_NUM];

  logic [255:0][7:0] lut_tbl; logic [7:0] lut_x, lut_y;
  logic [31:0] add_x, add_y, sub_x, sub_y, comp_x, comp_y, eq_x, eq_y;
  logic [32:0] add_s, sub_d;
  logic comp_gt_o, eq_o, bitext_msb;
  logic [7:0][31:0] mux_a; logic [2:0] mux_s; logic [31:0] mux_y;
  logic [31:0] bitext_x, bitext_y, mul_x, mul_y, mul_p;
  logic [15:0] div_x, div_y, div_q, div_r;
  logic [7:0] sbox_x, sbox_y;
  logic [127:0] aes_key, aes_pt, aes_ct;
  logic [15:0][15:0] sort_a, sort_y;
  logic [1:0][15:0] dst_p, dst_q; logic [16:0] dst_d;
  logic [31:0] relu_x0, relu_x1, relu_y, sig_x0, sig_x1, sig_y;
  logic [15:0][31:0] pool_a; logic [31:0] pool_y;
  logic [31:0][31:0] psi_a, psi_b; logic [31:0] psi_hit;
  logic [31:0] fadd_a, fadd_b, fadd_y, fmul_a, fmul_b, fmul_y;
  logic fadd_sub;

  syncirc_top dut (.*);

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check128(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam int ROUNDS = 400;

  initial begin
    for (int i = 0; i < 256; i++) lut_tbl[i] = 8'($urandom);

    // AES-128 example vector of FIPS-197 appendix C.1
    aes_key = 128'h000102030405060708090a0b0c0d0e0f;
    aes_pt  = 128'h00112233445566778899aabbccddeeff;
    #1 check128(aes_ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "AES-128 FIPS-197 C.1");
    ev[EV_AES]++;

    for (int n = 0; n < ROUNDS; n++) begin
      logic [63:0] wide;
      int v, sv, m, dx, dy;
      int r [16];
      logic [31:0] mu, ef;
      logic dup, e;

      // ---- drive ----
      lut_x = 8'($urandom);
      add_x = $urandom; add_y = $urandom;
      sub_x = $urandom; sub_y = (n % 2) ? $urandom : sub_x - 32'($urandom % 3);
      comp_x = $urandom; comp_y = (n % 3 == 0) ? comp_x : $urandom;
      eq_x = $urandom; eq_y = (n % 2) ? eq_x : eq_x ^ (32'h1 << ($urandom % 32));
      for (int i = 0; i < 8; i++) mux_a[i] = $urandom;
      mux_s = 3'(n);
      bitext_x = $urandom; bitext_y = $urandom;
      mul_x = $urandom; mul_y = (n % 4 == 0) ? 32'($urandom % 100) : $urandom;
      if (n % 4 == 0) mul_x = 32'($urandom % 1000);
      div_x = $urandom; div_y = (n % 10 == 0) ? 16'h0 : 16'($urandom >> ($urandom % 16));
      sbox_x = 8'(n);
      if (n % 50 == 1) begin
        aes_key = {$urandom, $urandom, $urandom, $urandom};
        aes_pt  = {$urandom, $urandom, $urandom, $urandom};
      end
      for (int i = 0; i < 16; i++) begin
        sort_a[i] = (n % 2) ? 16'($urandom) : 16'($urandom % 8);
        r[i] = int'(sort_a[i]);
      end
      dst_p[0] = $urandom; dst_p[1] = $urandom; dst_q[0] = $urandom; dst_q[1] = $urandom;
      v = (n % 2) ? int'($urandom) : int'($urandom % 200) - 100;
      relu_x0 = $urandom; relu_x1 = 32'(v) - relu_x0;
      sv = int'($urandom % 16384) - 8192;
      sig_x0 = $urandom; sig_x1 = 32'(sv) - sig_x0;
      for (int i = 0; i < 16; i++) pool_a[i] = $urandom;
      for (int i = 0; i < 32; i++) begin
        psi_a[i] = 32'($urandom % 64);
        psi_b[i] = 32'($urandom % 64);
      end
      fadd_a = rand_fp($urandom, 8'(n)); fadd_b = rand_fp($urandom, 8'(n)); fadd_sub = n[0];
      if (n % 25 == 7) begin fadd_b = fadd_a; fadd_sub = 1'b1; end
      fmul_a = rand_fp($urandom, 8'd2); fmul_b = rand_fp($urandom, 8'd60 + 8'(n % 8));
      if (n % 3 == 0) begin fmul_a = rand_fp($urandom, 8'd200); fmul_b = rand_fp($urandom, 8'd180); end
      #1;

      // ---- check ----
      check(longint'(lut_y), longint'(lut_tbl[lut_x]), "LUT");
      ev[EV_LUT]++;

      wide = longint'(add_x) + longint'(add_y);
      check(longint'(add_s), longint'(wide[32:0]), "ADD");
      if (add_s[32]) ev[EV_CARRY]++;

      check(longint'(sub_d[31:0]), longint'(32'(sub_x - sub_y)), "SUB difference");
      check(longint'(sub_d[32]), longint'(sub_x >= sub_y), "SUB carry");
      if (sub_x < sub_y) ev[EV_BORROW]++;

      check(longint'(comp_gt_o), longint'(comp_x > comp_y), "COMP");
      if (comp_x > comp_y) ev[EV_GT]++;

      check(longint'(eq_o), longint'(eq_x == eq_y), "EQ");
      if (eq_x == eq_y) ev[EV_EQ]++; else ev[EV_NEQ]++;

      check(longint'(mux_y), longint'(mux_a[mux_s]), $sformatf("MUX select %0d", mux_s));

      mu = bitext_x + bitext_y;
      check(longint'(bitext_msb), longint'(mu[31]), "BitExt");
      if (mu[31]) ev[EV_MSB]++;

      wide = longint'(mul_x) * longint'(mul_y);
      check(longint'(mul_p), longint'(wide[31:0]), "MUL");
      if (wide[63:32] != 0) ev[EV_MUL_WRAP]++;

      if (div_y == 0) begin
        check(longint'(div_q), 64'hFFFF, "DIV by zero");
        ev[EV_DIV0]++;
      end else begin
        check(longint'(div_q), longint'(div_x / div_y), "DIV quotient");
        check(longint'(div_r), longint'(div_x % div_y), "DIV remainder");
      end

      check(longint'(sbox_y), longint'(ref_sbox(sbox_x)), "S-box");

      if (n % 50 == 1) begin
        check128(aes_ct, ref_aes128(aes_key, aes_pt), "AES-128");
        ev[EV_AES]++;
      end

      dup = 1'b0;
      for (int i = 1; i < 16; i++) begin
        int t, j;
        t = r[i]; j = i - 1;
        while (j >= 0 && r[j] > t) begin r[j+1] = r[j]; j--; end
        r[j+1] = t;
      end
      for (int i = 0; i < 16; i++) begin
        check(longint'(sort_y[i]), longint'(r[i]), "SORT");
        if (i > 0 && r[i] == r[i-1]) dup = 1'b1;
      end
      if (dup) ev[EV_SORT_DUP]++;

      dx = int'(dst_p[0]) - int'(dst_q[0]); dy = int'(dst_p[1]) - int'(dst_q[1]);
      check(longint'(dst_d), longint'((dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy)), "DST_M");

      check(longint'(relu_y), (v > 0) ? longint'(v) : 0, "ReLU");
      if (v < 0) ev[EV_RELU_CLIP]++;

      if (sv < -2048) begin check(longint'(sig_y), 0, "Sigmoid low"); ev[EV_SIG_LO]++; end
      else if (sv < 2048) begin check(longint'(sig_y), longint'(sv + 2048), "Sigmoid mid"); ev[EV_SIG_MID]++; end
      else begin check(longint'(sig_y), 4096, "Sigmoid high"); ev[EV_SIG_HI]++; end

      m = int'(pool_a[0]);
      for (int i = 1; i < 16; i++) if (int'(pool_a[i]) > m) m = int'(pool_a[i]);
      mu = m;
      check(longint'(pool_y), longint'(mu), "Maxpool");

      for (int i = 0; i < 32; i++) begin
        e = 1'b0;
        for (int j = 0; j < 32; j++) if (psi_a[i] == psi_b[j]) e = 1'b1;
        check(longint'(psi_hit[i]), longint'(e), "PSI");
        if (e) ev[EV_PSI_HIT]++; else ev[EV_PSI_MISS]++;
      end

      ef = d2f(fadd_sub ? (f2d(fadd_a) - f2d(fadd_b)) : (f2d(fadd_a) + f2d(fadd_b)));
      check(longint'(fadd_y), longint'(ef), $sformatf("FP_ADD %h %h %b", fadd_a, fadd_b, fadd_sub));
      if (ef == 32'h0 && fadd_a[30:23] != 0) ev[EV_FP_CANCEL]++;
      if (is_nan(ef)) ev[EV_FP_NAN]++;

      ef = d2f(f2d(fmul_a) * f2d(fmul_b));
      check(longint'(fmul_y), longint'(ef), $sformatf("FP_MUL %h %h", fmul_a, fmul_b));
      if (ef[30:0] == 31'h7F80_0000 && fmul_a[30:23] != 8'hFF && fmul_b[30:23] != 8'hFF) ev[EV_FP_OVF]++;
      if (ef[30:0] == 31'h0 && fmul_a[30:23] != 0 && fmul_b[30:23] != 0) ev[EV_FP_UNF]++;
    end

    for (int i = 0; i < EV_NUM; i++) begin
      event_e evn;
      evn = event_e'(i);
      $display("event %-14s occurred %0d times", evn.name(), ev[i]);
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("FAIL event %s never occurred", evn.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
