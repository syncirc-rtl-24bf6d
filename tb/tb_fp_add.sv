// Testbench for fp_add: binary32 addition and subtraction on random operands (same-exponent pairs
// for cancellation, values near underflow and overflow, zeros, subnormals,
// infinities and NaNs) against the double-precision reference.
module tb_fp_add;
  timeunit 1ns; timeprecision 1ps;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y, e;
  logic sub;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a = 32'h3F80_0000; b = 32'h4000_0000; sub = 1'b0;
    #1 check(longint'(y), longint'(32'h4040_0000), "1.0 and 2.0");
    for (int n = 0; n < 50000; n++) begin
      logic [7:0] h;
      h = 8'($urandom);
      a = rand_fp($urandom, h);
      b = rand_fp($urandom, h);
      sub = n[0];
      e = d2f(sub ? (f2d(a) - f2d(b)) : (f2d(a) + f2d(b)));
      #1;
      check(longint'(y), longint'(e), $sformatf("%h %h", a, b));
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
