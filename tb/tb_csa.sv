// Testbench for csa: for random words, each bit position must satisfy
// a + b + c = s + 2 co, and the words must satisfy a + b + c = s + 2 co as
// integers.
module tb_csa;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, s, co;

  csa dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (n < 8) begin a = {32{n[0]}}; b = {32{n[1]}}; c = {32{n[2]}}; end
      #1;
      for (int i = 0; i < 32; i++) begin
        check(longint'(s[i]) + 2 * longint'(co[i]), longint'(a[i]) + longint'(b[i]) + longint'(c[i]),
              $sformatf("bit %0d", i));
      end
      check(longint'(s) + 2 * longint'(co), longint'(a) + longint'(b) + longint'(c), "word sum");
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
