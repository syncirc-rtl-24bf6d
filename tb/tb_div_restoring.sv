// Testbench for div_restoring: random 16-bit operands (default width),
// division by zero and by one, and exhaustive 8-bit operands. The reference
// is integer division; division by zero must give an all-ones quotient and
// the dividend as remainder.
module tb_div_restoring;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [15:0] x16, y16, q16, r16;
  logic [7:0]  x8, y8, q8, r8;

  div_restoring dut16 (.x(x16), .y(y16), .q(q16), .r(r16));
  div_restoring #(.W(8)) dut8 (.x(x8), .y(y8), .q(q8), .r(r8));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x16 = $urandom; y16 = $urandom;
      if (n % 4 == 1) y16 = 16'($urandom % 256);
      if (n % 4 == 2) y16 = 16'($urandom % 16);
      if (n == 3) y16 = 0;
      if (n == 5) y16 = 1;
      #1;
      if (y16 == 0) begin
        check(longint'(q16), 64'hFFFF, "16-bit divide by zero quotient");
        check(longint'(r16), longint'(x16), "16-bit divide by zero remainder");
      end else begin
        check(longint'(q16), longint'(x16 / y16), $sformatf("16-bit q %0d/%0d", x16, y16));
        check(longint'(r16), longint'(x16 % y16), $sformatf("16-bit r %0d/%0d", x16, y16));
      end
    end
    for (int i = 0; i < 256; i++) for (int j = 1; j < 256; j++) begin
      x8 = 8'(i); y8 = 8'(j); #1;
      check(longint'(q8), longint'(i / j), $sformatf("8-bit %0d/%0d", i, j));
      check(longint'(r8), longint'(i % j), $sformatf("8-bit %0d %% %0d", i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
