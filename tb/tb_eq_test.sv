// Testbench for eq_test: 32-bit words compared with themselves and with
// copies that differ in one random bit or at random, plus exhaustive 7-bit.
module tb_eq_test;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] x32, y32; logic e32;
  logic [6:0]  x7, y7;   logic e7;

  eq_test dut32 (.x(x32), .y(y32), .eq(e32));
  eq_test #(.W(7)) dut7 (.x(x7), .y(y7), .eq(e7));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x32 = $urandom;
      case (n % 3)
        0: y32 = x32;
        1: y32 = x32 ^ (32'h1 << ($urandom % 32));
        default: y32 = $urandom;
      endcase
      #1;
      check(longint'(e32), longint'(x32 == y32), $sformatf("32-bit %h %h", x32, y32));
    end
    for (int i = 0; i < 128; i++) for (int j = 0; j < 128; j++) begin
      x7 = 7'(i); y7 = 7'(j); #1;
      check(longint'(e7), longint'(i == j), $sformatf("7-bit %0d %0d", i, j));
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
