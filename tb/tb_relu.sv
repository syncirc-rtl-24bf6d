// Testbench for relu: random values split into two random additive shares,
// including zero, the extremes and values close to zero.
module tb_relu;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] x0, x1, y;

  relu dut (.x0(x0), .x1(x1), .y(y));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int v;
      v = $urandom;
      if (n % 3 == 1) v = int'($urandom % 9) - 4;
      if (n == 0) v = 0;
      if (n == 2) v = 32'h8000_0000;
      if (n == 4) v = 32'h7FFF_FFFF;
      x0 = $urandom;
      x1 = 32'(v) - x0;
      #1;
      check(longint'(y), (v > 0) ? longint'(v) : 0, $sformatf("value %0d", v));
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
