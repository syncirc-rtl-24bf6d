// Testbench for maxpool: 16 random signed 32-bit values (default size),
// all-negative sets, sets with equal values, and a 5-value instance that
// exercises the padding.
module tb_maxpool;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [15:0][31:0] a; logic [31:0] y;
  logic [4:0][7:0]   a5; logic [7:0] y5;

  maxpool dut (.a(a), .y(y));
  maxpool #(.N(5), .W(8)) dut5 (.a(a5), .y(y5));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int m; byte m5;
      logic [31:0] mu; logic [7:0] mu5;
      m = 32'h8000_0000; m5 = -128;
      for (int i = 0; i < 16; i++) begin
        a[i] = $urandom;
        if (n % 3 == 1) a[i] = -(32'($urandom % 1000) + 1);
        if (n % 3 == 2) a[i] = 32'(int'($urandom % 5) - 2);
        if (int'(a[i]) > m) m = int'(a[i]);
        if (i < 5) begin
          a5[i] = 8'($urandom);
          if ($signed(a5[i]) > m5) m5 = $signed(a5[i]);
        end
      end
      #1;
      mu = m; mu5 = m5;
      check(longint'(y), longint'(mu), "max of 16");
      check(longint'(y5), longint'(mu5), "max of 5");
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
