// Testbench for mul_clf: random and corner 32-bit operands, exhaustive 8-bit,
// and random 48-bit operands (the width the floating-point multiplier uses).
// The reference is integer multiplication truncated to W bits.
module tb_mul_clf;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] x32, y32, p32;
  logic [7:0]  x8, y8, p8;
  logic [47:0] x48, y48, p48;
  logic [2:0]  x3, y3, p3;

  mul_clf dut32 (.x(x32), .y(y32), .p(p32));
  mul_clf #(.W(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  mul_clf #(.W(48)) dut48 (.x(x48), .y(y48), .p(p48));
  mul_clf #(.W(3))  dut3  (.x(x3),  .y(y3),  .p(p3));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      x32 = $urandom; y32 = $urandom;
      x48 = {16'($urandom), 32'($urandom)}; y48 = {16'($urandom), 32'($urandom)};
      if (n == 0) begin x32 = '1; y32 = '1; x48 = '1; y48 = '1; end
      #1;
      check(longint'(p32), longint'(32'(x32 * y32)), $sformatf("32-bit %h %h", x32, y32));
      check(longint'(p48), longint'(48'(x48 * y48)), $sformatf("48-bit %h %h", x48, y48));
    end
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j++) begin
      x8 = 8'(i); y8 = 8'(j); x3 = 3'(i); y3 = 3'(j); #1;
      check(longint'(p8), longint'((i * j) & 255), $sformatf("8-bit %0d %0d", i, j));
      if (i < 8 && j < 8) check(longint'(p3), longint'((i * j) & 7), "3-bit");
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
