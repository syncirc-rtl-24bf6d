// Testbench for comp_gt: 32-bit random operands (many sharing a long common
// prefix so that low groups decide), exhaustive 8-bit and 5-bit operands.
module tb_comp_gt;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] x32, y32; logic g32;
  logic [7:0]  x8, y8;   logic g8;
  logic [4:0]  x5, y5;   logic g5;

  comp_gt dut32 (.x(x32), .y(y32), .gt(g32));
  comp_gt #(.W(8)) dut8 (.x(x8), .y(y8), .gt(g8));
  comp_gt #(.W(5)) dut5 (.x(x5), .y(y5), .gt(g5));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int k;
      x32 = $urandom; y32 = $urandom;
      k = n % 33;                       // keep the top k bits equal
      if (k > 0) y32 = (x32 & ~(32'hFFFF_FFFF >> k)) | (y32 & (32'hFFFF_FFFF >> k));
      #1;
      check(longint'(g32), longint'(x32 > y32), $sformatf("32-bit %h %h", x32, y32));
    end
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j++) begin
      x8 = 8'(i); y8 = 8'(j); x5 = 5'(i); y5 = 5'(j); #1;
      check(longint'(g8), longint'(i > j), $sformatf("8-bit %0d %0d", i, j));
      if (i < 32 && j < 32) check(longint'(g5), longint'(i > j), $sformatf("5-bit %0d %0d", i, j));
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
