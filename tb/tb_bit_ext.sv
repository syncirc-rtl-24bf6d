// Testbench for bit_ext: the MSB of x + y mod 2^W, for random 32-bit shares
// (including pairs whose sum is near a sign change) and exhaustive 8-bit.
module tb_bit_ext;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] x32, y32; logic m32;
  logic [7:0]  x8, y8;   logic m8;
  logic [1:0]  x2, y2;   logic m2;

  bit_ext dut32 (.x(x32), .y(y32), .msb(m32));
  bit_ext #(.W(8)) dut8 (.x(x8), .y(y8), .msb(m8));
  bit_ext #(.W(2)) dut2 (.x(x2), .y(y2), .msb(m2));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] sum;
      x32 = $urandom; y32 = $urandom;
      if (n % 2 == 1) y32 = (32'h8000_0000 - x32) + 32'(int'($urandom % 5) - 2);
      sum = x32 + y32;
      #1;
      check(longint'(m32), longint'(sum[31]), $sformatf("32-bit %h %h", x32, y32));
    end
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j++) begin
      logic [7:0] s8;
      x8 = 8'(i); y8 = 8'(j); x2 = 2'(i); y2 = 2'(j); s8 = 8'(i + j); #1;
      check(longint'(m8), longint'(s8[7]), $sformatf("8-bit %0d %0d", i, j));
      if (i < 4 && j < 4) check(longint'(m2), longint'(((i + j) >> 1) & 1), "2-bit");
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
