// Testbench for aes_sbox: all 256 inputs against the reference S-box, plus
// three published table entries.
module tb_aes_sbox;
  timeunit 1ns; timeprecision 1ps;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] x, y;

  aes_sbox dut (.x(x), .y(y));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1;
      check(longint'(y), longint'(ref_sbox(8'(i))), $sformatf("S(%h)", x));
      if (i == 8'h00) check(longint'(y), 64'h63, "S(00) = 63");
      if (i == 8'h01) check(longint'(y), 64'h7C, "S(01) = 7c");
      if (i == 8'h53) check(longint'(y), 64'hED, "S(53) = ed");
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
