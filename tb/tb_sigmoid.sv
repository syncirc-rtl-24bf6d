// Testbench for sigmoid: fixed-point values with 12 fractional bits spread
// over the three regions and their boundaries, split into random shares.
module tb_sigmoid;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  int cnt_lo = 0, cnt_mid = 0, cnt_hi = 0;
  logic [31:0] x0, x1, y;

  sigmoid dut (.x0(x0), .x1(x1), .y(y));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int v, e;
      v = int'($urandom % 16384) - 8192;        // -2.0 .. 2.0
      if (n % 7 == 0) v = int'($urandom % 2000000) - 1000000;
      if (n % 11 == 0) v = (n % 2 == 0) ? 2048 + int'($urandom % 3) - 1 : -2048 + int'($urandom % 3) - 1;
      if (v < -2048)     begin e = 0;        cnt_lo++;  end
      else if (v < 2048) begin e = v + 2048; cnt_mid++; end
      else               begin e = 4096;     cnt_hi++;  end
      x0 = $urandom;
      x1 = 32'(v) - x0;
      #1;
      check(longint'(y), longint'(e), $sformatf("x = %0d/4096", v));
    end
    checks++;
    if (cnt_lo == 0 || cnt_mid == 0 || cnt_hi == 0) failures++;
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
