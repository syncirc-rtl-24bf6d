// Testbench for sub_clf: random and corner operands at the default 32 bits,
// exhaustive 8-bit operands, and a 5-bit width that is not a power of four.
// The reference is 64-bit integer arithmetic; for subtraction the top
// result bit is the carry out, 1 when x >= y.
module tb_sub_clf;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic [31:0] x32, y32; logic [32:0] o32;
  logic [7:0]  x8, y8;   logic [8:0]  o8;
  logic [4:0]  x5, y5;   logic [5:0]  o5;

  sub_clf dut32 (.x(x32), .y(y32), .d(o32));
  sub_clf #(.W(8)) dut8 (.x(x8), .y(y8), .d(o8));
  sub_clf #(.W(5)) dut5 (.x(x5), .y(y5), .d(o5));

  function automatic longint ref_op(input longint xx, input longint yy, input int w);
    longint r;
    r = (longint'(xx) - longint'(yy)) + (longint'(1) << w);
    return r & ((longint'(1) << (w + 1)) - 1);
  endfunction

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1, 32'h5555_5555};
    foreach (corners[i]) foreach (corners[j]) begin
      x32 = corners[i]; y32 = corners[j]; #1;
      check(longint'(o32), ref_op(longint'(x32), longint'(y32), 32), "32-bit corner");
    end
    for (int n = 0; n < 20000; n++) begin
      x32 = $urandom; y32 = $urandom;
      if (n % 4 == 1) y32 = ~x32;
      if (n % 4 == 2) y32 = x32;
      #1;
      check(longint'(o32), ref_op(longint'(x32), longint'(y32), 32), $sformatf("32-bit %h %h", x32, y32));
    end
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j++) begin
      x8 = 8'(i); y8 = 8'(j); #1;
      check(longint'(o8), ref_op(longint'(i), longint'(j), 8), $sformatf("8-bit %0d %0d", i, j));
    end
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) begin
      x5 = 5'(i); y5 = 5'(j); #1;
      check(longint'(o5), ref_op(longint'(i), longint'(j), 5), $sformatf("5-bit %0d %0d", i, j));
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
