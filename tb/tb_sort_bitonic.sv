// Testbench for sort_bitonic: 16 random 16-bit keys (default size), keys
// drawn from a small range so that duplicates occur, and an 4-key instance.
// The reference is an insertion sort.
module tb_sort_bitonic;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [15:0][15:0] a, y;
  logic [3:0][7:0]   a4, y4;

  sort_bitonic dut (.a(a), .y(y));
  sort_bitonic #(.N(4), .W(8)) dut4 (.a(a4), .y(y4));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int r [16];
      for (int i = 0; i < 16; i++) begin
        a[i] = (n % 2 == 0) ? 16'($urandom) : 16'($urandom % 6);
        r[i] = int'(a[i]);
        if (i < 4) a4[i] = 8'($urandom);
      end
      for (int i = 1; i < 16; i++) begin
        int v, j;
        v = r[i]; j = i - 1;
        while (j >= 0 && r[j] > v) begin r[j+1] = r[j]; j--; end
        r[j+1] = v;
      end
      #1;
      for (int i = 0; i < 16; i++) check(longint'(y[i]), longint'(r[i]), $sformatf("position %0d", i));
      for (int i = 0; i < 3; i++) check(longint'(y4[i] <= y4[i+1]), 1, "4-key order");
      check(longint'(y4[0]) + y4[1] + y4[2] + y4[3], longint'(a4[0]) + a4[1] + a4[2] + a4[3], "4-key sum");
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
