// Testbench for psi: sets of 32 32-bit elements with a random number of
// planted common elements, against a direct membership search.
module tb_psi;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  int hits = 0, misses = 0;
  logic [31:0][31:0] a, b;
  logic [31:0] hit;

  psi dut (.a(a), .b(b), .hit(hit));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 32; i++) begin
        a[i] = $urandom; b[i] = $urandom;
      end
      for (int k = 0; k < n % 20; k++) b[$urandom % 32] = a[$urandom % 32];
      if (n % 10 == 3) for (int i = 0; i < 32; i++) begin a[i] = 32'($urandom % 40); b[i] = 32'($urandom % 40); end
      #1;
      for (int i = 0; i < 32; i++) begin
        logic e;
        e = 1'b0;
        for (int j = 0; j < 32; j++) if (a[i] == b[j]) e = 1'b1;
        if (e) hits++; else misses++;
        check(longint'(hit[i]), longint'(e), $sformatf("element %0d", i));
      end
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
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
