// Testbench for dst_manhattan: random 16-bit points, equal points and the
// largest distance, against integer arithmetic.
module tb_dst_manhattan;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [1:0][15:0] p, q;
  logic [16:0] d;

  dst_manhattan dut (.p(p), .q(q), .d(d));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int dx, dy;
      p[0] = $urandom; p[1] = $urandom; q[0] = $urandom; q[1] = $urandom;
      if (n == 0) q = p;
      if (n == 1) begin p = '0; q = '1; end
      if (n % 5 == 2) q[0] = p[0];
      dx = int'(p[0]) - int'(q[0]); dy = int'(p[1]) - int'(q[1]);
      if (dx < 0) dx = -dx;
      if (dy < 0) dy = -dy;
      #1;
      check(longint'(d), longint'(dx + dy), $sformatf("p=%h,%h q=%h,%h", p[0], p[1], q[0], q[1]));
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
