// Testbench for sc_and: exhaustive check of the AND2, AND3 and AND4 cells
// against a bit-by-bit loop.
module tb_sc_and;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic [3:0] a4; logic [2:0] a3; logic [1:0] a2;
  logic y4, y3, y2;

  sc_and #(.N(4)) dut4 (.a(a4), .y(y4));
  sc_and #(.N(3)) dut3 (.a(a3), .y(y3));
  sc_and #(.N(2)) dut2 (.a(a2), .y(y2));

  function automatic logic ref_and(input logic [3:0] v, input int n);
    logic r = 1'b1;
    for (int i = 0; i < n; i++) if (v[i] == 1'b0) r = 1'b0;
    return r;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      a4 = 4'(v); a3 = 3'(v); a2 = 2'(v);
      #1;
      check(y4, ref_and(4'(v), 4), $sformatf("AND4 %b", a4));
      check(y3, ref_and(4'(v), 3), $sformatf("AND3 %b", a3));
      check(y2, ref_and(4'(v), 2), $sformatf("AND2 %b", a2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
