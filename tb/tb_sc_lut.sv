// Testbench for sc_lut: random truth tables, every index, at the default
// 8-input 8-output size and at a 3-input 2-output size.
module tb_sc_lut;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic [255:0][7:0] tbl;
  logic [7:0] x, y;
  logic [7:0][1:0] tbl_s;
  logic [2:0] xs;
  logic [1:0] ys;

  sc_lut dut (.tbl(tbl), .x(x), .y(y));
  sc_lut #(.DELTA(3), .SIGMA(2)) dut_s (.tbl(tbl_s), .x(xs), .y(ys));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 256; i++) tbl[i] = 8'($urandom);
      for (int i = 0; i < 8; i++) tbl_s[i] = 2'($urandom);
      for (int i = 0; i < 256; i++) begin
        x = 8'(i); xs = 3'(i);
        #1;
        check(y, tbl[i], $sformatf("8x8 LUT index %0d", i));
        if (i < 8) check({6'b0, ys}, {6'b0, tbl_s[i]}, $sformatf("3x2 LUT index %0d", i));
      end
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
