// Testbench for mux_n: every select value for 8:1 (default), 2:1, 4:1, 5:1
// (padded), 16:1 and 32:1 multiplexers on random data words.
module tb_mux_n;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic [7:0][31:0]  a8;  logic [2:0] s8;  logic [31:0] y8;
  logic [1:0][31:0]  a2;  logic       s2;  logic [31:0] y2;
  logic [3:0][31:0]  a4;  logic [1:0] s4;  logic [31:0] y4;
  logic [4:0][31:0]  a5;  logic [2:0] s5;  logic [31:0] y5;
  logic [15:0][31:0] a16; logic [3:0] s16; logic [31:0] y16;
  logic [31:0][31:0] a32; logic [4:0] s32; logic [31:0] y32;

  mux_n dut8 (.a(a8), .s(s8), .y(y8));
  mux_n #(.N(2))  dut2  (.a(a2),  .s(s2),  .y(y2));
  mux_n #(.N(4))  dut4  (.a(a4),  .s(s4),  .y(y4));
  mux_n #(.N(5))  dut5  (.a(a5),  .s(s5),  .y(y5));
  mux_n #(.N(16)) dut16 (.a(a16), .s(s16), .y(y16));
  mux_n #(.N(32)) dut32 (.a(a32), .s(s32), .y(y32));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 32; i++) begin
        a32[i] = $urandom;
        if (i < 16) a16[i] = $urandom;
        if (i < 8)  a8[i]  = $urandom;
        if (i < 5)  a5[i]  = $urandom;
        if (i < 4)  a4[i]  = $urandom;
        if (i < 2)  a2[i]  = $urandom;
      end
      for (int s = 0; s < 32; s++) begin
        s32 = 5'(s); s16 = 4'(s); s8 = 3'(s); s5 = 3'(s); s4 = 2'(s); s2 = 1'(s);
        #1;
        check(longint'(y32), longint'(a32[s]), $sformatf("32:1 sel %0d", s));
        if (s < 16) check(longint'(y16), longint'(a16[s]), $sformatf("16:1 sel %0d", s));
        if (s < 8)  check(longint'(y8),  longint'(a8[s]),  $sformatf("8:1 sel %0d", s));
        if (s < 8)  check(longint'(y5),  (s < 5) ? longint'(a5[s]) : 0, $sformatf("5:1 sel %0d", s));
        if (s < 4)  check(longint'(y4),  longint'(a4[s]),  $sformatf("4:1 sel %0d", s));
        if (s < 2)  check(longint'(y2),  longint'(a2[s]),  $sformatf("2:1 sel %0d", s));
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
