// Testbench for aes_encrypt: the two AES-128 example vectors of FIPS-197
// (Appendix B and Appendix C.1) and random keys and plaintexts against the
// reference cipher.
module tb_aes_encrypt;
  timeunit 1ns; timeprecision 1ps;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] key, pt, ct;

  aes_encrypt dut (.key(key), .pt(pt), .ct(ct));

  task automatic check128(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pt  = 128'h3243f6a8885a308d313198a2e0370734;
    #1 check128(ct, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 appendix B");
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt  = 128'h00112233445566778899aabbccddeeff;
    #1 check128(ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 appendix C.1");
    for (int n = 0; n < 40; n++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom, $urandom, $urandom};
      #1 check128(ct, ref_aes128(key, pt), "random");
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
