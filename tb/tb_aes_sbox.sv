// tb_aes_sbox: checks all 256 entries of aes_sbox (S, {02}.S, {03}.S)
// against a log/antilog reference and a few FIPS-197 table values.
`include "tb/tb_common.svh"
module tb_aes_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, s, s2, s3;

  aes_sbox dut (.a, .s, .s2, .s3);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      `CHECK(s  == 8'(sbox(i)),             $sformatf("S(%02h)=%02h", i, s))
      `CHECK(s2 == 8'(mul(sbox(i), 2)),     $sformatf("2S(%02h)=%02h", i, s2))
      `CHECK(s3 == 8'(mul(sbox(i), 3)),     $sformatf("3S(%02h)=%02h", i, s3))
    end
    // spot values of the published table
    a = 8'h00; #1; `CHECK(s == 8'h63, "S(00)")
    a = 8'h53; #1; `CHECK(s == 8'hed, "S(53)")
    a = 8'hff; #1; `CHECK(s == 8'h16, "S(ff)")
    a = 8'h10; #1; `CHECK(s == 8'hca, "S(10)")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
