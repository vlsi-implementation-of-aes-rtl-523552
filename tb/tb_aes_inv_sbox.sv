// tb_aes_inv_sbox: checks all 256 entries of aes_inv_sbox against the
// reference inverse table and FIPS-197 values.
`include "tb/tb_common.svh"
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, s;

  aes_inv_sbox dut (.a, .s);

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
      `CHECK(s == 8'(inv_sbox(i)), $sformatf("InvS(%02h)=%02h", i, s))
      `CHECK(8'(sbox(s)) == a,     $sformatf("S(InvS(%02h))", i))
    end
    a = 8'h00; #1; `CHECK(s == 8'h52, "InvS(00)")
    a = 8'hff; #1; `CHECK(s == 8'h7d, "InvS(ff)")
    a = 8'h63; #1; `CHECK(s == 8'h00, "InvS(63)")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
