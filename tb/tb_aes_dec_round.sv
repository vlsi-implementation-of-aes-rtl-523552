// tb_aes_dec_round: one inverse round against the step-by-step reference on
// random data, and as the inverse of an encryption final round: with
// y = enc_round(x, k, last) ^ k, aes_dec_round(y, k2, last) must be x ^ k2.
`include "tb/tb_common.svh"
module tb_aes_dec_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] st, rk, so, x;
  logic         last;

  aes_dec_round dut (.state_i(st), .rkey(rk), .last, .state_o(so));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // final FIPS round undone: ciphertext back to the start of round 10
    st = 128'h3925841d02dc09fbdc118597196a0b32 ^ 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
    rk = '0;
    last = 1; #1;
    `CHECK(so == 128'heb40f21e592e38848ba113e71bc342d2, "undo FIPS round 10")
    for (int i = 0; i < 400; i++) begin
      st = rand128(); rk = rand128(); last = i[0];
      #1;
      `CHECK(so == dec_round(st, rk, last), $sformatf("random round %0d", i))
    end
    // last-round inverse property on random data
    for (int i = 0; i < 50; i++) begin
      x = rand128(); rk = rand128();
      st = enc_round(x, rk, 1) ^ rk; rk = rand128(); last = 1; #1;
      `CHECK(so == (x ^ rk), $sformatf("inverse of final round %0d", i))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
