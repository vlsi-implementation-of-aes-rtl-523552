// tb_aes_enc_round: one encryption round against the FIPS-197 Appendix B
// trace (round 1 and the final round) and against the step-by-step
// reference round on random states and keys, with and without MixColumns.
`include "tb/tb_common.svh"
module tb_aes_enc_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] st, rk, so;
  logic         last;

  aes_enc_round dut (.state_i(st), .rkey(rk), .last, .state_o(so));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    last = 0; #1;
    `CHECK(so == 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS round 1")
    st = 128'heb40f21e592e38848ba113e71bc342d2;
    rk = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
    last = 1; #1;
    `CHECK(so == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS round 10")
    for (int i = 0; i < 400; i++) begin
      st = rand128(); rk = rand128(); last = i[0];
      #1;
      `CHECK(so == enc_round(st, rk, last), $sformatf("random round %0d", i))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
