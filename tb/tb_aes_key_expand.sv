// tb_aes_key_expand: round keys of the FIPS-197 Appendix A.1 key and of
// random keys against the reference key schedule; checks that keys_ready
// rises exactly 10 cycles after key_valid and that busy covers that time.
`include "tb/tb_common.svh"
module tb_aes_key_expand;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 0, key_valid = 0, busy, keys_ready;
  block_t key;
  rkeys_t rkeys;
  logic [127:0] ref_rk [11];

  aes_key_expand dut (.clk, .rst_n, .key_valid, .key, .busy, .keys_ready, .rkeys);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(block_t k);
    int n = 0;
    @(negedge clk); key = k; key_valid = 1;
    @(negedge clk); key_valid = 0;
    `CHECK(busy && !keys_ready, "busy after key_valid")
    n = 0;   // clock edges after the accepting edge
    while (!keys_ready && n < 50) begin @(negedge clk); n++; end
    `CHECK(n == 10, $sformatf("keys_ready after %0d cycles", n))
    `CHECK(!busy, "busy cleared")
    key_schedule(k, ref_rk);
    for (int r = 0; r < 11; r++)
      `CHECK(rkeys[r] == ref_rk[r], $sformatf("round key %0d", r))
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    `CHECK(rkeys[1]  == 128'ha0fafe1788542cb123a339392a6c7605, "FIPS w[4..7]")
    `CHECK(rkeys[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS w[40..43]")
    for (int i = 0; i < 20; i++) run(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
