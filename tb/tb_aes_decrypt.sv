// tb_aes_decrypt: the AES-128 decryption core with round keys from the reference
// key schedule. FIPS-197 Appendix C.1 vector, then random blocks under
// random keys compared with the reference cipher, with random out_ready
// back-pressure. Checks the latency: out_valid exactly 10 cycles after the
// input handshake, and that in_ready stays low while a block is in flight.
`include "tb/tb_common.svh"
module tb_aes_decrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 0, keys_ready = 0;
  logic   in_valid = 0, in_ready, out_valid, out_ready = 0;
  block_t in_data, out_data, key;
  rkeys_t rkeys;
  logic [127:0] rk [11];

  aes_decrypt dut (.clk, .rst_n, .rkeys, .keys_ready, .in_valid, .in_ready, .in_data,
               .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_key(block_t k);
    key = k;
    key_schedule(k, rk);
    for (int r = 0; r < 11; r++) rkeys[r] = rk[r];
  endtask

  // sends one block, returns the result; checks the latency
  task automatic one(block_t x, output block_t y);
    int n;
    @(negedge clk);
    in_data = x; in_valid = 1;
    #1;
    while (!in_ready) @(negedge clk);
    @(negedge clk); in_valid = 0;
    n = 0;   // clock edges after the accepting edge
    while (!out_valid && n < 100) begin
      `CHECK(!in_ready, "in_ready low while busy")
      @(negedge clk); n++;
    end
    `CHECK(n == 10, $sformatf("latency %0d cycles", n))
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      `CHECK(out_valid, "out_valid held until out_ready")
    end
    y = out_data;
    out_ready = 1;
    @(negedge clk); out_ready = 0;
  endtask

  initial begin
    block_t x, y;
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(!in_ready, "in_ready low until keys are ready")
    keys_ready = 1;
    one(128'h69c4e0d86a7b0430d8cdb78070b4c55a, y);
    `CHECK(y == 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1")
    for (int i = 0; i < 100; i++) begin
      if (i % 10 == 0) set_key(rand128());
      x = rand128();
      one(x, y);
      `CHECK(encrypt(y, key) == x, $sformatf("random block %0d", i))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
