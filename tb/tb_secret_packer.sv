// tb_secret_packer: messages of random length (1..70 bytes) with random
// gaps on the input and random back-pressure on the output; every block must
// carry the message bytes in order, zero-padded after the last byte, with
// blk_padded set exactly on a short final block.
`include "tb/tb_common.svh"
module tb_secret_packer;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 0;
  logic   byte_valid = 0, byte_ready, byte_last = 0, blk_valid, blk_ready = 0, blk_padded;
  byte_t  byte_data;
  block_t blk_data;
  byte unsigned msg [$];
  int     n_blocks_seen, n_padded;

  secret_packer dut (.clk, .rst_n, .byte_valid, .byte_ready, .byte_data, .byte_last,
                     .blk_valid, .blk_ready, .blk_data, .blk_padded);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: random ready, compare with the expected block
  int exp_idx = 0;          // next message byte expected
  always @(posedge clk) begin
    blk_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) begin
    if (rst_n && blk_valid && blk_ready) begin
      automatic block_t e = '0;
      automatic int     nb = 0;
      for (int i = 0; i < 16; i++)
        if (exp_idx + i < msg.size()) begin
          e[127 - 8*i -: 8] = msg[exp_idx + i];
          nb++;
        end
      `CHECK(blk_data == e, $sformatf("block at byte %0d: %h", exp_idx, blk_data))
      `CHECK(blk_padded == (nb < 16), "blk_padded flag")
      if (nb < 16) n_padded++;
      exp_idx += nb;
      n_blocks_seen++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 30; m++) begin
      automatic int len = (m == 0) ? 32 : $urandom_range(1, 70);
      msg.delete();
      exp_idx = 0;
      n_blocks_seen = 0;
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      for (int i = 0; i < len; i++) begin
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        byte_valid = 1; byte_data = msg[i]; byte_last = (i == len - 1);
        #1;
        while (!byte_ready) @(negedge clk);
        @(negedge clk);
        byte_valid = 0; byte_last = 0;
      end
      repeat (30) @(negedge clk);
      `CHECK(exp_idx == len, $sformatf("all %0d bytes delivered (%0d)", len, exp_idx))
      `CHECK(n_blocks_seen == (len + 15) / 16, "block count")
    end
    `CHECK(n_padded > 0, "padding exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
