// tb_lsb_embed: several messages of 1..6 random ciphertext blocks, offered
// with random delays, embedded into a stream of random cover blocks with
// random back-pressure on the stego output. Each stego block is compared
// with a bit-queue reference: colour bytes in order R,G,B of pixels 0..3,
// low LSB_BITS bits replaced by the next message bits, most significant
// first, untouched once the message is exhausted. Also checks that the
// cover stream stalls while ciphertext is awaited, that blocks after the
// message pass through unchanged, and that done rises at the end.
`include "tb/tb_common.svh"
module tb_lsb_embed;
  import aes_pkg::*;
  localparam int unsigned L = 1;   // the default LSB_BITS of the module
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] msg_blocks;
  logic        cover_valid = 0, cover_ready, cipher_valid = 0, cipher_ready;
  logic        stego_valid, stego_ready = 0, done;
  pix2x2_t     cover_blk, stego_blk;
  block_t      cipher_data;
  bit          bq [$];
  pix2x2_t     cq [$];
  int          n_stall = 0, n_pass = 0, n_emb = 0;

  lsb_embed dut (.clk, .rst_n, .start, .msg_blocks, .cover_valid, .cover_ready,
    .cover_blk, .cipher_valid, .cipher_ready, .cipher_data, .stego_valid, .stego_ready,
    .stego_blk, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) stego_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && cover_valid && !cover_ready && !done && !start) n_stall++;
    if (rst_n && stego_valid && stego_ready) begin
      automatic pix2x2_t c = cq.pop_front();
      automatic pix2x2_t e = c;
      automatic bit      any = 0;
      for (int k = 0; k < 12; k++) begin
        if (bq.size() >= L) begin
          logic [7:0] v;
          v = pix_byte(c, k);
          for (int j = L - 1; j >= 0; j--) v[j] = bq.pop_front();
          case (k % 3)
            0: e.p[k/3].r = v;
            1: e.p[k/3].g = v;
            default: e.p[k/3].b = v;
          endcase
          any = 1;
        end
      end
      if (any) n_emb++; else n_pass++;
      `CHECK(stego_blk == e, $sformatf("stego block %h exp %h", stego_blk, e))
    end
  end

  task automatic message(int m, int n_cover);
    block_t cb [];
    cb = new[m];
    @(negedge clk);
    msg_blocks = 16'(m); start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < m; i++) begin
      cb[i] = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 127; b >= 0; b--) bq.push_back(cb[i][b]);
    end
    `CHECK(!done || m == 0, "done low after start")
    fork
      for (int i = 0; i < m; i++) begin
        repeat ($urandom_range(0, 25)) @(negedge clk);
        cipher_data = cb[i]; cipher_valid = 1;
        #1;
        while (!cipher_ready) @(negedge clk);
        @(negedge clk);
        cipher_valid = 0;
      end
      for (int i = 0; i < n_cover; i++) begin
        pix2x2_t p;
        p = {$urandom, $urandom, $urandom};
        cover_blk = p; cover_valid = 1;
        #1;
        while (!cover_ready) @(negedge clk);
        cq.push_back(p);
        @(negedge clk);
        cover_valid = 0;
      end
    join
    repeat (10) @(negedge clk);
    `CHECK(done, "done after message")
    `CHECK(bq.size() == 0, $sformatf("%0d bits not embedded", bq.size()))
    `CHECK(cq.size() == 0, "all stego blocks out")
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    message(1, 20);
    message(3, 40);
    message(6, 80);
    message(2, 25);
    `CHECK(n_stall > 0, "cover stream stalled for ciphertext")
    `CHECK(n_pass > 0, "pass-through after the message")
    `CHECK(n_emb > 0, "blocks embedded")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
