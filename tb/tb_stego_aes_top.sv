// tb_stego_aes_top: end-to-end test of the whole hiding and recovery chain
// at the design's default parameters.
//
// Two complete operations, each with its own key: a 37-byte message (three
// AES blocks, the last zero-padded) hidden in a 16x16 RGB image, then a
// 1024-byte message (64 blocks) hidden in a 64x64 RGB image. For each:
//   - the image is streamed as 2x2 blocks and the secret bytes in parallel,
//     both with random gaps, and the stego output taken with random
//     back-pressure;
//   - the sub-band coefficients seen on coef are checked against the
//     reference Haar lifting;
//   - every stego block is checked against a reference built from the
//     reference AES-128 encryption of the padded message;
//   - the stego image and the original are streamed into the recovery side;
//     the recovered blocks must equal the padded message, and sse, n_bytes
//     and n_diff must equal sums kept by the testbench.
// Each mechanism is counted (key expansion, cover stall while ciphertext is
// awaited, zero padding, pass-through after the message, coefficient output,
// decryption, measured distortion) and one that never happened is a failure.
`include "tb/tb_common.svh"
module tb_stego_aes_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        key_valid = 0, keys_ready, keys_busy;
  block_t      key;
  logic        start = 0;
  logic [15:0] msg_blocks = '0;
  logic        secret_valid = 0, secret_ready, secret_last = 0, padded_blk;
  byte_t       secret_byte;
  logic        cover_valid = 0, cover_ready;
  pix2x2_t     cover_blk;
  logic        coef_valid;
  coef_blk_t   coef;
  logic        stego_valid, stego_ready = 0, embed_done;
  pix2x2_t     stego_blk;
  logic        rx_valid = 0, rx_ready;
  pix2x2_t     rx_stego, rx_orig;
  logic        recov_valid, recov_ready = 0;
  block_t      recov_data;
  logic [47:0] sse;
  logic [31:0] n_bytes, n_diff;

  stego_aes_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bookkeeping
  int n_keyexp = 0, n_stall = 0, n_pad = 0, n_pass = 0, n_coef = 0, n_recov = 0, n_dist = 0;
  pix2x2_t cover_q [$];     // blocks sent, awaiting their coefficients
  pix2x2_t stego_q [$];     // stego blocks received
  block_t  recov_q [$];
  bit      hs_on = 0;       // sinks active

  always @(posedge clk) if (keys_busy) n_keyexp++;
  always @(posedge clk) if (padded_blk) n_pad++;
  always @(posedge clk)
    if (cover_valid && !cover_ready && !embed_done && !(stego_valid && !stego_ready)) n_stall++;

  always @(posedge clk) begin
    stego_ready <= hs_on && ($urandom_range(0, 4) != 0);
    recov_ready <= hs_on && ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && stego_valid && stego_ready) begin
      stego_q.push_back(stego_blk);
      if (embed_done) n_pass++;
    end
    if (rst_n && recov_valid && recov_ready) recov_q.push_back(recov_data);
    if (rst_n && coef_valid && dut.cf_ready) begin
      automatic pix2x2_t p = cover_q.pop_front();
      int ll, hl, lh, hh;
      haar_fwd(p.p[0].g, p.p[1].g, p.p[2].g, p.p[3].g, ll, hl, lh, hh);
      `CHECK(int'(coef.g.ll) == ll && int'(coef.g.hl) == hl && int'(coef.g.lh) == lh
             && int'(coef.g.hh) == hh, "G sub-band coefficients")
      haar_fwd(p.p[0].r, p.p[1].r, p.p[2].r, p.p[3].r, ll, hl, lh, hh);
      `CHECK(int'(coef.r.ll) == ll && int'(coef.r.hh) == hh, "R sub-band coefficients")
      n_coef++;
    end
  end

  // ------------------------------------------------------------ operation
  task automatic operation(block_t k, int msg_len, int w, int h);
    byte unsigned msg [];
    block_t       pt [];
    bit           bits [$];
    pix2x2_t      img [];
    int           nblk = (msg_len + 15) / 16;
    int           npix = (w / 2) * (h / 2);
    int           t0, t_end;
    longint       e_sse = 0;
    int           e_diff = 0;

    // key
    @(negedge clk);
    key = k; key_valid = 1;
    @(negedge clk);
    key_valid = 0;
    while (!keys_ready) @(negedge clk);

    // message and its padded blocks, reference ciphertext bits
    msg = new[msg_len];
    pt  = new[nblk];
    foreach (msg[i]) msg[i] = 8'($urandom_range(32, 126));
    for (int b = 0; b < nblk; b++) begin
      pt[b] = '0;
      for (int i = 0; i < 16; i++)
        if (16*b + i < msg_len) pt[b][127 - 8*i -: 8] = msg[16*b + i];
      begin
        block_t ct = encrypt(pt[b], k);
        for (int j = 127; j >= 0; j--) bits.push_back(ct[j]);
      end
    end

    // image: 2x2 blocks in raster order of blocks
    img = new[npix];
    foreach (img[i]) img[i] = {$urandom, $urandom, $urandom};

    @(negedge clk);
    msg_blocks = 16'(nblk); start = 1;
    @(negedge clk);
    start = 0;
    stego_q.delete(); recov_q.delete();
    hs_on = 1;
    t0 = $time;

    fork
      for (int i = 0; i < msg_len; i++) begin
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        secret_byte = msg[i]; secret_last = (i == msg_len - 1); secret_valid = 1;
        #1;
        while (!secret_ready) @(negedge clk);
        @(negedge clk);
        secret_valid = 0; secret_last = 0;
      end
      for (int i = 0; i < npix; i++) begin
        while ($urandom_range(0, 7) == 0) @(negedge clk);
        cover_blk = img[i]; cover_valid = 1;
        #1;
        while (!cover_ready) @(negedge clk);
        cover_q.push_back(img[i]);
        @(negedge clk);
        cover_valid = 0;
      end
    join
    while (stego_q.size() < npix) @(negedge clk);
    t_end = $time;
    `CHECK(embed_done, "message fully embedded")
    $display("MECH operation: %0d-byte message, %0dx%0d image, hidden in %0d cycles",
             msg_len, w, h, (t_end - t0) / 10);

    // reference stego image
    for (int i = 0; i < npix; i++) begin
      pix2x2_t e = img[i];
      for (int kk = 0; kk < 12; kk++)
        if (bits.size() > 0) begin
          logic [7:0] v = pix_byte(e, kk);
          v[0] = bits.pop_front();
          case (kk % 3)
            0: e.p[kk/3].r = v;
            1: e.p[kk/3].g = v;
            default: e.p[kk/3].b = v;
          endcase
        end
      `CHECK(stego_q[i] == e, $sformatf("stego block %0d", i))
      for (int kk = 0; kk < 12; kk++) begin
        int d = int'(pix_byte(img[i], kk)) - int'(pix_byte(stego_q[i], kk));
        e_sse += d * d;
        if (d != 0) e_diff++;
      end
    end

    // recovery side
    for (int i = 0; i < npix; i++) begin
      while ($urandom_range(0, 5) == 0) @(negedge clk);
      rx_stego = stego_q[i]; rx_orig = img[i]; rx_valid = 1;
      #1;
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
      rx_valid = 0;
    end
    while (recov_q.size() < nblk && ($time - t_end) < 100000) @(negedge clk);
    repeat (20) @(negedge clk);
    `CHECK(recov_q.size() == nblk, $sformatf("%0d of %0d blocks recovered", recov_q.size(), nblk))
    for (int b = 0; b < nblk && b < recov_q.size(); b++)
      `CHECK(recov_q[b] == pt[b], $sformatf("recovered block %0d", b))
    n_recov += recov_q.size();
    `CHECK(sse == 48'(e_sse) && n_bytes == 12 * npix && n_diff == e_diff,
           $sformatf("quality sums %0d %0d %0d exp %0d %0d %0d", sse, n_bytes, n_diff,
                     e_sse, 12 * npix, e_diff))
    if (n_diff > 0) n_dist++;
    $display("MECH quality: %0d bytes, %0d changed, squared error %0d", n_bytes, n_diff, sse);
    hs_on = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    operation(128'h000102030405060708090a0b0c0d0e0f, 37, 16, 16);
    operation(128'h2b7e151628aed2a6abf7158809cf4f3c, 1024, 64, 64);
    $display("MECH counts: key_expansion_cycles=%0d cover_stalls=%0d padded_blocks=%0d passthrough_blocks=%0d coef_blocks=%0d decrypted_blocks=%0d distortion_measured=%0d",
             n_keyexp, n_stall, n_pad, n_pass, n_coef, n_recov, n_dist);
    `CHECK(n_keyexp > 0, "key expansion happened")
    `CHECK(n_stall > 0,  "cover stall happened")
    `CHECK(n_pad > 0,    "padding happened")
    `CHECK(n_pass > 0,   "pass-through happened")
    `CHECK(n_coef > 0,   "coefficients observed")
    `CHECK(n_recov > 0,  "decryption happened")
    `CHECK(n_dist > 0,   "distortion measured")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
