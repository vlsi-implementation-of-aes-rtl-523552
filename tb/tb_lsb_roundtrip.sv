// tb_lsb_roundtrip: lsb_embed feeding lsb_extract directly, for LSB_BITS =
// 1, 2 and 4 side by side. Random ciphertext blocks are hidden in random
// cover blocks and must come out of the extractor unchanged and in order;
// each stego byte may differ from its cover byte only in its low LSB_BITS
// bits. Three messages per width, random gaps and back-pressure.
`include "tb/tb_common.svh"
module tb_lsb_roundtrip;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  int   finished = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned WIDTHS [3] = '{1, 2, 4};

  for (genvar g = 0; g < 3; g++) begin : g_w
    localparam int unsigned L = WIDTHS[g];
    logic        start = 0;
    logic [15:0] msg_blocks = '0;
    logic        cover_valid = 0, cover_ready, cipher_valid = 0, cipher_ready;
    logic        stego_valid, stego_ready, done, out_valid, out_ready = 0;
    pix2x2_t     cover_blk, stego_blk;
    block_t      cipher_data, out_data;
    block_t      expq [$];
    pix2x2_t     coverq [$];

    lsb_embed #(.LSB_BITS(L)) u_emb (.clk, .rst_n, .start, .msg_blocks, .cover_valid,
      .cover_ready, .cover_blk, .cipher_valid, .cipher_ready, .cipher_data, .stego_valid,
      .stego_ready, .stego_blk, .done);

    lsb_extract #(.LSB_BITS(L)) u_ext (.clk, .rst_n, .start, .msg_blocks,
      .in_valid(stego_valid), .in_ready(stego_ready), .in_blk(stego_blk),
      .out_valid, .out_ready, .out_data);

    always @(posedge clk) out_ready <= ($urandom_range(0, 2) != 0);

    always @(posedge clk) begin
      if (rst_n && out_valid && out_ready) begin
        if (expq.size() == 0) begin
          `CHECK(0, $sformatf("L=%0d: block beyond the message", L))
        end else begin
          automatic block_t e = expq.pop_front();
          `CHECK(out_data == e, $sformatf("L=%0d: block %h exp %h", L, out_data, e))
        end
      end
      if (rst_n && stego_valid && stego_ready) begin
        automatic pix2x2_t c = coverq.pop_front();
        automatic logic [7:0] m = 8'((1 << L) - 1);
        automatic bit ok = 1;
        for (int k = 0; k < 12; k++)
          if ((pix_byte(c, k) & ~m) != (pix_byte(stego_blk, k) & ~m)) ok = 0;
        `CHECK(ok, $sformatf("L=%0d: only low bits changed", L))
      end
    end

    task automatic message(int nb);
      int npix = (128 * nb + 12 * L - 1) / (12 * L) + 4;
      @(negedge clk);
      msg_blocks = 16'(nb); start = 1;
      @(negedge clk);
      start = 0;
      fork
        for (int i = 0; i < nb; i++) begin
          automatic block_t b = {$urandom, $urandom, $urandom, $urandom};
          repeat ($urandom_range(0, 10)) @(negedge clk);
          cipher_data = b; cipher_valid = 1;
          #1;
          while (!cipher_ready) @(negedge clk);
          expq.push_back(b);
          @(negedge clk);
          cipher_valid = 0;
        end
        for (int i = 0; i < npix; i++) begin
          automatic pix2x2_t p = {$urandom, $urandom, $urandom};
          cover_blk = p; cover_valid = 1;
          #1;
          while (!cover_ready) @(negedge clk);
          coverq.push_back(p);
          @(negedge clk);
          cover_valid = 0;
        end
      join
      repeat (30) @(negedge clk);
      `CHECK(done, $sformatf("L=%0d: embedding done", L))
      `CHECK(expq.size() == 0, $sformatf("L=%0d: %0d blocks not recovered", L, expq.size()))
    endtask

    initial begin
      @(posedge rst_n);
      message(1);
      message(5);
      message(3);
      finished++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (finished == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
