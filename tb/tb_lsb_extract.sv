// tb_lsb_extract: stego blocks are built by the testbench from random pixels
// whose low bits carry 1..6 random 128-bit blocks (bit order as lsb_embed),
// followed by spare blocks, fed with random gaps; the recovered blocks, taken
// with random back-pressure, must equal the hidden ones, in order, and no
// block may appear beyond the message.
`include "tb/tb_common.svh"
module tb_lsb_extract;
  import aes_pkg::*;
  localparam int unsigned L = 1;   // the default LSB_BITS of the module
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] msg_blocks;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix2x2_t     in_blk;
  block_t      out_data;
  block_t      expq [$];
  int          n_extra = 0;

  lsb_extract dut (.clk, .rst_n, .start, .msg_blocks, .in_valid, .in_ready,
    .in_blk, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (expq.size() == 0) n_extra++;
      else begin
        automatic block_t e = expq.pop_front();
        `CHECK(out_data == e, $sformatf("block %h exp %h", out_data, e))
      end
    end
  end

  task automatic message(int m, int spare);
    bit     bits [$];
    block_t blk;
    int     n_pix;
    @(negedge clk);
    msg_blocks = 16'(m); start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < m; i++) begin
      blk = {$urandom, $urandom, $urandom, $urandom};
      expq.push_back(blk);
      for (int b = 127; b >= 0; b--) bits.push_back(blk[b]);
    end
    n_pix = (bits.size() + 12*L - 1) / (12*L) + spare;
    for (int i = 0; i < n_pix; i++) begin
      pix2x2_t p;
      p = {$urandom, $urandom, $urandom};
      for (int k = 0; k < 12; k++) begin
        logic [7:0] v;
        v = pix_byte(p, k);
        for (int j = L - 1; j >= 0; j--) if (bits.size() > 0) v[j] = bits.pop_front();
        case (k % 3)
          0: p.p[k/3].r = v;
          1: p.p[k/3].g = v;
          default: p.p[k/3].b = v;
        endcase
      end
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_blk = p; in_valid = 1;
      #1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (10) @(negedge clk);
    `CHECK(expq.size() == 0, $sformatf("%0d blocks missing", expq.size()))
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    message(1, 3);
    message(4, 10);
    message(6, 0);
    message(2, 5);
    `CHECK(n_extra == 0, "no blocks beyond the message")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
