// tb_lwt_haar2d: random 2x2 RGB blocks (plus all-0 and all-255 corners)
// through the forward Haar lifting, with random back-pressure; each output
// is compared, in order, with the reference transform.
`include "tb/tb_common.svh"
module tb_lwt_haar2d;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic      clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix2x2_t   in_blk;
  coef_blk_t out_coef;
  pix2x2_t   sent [$];
  int        n_out = 0;
  localparam int N = 500;

  lwt_haar2d dut (.clk, .rst_n, .in_valid, .in_ready, .in_blk, .out_valid, .out_ready, .out_coef);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk_ch(subband_t c, int x0, int x1, int x2, int x3, string nm);
    int ll, hl, lh, hh;
    haar_fwd(x0, x1, x2, x3, ll, hl, lh, hh);
    `CHECK(int'(c.ll) == ll && int'(c.hl) == hl && int'(c.lh) == lh && int'(c.hh) == hh,
           $sformatf("%s: got %0d %0d %0d %0d exp %0d %0d %0d %0d", nm,
                     c.ll, c.hl, c.lh, c.hh, ll, hl, lh, hh))
  endfunction

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      automatic pix2x2_t p = sent.pop_front();
      chk_ch(out_coef.r, p.p[0].r, p.p[1].r, p.p[2].r, p.p[3].r, "R");
      chk_ch(out_coef.g, p.p[0].g, p.p[1].g, p.p[2].g, p.p[3].g, "G");
      chk_ch(out_coef.b, p.p[0].b, p.p[1].b, p.p[2].b, p.p[3].b, "B");
      n_out++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      pix2x2_t p;
      p = {$urandom, $urandom, $urandom};
      if (i == 0) p = '0;
      if (i == 1) p = '1;
      if (i == 2) p = {{3{8'd255}}, {3{8'd0}}, {3{8'd0}}, {3{8'd255}}};
      in_blk = p; in_valid = ($urandom_range(0, 4) != 0);
      while (!in_valid) begin @(negedge clk); in_valid = ($urandom_range(0, 4) != 0); end
      #1;
      while (!in_ready) @(negedge clk);
      sent.push_back(p);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    `CHECK(n_out == N, $sformatf("%0d blocks out", n_out))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
