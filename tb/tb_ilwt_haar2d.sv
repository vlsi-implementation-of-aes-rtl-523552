// tb_ilwt_haar2d: coefficients of random pixel blocks (reference forward
// transform) must come back as the exact pixels; coefficients perturbed at
// random must give the reference inverse clamped to 0..255. Random
// back-pressure on the output.
`include "tb/tb_common.svh"
module tb_ilwt_haar2d;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic      clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  coef_blk_t in_coef;
  pix2x2_t   out_blk;
  pix2x2_t   expq [$];
  int        n_out = 0, n_clamped = 0;
  localparam int N = 500;

  ilwt_haar2d dut (.clk, .rst_n, .in_valid, .in_ready, .in_coef, .out_valid, .out_ready, .out_blk);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, ref int nc);
    if (v < 0)   begin nc++; return 0;   end
    if (v > 255) begin nc++; return 255; end
    return v;
  endfunction

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      automatic pix2x2_t e = expq.pop_front();
      `CHECK(out_blk == e, $sformatf("block %0d: %h exp %h", n_out, out_blk, e))
      n_out++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      coef_blk_t c;
      pix2x2_t   e;
      subband_t  sb [3];
      int        x [3][4];
      automatic bit        perturb = (i % 4 == 3);
      for (int ch = 0; ch < 3; ch++) begin
        int ll, hl, lh, hh, y0, y1, y2, y3;
        for (int j = 0; j < 4; j++) x[ch][j] = $urandom_range(0, 255);
        haar_fwd(x[ch][0], x[ch][1], x[ch][2], x[ch][3], ll, hl, lh, hh);
        if (perturb) begin
          ll += $urandom_range(0, 40) - 20;  hh += $urandom_range(0, 40) - 20;
          hl += $urandom_range(0, 40) - 20;  lh += $urandom_range(0, 40) - 20;
        end
        sb[ch] = '{ll: coef_t'(ll), hl: coef_t'(hl), lh: coef_t'(lh), hh: coef_t'(hh)};
        haar_inv(ll, hl, lh, hh, y0, y1, y2, y3);
        x[ch][0] = clampi(y0, n_clamped); x[ch][1] = clampi(y1, n_clamped);
        x[ch][2] = clampi(y2, n_clamped); x[ch][3] = clampi(y3, n_clamped);
      end
      c.r = sb[0]; c.g = sb[1]; c.b = sb[2];
      for (int j = 0; j < 4; j++) begin
        e.p[j].r = 8'(x[0][j]); e.p[j].g = 8'(x[1][j]); e.p[j].b = 8'(x[2][j]);
      end
      in_coef = c; in_valid = 1;
      #1;
      while (!in_ready) @(negedge clk);
      expq.push_back(e);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    `CHECK(n_out == N, $sformatf("%0d blocks out", n_out))
    `CHECK(n_clamped > 0, "clamping exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
