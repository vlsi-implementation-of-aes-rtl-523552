// lwt_haar2d: one-level 2-D Haar wavelet of a 2x2 RGB pixel block, computed
// by integer lifting (the lifting wavelet transform, LWT).
//
// For a pair (a, b) the lifting step is d = a - b, s = b + floor(d/2); the
// step is exactly invertible in integers. It is applied along the rows of
// the block (pixels 0,1 and 2,3) and then down the columns of the two
// results, separately for R, G and B:
//   LL = low-pass of both, HL = low-pass of the row differences,
//   LH = difference of the row low-passes, HH = difference of differences.
// Coefficient ranges: LL 0..255, HL and LH -255..255, HH -510..510, all held
// in 10-bit signed coef_t.
// Interface: valid/ready stream in and out, one registered stage; a block is
// accepted whenever the output register is empty or being read, so the
// latency is one cycle and the throughput one block per cycle.
//
// The publication calls for a DWT into sub-bands and labels its results
// LWT; the Haar wavelet, one level and 2x2 block streaming are this design's.
module lwt_haar2d
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  pix2x2_t   in_blk,
  output logic      out_valid,
  input  logic      out_ready,
  output coef_blk_t out_coef
);

  typedef logic signed [11:0] w_t;

  function automatic subband_t fwd(logic [7:0] x00, logic [7:0] x01,
                                   logic [7:0] x10, logic [7:0] x11);
    w_t d0, s0, d1, s1, lh, ll, hh, hl;
    subband_t o;
    d0 = w_t'({4'b0, x00}) - w_t'({4'b0, x01});
    s0 = w_t'({4'b0, x01}) + (d0 >>> 1);
    d1 = w_t'({4'b0, x10}) - w_t'({4'b0, x11});
    s1 = w_t'({4'b0, x11}) + (d1 >>> 1);
    lh = s0 - s1;
    ll = s1 + (lh >>> 1);
    hh = d0 - d1;
    hl = d1 + (hh >>> 1);
    o.ll = coef_t'(ll);
    o.hl = coef_t'(hl);
    o.lh = coef_t'(lh);
    o.hh = coef_t'(hh);
    return o;
  endfunction

  coef_blk_t c;

  always_comb begin
    c.r = fwd(in_blk.p[0].r, in_blk.p[1].r, in_blk.p[2].r, in_blk.p[3].r);
    c.g = fwd(in_blk.p[0].g, in_blk.p[1].g, in_blk.p[2].g, in_blk.p[3].g);
    c.b = fwd(in_blk.p[0].b, in_blk.p[1].b, in_blk.p[2].b, in_blk.p[3].b);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_coef  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_coef <= c;
    end
  end

endmodule
