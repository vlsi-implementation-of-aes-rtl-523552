// ilwt_haar2d: inverse of lwt_haar2d, rebuilding a 2x2 RGB pixel block from
// its one-level Haar sub-band coefficients.
//
// The lifting steps of lwt_haar2d are undone in reverse order, first down the
// columns and then along the rows: for a pair b = s - floor(d/2), a = d + b.
// Integer lifting is lossless, so unmodified coefficients give back the exact
// pixels. Results are clamped to 0..255, which only matters when the
// coefficients were changed between the two transforms.
// Interface and timing as lwt_haar2d: one registered stage, valid/ready.
//
// The publication names the IDWT; the exact lifting inverse and the clamp
// are this design's.
module ilwt_haar2d
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  coef_blk_t in_coef,
  output logic      out_valid,
  input  logic      out_ready,
  output pix2x2_t   out_blk
);

  typedef logic signed [11:0] w_t;

  function automatic logic [7:0] clamp(w_t v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // returns {x00, x01, x10, x11}
  function automatic logic [31:0] inv(subband_t c);
    w_t s0, s1, d0, d1, x00, x01, x10, x11;
    s1  = w_t'(c.ll) - (w_t'(c.lh) >>> 1);
    s0  = w_t'(c.lh) + s1;
    d1  = w_t'(c.hl) - (w_t'(c.hh) >>> 1);
    d0  = w_t'(c.hh) + d1;
    x01 = s0 - (d0 >>> 1);
    x00 = d0 + x01;
    x11 = s1 - (d1 >>> 1);
    x10 = d1 + x11;
    return {clamp(x00), clamp(x01), clamp(x10), clamp(x11)};
  endfunction

  pix2x2_t     p;
  logic [31:0] vr, vg, vb;

  always_comb begin
    vr = inv(in_coef.r);
    vg = inv(in_coef.g);
    vb = inv(in_coef.b);
    for (int i = 0; i < 4; i++) begin
      p.p[i].r = vr[31 - 8*i -: 8];
      p.p[i].g = vg[31 - 8*i -: 8];
      p.p[i].b = vb[31 - 8*i -: 8];
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_blk <= p;
    end
  end

endmodule
