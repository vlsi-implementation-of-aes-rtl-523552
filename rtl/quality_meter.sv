// quality_meter: measures how far a recovered (stego) image is from the
// original, for the image-quality figures MSE and PSNR.
//
// Each valid cycle compares the twelve colour bytes of one 2x2 block of the
// original image with the same block of the image under test and adds the
// squared differences to sse, the byte count to n_bytes and the number of
// bytes that differ to n_diff. MSE = sse / n_bytes and
// PSNR = 10 log10(255^2 / MSE) are left to the reader of these counters.
// clear zeroes all three; results are visible one cycle after each valid.
//
// The publication names a quality measurement between the original and
// recovered image; the choice of squared error and changed-byte count is
// this design's.
module quality_meter
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  pix2x2_t     orig_blk,
  input  pix2x2_t     test_blk,
  output logic [47:0] sse,
  output logic [31:0] n_bytes,
  output logic [31:0] n_diff
);

  logic [19:0] blk_sse;     // at most 12 * 255^2
  logic [3:0]  blk_diff;

  always_comb begin
    blk_sse  = '0;
    blk_diff = '0;
    for (int k = 0; k < BLK_BYTES; k++) begin
      logic signed [8:0] d;
      d = $signed({1'b0, pix_byte(orig_blk, k)}) - $signed({1'b0, pix_byte(test_blk, k)});
      blk_sse  = blk_sse + 20'(d * d);
      blk_diff = blk_diff + 4'(d != 0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sse     <= '0;
      n_bytes <= '0;
      n_diff  <= '0;
    end else if (valid) begin
      sse     <= sse + 48'(blk_sse);
      n_bytes <= n_bytes + 32'(BLK_BYTES);
      n_diff  <= n_diff + 32'(blk_diff);
    end
  end

endmodule
