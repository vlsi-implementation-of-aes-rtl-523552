// stego_aes_top: AES-128 based data hiding in images, hiding and recovery
// paths side by side.
//
// Hiding path: secret bytes -> secret_packer (128-bit blocks, zero-padded
// tail) -> aes_encrypt -> lsb_embed. In parallel, the cover image arrives as
// 2x2 RGB blocks and passes lwt_haar2d (one-level integer Haar wavelet) and
// ilwt_haar2d before lsb_embed writes the ciphertext bits into the LSBs of
// its colour bytes, giving the stego image. The sub-band coefficients between
// the two transforms are also brought out on coef/coef_valid; no fusion is
// applied to them, so the cover image equals the input image.
// Recovery path: each stego block (rx_stego) arrives together with the
// matching block of the original image (rx_orig). lsb_extract gathers the
// LSBs into ciphertext blocks, aes_decrypt turns them back into the secret
// blocks on recov_data, and quality_meter accumulates the squared error
// between the two images.
// One aes_key_expand serves both cores. Order of use: key_valid, wait for
// keys_ready, then pulse start with msg_blocks = number of 128-bit blocks in
// the message, then stream secret bytes and image blocks (any interleaving;
// the cover stream is stalled while the AES core has no ciphertext ready).
// All streams are valid/ready; one clock, synchronous active-low reset.
//
// The block chain follows the publication's hiding and recovery diagrams;
// the shared key schedule, the msg_blocks control and all interfaces are this
// design's. The publication leaves the sub-band fusion rule open, so none
// is applied.
module stego_aes_top
  import aes_pkg::*;
#(
  parameter int unsigned LSB_BITS = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // key
  input  logic        key_valid,
  input  block_t      key,
  output logic        keys_ready,
  output logic        keys_busy,
  // message control
  input  logic        start,
  input  logic [15:0] msg_blocks,
  // secret data
  input  logic        secret_valid,
  output logic        secret_ready,
  input  byte_t       secret_byte,
  input  logic        secret_last,
  output logic        padded_blk,     // pulse: a zero-padded block entered AES
  // cover image in
  input  logic        cover_valid,
  output logic        cover_ready,
  input  pix2x2_t     cover_blk,
  // sub-band coefficients (observation)
  output logic        coef_valid,
  output coef_blk_t   coef,
  // stego image out
  output logic        stego_valid,
  input  logic        stego_ready,
  output pix2x2_t     stego_blk,
  output logic        embed_done,
  // recovery side: stego image and original image in
  input  logic        rx_valid,
  output logic        rx_ready,
  input  pix2x2_t     rx_stego,
  input  pix2x2_t     rx_orig,
  // recovered secret blocks
  output logic        recov_valid,
  input  logic        recov_ready,
  output block_t      recov_data,
  // quality measurement
  output logic [47:0] sse,
  output logic [31:0] n_bytes,
  output logic [31:0] n_diff
);

  rkeys_t rkeys;

  aes_key_expand u_keys (
    .clk, .rst_n,
    .key_valid, .key,
    .busy       (keys_busy),
    .keys_ready,
    .rkeys
  );

  // ------------------------------------------------------------ hiding path
  logic   pk_valid, pk_ready, pk_padded;
  block_t pk_data;

  secret_packer u_pack (
    .clk, .rst_n,
    .byte_valid (secret_valid),
    .byte_ready (secret_ready),
    .byte_data  (secret_byte),
    .byte_last  (secret_last),
    .blk_valid  (pk_valid),
    .blk_ready  (pk_ready),
    .blk_data   (pk_data),
    .blk_padded (pk_padded)
  );

  assign padded_blk = pk_valid && pk_ready && pk_padded;

  logic   ct_valid, ct_ready;
  block_t ct_data;

  aes_encrypt u_enc (
    .clk, .rst_n,
    .rkeys, .keys_ready,
    .in_valid  (pk_valid),
    .in_ready  (pk_ready),
    .in_data   (pk_data),
    .out_valid (ct_valid),
    .out_ready (ct_ready),
    .out_data  (ct_data)
  );

  logic cf_ready;

  lwt_haar2d u_dwt (
    .clk, .rst_n,
    .in_valid  (cover_valid),
    .in_ready  (cover_ready),
    .in_blk    (cover_blk),
    .out_valid (coef_valid),
    .out_ready (cf_ready),
    .out_coef  (coef)
  );

  logic    cv_valid, cv_ready;
  pix2x2_t cv_blk;

  ilwt_haar2d u_idwt (
    .clk, .rst_n,
    .in_valid  (coef_valid),
    .in_ready  (cf_ready),
    .in_coef   (coef),
    .out_valid (cv_valid),
    .out_ready (cv_ready),
    .out_blk   (cv_blk)
  );

  lsb_embed #(.LSB_BITS(LSB_BITS)) u_embed (
    .clk, .rst_n,
    .start, .msg_blocks,
    .cover_valid  (cv_valid),
    .cover_ready  (cv_ready),
    .cover_blk    (cv_blk),
    .cipher_valid (ct_valid),
    .cipher_ready (ct_ready),
    .cipher_data  (ct_data),
    .stego_valid,
    .stego_ready,
    .stego_blk,
    .done         (embed_done)
  );

  // ---------------------------------------------------------- recovery path
  logic   ex_valid, ex_ready;
  block_t ex_data;

  lsb_extract #(.LSB_BITS(LSB_BITS)) u_extract (
    .clk, .rst_n,
    .start, .msg_blocks,
    .in_valid  (rx_valid),
    .in_ready  (rx_ready),
    .in_blk    (rx_stego),
    .out_valid (ex_valid),
    .out_ready (ex_ready),
    .out_data  (ex_data)
  );

  aes_decrypt u_dec (
    .clk, .rst_n,
    .rkeys, .keys_ready,
    .in_valid  (ex_valid),
    .in_ready  (ex_ready),
    .in_data   (ex_data),
    .out_valid (recov_valid),
    .out_ready (recov_ready),
    .out_data  (recov_data)
  );

  quality_meter u_quality (
    .clk, .rst_n,
    .clear    (start),
    .valid    (rx_valid && rx_ready),
    .orig_blk (rx_orig),
    .test_blk (rx_stego),
    .sse, .n_bytes, .n_diff
  );

endmodule
