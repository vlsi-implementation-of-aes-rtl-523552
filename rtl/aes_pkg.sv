// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 cores
// and the image data-hiding blocks.
//
// A 128-bit AES block is kept as a packed vector whose most significant byte
// is byte 0 of the FIPS-197 input; byte 4*c+r of the block is row r, column c
// of the 4x4 state matrix. The S-box is not written out as a list of numbers:
// it is computed once, at elaboration, from its definition (multiplicative
// inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the affine map with
// constant 0x63). The inverse S-box is obtained by inverting that table.
// Pixel types describe the 2x2 RGB blocks (8 bits per colour) that the
// wavelet and LSB blocks exchange, and the one-level Haar sub-band
// coefficients of such a block.
//
// The reduction polynomial and the S-box definition are standard AES; the
// block/pixel types, byte order and coefficient width are this design's own.
package aes_pkg;

  localparam int unsigned NR = 10;            // rounds of AES-128
  localparam int unsigned NK = 11;            // round keys 0..NR

  typedef logic [7:0]           byte_t;
  typedef logic [127:0]         block_t;
  typedef logic [NK-1:0][127:0] rkeys_t;      // rkeys[i] = round key i
  typedef logic [255:0][7:0]    sbox_tbl_t;  // t[i] = entry for byte i

  // multiplication by {02}: shift left, XOR 0x1b when bit 7 was set
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // general GF(2^8) multiplication (shift and add)
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // multiplicative inverse as a^254 = a^2 * a^4 * ... * a^128 (0 maps to 0)
  function automatic byte_t ginv(byte_t a);
    byte_t r = 8'h01;
    byte_t x = a;
    for (int i = 1; i < 8; i++) begin
      x = gmul(x, x);
      r = gmul(r, x);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic sbox_tbl_t gen_sbox();
    sbox_tbl_t t;
    for (int i = 0; i < 256; i++) begin
      byte_t v = ginv(byte_t'(i));
      t[i] = v ^ rotl8(v, 1) ^ rotl8(v, 2) ^ rotl8(v, 3) ^ rotl8(v, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic sbox_tbl_t gen_inv_sbox();
    sbox_tbl_t f = gen_sbox();
    sbox_tbl_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_tbl_t SBOX     = gen_sbox();
  localparam sbox_tbl_t INV_SBOX = gen_inv_sbox();

  // byte k (0 = most significant) of a block
  function automatic byte_t blk_byte(block_t b, int unsigned k);
    return b[127 - 8*k -: 8];
  endfunction

  // ---------------------------------------------------------------- image
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // 2x2 pixel block: p[0] top-left, p[1] top-right, p[2] bottom-left,
  // p[3] bottom-right
  typedef struct packed {
    rgb_t [3:0] p;
  } pix2x2_t;

  localparam int unsigned BLK_BYTES = 12;     // colour bytes per 2x2 block

  typedef logic signed [9:0] coef_t;

  // one colour channel of one 2x2 block after a one-level 2-D Haar lifting
  typedef struct packed {
    coef_t ll;
    coef_t hl;   // horizontal detail (difference across columns)
    coef_t lh;   // vertical detail   (difference across rows)
    coef_t hh;   // diagonal detail
  } subband_t;

  typedef struct packed {
    subband_t r;
    subband_t g;
    subband_t b;
  } coef_blk_t;

  // colour byte k (0..11) of a block: pixel k/3, channel r,g,b for k%3 = 0,1,2
  function automatic byte_t pix_byte(pix2x2_t x, int unsigned k);
    rgb_t p = x.p[k / 3];
    case (k % 3)
      0:       return p.r;
      1:       return p.g;
      default: return p.b;
    endcase
  endfunction

endpackage
