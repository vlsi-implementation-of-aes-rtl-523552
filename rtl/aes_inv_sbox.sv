// aes_inv_sbox: inverse AES S-box lookup for InvSubBytes.
//
// A 256-byte table holding the inverse of the S-box permutation, computed at
// elaboration in aes_pkg by inverting the forward table. Purely
// combinational: a -> s = S^-1(a) in the same cycle.
//
// The publication only says decryption reverses encryption; this standard
// inverse table is this design's reading of that.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t s
);

  assign s = INV_SBOX[a];

endmodule
