// aes_sbox: AES S-box lookup with the {02} and {03} multiples used by
// MixColumns.
//
// One 256-byte table holds S(a). The "2S" value {02}.S(a) is not stored: it
// is S(a) shifted left by one bit, XORed with 0x1b when the bit shifted out
// was 1. The "3S" value {03}.S(a) is S(a) XOR {02}.S(a). A round of the
// cipher therefore needs only this one table, plus XOR gates, to perform
// SubBytes, ShiftRows and MixColumns together. The table contents are the
// standard AES S-box, computed at elaboration in aes_pkg.
// Purely combinational: a -> s, s2, s3 in the same cycle.
//
// The single-table scheme with derived 2S and 3S values follows the
// publication this design is based on; the table itself is standard AES.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t s,    // S(a)
  output byte_t s2,   // {02} . S(a)
  output byte_t s3    // {03} . S(a)
);

  always_comb begin
    s  = SBOX[a];
    s2 = {s[6:0], 1'b0} ^ (s[7] ? 8'h1b : 8'h00);
    s3 = s2 ^ s;
  end

endmodule
