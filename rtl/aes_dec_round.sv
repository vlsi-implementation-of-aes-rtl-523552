// aes_dec_round: one AES inverse-cipher round, combinational.
//
// Applies, in order, InvShiftRows (folded into the addressing of 16 inverse
// S-box lookups: output row r, column c reads input row r, column
// (c - r) mod 4), InvSubBytes, AddRoundKey and InvMixColumns, the order of the
// FIPS-197 inverse cipher. InvMixColumns multiplies each column by the matrix
// {0e 0b 0d 09} (rotated per row); it is skipped when last = 1, which marks
// the final round that uses round key 0.
//
// The publication gives no inverse round; this is the standard FIPS-197
// inverse cipher round, with InvMixColumns built from GF(2^8) multipliers.
module aes_dec_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t rkey,
  input  logic   last,
  output block_t state_o
);

  byte_t t [16];    // after InvShiftRows + InvSubBytes, position 4c+r

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      aes_inv_sbox u_isbox (
        .a (state_i[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8]),
        .s (t[4*c + r])
      );
    end
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t k0, k1, k2, k3;
      k0 = t[4*c]     ^ rkey[127 - 32*c      -: 8];
      k1 = t[4*c + 1] ^ rkey[127 - 32*c - 8  -: 8];
      k2 = t[4*c + 2] ^ rkey[127 - 32*c - 16 -: 8];
      k3 = t[4*c + 3] ^ rkey[127 - 32*c - 24 -: 8];
      if (last) begin
        state_o[127 - 32*c -: 32] = {k0, k1, k2, k3};
      end else begin
        state_o[127 - 32*c -: 32] = {
          gmul(k0, 8'h0e) ^ gmul(k1, 8'h0b) ^ gmul(k2, 8'h0d) ^ gmul(k3, 8'h09),
          gmul(k0, 8'h09) ^ gmul(k1, 8'h0e) ^ gmul(k2, 8'h0b) ^ gmul(k3, 8'h0d),
          gmul(k0, 8'h0d) ^ gmul(k1, 8'h09) ^ gmul(k2, 8'h0e) ^ gmul(k3, 8'h0b),
          gmul(k0, 8'h0b) ^ gmul(k1, 8'h0d) ^ gmul(k2, 8'h09) ^ gmul(k3, 8'h0e)};
      end
    end
  end

endmodule
