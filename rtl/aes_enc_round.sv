// aes_enc_round: one AES encryption round, combinational.
//
// SubBytes and ShiftRows are folded into the addressing of 16 S-box lookups:
// output column c, row r reads input byte (row r, column (c+r) mod 4). Each
// lookup also yields {02}.S and {03}.S, so MixColumns reduces to XORs:
//   s'0 = 2S0 ^ 3S1 ^  S2 ^  S3      s'1 =  S0 ^ 2S1 ^ 3S2 ^  S3
//   s'2 =  S0 ^  S1 ^ 2S2 ^ 3S3      s'3 = 3S0 ^  S1 ^  S2 ^ 2S3
// AddRoundKey XORs the round key. With last = 1 (the final round)
// MixColumns is skipped. Block byte 0 is bits [127:120]; byte 4c+r is row r,
// column c of the state.
//
// The S/2S/3S formulation of SubBytes-ShiftRows-MixColumns follows the
// publication; doing a whole round combinationally in one cycle is this
// design's choice.
module aes_enc_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t rkey,
  input  logic   last,
  output block_t state_o
);

  byte_t s  [16];   // indexed by output position 4c+r (after ShiftRows)
  byte_t s2 [16];
  byte_t s3 [16];

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      aes_sbox u_sbox (
        .a  (state_i[127 - 8*(4*((c + r) % 4) + r) -: 8]),
        .s  (s [4*c + r]),
        .s2 (s2[4*c + r]),
        .s3 (s3[4*c + r])
      );
    end
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t m0, m1, m2, m3;
      if (last) begin
        m0 = s[4*c];     m1 = s[4*c + 1];
        m2 = s[4*c + 2]; m3 = s[4*c + 3];
      end else begin
        m0 = s2[4*c] ^ s3[4*c + 1] ^ s [4*c + 2] ^ s [4*c + 3];
        m1 = s [4*c] ^ s2[4*c + 1] ^ s3[4*c + 2] ^ s [4*c + 3];
        m2 = s [4*c] ^ s [4*c + 1] ^ s2[4*c + 2] ^ s3[4*c + 3];
        m3 = s3[4*c] ^ s [4*c + 1] ^ s [4*c + 2] ^ s2[4*c + 3];
      end
      state_o[127 - 32*c -: 32] = {m0, m1, m2, m3} ^ rkey[127 - 32*c -: 32];
    end
  end

endmodule
