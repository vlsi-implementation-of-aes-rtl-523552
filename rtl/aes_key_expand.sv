// aes_key_expand: AES-128 key schedule, one round key per clock.
//
// On key_valid the cipher key is stored as round key 0 and the unit starts
// iterating: each cycle it forms the next round key from the previous one
// (RotWord, SubWord through four S-box lookups, XOR with the round constant,
// then the running XOR across the four words) and stores it. All eleven
// round keys are held in registers and offered in parallel on rkeys, so the
// encryption and the decryption core can both read any of them.
// Timing: key_valid in cycle 0; busy for NR cycles; keys_ready rises NR
// cycles after key_valid and stays high until the next key_valid.
//
// The publication names key expansion only; the standard AES-128 schedule,
// the one-key-per-clock iteration and the register storage are this design's.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_valid,
  input  block_t key,
  output logic   busy,
  output logic   keys_ready,
  output rkeys_t rkeys
);

  block_t      cur;          // last round key produced
  byte_t       rcon;
  logic [3:0]  idx;          // index of the round key being produced
  byte_t       sw [4];       // SubWord(RotWord(w3))
  block_t      nxt;

  for (genvar i = 0; i < 4; i++) begin : g_sub
    // RotWord: bytes of w3 taken in the order 1, 2, 3, 0
    aes_sbox u_sbox (
      .a  (cur[31 - 8*((i + 1) % 4) -: 8]),
      .s  (sw[i]),
      .s2 (),
      .s3 ()
    );
  end

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    w0 = cur[127:96] ^ {sw[0] ^ rcon, sw[1], sw[2], sw[3]};
    w1 = cur[95:64]  ^ w0;
    w2 = cur[63:32]  ^ w1;
    w3 = cur[31:0]   ^ w2;
    nxt = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      keys_ready <= 1'b0;
      idx        <= '0;
      rcon       <= 8'h01;
      cur        <= '0;
      rkeys      <= '0;
    end else if (key_valid) begin
      busy       <= 1'b1;
      keys_ready <= 1'b0;
      idx        <= 4'd1;
      rcon       <= 8'h01;
      cur        <= key;
      rkeys[0]   <= key;
    end else if (busy) begin
      rkeys[idx] <= nxt;
      cur        <= nxt;
      rcon       <= xtime(rcon);
      idx        <= idx + 4'd1;
      if (idx == 4'(NR)) begin
        busy       <= 1'b0;
        keys_ready <= 1'b1;
      end
    end
  end

endmodule
