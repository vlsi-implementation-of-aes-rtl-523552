// aes_decrypt: iterative AES-128 decryption (inverse cipher) core.
//
// Mirror of aes_encrypt: the ciphertext is XORed with round key NR on entry,
// then one aes_dec_round is applied per clock with round keys NR-1 down to 0,
// the last (key 0) without InvMixColumns. Same handshake and timing as
// aes_encrypt: accept in cycle 0, out_valid in cycle NR.
//
// The publication says only that decryption reverses encryption with the
// same key; architecture and timing mirror aes_encrypt and are this design's.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  rkeys_t rkeys,
  input  logic   keys_ready,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_data,
  output logic   out_valid,
  input  logic   out_ready,
  output block_t out_data
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} st_e;
  st_e        st;
  block_t     state;
  logic [3:0] rnd;           // round key used next
  block_t     rnd_out;

  aes_dec_round u_round (
    .state_i (state),
    .rkey    (rkeys[rnd]),
    .last    (rnd == 4'd0),
    .state_o (rnd_out)
  );

  assign in_ready  = (st == IDLE) && keys_ready;
  assign out_valid = (st == DONE);
  assign out_data  = state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= IDLE;
      rnd   <= '0;
      state <= '0;
    end else begin
      unique case (st)
        IDLE: if (in_valid && in_ready) begin
          state <= in_data ^ rkeys[NR];
          rnd   <= 4'(NR - 1);
          st    <= RUN;
        end
        RUN: begin
          state <= rnd_out;
          rnd   <= rnd - 4'd1;
          if (rnd == 4'd0) st <= DONE;
        end
        DONE: if (out_ready) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

endmodule
