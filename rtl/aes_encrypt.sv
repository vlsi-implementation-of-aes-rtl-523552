// aes_encrypt: iterative AES-128 encryption core.
//
// One aes_enc_round instance is reused for all rounds. A plaintext block is
// accepted (in_valid & in_ready) only when the core is idle and the round
// keys are ready; it is XORed with round key 0 on entry, then one round is
// applied per clock with round keys 1..NR, the last one without MixColumns.
// The ciphertext is held on out_data with out_valid until out_ready.
// Timing: accept in cycle 0, out_valid in cycle NR (10 cycles later); a new
// block can be accepted in the cycle after the output handshake, so the
// throughput is one block per NR+1 cycles with a ready sink.
//
// The round sequence follows the publication's AES block diagram; the
// iterative architecture, handshake and latency are this design's choices.
module aes_encrypt
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
  logic [3:0] rnd;           // round being applied next
  block_t     rnd_out;

  aes_enc_round u_round (
    .state_i (state),
    .rkey    (rkeys[rnd]),
    .last    (rnd == 4'(NR)),
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
          state <= in_data ^ rkeys[0];
          rnd   <= 4'd1;
          st    <= RUN;
        end
        RUN: begin
          state <= rnd_out;
          rnd   <= rnd + 4'd1;
          if (rnd == 4'(NR)) st <= DONE;
        end
        DONE: if (out_ready) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

endmodule
