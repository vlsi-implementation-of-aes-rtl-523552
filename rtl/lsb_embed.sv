// lsb_embed: hides the ciphertext in the cover image by least-significant-bit
// substitution.
//
// Ciphertext blocks (128 bits each) are loaded into a bit buffer; every
// colour byte of every 2x2 cover block then has its LSB_BITS low bits
// replaced by the next buffer bits, most significant ciphertext bit first,
// in byte order R,G,B of pixel 0, then pixels 1, 2 and 3. One block takes
// NEED = 12*LSB_BITS bits, so a ciphertext block spans several pixel blocks
// and a pixel block can straddle two ciphertext blocks.
// start latches msg_blocks (number of ciphertext blocks of the message) and
// empties the buffer. While fewer than NEED bits are buffered and
// ciphertext is still due, the cover stream is stalled (cover_ready low) until
// the next ciphertext block arrives. The last bits of the message may fill
// only part of a block; bytes left without bits, and all blocks after the
// message, pass through unchanged. done is high once every bit is embedded.
// Timing: a ciphertext load takes one cycle; each cover block is one cycle,
// registered, valid/ready on every port.
//
// LSB substitution of encrypted data follows the publication; bits per
// byte, bit order, buffering, stall and pass-through are this design's.
module lsb_embed
  import aes_pkg::*;
#(
  parameter int unsigned LSB_BITS = 1   // bits replaced per colour byte: 1, 2 or 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] msg_blocks,
  input  logic        cover_valid,
  output logic        cover_ready,
  input  pix2x2_t     cover_blk,
  input  logic        cipher_valid,
  output logic        cipher_ready,
  input  block_t      cipher_data,
  output logic        stego_valid,
  input  logic        stego_ready,
  output pix2x2_t     stego_blk,
  output logic        done
);

  localparam int unsigned NEED = BLK_BYTES * LSB_BITS;
  localparam int unsigned BUFW = 128 + NEED;
  localparam logic [7:0]  MASK = 8'((1 << LSB_BITS) - 1);

  logic [BUFW-1:0] bitbuf;        // bitbuf[BUFW-1] is the next bit to embed
  logic [8:0]      cnt;           // valid bits in bitbuf
  logic [15:0]     blocks_left;   // ciphertext blocks not yet loaded
  logic            enough;
  pix2x2_t         emb;

  assign enough       = (cnt >= 9'(NEED)) || (blocks_left == '0);
  assign cipher_ready = !start && (blocks_left != '0) && (cnt < 9'(NEED));
  assign cover_ready  = !start && enough && (!stego_valid || stego_ready);
  assign done         = (blocks_left == '0) && (cnt == '0);

  function automatic logic [7:0] put(logic [7:0] v, logic [7:0] bits);
    return (v & ~MASK) | (bits & MASK);
  endfunction

  always_comb begin
    emb = cover_blk;
    for (int k = 0; k < BLK_BYTES; k++) begin
      if (9'((k + 1) * LSB_BITS) <= cnt) begin
        logic [7:0] bits;
        bits = 8'(bitbuf[BUFW - 1 - k*LSB_BITS -: LSB_BITS]);
        unique case (k % 3)
          0:       emb.p[k/3].r = put(cover_blk.p[k/3].r, bits);
          1:       emb.p[k/3].g = put(cover_blk.p[k/3].g, bits);
          default: emb.p[k/3].b = put(cover_blk.p[k/3].b, bits);
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bitbuf      <= '0;
      cnt         <= '0;
      blocks_left <= '0;
      stego_valid <= 1'b0;
      stego_blk   <= '0;
    end else if (start) begin
      bitbuf      <= '0;
      cnt         <= '0;
      blocks_left <= msg_blocks;
    end else begin
      if (stego_valid && stego_ready) stego_valid <= 1'b0;
      if (cipher_valid && cipher_ready) begin
        bitbuf      <= bitbuf | ({cipher_data, NEED'(0)} >> cnt);
        cnt         <= cnt + 9'd128;
        blocks_left <= blocks_left - 16'd1;
      end else if (cover_valid && cover_ready) begin
        stego_valid <= 1'b1;
        stego_blk   <= emb;
        bitbuf      <= bitbuf << NEED;
        cnt         <= (cnt >= 9'(NEED)) ? cnt - 9'(NEED) : '0;
      end
    end
  end

  initial assert (LSB_BITS == 1 || LSB_BITS == 2 || LSB_BITS == 4)
    else $error("LSB_BITS must be 1, 2 or 4");

endmodule
