// lsb_extract: LSB decoding, the inverse of lsb_embed.
//
// The LSB_BITS low bits of every colour byte of each incoming stego 2x2
// block are appended to a bit buffer, in the same order lsb_embed used, until
// 128*msg_blocks bits have been gathered; every 128 gathered bits leave as one
// ciphertext block on out_data. Pixel blocks that arrive after the message
// has been gathered are accepted and ignored.
// start latches msg_blocks and empties the buffer. The input is stalled only
// while a full block waits on out_ready and no room is left for another
// pixel block. Timing: one pixel block per cycle; a ciphertext block is
// offered in the cycle after its last bit arrived.
//
// LSB decoding follows the publication's recovery diagram; the bit order
// matches lsb_embed and the message length input is this design's.
module lsb_extract
  import aes_pkg::*;
#(
  parameter int unsigned LSB_BITS = 1   // bits read per colour byte: 1, 2 or 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] msg_blocks,
  input  logic        in_valid,
  output logic        in_ready,
  input  pix2x2_t     in_blk,
  output logic        out_valid,
  input  logic        out_ready,
  output block_t      out_data
);

  localparam int unsigned NEED = BLK_BYTES * LSB_BITS;
  localparam int unsigned BUFW = 128 + NEED;

  logic [BUFW-1:0] bitbuf;       // bitbuf[BUFW-1] is the oldest bit
  logic [8:0]      cnt;          // valid bits in bitbuf
  logic [23:0]     bits_left;    // message bits still to gather
  logic [NEED-1:0] ext;          // bits of the incoming block, first bit at MSB

  always_comb begin
    for (int k = 0; k < BLK_BYTES; k++)
      ext[NEED - 1 - k*LSB_BITS -: LSB_BITS] = LSB_BITS'(pix_byte(in_blk, k));
  end

  assign out_valid = (cnt >= 9'd128);
  assign out_data  = bitbuf[BUFW-1 -: 128];
  assign in_ready  = !start && ((bits_left == '0) || (cnt <= 9'd128));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bitbuf    <= '0;
      cnt       <= '0;
      bits_left <= '0;
    end else if (start) begin
      bitbuf    <= '0;
      cnt       <= '0;
      bits_left <= 24'({msg_blocks, 7'd0});
    end else begin
      logic [BUFW-1:0] b;
      logic [8:0]      n;
      b = bitbuf;
      n = cnt;
      if (out_valid && out_ready) begin
        b = b << 128;
        n = n - 9'd128;
      end
      if (in_valid && in_ready && bits_left != '0) begin
        logic [8:0] take;
        take = (bits_left < 24'(NEED)) ? 9'(bits_left) : 9'(NEED);
        b = b | ({ext, 128'd0} >> n);
        n = n + take;
        bits_left <= bits_left - 24'(take);
      end
      bitbuf <= b;
      cnt    <= n;
    end
  end

  initial assert (LSB_BITS == 1 || LSB_BITS == 2 || LSB_BITS == 4)
    else $error("LSB_BITS must be 1, 2 or 4");

endmodule
