// secret_packer: turns the secret message, a stream of bytes, into the
// 128-bit binary blocks that the AES core encrypts.
//
// Bytes fill a block from the most significant byte down (byte 0 of the AES
// input first). A block is offered on blk_data when its 16th byte arrives, or
// earlier when a byte is marked byte_last; the unused tail of such a block is
// zero-padded and blk_padded is set with it.
// Interface: valid/ready on both sides. While a finished block waits for
// blk_ready, byte_ready is low. A full block leaves one cycle after its 16th
// byte is accepted.
//
// The publication names a 'binary form' step before AES and mentions
// padding as a possible pre-processing; byte order and zero padding are this
// design's choices.
module secret_packer
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   byte_valid,
  output logic   byte_ready,
  input  byte_t  byte_data,
  input  logic   byte_last,
  output logic   blk_valid,
  input  logic   blk_ready,
  output block_t blk_data,
  output logic   blk_padded
);

  logic [3:0] cnt;      // bytes already in the block being filled

  assign byte_ready = !blk_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      blk_valid  <= 1'b0;
      blk_data   <= '0;
      blk_padded <= 1'b0;
    end else begin
      if (blk_valid && blk_ready) begin
        blk_valid <= 1'b0;
        blk_data  <= '0;
      end
      if (byte_valid && byte_ready) begin
        blk_data[127 - 8*cnt -: 8] <= byte_data;
        if (cnt == 4'd15 || byte_last) begin
          blk_valid  <= 1'b1;
          blk_padded <= (cnt != 4'd15);
          cnt        <= '0;
        end else begin
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

endmodule
