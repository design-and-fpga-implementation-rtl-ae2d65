// Padding module: turns a stream of 64-bit message words into 576-bit rate
// blocks for the permutation.
//
// Words are written into a nine-word buffer, first word in lane 0. A word
// with in_last_i set is the message's last and carries in_byte_num_i (0..7)
// bytes; a message whose length is a multiple of 8 bytes ends with an empty
// last word (byte_num 0). That word is padded by sha3_pad_word, the words
// above it stay zero and bit 7 of the block's last byte is set, so padding
// always completes within the current block. When the buffer holds a full or
// a padded block, blk_valid_o rises and in_ready_o falls until the
// permutation takes the block; the permutation keeps its own copy, so the
// padder takes new words while the rounds run. blk_first_o / blk_last_o mark
// the first and the padded block of a message.
//
// The 64-bit input, the byte_num[2:0] selector, the 576-bit buffer and
// IN_READY falling while the buffer is full follow the document. The
// valid/ready handshakes and the empty-last-word rule are this design's.
module sha3_padder
  import keccak_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lane_t       in_word_i,
  input  logic        in_last_i,
  input  logic [2:0]  in_byte_num_i,
  input  logic        in_valid_i,
  output logic        in_ready_o,
  output block_t      blk_o,
  output logic        blk_first_o,
  output logic        blk_last_o,
  output logic        blk_valid_o,
  input  logic        blk_ready_i
);

  block_t      buf_q;
  logic [3:0]  cnt_q;
  logic        full_q, last_q, first_q;
  lane_t       padded;

  sha3_pad_word u_pad (.word_i(in_word_i), .byte_num_i(in_byte_num_i), .word_o(padded));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q   <= '0;
      cnt_q   <= '0;
      full_q  <= 1'b0;
      last_q  <= 1'b0;
      first_q <= 1'b1;
    end else if (full_q) begin
      if (blk_ready_i) begin
        buf_q   <= '0;
        cnt_q   <= '0;
        full_q  <= 1'b0;
        last_q  <= 1'b0;
        first_q <= last_q;
      end
    end else if (in_valid_i) begin
      if (in_last_i) begin
        buf_q[cnt_q]             <= padded;
        // closing '1' of pad10*1 (bit 7 of the block's last byte); written
        // after the padded word, so it also lands there when that is word 8
        buf_q[RATE_WORDS-1][63]  <= 1'b1;
        full_q <= 1'b1;
        last_q <= 1'b1;
      end else begin
        buf_q[cnt_q] <= in_word_i;
        cnt_q        <= cnt_q + 4'd1;
        if (cnt_q == 4'(RATE_WORDS - 1)) full_q <= 1'b1;
      end
    end
  end

  assign in_ready_o  = !full_q;
  assign blk_o       = buf_q;
  assign blk_valid_o = full_q;
  assign blk_first_o = first_q;
  assign blk_last_o  = last_q;

  a_blk_hold: assert property (@(posedge clk) disable iff (!rst_n)
    blk_valid_o && !blk_ready_i |=> blk_valid_o && $stable(blk_o));

endmodule
