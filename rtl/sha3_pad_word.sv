// Pads the last, partly filled 64-bit word of a message.
//
// byte_num_i (0..7) is the number of message bytes in word_i, filling it from
// byte 0 (bits 7:0) upwards. The result keeps those bytes, puts the first
// padding byte (0x06: SHA-3 domain bits "01" and the first '1' of pad10*1)
// right after them and clears the bytes above. The closing 0x80 of the block
// is added by the padder. The byte-select structure, one unit per byte
// position chosen by byte_num[2:0], follows the document; the padding value
// is that of the SHA-3 standard, which the document names without detail.
// Combinational.
module sha3_pad_word
  import keccak_pkg::*;
(
  input  lane_t       word_i,
  input  logic [2:0]  byte_num_i,
  output lane_t       word_o
);

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (k < int'(byte_num_i))       word_o[8*k +: 8] = word_i[8*k +: 8];
      else if (k == int'(byte_num_i)) word_o[8*k +: 8] = PAD_FIRST;
      else                            word_o[8*k +: 8] = 8'h00;
    end
  end

endmodule
