// Reliable SHA3-512 hashing of an 8-bit pixel stream.
//
// The chain is: pixel bytes -> byte_to_word (8 to 64 bits) -> sha3_core
// (padding module and Keccak-f[1600] permutation with RERO error detection)
// -> word_to_byte (512 to 8 bits) -> digest bytes. A message is any number
// (at least one) of bytes ending with pix_last; for the intended use it is a
// 100 x 100 8-bit image, 10,000 bytes, hashed into 64 digest bytes. Every
// digest byte carries hash_error, which is 1 when the RERO comparison found a
// mismatch in any block of that message. fi_mode / fi_bit inject a fault into
// one bit of the round pipeline register for fault-coverage experiments; tie
// fi_mode to 0 in normal use. All ports are valid/ready handshakes in the
// clk domain with a synchronous active-low reset. The chain follows the
// document's block diagram; handshakes, byte order and the fault-injection
// ports are this design's.
module sha3_image_top
  import keccak_pkg::*;
#(
  parameter int unsigned ROT_AMT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   pix_data,
  input  logic         pix_last,
  input  logic         pix_valid,
  output logic         pix_ready,
  output logic [7:0]   hash_data,
  output logic         hash_last,
  output logic         hash_error,
  output logic         hash_valid,
  input  logic         hash_ready,
  input  logic [1:0]   fi_mode,
  input  logic [10:0]  fi_bit,
  output logic         perm_busy,
  output logic         rero_check,
  output logic         rero_check_error
);

  lane_t               word;
  logic                word_last, word_valid, word_ready;
  logic [2:0]          word_byte_num;
  logic [DIGEST_W-1:0] dig;
  logic                dig_error, dig_valid, dig_ready;

  byte_to_word u_b2w (
    .clk, .rst_n,
    .in_byte_i(pix_data), .in_last_i(pix_last), .in_valid_i(pix_valid), .in_ready_o(pix_ready),
    .out_word_o(word), .out_last_o(word_last), .out_byte_num_o(word_byte_num),
    .out_valid_o(word_valid), .out_ready_i(word_ready)
  );

  sha3_core #(.ROT_AMT(ROT_AMT)) u_core (
    .clk, .rst_n,
    .in_word_i(word), .in_last_i(word_last), .in_byte_num_i(word_byte_num),
    .in_valid_i(word_valid), .in_ready_o(word_ready),
    .dig_o(dig), .dig_error_o(dig_error), .dig_valid_o(dig_valid), .dig_ready_i(dig_ready),
    .fi_mode_i(fi_mode_e'(fi_mode)), .fi_bit_i(fi_bit),
    .busy_o(perm_busy), .check_o(rero_check), .check_error_o(rero_check_error)
  );

  word_to_byte u_w2b (
    .clk, .rst_n,
    .in_dig_i(dig), .in_error_i(dig_error), .in_valid_i(dig_valid), .in_ready_o(dig_ready),
    .out_byte_o(hash_data), .out_last_o(hash_last), .out_error_o(hash_error),
    .out_valid_o(hash_valid), .out_ready_i(hash_ready)
  );

endmodule
