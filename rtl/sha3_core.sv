// SHA3-512 core: the padding module feeding the RERO-protected permutation.
//
// 64-bit message words come in with a last flag and, on the last word, the
// number of bytes it holds (see sha3_padder). The padder builds 576-bit rate
// blocks, the permutation absorbs them and, after the padded block, offers
// the 512-bit digest (lanes 0..7 of the state, byte 0 in bits 7:0) together
// with the error flag of the RERO check, raised if any block of the message
// failed the comparison. The structure (padder, then permutation, r = 576 and
// a 512-bit digest) follows the document. The padder can fill the next block
// while the permutation runs; a block takes 51 cycles in the permutation.
module sha3_core
  import keccak_pkg::*;
#(
  parameter int unsigned ROT_AMT = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  lane_t               in_word_i,
  input  logic                in_last_i,
  input  logic [2:0]          in_byte_num_i,
  input  logic                in_valid_i,
  output logic                in_ready_o,
  output logic [DIGEST_W-1:0] dig_o,
  output logic                dig_error_o,
  output logic                dig_valid_o,
  input  logic                dig_ready_i,
  input  fi_mode_e            fi_mode_i,
  input  logic [10:0]         fi_bit_i,
  output logic                busy_o,
  output logic                check_o,
  output logic                check_error_o
);

  block_t blk;
  logic   blk_first, blk_last, blk_valid, blk_ready;

  sha3_padder u_padder (
    .clk, .rst_n,
    .in_word_i, .in_last_i, .in_byte_num_i, .in_valid_i, .in_ready_o,
    .blk_o(blk), .blk_first_o(blk_first), .blk_last_o(blk_last),
    .blk_valid_o(blk_valid), .blk_ready_i(blk_ready)
  );

  keccak_rero_perm #(.ROT_AMT(ROT_AMT)) u_perm (
    .clk, .rst_n,
    .blk_i(blk), .blk_first_i(blk_first), .blk_last_i(blk_last),
    .blk_valid_i(blk_valid), .blk_ready_o(blk_ready),
    .dig_o, .dig_error_o, .dig_valid_o, .dig_ready_i,
    .fi_mode_i, .fi_bit_i,
    .busy_o, .check_o, .check_error_o
  );

endmodule
