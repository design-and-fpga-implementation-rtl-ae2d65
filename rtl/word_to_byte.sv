// 512-bit to 8-bit converter for the digest.
//
// Takes a 512-bit digest and its error flag when idle and sends the 64 bytes
// out, byte 0 (bits 7:0, the first digest byte of SHA3-512) first, one per
// accepted cycle. out_last_o marks byte 63; out_error_o repeats the error
// flag with every byte. A new digest is taken only after the last byte has
// gone. The converter is named by the document; byte order, handshakes and
// the error flag travelling with the bytes are this design's.
module word_to_byte
  import keccak_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DIGEST_W-1:0] in_dig_i,
  input  logic                in_error_i,
  input  logic                in_valid_i,
  output logic                in_ready_o,
  output logic [7:0]          out_byte_o,
  output logic                out_last_o,
  output logic                out_error_o,
  output logic                out_valid_o,
  input  logic                out_ready_i
);

  logic [DIGEST_W-1:0] sh_q;
  logic [5:0]          idx_q;
  logic                busy_q, err_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh_q   <= '0;
      idx_q  <= '0;
      busy_q <= 1'b0;
      err_q  <= 1'b0;
    end else if (!busy_q) begin
      if (in_valid_i) begin
        sh_q   <= in_dig_i;
        idx_q  <= '0;
        busy_q <= 1'b1;
        err_q  <= in_error_i;
      end
    end else if (out_ready_i) begin
      sh_q  <= sh_q >> 8;
      idx_q <= idx_q + 6'd1;
      if (idx_q == 6'd63) busy_q <= 1'b0;
    end
  end

  assign in_ready_o  = !busy_q;
  assign out_valid_o = busy_q;
  assign out_byte_o  = sh_q[7:0];
  assign out_last_o  = (idx_q == 6'd63);
  assign out_error_o = err_q;

endmodule
