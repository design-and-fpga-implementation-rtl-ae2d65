// 8-bit to 64-bit converter between the pixel stream and the padder.
//
// Bytes fill a word from bits 7:0 upwards (the first byte of the message is
// the lowest byte of Keccak lane 0). A full word goes out with out_last_o = 0.
// When the byte marked in_last_i leaves k < 8 bytes in the word, the word
// goes out with out_last_o = 1 and out_byte_num_o = k; when it completes a
// full word, that word is followed by an empty last word (byte_num 0), which
// is how the padder learns that a message ended on a word boundary. Both
// sides are valid/ready handshakes; a byte can be taken every cycle while the
// output side keeps up. The converter itself is named by the document; its
// byte order and handshakes are this design's.
module byte_to_word
  import keccak_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  in_byte_i,
  input  logic        in_last_i,
  input  logic        in_valid_i,
  output logic        in_ready_o,
  output lane_t       out_word_o,
  output logic        out_last_o,
  output logic [2:0]  out_byte_num_o,
  output logic        out_valid_o,
  input  logic        out_ready_i
);

  lane_t       acc_q, acc_next;
  logic [2:0]  cnt_q;
  logic        pend_q;      // an empty last word still has to go out
  logic        out_free;

  assign out_free   = !out_valid_o || out_ready_i;
  assign in_ready_o = !pend_q && out_free;

  always_comb begin
    acc_next = acc_q;
    acc_next[8*cnt_q +: 8] = in_byte_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q          <= '0;
      cnt_q          <= '0;
      pend_q         <= 1'b0;
      out_word_o     <= '0;
      out_last_o     <= 1'b0;
      out_byte_num_o <= '0;
      out_valid_o    <= 1'b0;
    end else begin
      if (out_valid_o && out_ready_i) out_valid_o <= 1'b0;
      if (pend_q && out_free) begin
        out_word_o     <= '0;
        out_last_o     <= 1'b1;
        out_byte_num_o <= 3'd0;
        out_valid_o    <= 1'b1;
        pend_q         <= 1'b0;
      end else if (in_valid_i && in_ready_o) begin
        if (cnt_q == 3'd7 || in_last_i) begin
          out_word_o     <= acc_next;
          out_last_o     <= in_last_i && (cnt_q != 3'd7);
          out_byte_num_o <= cnt_q + 3'd1;
          out_valid_o    <= 1'b1;
          pend_q         <= in_last_i && (cnt_q == 3'd7);
          acc_q          <= '0;
          cnt_q          <= '0;
        end else begin
          acc_q <= acc_next;
          cnt_q <= cnt_q + 3'd1;
        end
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid_o && !out_ready_i |=> out_valid_o && $stable(out_word_o));

endmodule
