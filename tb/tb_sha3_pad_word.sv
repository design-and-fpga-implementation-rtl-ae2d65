// Checks word padding for every byte count: data bytes kept, 0x06 after
// them, zeros above.
module tb_sha3_pad_word;
  int checks = 0, failures = 0;
  logic [63:0] wi, wo, exp_w;
  logic [2:0]  bn;
  sha3_pad_word dut (.word_i(wi), .byte_num_i(bn), .word_o(wo));
  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int k = 0; k < 8; k++) begin
        wi = {$urandom, $urandom};
        bn = 3'(k);
        exp_w = 64'h06 << (8 * k);
        for (int j = 0; j < k; j++) exp_w[8 * j +: 8] = wi[8 * j +: 8];
        #1;
        checks++;
        if (wo !== exp_w) begin
          failures++;
          $display("byte_num %0d: got %h expected %h", k, wo, exp_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
