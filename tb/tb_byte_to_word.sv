// Checks the 8-to-64-bit converter: messages of 1..40 bytes are sent with
// random gaps and taken with random back-pressure; every word, its last flag
// and byte count must match the packing rule, including the empty last word
// after a message that ends on a word boundary.
module tb_byte_to_word;
  import keccak_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] b;
  logic       blast, bvalid, bready;
  lane_t      w;
  logic       wlast, wvalid, wready;
  logic [2:0] bn;
  byte unsigned msg[$];

  byte_to_word dut (
    .clk, .rst_n, .in_byte_i(b), .in_last_i(blast), .in_valid_i(bvalid), .in_ready_o(bready),
    .out_word_o(w), .out_last_o(wlast), .out_byte_num_o(bn), .out_valid_o(wvalid), .out_ready_i(wready)
  );

  task automatic drive(input byte unsigned m[$]);
    for (int i = 0; i < m.size(); i++) begin
      if ($urandom_range(4) == 0) repeat ($urandom_range(2)) @(posedge clk);
      #1 b = m[i]; blast = (i == m.size() - 1); bvalid = 1;
      do @(posedge clk); while (!bready);
      #1 bvalid = 0;
    end
  endtask

  task automatic collect(input byte unsigned m[$]);
    int nw = m.size() / 8;
    for (int i = 0; i <= nw; i++) begin
      logic [63:0] e = '0;
      int k = m.size() - 8 * i;
      if (k > 8) k = 8;
      for (int j = 0; j < k; j++) e[8 * j +: 8] = m[8 * i + j];
      while (!(wvalid && wready)) begin
        @(posedge clk);
        #1 wready = ($urandom_range(2) != 0);
      end
      checks++;
      if (i < nw) begin
        if (w !== e || wlast !== 1'b0) begin
          failures++;
          $display("len %0d word %0d: got %h last %b exp %h", m.size(), i, w, wlast, e);
        end
      end else begin
        if (wlast !== 1'b1 || bn !== 3'(k) || (w & ~(64'hFFFF_FFFF_FFFF_FFFF << (8 * k))) !== e) begin
          failures++;
          $display("len %0d last word: got %h last %b bn %0d exp %h bn %0d", m.size(), w, wlast, bn, e, k);
        end
      end
      @(posedge clk);
      #1 wready = ($urandom_range(2) != 0);
    end
  endtask

  initial begin
    bvalid = 0; wready = 0; b = 0; blast = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int len;
      len = 1 + t % 40;
      msg = {};
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      fork
        drive(msg);
        collect(msg);
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
