// Checks the padding module: messages of many lengths (including empty ones,
// word-aligned ones and ones whose padding byte lands in the block's last
// byte) are sent as 64-bit words with random gaps; the blocks, taken with
// random back-pressure, must equal the reference padding, with correct
// first/last flags, and in_ready must be low while a block waits.
module tb_sha3_padder;
  import keccak_pkg::*;
  import sha3_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lane_t       w;
  logic        wlast, wvalid, wready;
  logic [2:0]  bn;
  block_t      blk;
  logic        bfirst, blast, bvalid, bready;
  int          full_stalls = 0;

  sha3_padder dut (
    .clk, .rst_n, .in_word_i(w), .in_last_i(wlast), .in_byte_num_i(bn),
    .in_valid_i(wvalid), .in_ready_o(wready),
    .blk_o(blk), .blk_first_o(bfirst), .blk_last_o(blast), .blk_valid_o(bvalid), .blk_ready_i(bready)
  );

  byte unsigned msg[$];
  int lens[$] = '{0, 1, 7, 8, 63, 64, 70, 71, 72, 73, 135, 143, 144, 150, 216, 300};

  // consumer: random ready, compare each block
  int exp_blk_q[$];   // message index per expected block
  int blk_seen = 0;
  always @(posedge clk) begin
    if (rst_n && wvalid && !wready) full_stalls++;
  end

  task automatic drive(input byte unsigned m[$]);
    int nw = m.size() / 8;
    for (int i = 0; i <= nw; i++) begin
      logic [63:0] v = {$urandom, $urandom};
      bit is_last = (i == nw);
      for (int j = 0; j < 8; j++) if (8 * i + j < m.size()) v[8 * j +: 8] = m[8 * i + j];
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(posedge clk);
      #1 w = v; wlast = is_last; bn = 3'(m.size() - 8 * i); wvalid = 1;
      if (!is_last) bn = 3'($urandom);
      do @(posedge clk); while (!wready);
      #1 wvalid = 0;
    end
  endtask

  task automatic collect(input byte unsigned m[$]);
    int nb = num_blocks(m.size());
    for (int k = 0; k < nb; k++) begin
      while (!(bvalid && bready)) begin
        @(posedge clk);
        #1 bready = ($urandom_range(2) != 0);
      end
      checks++;
      if (blk !== pad_block(m, k) || bfirst !== (k == 0) || blast !== (k == nb - 1)) begin
        failures++;
        $display("len %0d block %0d: first=%b last=%b\n got %h\n exp %h", m.size(), k, bfirst, blast,
                 blk, pad_block(m, k));
      end
      @(posedge clk);
      #1 bready = ($urandom_range(2) != 0);
    end
  endtask

  initial begin
    wvalid = 0; bready = 0; w = '0; wlast = 0; bn = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < lens.size() + 10; t++) begin
      int len;
      len = (t < lens.size()) ? lens[t] : $urandom_range(400);
      msg = {};
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      fork
        drive(msg);
        collect(msg);
      join
    end
    checks++;
    if (full_stalls == 0) begin
      failures++;
      $display("in_ready never held a word back");
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
