// End-to-end test of the pixel-to-digest chain at its default parameters.
//
// 1. A 100 x 100 8-bit image (pixel (r, c) = (37r + 11c + (rc mod 23)) mod 256,
//    row by row, 10,000 bytes, 139 rate blocks) is hashed; the 64 digest bytes
//    are compared with the reference model and with a digest from an
//    independent SHA3-512 implementation, and the hashing time is reported.
// 2. Short messages hit each padding case: a partly filled last word, a
//    message ending on a word boundary (empty last word), the padding byte in
//    the last byte of a block (0x86), and an exactly block-sized message.
// 3. Fault campaign: transient bit flips and permanent stuck-at faults in the
//    round pipeline register; hash_error must rise whenever the digest is
//    wrong, and must clear again on the next clean message.
// Each mechanism (multi-block absorb, padder full stall, output back-pressure,
// empty last word, 0x86 padding, clean RERO check, detected transient,
// detected permanent fault, error flag cleared) is counted; one that never
// happens counts as a failure.
module tb_sha3_image_top;
  import sha3_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  pix, hbyte;
  logic        plast, pvalid, pready, hlast, herr, hvalid, hready;
  logic [1:0]  fmode;
  logic [10:0] fbit;
  logic        busy, chk, chk_err;

  sha3_image_top dut (
    .clk, .rst_n, .pix_data(pix), .pix_last(plast), .pix_valid(pvalid), .pix_ready(pready),
    .hash_data(hbyte), .hash_last(hlast), .hash_error(herr), .hash_valid(hvalid), .hash_ready(hready),
    .fi_mode(fmode), .fi_bit(fbit), .perm_busy(busy), .rero_check(chk), .rero_check_error(chk_err)
  );

  localparam logic [511:0] IMG_KAT_BE = 512'h5ab14675d615148dee84f28423badee0c11f1d7c4820800698eb5d888c9ea04158e919111031cdecb8486d60eb309fad01585e660db522dbb0b78490bfdab930;

  // mechanism counters
  int n_multiblock = 0, n_full_stall = 0, n_backpressure = 0, n_empty_last = 0, n_pad86 = 0;
  int n_clean_check = 0, n_transient_det = 0, n_permanent_det = 0, n_err_cleared = 0;
  bit random_ready = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_padder.in_valid_i && !dut.u_core.u_padder.in_ready_o) n_full_stall++;
    if (hvalid && !hready) n_backpressure++;
    if (chk && !chk_err) n_clean_check++;
    if (dut.u_core.u_padder.in_valid_i && dut.u_core.u_padder.in_ready_o &&
        dut.u_core.u_padder.in_last_i && dut.u_core.u_padder.in_byte_num_i == 3'd0) n_empty_last++;
    if (dut.u_core.blk_valid && dut.u_core.blk_ready && dut.u_core.blk_last &&
        dut.u_core.blk[8][63:56] == 8'h86) n_pad86++;
    if (dut.u_core.blk_valid && dut.u_core.blk_ready && !dut.u_core.blk_first) n_multiblock++;
  end

  always @(negedge clk) hready <= random_ready ? ($urandom_range(3) != 0) : 1'b1;

  task automatic send(input byte unsigned m[$]);
    for (int i = 0; i < m.size(); i++) begin
      #1 pix = m[i]; plast = (i == m.size() - 1); pvalid = 1;
      do @(posedge clk); while (!pready);
      #1 pvalid = 0;
    end
  endtask

  task automatic receive(output logic [511:0] d, output logic e);
    e = 0;
    for (int k = 0; k < 64; k++) begin
      do @(posedge clk); while (!(hvalid && hready));
      d[8 * k +: 8] = hbyte;
      e |= herr;
      if (hlast !== (k == 63)) begin
        failures++;
        $display("hash_last wrong at byte %0d", k);
      end
    end
  endtask

  // Hash m with an optional fault (0 none, 1 transient flip, 2/3 stuck-at 0/1).
  task automatic hash(input byte unsigned m[$], input int fault, output logic [511:0] d,
                      output logic e);
    fork
      send(m);
      receive(d, e);
      if (fault != 0) begin
        fbit = 11'($urandom_range(1599));
        while (!busy) @(posedge clk);
        if (fault == 1) begin
          repeat ($urandom_range(45)) @(posedge clk);
          #1 fmode = 2'd1;
          @(posedge clk);
          #1 fmode = 2'd0;
        end else begin
          #1 fmode = 2'(fault);
        end
      end
    join
    #1 fmode = 2'd0;
  endtask

  byte unsigned msg[$];
  logic [511:0] d, expd;
  logic         e;
  longint       t0, t1;
  int           lens[$] = '{1, 8, 71, 72, 143, 150};
  bit           wrong;

  initial begin
    pvalid = 0; pix = 0; plast = 0; fmode = 0; fbit = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. the 100 x 100 image
    msg = {};
    for (int r = 0; r < 100; r++)
      for (int c = 0; c < 100; c++) msg.push_back(8'((37 * r + 11 * c + (r * c) % 23) % 256));
    t0 = $time;
    hash(msg, 0, d, e);
    t1 = $time;
    $display("100x100 image: %0d bytes, %0d blocks, %0d cycles", msg.size(), num_blocks(msg.size()),
             (t1 - t0) / 10);
    checks++;
    wrong = 0;
    for (int k = 0; k < 64; k++) if (d[8 * k +: 8] !== IMG_KAT_BE[8 * (63 - k) +: 8]) wrong = 1;
    if (wrong || e) begin
      failures++;
      $display("image digest wrong (error flag %b): %h", e, d);
    end
    checks++;
    if (d !== sha3_512(msg)) begin
      failures++;
      $display("image digest differs from reference model");
    end

    // 2. padding cases, with output back-pressure
    random_ready = 1;
    foreach (lens[t]) begin
      msg = {};
      for (int i = 0; i < lens[t]; i++) msg.push_back(8'($urandom));
      hash(msg, 0, d, e);
      checks++;
      if (d !== sha3_512(msg) || e) begin
        failures++;
        $display("len %0d digest wrong", lens[t]);
      end
    end

    // 3. fault campaign
    for (int n = 0; n < 24; n++) begin
      int f;
      f = 1 + n % 3;
      msg = {};
      for (int i = 0; i < 100; i++) msg.push_back(8'($urandom));
      expd = sha3_512(msg);
      hash(msg, f, d, e);
      checks++;
      if ((d !== expd) && !e) begin
        failures++;
        $display("fault %0d corrupted the digest undetected", f);
      end
      if (e && f == 1) n_transient_det++;
      if (e && f != 1) n_permanent_det++;
      // a clean message afterwards
      hash(msg, 0, d, e);
      checks++;
      if (d !== expd || e) begin
        failures++;
        $display("clean message after fault wrong");
      end else n_err_cleared++;
    end

    $display("multiblock=%0d full_stall=%0d backpressure=%0d empty_last=%0d pad86=%0d",
             n_multiblock, n_full_stall, n_backpressure, n_empty_last, n_pad86);
    $display("clean_check=%0d transient_detected=%0d permanent_detected=%0d err_cleared=%0d",
             n_clean_check, n_transient_det, n_permanent_det, n_err_cleared);
    checks++;
    if (n_multiblock == 0 || n_full_stall == 0 || n_backpressure == 0 || n_empty_last == 0 ||
        n_pad86 == 0 || n_clean_check == 0 || n_transient_det == 0 || n_permanent_det == 0 ||
        n_err_cleared == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
