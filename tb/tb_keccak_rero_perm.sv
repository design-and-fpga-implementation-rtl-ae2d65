// Checks the RERO permutation module: multi-block messages against the
// reference Keccak-f, the 50-cycle latency from block acceptance to result,
// digest hold under back-pressure, a clean RERO comparison without faults,
// and detection of transient bit flips and permanent stuck-at faults
// injected into the pipeline register.
module tb_keccak_rero_perm;
  import keccak_pkg::*;
  import sha3_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  block_t       blk;
  logic         first, last, bvalid, bready;
  logic [511:0] dig;
  logic         derr, dvalid, dready;
  fi_mode_e     fmode;
  logic [10:0]  fbit;
  logic         busy, chk, chk_err;
  flat_t        ref_s;
  int           lat, detected, injected;

  keccak_rero_perm #(.ROT_AMT(1)) dut (
    .clk, .rst_n, .blk_i(blk), .blk_first_i(first), .blk_last_i(last),
    .blk_valid_i(bvalid), .blk_ready_o(bready),
    .dig_o(dig), .dig_error_o(derr), .dig_valid_o(dvalid), .dig_ready_i(dready),
    .fi_mode_i(fmode), .fi_bit_i(fbit), .busy_o(busy), .check_o(chk), .check_error_o(chk_err)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Sends one block; returns the number of cycles until the result is ready.
  task automatic send_block(input logic [575:0] b, input bit f, input bit l, output int cycles);
    blk = b; first = f; last = l; bvalid = 1;
    do @(posedge clk); while (!bready);
    #1 bvalid = 0;
    cycles = 0;
    while (busy) begin
      @(posedge clk);
      #1 cycles++;
    end
  endtask

  // Hashes nblk random blocks with an optional fault; returns error flag and digest check.
  task automatic run_msg(input int nblk, input fi_mode_e m, input int bitpos,
                         input int fault_cycle, output logic err_seen, output logic dig_ok);
    logic [575:0] b;
    int cyc;
    ref_s = '0;
    for (int k = 0; k < nblk; k++) begin
      for (int w = 0; w < 18; w++) b[32 * w +: 32] = $urandom;
      ref_s[575:0] ^= b;
      ref_s = keccak_f(ref_s);
      fbit = 11'(bitpos);
      if (m == FI_FLIP && k == nblk - 1) begin
        // single-cycle transient on a chosen cycle of the last block
        blk = b; first = (k == 0); last = (k == nblk - 1); bvalid = 1;
        do @(posedge clk); while (!bready);
        #1 bvalid = 0;
        repeat (fault_cycle) @(posedge clk);
        #1 fmode = FI_FLIP;
        @(posedge clk);
        #1 fmode = FI_NONE;
        while (busy) @(posedge clk);
        #1;
      end else begin
        fmode = (m == FI_FLIP) ? FI_NONE : m;
        send_block(b, k == 0, k == nblk - 1, cyc);
        if (m == FI_NONE) check(cyc == 50, $sformatf("latency %0d, expected 50", cyc));
      end
    end
    fmode = FI_NONE;
    check(dvalid === 1'b1, "digest valid after last block");
    err_seen = derr;
    dig_ok = (dig === ref_s[511:0]);
    dready = 1;
    @(posedge clk);
    #1 dready = 0;
  endtask

  logic e, ok;
  initial begin
    bvalid = 0; dready = 0; fmode = FI_NONE; fbit = '0; blk = '0; first = 0; last = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // fault-free messages of 1..4 blocks
    for (int n = 1; n <= 4; n++) begin
      run_msg(n, FI_NONE, 0, 0, e, ok);
      check(ok, $sformatf("digest of %0d-block message", n));
      check(!e, "no error without fault");
    end
    // back-pressure: digest held, no new block taken
    run_msg(1, FI_NONE, 0, 0, e, ok);
    begin
      logic [575:0] b = '1;
      logic [511:0] held;
      blk = b; first = 1; last = 1; bvalid = 1;
      do @(posedge clk); while (!bready);
      #1 bvalid = 0;
      while (!dvalid) @(posedge clk);
      #1 held = dig;
      blk = '0; bvalid = 1;
      repeat (10) @(posedge clk);
      #1 check(dvalid && dig === held && !bready, "digest held under back-pressure");
      bvalid = 0; dready = 1;
      @(posedge clk);
      #1 dready = 0;
    end
    // transient flips at random cycles and bits
    detected = 0; injected = 0;
    for (int n = 0; n < 40; n++) begin
      run_msg(1 + n % 2, FI_FLIP, $urandom_range(1599), $urandom_range(47), e, ok);
      injected++;
      if (e) detected++;
      check(e, "transient fault detected");
    end
    // permanent stuck-at faults
    for (int n = 0; n < 40; n++) begin
      run_msg(1, (n % 2) ? FI_STUCK1 : FI_STUCK0, $urandom_range(1599), 0, e, ok);
      injected++;
      if (e) detected++;
      check(e == !ok, "stuck-at fault detected whenever it corrupts the digest");
    end
    $display("faults injected %0d, detected %0d", injected, detected);
    // the error flag is cleared by the next message
    run_msg(1, FI_NONE, 0, 0, e, ok);
    check(ok && !e, "clean message after faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
