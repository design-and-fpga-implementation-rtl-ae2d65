// Fault-coverage campaign of the RERO scheme on 64-bit messages.
//
// Each trial hashes one random 64-bit (8-byte) message through sha3_core
// while a fault is injected into a random bit of the round pipeline register:
// a single-cycle flip at a random round cycle (transient), or a stuck-at-0 /
// stuck-at-1 held for the whole permutation (permanent). The digest is
// compared with the reference model. A fault that corrupts the digest
// without raising the error flag is a failure; the run reports, like a
// console "good"/"error" monitor, how many faults were effective and how
// many were detected, and the resulting coverage. Fault-free trials must
// report "good" and give the right digest.
module tb_rero_fault_coverage;
  import keccak_pkg::*;
  import sha3_ref_pkg::*;
  localparam int N_TRANSIENT = 600;
  localparam int N_PERMANENT = 600;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lane_t        w;
  logic         wlast, wvalid, wready;
  logic [2:0]   bn;
  logic [511:0] dig;
  logic         derr, dvalid, dready;
  fi_mode_e     fmode;
  logic [10:0]  fbit;
  logic         busy, chk, chk_err;

  sha3_core dut (
    .clk, .rst_n, .in_word_i(w), .in_last_i(wlast), .in_byte_num_i(bn), .in_valid_i(wvalid),
    .in_ready_o(wready), .dig_o(dig), .dig_error_o(derr), .dig_valid_o(dvalid), .dig_ready_i(dready),
    .fi_mode_i(fmode), .fi_bit_i(fbit), .busy_o(busy), .check_o(chk), .check_error_o(chk_err)
  );

  task automatic put_word(input logic [63:0] v, input bit l);
    #1 w = v; wlast = l; bn = 3'd0; wvalid = 1;
    do @(posedge clk); while (!wready);
    #1 wvalid = 0;
  endtask

  // kind: 0 none, 1 transient flip, 2 stuck-at-0, 3 stuck-at-1
  task automatic trial(input int kind, output bit corrupted, output bit flagged);
    logic [63:0] v;
    byte unsigned m[$];
    v = {$urandom, $urandom};
    m = {};
    for (int j = 0; j < 8; j++) m.push_back(v[8 * j +: 8]);
    fbit = 11'($urandom_range(1599));
    fork
      begin
        put_word(v, 0);
        put_word('0, 1);
      end
      if (kind != 0) begin
        while (!busy) @(posedge clk);
        if (kind == 1) begin
          repeat ($urandom_range(47)) @(posedge clk);
          #1 fmode = FI_FLIP;
          @(posedge clk);
          #1 fmode = FI_NONE;
        end else begin
          #1 fmode = fi_mode_e'(kind);
          while (busy) @(posedge clk);
          #1 fmode = FI_NONE;
        end
      end
    join
    while (!dvalid) @(posedge clk);
    #1;
    corrupted = (dig !== sha3_512(m));
    flagged   = derr;
    dready = 1;
    @(posedge clk);
    #1 dready = 0;
  endtask

  int eff_t = 0, det_t = 0, eff_p = 0, det_p = 0, masked_flag = 0;
  bit c, f;
  initial begin
    wvalid = 0; dready = 0; w = '0; wlast = 0; bn = '0; fmode = FI_NONE; fbit = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      trial(0, c, f);
      checks++;
      if (c || f) begin
        failures++;
        $display("fault-free trial: %s, digest %s", f ? "error" : "good", c ? "wrong" : "right");
      end
    end
    for (int n = 0; n < N_TRANSIENT + N_PERMANENT; n++) begin
      int kind;
      kind = (n < N_TRANSIENT) ? 1 : 2 + n % 2;
      trial(kind, c, f);
      checks++;
      if (c && !f) begin
        failures++;
        $display("undetected fault: kind %0d bit %0d", kind, fbit);
      end
      if (!c && f) masked_flag++;
      if (kind == 1) begin
        if (c || f) eff_t++;
        if (f) det_t++;
      end else begin
        if (c || f) eff_p++;
        if (f) det_p++;
      end
    end
    $display("transient: %0d injected, %0d effective, %0d detected", N_TRANSIENT, eff_t, det_t);
    $display("permanent: %0d injected, %0d effective, %0d detected", N_PERMANENT, eff_p, det_p);
    $display("flagged although the digest was right: %0d", masked_flag);
    $display("coverage of effective faults: %0d.%02d %%", 100 * (det_t + det_p) / (eff_t + eff_p),
             (10000 * (det_t + det_p) / (eff_t + eff_p)) % 100);
    checks++;
    if (eff_t == 0 || eff_p == 0) begin
      failures++;
      $display("no effective fault of one kind");
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
