// Checks the SHA3-512 core at the 64-bit word interface: messages of
// lengths around every block and word boundary are hashed and compared with
// the reference model and, for one 200-byte message, with a digest computed
// by an independent SHA3-512 implementation. The RERO flag must stay low
// without faults and rise when a bit flip is injected during the rounds.
module tb_sha3_core;
  import keccak_pkg::*;
  import sha3_ref_pkg::*;
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

  byte unsigned msg[$];
  int lens[$] = '{0, 1, 5, 8, 64, 71, 72, 79, 80, 143, 144, 145, 215, 216, 300, 577};
  // digest of bytes (29*i + 7) mod 256, i = 0..199, byte 0 first
  localparam logic [511:0] KAT200_BE = 512'h12bf901b04a2bad1eeb531a5b23d836451928b3ee462eb728494d9f5464a74865c9f99f7a11a03176d230dc990acd60a5fb727ec7574a1cbe9e1abb49213bea3;

  task automatic hash(input byte unsigned m[$], input bit inject, output logic [511:0] d, output logic e);
    int nw = m.size() / 8;
    fork
      begin
        for (int i = 0; i <= nw; i++) begin
          logic [63:0] v;
          v = '0;
          for (int j = 0; j < 8; j++) if (8 * i + j < m.size()) v[8 * j +: 8] = m[8 * i + j];
          #1 w = v; wlast = (i == nw); bn = 3'(m.size() - 8 * i); wvalid = 1;
          do @(posedge clk); while (!wready);
          #1 wvalid = 0;
        end
      end
      if (inject) begin
        while (!busy) @(posedge clk);
        repeat ($urandom_range(40)) @(posedge clk);
        #1 fbit = 11'($urandom_range(1599)); fmode = FI_FLIP;
        @(posedge clk);
        #1 fmode = FI_NONE;
      end
    join
    while (!dvalid) @(posedge clk);
    #1 d = dig; e = derr; dready = 1;
    @(posedge clk);
    #1 dready = 0;
  endtask

  logic [511:0] d;
  logic         e;
  initial begin
    wvalid = 0; dready = 0; w = '0; wlast = 0; bn = '0; fmode = FI_NONE; fbit = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (lens[t]) begin
      msg = {};
      for (int i = 0; i < lens[t]; i++) msg.push_back(8'($urandom));
      hash(msg, 0, d, e);
      checks++;
      if (d !== sha3_512(msg) || e !== 1'b0) begin
        failures++;
        $display("len %0d: digest mismatch or error flag %b", lens[t], e);
      end
    end
    msg = {};
    for (int i = 0; i < 200; i++) msg.push_back(8'((29 * i + 7) % 256));
    hash(msg, 0, d, e);
    checks++;
    for (int k = 0; k < 64; k++) begin
      if (d[8 * k +: 8] !== KAT200_BE[8 * (63 - k) +: 8]) begin
        failures++;
        $display("200-byte known answer mismatch at byte %0d", k);
        break;
      end
    end
    for (int n = 0; n < 10; n++) begin
      msg = {};
      for (int i = 0; i < 100; i++) msg.push_back(8'($urandom));
      hash(msg, 1, d, e);
      checks++;
      if (e !== 1'b1) begin
        failures++;
        $display("injected flip not flagged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
