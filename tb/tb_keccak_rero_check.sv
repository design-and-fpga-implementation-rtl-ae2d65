// Checks the RERO comparator: a rotated copy of the state must compare
// equal after rotating back, and any single flipped bit in either input, or a
// copy rotated by the wrong amount, must be reported.
module tb_keccak_rero_check;
  import keccak_pkg::*;
  import sha3_ref_pkg::*;
  localparam int ROT = 1;
  int checks = 0, failures = 0;
  state_t orig, rot;
  logic   err;
  flat_t  f;
  int     b;
  keccak_rero_check #(.ROT_AMT(ROT)) dut (.orig_i(orig), .rot_i(rot), .error_o(err));
  task automatic expect_err(input logic e, input string what);
    #1;
    checks++;
    if (err !== e) begin
      failures++;
      $display("%s: error=%b expected %b", what, err, e);
    end
  endtask
  initial begin
    for (int n = 0; n < 100; n++) begin
      for (int w = 0; w < 50; w++) f[32 * w +: 32] = $urandom;
      orig = f;
      for (int i = 0; i < 25; i++) rot[i] = rol(f[64 * i +: 64], ROT);
      expect_err(1'b0, "clean");
      b = $urandom_range(1599);
      rot[b / 64][b % 64] = ~rot[b / 64][b % 64];
      expect_err(1'b1, "flip in rotated copy");
      rot[b / 64][b % 64] = ~rot[b / 64][b % 64];
      orig[b / 64][b % 64] = ~orig[b / 64][b % 64];
      expect_err(1'b1, "flip in original");
      orig = f;
      for (int i = 0; i < 25; i++) rot[i] = rol(f[64 * i +: 64], ROT + 1);
      expect_err(1'b1, "wrong rotation");
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
