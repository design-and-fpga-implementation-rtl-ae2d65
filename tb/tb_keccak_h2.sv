// Compares the chi-iota half round with the reference model on random
// states and random round constants.
module tb_keccak_h2;
  import keccak_pkg::*;
  import sha3_ref_pkg::*;
  int checks = 0, failures = 0;
  state_t si, so;
  lane_t  rc;
  flat_t  f;
  keccak_h2 dut (.state_i(si), .rc_i(rc), .state_o(so));
  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int w = 0; w < 50; w++) f[32 * w +: 32] = $urandom;
      si = f;
      rc = (n < 24) ? round_const(n) : {$urandom, $urandom};
      #1;
      checks++;
      if (flat_t'(so) !== ref_h2(f, rc)) begin
        failures++;
        if (failures < 5) $display("mismatch at vector %0d", n);
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
