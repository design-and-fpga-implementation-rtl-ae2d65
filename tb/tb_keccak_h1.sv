// Compares the theta-rho-pi half round with the reference model on
// single-bit states (which expose every rotation offset and lane move) and
// on random states.
module tb_keccak_h1;
  import keccak_pkg::*;
  import sha3_ref_pkg::*;
  int checks = 0, failures = 0;
  state_t si, so;
  flat_t  f, exp_f;
  keccak_h1 dut (.state_i(si), .state_o(so));
  task automatic check_one(input flat_t v);
    si = v;
    #1;
    exp_f = ref_h1(v);
    checks++;
    if (flat_t'(so) !== exp_f) begin
      failures++;
      if (failures < 5) $display("mismatch for input %h", v);
    end
  endtask
  initial begin
    for (int b = 0; b < 1600; b += 7) begin
      f = '0;
      f[b] = 1'b1;
      check_one(f);
    end
    for (int n = 0; n < 200; n++) begin
      for (int w = 0; w < 50; w++) f[32 * w +: 32] = $urandom;
      check_one(f);
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
