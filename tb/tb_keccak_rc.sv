// Checks the round constant table against constants generated by the
// Keccak LFSR in the reference model, for all 24 rounds and the unused codes.
module tb_keccak_rc;
  import sha3_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0]  round;
  logic [63:0] rc;
  keccak_rc dut (.round_i(round), .rc_o(rc));
  initial begin
    for (int r = 0; r < 32; r++) begin
      round = 5'(r);
      #1;
      checks++;
      if (rc !== (r < 24 ? round_const(r) : 64'h0)) begin
        failures++;
        $display("round %0d: got %h expected %h", r, rc, round_const(r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
