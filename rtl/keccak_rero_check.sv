// RERO comparator: rotates every lane of the rotated run's result right by
// ROT_AMT and compares it with the original run's result.
//
// Because theta, rho, pi and chi commute with rotating all lanes by the same
// amount, and iota is given a rotated round constant, the rotated run ends
// in the original result rotated by ROT_AMT. Any difference means a fault
// hit one of the runs. Combinational; error_o is 1 on a mismatch in any of
// the 1600 bits. Comparing the whole state, not only the digest, is this
// design's choice.
module keccak_rero_check
  import keccak_pkg::*;
#(
  parameter int unsigned ROT_AMT = 1
) (
  input  state_t orig_i,
  input  state_t rot_i,
  output logic   error_o
);

  state_t back;

  always_comb begin
    for (int i = 0; i < NUM_LANES; i++) begin
      back[i] = rotr(rot_i[i], ROT_AMT);
    end
    error_o = (back != orig_i);
  end

endmodule
