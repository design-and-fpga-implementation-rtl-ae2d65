// Second half (H2) of a Keccak-f[1600] round: the chi and iota steps.
//
// chi: A[x,y] = B[x,y] ^ (~B[x+1,y] & B[x+2,y]); iota: A[0,0] ^= rc.
// The round constant comes in as a port so the same logic serves both the
// original run (plain RC) and the rotated RERO run (RC rotated by the same
// amount as the state). Combinational, lane indexing x + 5*y. The steps and
// their place after the pipeline register follow the document; passing the
// constant in as a port is this design's choice.
module keccak_h2
  import keccak_pkg::*;
(
  input  state_t state_i,
  input  lane_t  rc_i,
  output state_t state_o
);

  always_comb begin
    for (int y = 0; y < 5; y++) begin
      for (int x = 0; x < 5; x++) begin
        state_o[idx(x, y)] = state_i[idx(x, y)]
                           ^ (~state_i[idx(x + 1, y)] & state_i[idx(x + 2, y)]);
      end
    end
    state_o[0] = state_o[0] ^ rc_i;
  end

endmodule
