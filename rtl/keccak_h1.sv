// First half (H1) of a Keccak-f[1600] round: the theta, rho and pi steps.
//
// theta: C[x] = xor of column x, D[x] = C[x-1] ^ rotl(C[x+1], 1), every lane
// A[x,y] ^= D[x]. rho rotates lane (x,y) left by r[x,y]; pi moves it to
// B[y, 2x+3y]. The steps and their split into H1 / H2 around the pipeline
// register follow the document. Purely combinational: state_i in, state_o out
// in the same cycle. The lane indexing is x + 5*y (see keccak_pkg).
module keccak_h1
  import keccak_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  lane_t  c [5];
  lane_t  d [5];
  state_t a;

  always_comb begin
    for (int x = 0; x < 5; x++) begin
      c[x] = state_i[idx(x, 0)] ^ state_i[idx(x, 1)] ^ state_i[idx(x, 2)]
           ^ state_i[idx(x, 3)] ^ state_i[idx(x, 4)];
    end
    for (int x = 0; x < 5; x++) begin
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    end
    for (int y = 0; y < 5; y++) begin
      for (int x = 0; x < 5; x++) begin
        a[idx(x, y)] = state_i[idx(x, y)] ^ d[x];
      end
    end
    // rho then pi
    for (int y = 0; y < 5; y++) begin
      for (int x = 0; x < 5; x++) begin
        state_o[idx(y, 2 * x + 3 * y)] = rotl(a[idx(x, y)], RHO[idx(x, y)]);
      end
    end
  end

endmodule
