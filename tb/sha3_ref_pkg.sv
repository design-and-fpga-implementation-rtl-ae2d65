// Reference model of SHA3-512 for the testbenches, written from the Keccak
// specification independently of the RTL: the round constants come from the
// degree-8 LFSR, the rho offsets from the (x, y) -> (y, 2x+3y) walk, and the
// state is kept as a [x][y] array instead of the RTL's flat lane vector.
// Flat 1600-bit states use lane x + 5*y at bits 64*(x+5y) +: 64.
package sha3_ref_pkg;

  typedef logic [63:0]   u64;
  typedef u64            st_t [5][5];
  typedef logic [1599:0] flat_t;

  function automatic u64 rol(input u64 v, input int n);
    n = n % 64;
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic bit lfsr_rc(input int t);
    logic [8:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 9'h001;
    for (int i = 1; i <= t % 255; i++) begin
      r = r << 1;
      if (r[8]) r = r ^ 9'h171;
    end
    return r[0];
  endfunction

  function automatic u64 round_const(input int ir);
    u64 rc = '0;
    for (int j = 0; j <= 6; j++) rc[(1 << j) - 1] = lfsr_rc(j + 7 * ir);
    return rc;
  endfunction

  function automatic int rho_off(input int xx, input int yy);
    int x = 1, y = 0, nx;
    if (xx == 0 && yy == 0) return 0;
    for (int t = 0; t < 24; t++) begin
      if (x == xx && y == yy) return ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return -1;
  endfunction

  function automatic st_t unflat(input flat_t f);
    st_t a;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) a[x][y] = f[64 * (x + 5 * y) +: 64];
    return a;
  endfunction

  function automatic flat_t to_flat(input st_t a);
    flat_t f;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) f[64 * (x + 5 * y) +: 64] = a[x][y];
    return f;
  endfunction

  // theta, rho, pi
  function automatic flat_t ref_h1(input flat_t f);
    st_t a = unflat(f), b;
    u64 c[5], d[5];
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rol(c[(x + 1) % 5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) a[x][y] ^= d[x];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) b[y][(2 * x + 3 * y) % 5] = rol(a[x][y], rho_off(x, y));
    return to_flat(b);
  endfunction

  // chi, iota
  function automatic flat_t ref_h2(input flat_t f, input u64 rc);
    st_t b = unflat(f), a;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) a[x][y] = b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
    a[0][0] ^= rc;
    return to_flat(a);
  endfunction

  function automatic flat_t keccak_f(input flat_t f);
    for (int r = 0; r < 24; r++) f = ref_h2(ref_h1(f), round_const(r));
    return f;
  endfunction

  // Padded message block k (576 bits, byte j of the block at bits 8j +: 8).
  function automatic logic [575:0] pad_block(input byte unsigned msg[$], input int k);
    logic [575:0] blk = '0;
    int total = ((msg.size() / 72) + 1) * 72;
    for (int j = 0; j < 72; j++) begin
      int p = 72 * k + j;
      logic [7:0] v = 8'h00;
      if (p < msg.size()) v = msg[p];
      else if (p == msg.size()) v = 8'h06;
      if (p == total - 1) v |= 8'h80;
      blk[8 * j +: 8] = v;
    end
    return blk;
  endfunction

  function automatic int num_blocks(input int len);
    return len / 72 + 1;
  endfunction

  function automatic logic [511:0] sha3_512(input byte unsigned msg[$]);
    flat_t s = '0;
    for (int k = 0; k < num_blocks(msg.size()); k++) begin
      s[575:0] ^= pad_block(msg, k);
      s = keccak_f(s);
    end
    return s[511:0];
  endfunction

endpackage
