// Shared types and constants of the SHA-3-512 (Keccak-f[1600]) core.
//
// The state is 5x5 lanes of 64 bits. A lane is addressed as (x, y) with
// 0 <= x, y <= 4 and stored at flat index x + 5*y, so lane (0,0) is the
// first 64 bits of the message block. Bit i of a lane is bit i of the
// little-endian 64-bit word, which is the Keccak convention.
//
// The rate/capacity split (r = 576, c = 1024), the lane width and the 24
// rounds follow the document. The fault-injection encoding at the end is a
// test hook of this design used to repeat the document's fault simulations.
package keccak_pkg;

  localparam int unsigned LANE_W     = 64;
  localparam int unsigned NUM_LANES  = 25;
  localparam int unsigned STATE_W    = LANE_W * NUM_LANES;   // b = 1600
  localparam int unsigned RATE_W     = 576;                  // r
  localparam int unsigned RATE_WORDS = RATE_W / LANE_W;      // 9 words per block
  localparam int unsigned DIGEST_W   = 512;
  localparam int unsigned ROUNDS     = 24;

  typedef logic [LANE_W-1:0]              lane_t;
  typedef lane_t [NUM_LANES-1:0]          state_t;
  typedef lane_t [RATE_WORDS-1:0]         block_t;

  // Rho rotation offsets r[x, y], indexed [x + 5*y].
  localparam int unsigned RHO [NUM_LANES] = '{
     0,  1, 62, 28, 27,     // y = 0
    36, 44,  6, 55, 20,     // y = 1
     3, 10, 43, 25, 39,     // y = 2
    41, 45, 15, 21,  8,     // y = 3
    18,  2, 61, 56, 14      // y = 4
  };

  // First padding byte of SHA-3 (FIPS 202): domain suffix "01" plus the
  // first '1' of pad10*1 gives 0x06. The final '1' of pad10*1 is bit 7 of the
  // last rate byte (0x80), set by the padder.
  localparam logic [7:0] PAD_FIRST = 8'h06;

  // Fault injection on the pipeline register between H1 and H2.
  typedef enum logic [1:0] {
    FI_NONE   = 2'd0,
    FI_FLIP   = 2'd1,
    FI_STUCK0 = 2'd2,
    FI_STUCK1 = 2'd3
  } fi_mode_e;

  function automatic int unsigned idx(input int unsigned x, input int unsigned y);
    return (x % 5) + 5 * (y % 5);
  endfunction

  function automatic lane_t rotl(input lane_t v, input int unsigned n);
    int unsigned k;
    k = n % LANE_W;
    if (k == 0) return v;
    return (v << k) | (v >> (LANE_W - k));
  endfunction

  function automatic lane_t rotr(input lane_t v, input int unsigned n);
    return rotl(v, (LANE_W - (n % LANE_W)) % LANE_W);
  endfunction

endpackage
