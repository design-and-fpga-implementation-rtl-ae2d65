# Reliable SHA3-512 with RERO error detection

A hash core is only useful if its digest is right. A transient upset or a
stuck gate inside a SHA-3 datapath silently produces a wrong digest, and an
attacker who can inject faults can use that. This design is a SHA3-512 engine
(Keccak-f[1600], rate r = 576, capacity c = 1024, 24 rounds) that checks every
permutation it computes by **recomputing with rotated operands (RERO)**: a
second copy of the state, with every lane rotated by a fixed amount, is run
through the same round hardware interleaved with the original, then rotated
back and compared. Because the round datapath is cut in two by a pipeline
register, the second copy fills the half that would otherwise sit idle, so
the check costs almost no extra cycles.

The system around the core hashes a byte stream, intended to be the pixels of
a 100 x 100 8-bit grey-scale image (10,000 bytes), and returns the 64-byte
digest as a byte stream together with an error flag.

```
pixels (8 bit) -> byte_to_word -> sha3_padder -> keccak_rero_perm -> word_to_byte -> digest bytes
                  8 -> 64 bit     576-bit block   rounds + RERO        512 -> 8 bit     + hash_error
                                  \________ sha3_core ________/
```

## Why rotating the operands works

Let `R` rotate each of the 25 lanes left by `t` bits (`ROT_AMT`, 1..63).
Every step of a Keccak round commutes with `R`:

* **theta** XORs lanes and rotates column parities by one bit; rotations
  compose, and XOR is bitwise.
* **rho** rotates each lane by its own constant offset: rotations compose.
* **pi** only moves whole lanes.
* **chi** is bitwise within a row of lanes.
* **iota** XORs a round constant `RC` into lane (0,0). This is the one step
  that does not commute with `R`, so the rotated copy uses `rotl(RC, t)`.

Hence `f_rot(R(A)) = R(f(A))`. A fault hits the two copies at different
logical bit positions (or at a different time), so their results disagree
after the rotated one is rotated back. Both transient faults (one run only)
and permanent faults (same physical bit, different logical bit in each copy)
are caught. The comparison covers all 1600 state bits.

## The interleaved round pipeline

One round is split at a pipeline register `P` placed after pi:

* **H1** (`keccak_h1`): theta, rho, pi, from the state register `S` into `P`.
* **H2** (`keccak_h2`): chi, iota, from `P` back into `S`.

With a single state, H1 and H2 would each be busy only every other cycle and
24 rounds take 48 cycles. `keccak_rero_perm` instead keeps the original copy
`O` and the rotated copy `Q` in flight together, one in `S` and one in `P`:

| cycle after accept | H1 (S -> P)         | H2 (P -> S)              |
|--------------------|---------------------|--------------------------|
| 1                  | O, round 0          | S loads `Q = R(O)`       |
| 2                  | Q, round 0          | O, round 0, `RC[0]`      |
| 3                  | O, round 1          | Q, round 0, `rotl(RC[0])`|
| ...                | ...                 | ...                      |
| 48                 | Q, round 23         | O, round 23 (O done)     |
| 49                 | P takes O's result  | Q, round 23 (Q done)     |
| 50                 | compare `R^-1(S)` with `P` | `S <- P` (original result) |

H2 finishes the original copy on even cycles and the rotated one on odd
cycles; the round number is `(cycle - 2) / 2`. The 24 rounds of both copies
take 48 cycles, the same as one copy alone on this pipelined datapath. One
extra cycle loads the rotated copy and one compares and restores, so a block
is finished 50 cycles after it is accepted and the permutation accepts the
next block on the cycle after that (51 cycles per block).

Absorbing is part of the same module: on acceptance the 576-bit block is
XORed into lanes 0..8 of `S`, or into a zero state for the first block of a
message. The round constants come from `keccak_rc`, a combinational table.
`keccak_rero_check` does the rotate-back-and-compare.

The error flag of a message is the OR of the comparisons of all its blocks.
It is cleared by the next message's first block and travels with the digest.
Per block, `rero_check` pulses in the compare cycle and `rero_check_error`
says whether that comparison failed.

## Padding and message framing

Messages enter as bytes. `byte_to_word` packs them into 64-bit words, first
byte in bits 7:0 (Keccak lane order). The last word carries `byte_num`, the
number of message bytes in it, 0..7. A message whose length is a multiple of
8 ends with an extra, empty last word (`byte_num = 0`).

`sha3_padder` writes words into a nine-word (576-bit) buffer. The last word
goes through `sha3_pad_word`, which keeps `byte_num` bytes, appends `0x06`
and clears the rest. The padder then sets bit 7 of the block's last byte
(`0x80`); if the `0x06` landed in that byte, it becomes `0x86`. This is the
SHA-3 (FIPS 202) padding, so the digests equal standard SHA3-512. Changing
`PAD_FIRST` in `keccak_pkg` to `0x01` gives the original Keccak-512 padding.
Since a last word holds at most 7 bytes, padding always fits in the
current block.

A full or padded block raises `blk_valid` and drops the padder's input ready
(IN_READY) until the permutation takes it. The permutation keeps its own
copy, so the padder fills the next block while the rounds run.

`word_to_byte` shifts the 512-bit digest out as 64 bytes, byte 0 first.
`hash_last` marks byte 63, and `hash_error` is valid on every byte.

## Interfaces and timing (`sha3_image_top`)

All handshakes are valid/ready: a transfer happens on a rising clock edge
where both are 1. The reset `rst_n` is synchronous and active low.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `pix_data`, `pix_last`, `pix_valid` / `pix_ready` | in / out | 8,1,1 / 1 | message bytes; `pix_last` on the final byte |
| `hash_data`, `hash_last`, `hash_error`, `hash_valid` / `hash_ready` | out / in | 8,1,1,1 / 1 | digest bytes |
| `fi_mode`, `fi_bit` | in | 2, 11 | fault injection, tie `fi_mode` to 0 |
| `perm_busy`, `rero_check`, `rero_check_error` | out | 1 each | status |

The only parameter is `ROT_AMT`, the lane rotation of the second copy. Its
default is 1 and any value from 1 to 63 works.

Throughput: a block (72 bytes) needs 51 permutation cycles. At one byte per
cycle the byte input is therefore the bottleneck. The 100 x 100 image takes
10,118 cycles from its first pixel to its last digest byte.

At the word interface of `sha3_core`, messages of any length can be hashed,
the empty one included. At the byte interface a message has at least one
byte.

## Fault injection

Both `keccak_rero_perm` and the top take a fault-injection input. It acts on
one bit (`fi_bit`, 0..1599) of the value H1 writes into the pipeline
register, while the rounds run:

| `fi_mode` | effect |
|---|---|
| 0 | none |
| 1 | flip: hold it for one cycle to get a transient fault |
| 2 | stuck-at-0: hold it for a permanent fault |
| 3 | stuck-at-1: hold it for a permanent fault |

This input is there to measure error coverage by simulation. In the
testbenches every fault that changed the digest was flagged, whether it was
a transient flip or a stuck-at fault.

## Files

| file | content |
|------|---------|
| `rtl/keccak_pkg.sv` | types (`lane_t`, `state_t`, `block_t`), sizes, rho offsets, padding byte, fault-mode enum, rotate helpers |
| `rtl/keccak_h1.sv`, `rtl/keccak_h2.sv` | the two round halves |
| `rtl/keccak_rc.sv` | round constant table |
| `rtl/keccak_rero_check.sv` | rotate back and compare |
| `rtl/keccak_rero_perm.sv` | absorb, interleaved rounds, RERO control |
| `rtl/sha3_pad_word.sv`, `rtl/sha3_padder.sv` | padding module |
| `rtl/sha3_core.sv` | padder + permutation |
| `rtl/byte_to_word.sv`, `rtl/word_to_byte.sv` | 8/64 and 512/8 bit converters |
| `rtl/sha3_image_top.sv` | the whole chain |
| `tb/sha3_ref_pkg.sv` | independent SHA3-512 reference model: LFSR-generated round constants, rho offsets from the (x,y) walk |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ref_selftest` (reference model against published digests) and `tb_rero_fault_coverage` (fault campaign) |

## Verification

Each testbench compares with values computed independently of the RTL and
ends by printing `TB_RESULT checks=N failures=M`.

* The reference model reproduces the published SHA3-512 digests of the
  empty string and of "abc".
* The round halves are checked on single-bit and random states, the round
  constant table against the LFSR.
* `tb_keccak_rero_perm` checks 1- to 4-block messages and the 50-cycle
  latency. It also checks that the digest is held under back-pressure and
  runs 80 injected faults.
* `tb_sha3_padder` and `tb_sha3_core` cover message lengths around every
  word and block boundary. `tb_sha3_core` also checks one digest computed by
  a separate SHA3-512 implementation.
* `tb_rero_fault_coverage` hashes 8-byte (64-bit) messages while
  injecting 600 single-cycle flips and 600 stuck-at faults at random bits
  and cycles. It reports how many faults were effective and how many were
  detected. Any fault that corrupted the digest without raising the flag
  counts as a failure; none did. Faults that hit only the rotated copy are
  flagged although the digest is right, and are reported separately.
* `tb_sha3_image_top` runs at the default parameters. It hashes the
  100 x 100 image and compares the digest with an independently computed
  value. It also runs the padding corner cases with random output
  back-pressure, and a fault campaign of transient and stuck-at faults. It
  counts each of these and fails if one never happened: multi-block
  absorption, a padder-full stall, output back-pressure, the empty last
  word, `0x86` padding, a clean RERO check, a detected transient fault, a
  detected permanent fault, and the error flag clearing.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/keccak_pkg.sv tb/sha3_ref_pkg.sv tb/tb_sha3_image_top.sv \
  --top-module tb_sha3_image_top -o sim && ./obj_dir/sim
```

## Departures and open points

* **Latency.** The rounds of both copies take the 48 cycles of the plain
  pipelined datapath. Loading the rotated copy and comparing add one cycle
  each, so a block takes 50 cycles, not 48.
* **Rotation amount.** Any amount from 1 to 63 is allowed. The default of 1
  is a choice, not a derived value.
* **Rotated round constant.** The rotated copy must use the rotated round
  constant. This follows from the commutation argument above.
* **Area.** With two 1600-bit registers, the 576-bit block buffer and the
  512-bit output shift register, the design holds about 4450 flip-flops.
  This is more than the 2428 slice registers reported for a published FPGA
  implementation of this architecture, whose internal organisation is not
  known in enough detail to match it.
* **Extra ports.** Fault injection and the per-block check outputs are
  additions for testing.
* **Off-chip steps.** The image resize to 100 x 100, the conversion of the
  digest to a text file and its display are host software and are not part
  of the RTL.
