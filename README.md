# Iterative Keccak-f[1600] sponge hash core

This is a Keccak (SHA-3 family) hash engine. It holds the 1600-bit Keccak
state in one register and runs a single combinational round of
Keccak-f[1600] on it once per clock. The 24 rounds of one permutation
therefore take 24 cycles. Around that round sits a sponge:

- message words are packed and padded into rate-sized blocks;
- each block is XORed into the first `RATE` bits of the state;
- the state is permuted;
- after the last block, the first `OUT_W` bits of the state are the hash.

The default configuration is rate R = 1024 bits, capacity C = 576 bits and a
512-bit hash value, fed 64 bits per cycle. Parameters also give the standard
SHA3-256 (R = 1088) and SHA3-512 (R = 576) configurations, Keccak or FIPS 202
padding, and 256-bit input words.

```
             in_data (DATA_W)
                  |
          +---------------+  blk (RATE)        +-------------+
          | keccak_buffer |-------+            | keccak_round|
          |  pack + pad   |       v            |  _constant  |
          +---------------+   (XOR, round 0)   +-------------+
            ^        |            |                   | rc
            |        |            v                   v
            |  hash  |     +-------------------------------+
            |        v     | keccak_round: theta -> rho/pi |
            |              |   -> chi -> iota  (comb.)     |
            |              +-------------------------------+
            |                         |
            |                  +--------------+
            +------------------| keccak_state |<-- init (clear)
              first OUT_W bits |  1600 bits   |
                               +--------------+
                        keccak_ctrl sequences all of it
```

## The state and its bit numbering

The state is a 5 x 5 array of 64-bit lanes A[x,y], with bit z (0..63) inside
each lane. In the RTL it is the packed type `keccak_pkg::state_t`, indexed
`[y][x]`. Lane (x,y) therefore occupies bits `64*(5*y+x) +: 64` of the flat
1600-bit vector. With this numbering the rate part of the sponge is simply
bits `[RATE-1:0]`: lanes 0, 1, 2, ... in the usual Keccak order.

Message bytes are little-endian throughout, as Keccak requires:

- byte 0 of an input word is `in_data[7:0]`;
- byte 0 of a block is `blk[7:0]`;
- byte 0 of the digest is `hash[7:0]`.

A digest printed as a hex string, first byte leftmost, is therefore the
byte-reversed `hash` vector.

## One round, four steps

`keccak_round` chains four purely combinational modules:

| step | module | what it does | logic per state bit |
|---|---|---|---|
| theta | `keccak_theta` | C[x] = XOR of the five lanes of column x. D[x] = C[x-1] ^ ROT(C[x+1],1). Every lane of column x is XORed with D[x]. | about 3 XOR levels |
| rho + pi | `keccak_rho_pi` | B[y, 2x+3y] = ROT(A[x,y], r[x,y]), indices mod 5 | wiring only |
| chi | `keccak_chi` | A[x,y] = B[x,y] ^ (~B[x+1,y] & B[x+2,y]) | NOT, AND, XOR |
| iota | `keccak_iota` | A[0,0] ^= RC[round] | one XOR on lane 0 |

ROT rotates towards higher bit index, so bit z moves to bit z+n mod 64.
The 25 offsets r[x,y] are in `keccak_pkg::RHO_OFFSET`. The 24 round
constants are in `keccak_pkg::RC_TABLE`. `keccak_round_constant` reads that
table for the round index that the controller supplies.

The critical path of the core is one full round: theta's XOR tree, chi,
iota, plus the absorb XOR and the state-register multiplexer in front of it.
Rho/pi adds no logic. The core has no pipelining inside a round.

## Absorbing, permuting, squeezing: the controller

`keccak_ctrl` has three states:

- **IDLE.** The state holds the chaining value (all zeros before the first
  block). When the buffer offers a block, the controller takes it in the same
  cycle. It selects `state ^ {0, block}` as the round input (`absorb`), and
  round 0 is written into the state at the next edge.
- **PERMUTE.** Rounds 1..23 run on the state alone, one per cycle. After
  round 23 the controller returns to IDLE, or goes to SQUEEZE if the block
  was the last one of its message.
- **SQUEEZE.** If more output blocks are needed (outputs longer than the
  rate), the controller starts another permutation. Otherwise `hash_valid`
  stays high until `hash_ready`. At the handshake the state is cleared
  synchronously. This is the initialisation for the next message.

So every block costs exactly 24 cycles, counted from the cycle it is taken.
The block is XORed in only during round 0. The buffer can therefore start
filling the next block at once, while rounds 1..23 run. With 64-bit words a
1024-bit block needs 16 words. That is fewer than the 23 cycles of the
permutation, so a long message streams at one block per 24 cycles, apart from
handshake bubbles. That is 1024/24 ≈ 42.7 bits per clock.

The only output-side handshake rule is checked by a concurrent assertion in
`keccak_ctrl`: once offered, the hash stays offered until it is accepted.

## The buffer and the padding

`keccak_buffer` collects `RATE/DATA_W` words. A message is a sequence of
words, and the word with `in_last = 1` carries `in_bytes` valid bytes
(0..DATA_W/8). Bytes beyond `in_bytes` are ignored. An empty message is one
word with `in_last = 1` and `in_bytes = 0`.

Padding is the multi-rate pad10*1 rule. The byte right after the message
becomes `PAD_BYTE`, and bit `RATE-1` of the final block is set:

- `PAD_BYTE = 8'h01` is the original Keccak padding (the default);
- `PAD_BYTE = 8'h06` is FIPS 202 SHA-3.

If a message ends exactly on a block boundary, the padding needs a block of
its own. The buffer then offers the full block as not final, followed by a
block that holds only padding. While a block waits to be taken, `in_ready` is
low.

The hash output is read from the rate part of the state, through the buffer.
When `OUT_W <= RATE`, as in all the configurations below, it is simply the
first `OUT_W` bits of the state after the last absorb permutation. A longer
output is squeezed over NSQ = ceil(OUT_W/RATE) rate blocks:

1. In SQUEEZE, the controller pulses `squeeze_capture`.
2. The buffer shifts the current rate block into an output register.
3. Another permutation starts in the same cycle, with nothing XORed in.
4. After the last permutation, `hash` is the captured blocks with the final
   rate block on top, first block in the low bits, cut to `OUT_W`.

Each extra output block costs 24 cycles. The output register exists only when
NSQ > 1.

## Parameters of `keccak_top`

| parameter | default | meaning |
|---|---|---|
| `RATE` | 1024 | rate R in bits. Capacity is 1600 - R (576 by default). Must be a multiple of `DATA_W`. |
| `OUT_W` | 512 | hash length in bits. Above `RATE`, extra squeeze permutations run. |
| `DATA_W` | 64 | input word width. 64 and 256 are the intended values; any multiple of 8 that divides `RATE` works. |
| `PAD_BYTE` | 8'h01 | first padding byte: 8'h01 for Keccak, 8'h06 for SHA-3 |

| configuration | RATE | OUT_W | PAD_BYTE |
|---|---|---|---|
| default, Keccak R=1024/C=576, 512-bit output | 1024 | 512 | 8'h01 |
| Keccak-256 | 1088 | 256 | 8'h01 |
| SHA3-256 | 1088 | 256 | 8'h06 |
| SHA3-512 | 576 | 512 | 8'h06 |

## What follows the reference architecture and what is this design's own

These parts follow the published architecture:

- the block structure: state, buffer, round constant, and the Keccak-f
  permutation fed back into the state;
- the 5x5x64 state;
- the default R = 1024 / C = 576 with a 512-bit output;
- 64- or 256-bit input words;
- the step equations, the rotation offsets and the round constants;
- the three sponge phases.

These are choices made here, because the published architecture leaves them
open:

- **One round per cycle.** The round is iterated, not unrolled or pipelined.
- **The interfaces.** Valid/ready handshakes, byte-granular message length,
  and an asynchronous active-low reset.
- **The byte order.** This is Keccak's own little-endian order.
- **The padding rule and its default byte.** The architecture shows a
  padding stage but does not define it.
- **Buffer overlap.** The buffer refills during rounds 1..23.
- **The controller's state machine.**

Some drawings of the step architectures describe the rotations as "right"
rotations. The RTL uses the rotation that the round equations define, which
is Keccak's, and the known-answer tests confirm it. In chi the complement is
on B[x+1,y], as in the chi equation.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values come from
`tb/keccak_ref_pkg.sv`, a bit-level model written independently of the RTL:

- it addresses the state bit by bit;
- it generates the rotation offsets from the (t+1)(t+2)/2 walk;
- it generates the round constants from the Keccak LFSR;
- it applies pi in its inverse form.

| testbench | checks |
|---|---|
| `tb_keccak_theta`, `tb_keccak_rho_pi`, `tb_keccak_chi`, `tb_keccak_iota` | directed and random states against the reference steps |
| `tb_keccak_round_constant` | all 24 constants against the LFSR, and zero out of range |
| `tb_keccak_round` | random rounds. Also 24 rounds on the zero state, giving the published first lanes F1258F7940E1DDE7 and 84D5CCF933C0478A. |
| `tb_keccak_state` | reset, load, hold, and clear taking priority |
| `tb_keccak_buffer` | 33 messages, 0 to 400 bytes, with random gaps and random take delays. Each block and its final flag are checked against the reference padding. |
| `tb_keccak_ctrl` | round sequence, 24-cycle permutation, absorb only in round 0, and hash hold under back-pressure |
| `tb_keccak_top` | End to end, at the default parameters. 21 messages, with digests compared to the reference sponge. It also checks 23 busy cycles per block (plus round 0 in the cycle the block is taken) and a 25-cycle latency from last word to digest on an idle core. It counts multi-block messages, padding-only blocks, empty messages, words accepted during a permutation, input stalls and digest back-pressure. Each must occur. |
| `tb_keccak_kat` | Published digests of "" and "abc" for Keccak-256, SHA3-256 and SHA3-512. Also the default rate with 256-bit words, against the reference sponge. A 1536-bit output at rate 576 is checked against the reference squeeze; its first 512 bits must equal SHA3-512, and it must take 48 more cycles than a one-block output. Uses the helper `tb/keccak_kat_runner.sv`. |

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/keccak_pkg.sv tb/keccak_ref_pkg.sv \
  tb/tb_keccak_top.sv --top-module tb_keccak_top
./obj_dir/Vtb_keccak_top
```

Replace `tb_keccak_top` with any other testbench name.

## Files

- `rtl/keccak_pkg.sv`: state types, round constants, rotation offsets.
- `rtl/keccak_theta.sv`, `rtl/keccak_rho_pi.sv`, `rtl/keccak_chi.sv`,
  `rtl/keccak_iota.sv`: the four step functions.
- `rtl/keccak_round.sv`: one complete round.
- `rtl/keccak_round_constant.sv`: the round-constant ROM.
- `rtl/keccak_state.sv`: the 1600-bit state register.
- `rtl/keccak_buffer.sv`: message packing, padding and hash output.
- `rtl/keccak_ctrl.sv`: the sponge phase controller.
- `rtl/keccak_top.sv`: the core.
