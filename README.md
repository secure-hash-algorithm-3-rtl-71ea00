# SHA-3 engine built from one LUT6 function

This is a SHA-3 (Keccak) hash engine for small FPGA systems that need fast
integrity checks, for example IoT nodes. It computes one round of the
Keccak-f[1600] permutation per clock cycle, so a message block is absorbed in
24 cycles. Its main idea is about structure. All the bitwise logic of a round
(theta's parities and XORs, chi, iota) is written as copies of a single
6-input look-up table with one fixed INIT value. The sixth input of that table
selects between a 5-input XOR and the chi function.

The default build is SHA3-256: rate r = 1088 bits, capacity c = 512 bits, and a
256-bit digest. With one parameter changed the same RTL gives SHA3-512
(r = 576, c = 1024).

At 24 cycles per 1088-bit block, throughput is 1088 / 24 = 45.3 bits per
clock. This is about 8.7 Gbit/s at 193 MHz and 9.7 Gbit/s at 213 MHz, which are
clock rates that a Xilinx 7-series part reaches with this structure.

## The dual-function LUT6

`lut6` is a generic 6-input table. Its output is `INIT[{i5,i4,i3,i2,i1,i0}]`.
It is written as a lookup, not as a vendor primitive, so it needs no vendor
library. This design uses one value everywhere:

    INIT = 64'hD2D2D2D2_96696996

* The lower half (`i5 = 0`) is `96696996`, the parity of `i0..i4`: a 5-input XOR.
* The upper half (`i5 = 1`) is `D2` four times. This is `o = i2 ^ (~i1 & i0)`,
  and it ignores `i3` and `i4`. That is the chi function
  `b[x] ^ (~b[x+1] & b[x+2])`, provided that `b[x]` is on `i2`, `b[x+1]` on `i1`
  and `b[x+2]` on `i0`.

`lut6_x64` puts 64 of these side by side. LUT `k` takes bit `k` of five 64-bit
words: word `j` (`i[64j+63:64j]`) drives LUT input `j`, and the shared `control`
drives `i5`. This gives a 64-bit operator:

| control | result                         | used for                 |
|---------|--------------------------------|--------------------------|
| 0       | `w0 ^ w1 ^ w2 ^ w3 ^ w4`       | theta (C, D, apply), iota |
| 1       | `w2 ^ (~w1 & w0)`              | chi                      |

Words that an operation does not need are tied to zero. The chi word order
(B[x] on word 2, B[x+2] on word 0) follows from the INIT value. Connecting
words in the "natural" order gives a wrong hash.

## One round, `keccak_round`

Lane (x,y) of the 1600-bit state lives at bits `64*(5y+x)+63 : 64*(5y+x)` of
every flat state vector in the design. Indices are modulo 5, and ROT is a left
rotation. One round uses 61 copies of `lut6_x64`, and is purely combinational:

| step             | equation                                  | copies |
|------------------|-------------------------------------------|--------|
| theta, parity    | `C[x] = A[x,0]^A[x,1]^A[x,2]^A[x,3]^A[x,4]` | 5      |
| theta, offset    | `D[x] = C[x-1] ^ ROT(C[x+1],1)`           | 5      |
| theta, apply     | `A[x,y] ^= D[x]`                          | 25     |
| rho + pi         | `B[y,2x+3y] = ROT(A[x,y], r[x,y])`         | wiring |
| chi              | `A[x,y] = B[x,y] ^ (~B[x+1,y] & B[x+2,y])` | 25     |
| iota             | `A[0,0] ^= RC[round]`                     | 1      |

The rho offsets `r[x,y]` (in `sha3_pkg::RHO_OFF`) and the 24 round constants
(in `rc_rom`) are the standard Keccak values. C and D are nets, not registers:
the whole round settles in one cycle.

## Sponge, control and timing

```
 din/load/last ──► sipo_in ──block──►┐
        ack ◄────┘   (17 x 64 b)     │ absorb (round 0)
                                     ▼
                 sha3_state (1600-b reg) ─round_in─► keccak_round ─round_out─┬─► piso_out ──► hash_out/hash_valid
                        ▲                               ▲                    │    (4 x 64 b)
                        └────────── update ─────────────┼────────────────────┘
                 sha3_ctrl (FSM + round counter) ─round─► rc_rom (24 x 64)
```

* **Initialization.** The state register is zero after reset and is cleared
  again after every squeeze.
* **Absorbing.** `sipo_in` collects RATE/64 words into a block. In the first
  round cycle the round input is `state ^ {capacity zeros, block}`, so the
  absorb XOR costs no separate cycle. `take` frees the buffer in that same
  cycle, and the next block loads while rounds 1..23 run. If a block is
  waiting when round 23 ends, the next round 0 starts on the following cycle.
  Blocks therefore stream at exactly one per 24 cycles, even across message
  boundaries.
* **Squeezing.** If the block just permuted carried `last`, the round-23
  result is truncated to the digest and loaded into `piso_out`. In the same
  cycle the state is cleared for the next message.

`sha3_ctrl` has two states, IDLE and RUN, and a 5-bit round counter. The
counter addresses the round-constant ROM directly.

Latency for a message whose final word arrives while the core is idle: the
final word is accepted at clock edge t, and the first digest word is on
`hash_out` 25 cycles later. The rest of the digest follows on the next cycles,
one word per cycle.

## Interface of `sha3_top`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | synchronous, active-low reset |
| `load`      | in  | 1     | `din` holds a message word |
| `din`       | in  | 64    | message word |
| `last`      | in  | 1     | high with the final word of the final block of a message |
| `ack`       | out | 1     | a word is taken at a rising edge where `load && ack` |
| `hash_valid`| out | 1     | `hash_out` holds a digest word |
| `hash_out`  | out | 64    | digest word |

Rules for the host:

* **Padding is the host's job.** Send whole blocks that are already padded:
  for SHA-3, append byte `0x06`, zero bytes, and set bit 7 of the last byte of
  the block (`0x86` if both fall on the same byte).
* **Word order.** Word k of a block is Keccak lane k. Bytes are little-endian
  within a word: message byte 8k+i goes to bits `8i+7:8i`.
* **`last` and `ack`.** `last` is sampled only with the word that completes a
  block. `ack` is low while a full block waits for the core.
* **Digest output.** The digest leaves lane 0 first, bytes little-endian, so
  the byte order matches the standard digest. `hash_valid` is high for
  OUT_BITS/64 consecutive cycles (rounded up). There is no back-pressure on
  the output. Digests are at least 24 cycles apart, which is longer than a
  digest takes to leave.

Parameter: `OUT_BITS` (default 256). The rate is `1600 - 2*OUT_BITS`. Use 512
for SHA3-512. An `OUT_BITS` that is not a multiple of 64 also works, but then
the last output word carries extra state bits that the receiver must drop.

## Files

| file | role |
|------|------|
| `rtl/sha3_pkg.sv` | widths, rho offsets, INIT value, lane helpers |
| `rtl/lut6.sv` | the 6-input table |
| `rtl/lut6_x64.sv` | 64-wide XOR/chi operator |
| `rtl/keccak_round.sv` | one round from 61 operators |
| `rtl/rc_rom.sv` | 24 x 64 round-constant ROM |
| `rtl/sha3_state.sv` | 1600-bit state register with absorb XOR and clear |
| `rtl/sipo_in.sv` | input block buffer, Load/Acknowledge |
| `rtl/piso_out.sv` | digest shift-out with hash_valid |
| `rtl/sha3_ctrl.sv` | FSM and round counter |
| `rtl/sha3_top.sv` | the engine |
| `tb/keccak_ref_pkg.sv` | independent reference model: Keccak-f, padding, SHA-3 |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_sha3_top.sv` | end to end SHA3-256 at default parameters |
| `tb/tb_sha3_512.sv` | end to end with `OUT_BITS = 512` |

## Verification

Each testbench compares against values computed without the RTL, and prints
`TB_RESULT checks=N failures=M`:

* `tb_lut6` checks all 64 input combinations.
* `tb_lut6_x64` checks random words in both modes.
* `tb_rc_rom` checks against constants that the reference generates with the
  rc(t) LFSR.
* `tb_keccak_round` checks random states and every round number against the
  reference round, and checks that 24 chained rounds on the zero state give
  first lane `F1258F7940E1DDE7`.
* The `sha3_state`, `sipo_in`, `piso_out` and `sha3_ctrl` testbenches check
  cycle by cycle. The `sha3_ctrl` testbench also checks that back-to-back
  blocks and idle periods both occur.
* `tb_sha3_top` sends the known answers for `""` and `"abc"`, then 20 random
  messages of up to 400 bytes, with and without gaps in `load`. It also checks:
  * the 25-cycle latency;
  * that block starts are at least 24 cycles apart, and exactly 24 when
    streaming;
  * that `hash_valid` lasts 4 cycles.

  It counts back-pressure, back-to-back blocks, multi-block messages and idle
  periods, and fails if any of them never happened.
* `tb_sha3_512` does the same for SHA3-512. It includes the known digest of
  the empty message.

Every testbench passes.

To run one with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/sha3_pkg.sv tb/keccak_ref_pkg.sv tb/tb_sha3_top.sv --top-module tb_sha3_top
./obj_dir/Vtb_sha3_top
```

The full-size end-to-end test runs in well under a second.

## Where this design makes its own choices

The architecture is taken from the design it implements: a SIPO input, the
1600-bit state register, the LUT6-based round with its copy counts, the
24 x 64 ROM, an FSM with a counter, a PISO output, 64-bit I/O and 24 cycles per
block. The following points are choices made here:

* **C and D are not registered.** The source architecture keeps C[x] and D[x]
  in intermediate registers, but it also states one round per clock cycle and
  24 cycles per block. This design follows the one-round-per-cycle reading,
  which the reported throughput also requires. So C and D are combinational.
* **Handshake.** Load/Acknowledge is implemented as a valid/ready pair.
  `hash_valid` is a plain strobe, with no back-pressure on the output.
* **The `last` input and external padding.** The end-of-message signal and the
  SHA-3 padding are not part of the source architecture. Here the host pads,
  and `last` marks the final block.
* **Absorb merged into round 0.** The absorb XOR is not a LUT6 operator: it is
  a plain XOR on the round input.
* **LUT pin assignment.** Word j of each operator goes to LUT input j, and
  `control` goes to the most significant input. The chi word order follows
  from the INIT value.
* **Reset.** All registers have a synchronous, active-low reset.

Not covered by this RTL:

* **HMAC.** HMAC generation and digest comparison at the receiver are the
  intended use of the engine, but no hardware for them is specified.
* **FPGA results.** Area, clock rate and power on the Artix-7, Virtex-6,
  Spartan-6 and Kintex-7 devices come from vendor tools and are not
  reproduced here.
* **Generic synthesis.** A generic synthesis tool may map the LUT operators
  into other gates; nothing forces one LUT6 per bit. To keep that structure on
  a Xilinx device, replace the body of `lut6` with the vendor's LUT6 primitive,
  using the same INIT value.
