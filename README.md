# Byte-serial, shuffled AES-128 in distributed RAM

This is an AES-128 encryption core built to be as small as possible on
FPGAs with LUT RAM, and still hardened against power analysis. It follows
the architecture published as *"A Grain in the Silicon: SCA-Protected AES in
Less Than 30 Slices"*. The core works on one byte at a time. It keeps the
cipher state and the round key in two 32 x 8 LUT RAMs instead of
flip-flops. It has one S-box, shared by the key schedule and the round
function. One small accumulating ALU does MixColumns and AddRoundKey
together.

Two features harden it against side-channel attacks:

- **Shuffling.** In every round, the 16 state bytes are processed in a
  random order. This spreads the leakage of any one byte over 16 points in
  time.
- **Built-in randomness.** The core makes its own random numbers by
  encrypting a secret block with itself (a CPRNG). It needs no external
  random source.

The core supports encryption only. Key expansion is done on the fly. The
key is expanded in place, round by round, from the key supplied with every
encryption.

## Datapath

```
  KEY RAM 32x8 ──┬──────────────────────────────┐
                 ├─► MUX 2:1 ─► S-box ─► MUX 4:1 ─► ALU (r) ──► C (ciphertext byte)
  STATE RAM 32x8 ┘                          ▲  ▲                 │
                                            K  P                 │
        ▲   ▲                                                    │
        └───┴──────────────── r written back ◄───────────────────┘
```

- `dist_ram`: a LUT RAM with one synchronous write port and combinational
  read ports. It is used for the KEY memory, the STATE memory and the
  permutation memory (16 x 4).
- `aes_mux2`: feeds the S-box either from KEY (for SubWord in the key
  schedule) or from STATE (for SubBytes).
- `aes_sbox`: a 256-entry ROM. It is built at elaboration time from the
  GF(2^8) inverse and the affine map, so no table appears in the sources.
- `aes_mux4`: selects the ALU operand from four sources:
  - the S-box output;
  - the KEY byte directly, for AddRoundKey and the linear part of the key
    schedule;
  - the external key byte `K`;
  - the external plaintext byte `P`.

  During key expansion the `K` leg carries the round constant.
- `mc_alu`: one 8-bit register `r` and four operations, all in GF(2^8):

  | op | meaning |
  |----|---------|
  | 00 | `r = x` (set) |
  | 01 | `r = r ^ x` (add) |
  | 10 | `r = r ^ 02*x` |
  | 11 | `r = r ^ 03*x` |

  `r` is the core's output, and it is the only data ever written back into
  the memories.

### Memory map

| memory | words | content |
|---|---|---|
| KEY | 0..15 | current round key, updated in place each round |
| KEY | 16..31 | PRNG block V (128 bits), seeded by the host |
| STATE | 0..15 / 16..31 | two state banks. Each round reads one bank and writes the other. |

Because of the two banks, the 16 output bytes of a round can be produced in
any order. That is what makes shuffling free.

## How one encryption is scheduled

`aes_ctrl` is the sequencer. In every cycle it picks one ALU operation, the
operand source and the read addresses. When a byte is finished, the
sequencer writes `r` back in the following cycle. That write overlaps the
first operation of the next byte, so no cycle is lost. Bytes are numbered as
in FIPS-197: byte `i` is row `i % 4` of column `i / 4`.

| phase | cycles | operations per byte |
|---|---|---|
| LOAD (initial AddRoundKey) | 32 | `set K[i]` → KEY[i]; `add P[i]` → STATE bank 0 |
| KEYEXP (each of 10 rounds) | 33 | column 0: `set S(KEY[12+(r+1)%4])`, `add KEY[r]`, `add rcon` (row 0 only). Columns 1..3: `set KEY[i]`, `add KEY[i-4]` |
| MIX (rounds 1..9) | 80 | `set S(a[r+2])`, `add S(a[r+3])`, `add2 S(a[r])`, `add3 S(a[r+1])`, `add KEY[i]` → other bank |
| FINAL (round 10) | 32 | `set S(a[r])`, `add KEY[i]` → ciphertext port |

In MIX and FINAL, `a[k]` stands for the byte in row `k mod 4` of the
ShiftRows view of the column. **ShiftRows costs nothing: it is only a
change of read address.** The byte in row `r`, column `c` after ShiftRows
is read from address `4*((c+r) mod 4) + r` of the source bank. SubBytes
happens as the byte passes through the S-box on its way to the ALU.
MixColumns is the sequence of four accumulating operations. AddRoundKey is
the fifth operation.

The key schedule reads the last column (bytes 12..15) before it overwrites
it, so it can run in place.

One AES run takes `ENC_CYCLES = 32 + 10*33 + 9*80 + 32 = 1114` cycles.
`done` rises one cycle after the last operation, together with the last
ciphertext byte. A round therefore takes 113 cycles. After reset, the core
spends 16 cycles writing the identity permutation.

## Shuffling

`perm_gen` holds a permutation of 0..15 in a 16 x 4 LUT RAM. When shuffling
is on, step `s` of MIX and FINAL processes byte `perm[s]` instead of byte
`s`. The same permutation is used for all rounds of one encryption, and the
key schedule always runs in fixed order.

A new permutation is made from the previous one during the 32 LOAD cycles,
so it adds no time. For `i = 0..15`, entry `i` is swapped with entry `j`,
where `j` is a fresh 4-bit random number. A swap takes two cycles on the
single write port. In the first cycle, `perm[i] <= perm[j]`, and the old
`perm[i]` and `j` are saved in registers. In the second cycle,
`perm[j] <=` the saved value. Sixteen swaps use 64 random bits.

Because ciphertext bytes leave the core in the shuffled order, each one
carries its index (`ct_idx`).

## Built-in randomness (CPRNG)

The 64 random bits per encryption come from the PRNG block V, stored in KEY
words 16..31:

- `seed_load` copies 16 bytes from the plaintext port into V.
- Before a shuffled encryption, if no unused random bits are left, the core
  first runs a complete extraction:
  - The extraction is an AES run with plaintext V and the current key `K`.
  - Its output overwrites V: `V <= AES_K(V)`.
- The encryption right after an extraction uses V bytes 0..7. The next
  encryption uses bytes 8..15. `prng_ctrl` keeps track of which half is
  still unused.

Two shuffled encryptions therefore cost three AES runs. Throughput falls by
one third compared with unshuffled operation.

An extraction run uses the existing permutation and does not renew it. The
output of an extraction never leaves the core.

With `shuffle_en = 0`, no extraction is made and the bytes are processed in
natural order. This is the setup for checking the core against a known
answer, or for measuring an unprotected baseline.

## Interface and timing (`grain_aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | pulse while `!busy`: encrypt |
| `seed_load` | in | 1 | pulse while `!busy`: load the PRNG seed from `pt_in` |
| `shuffle_en` | in | 1 | sampled at `start`: random order plus CPRNG |
| `in_idx` | out | 4 | index of the key/plaintext byte the core reads now |
| `key_in`, `pt_in` | in | 8 | `K[in_idx]` and `P[in_idx]`, answered combinationally |
| `ct_valid`, `ct_idx`, `ct_out` | out | 1, 4, 8 | one ciphertext byte and its index |
| `busy`, `done` | out | 1 | working; `done` pulses with the last ciphertext byte |

The key has to stay readable until `done`, because the initial key addition
and any extraction read it. Latency from the `start` cycle to `done`:

- 1115 cycles without an extraction;
- 2229 cycles with one.

## Where this RTL departs from the published design

- **Cycle count.** The published core needs 1471 cycles per encryption.
  The paper does not give its per-round schedule. The schedule above needs
  1114 cycles, and keeps the same datapath, operations and memory
  organisation. Throughput figures scale accordingly.
- **Not FPGA-mapped.** The RTL is plain, portable SystemVerilog. It does
  not instantiate RAM32M or LUT primitives and is not floorplanned, so the
  21/24/28-slice figures are not claims of this code. After generic
  synthesis it has 56 flip-flops. The published variants report 23 to 36.
  The extra flip-flops are mostly in the sequencer's counters and the
  write-back pipeline.
- **Only the protected variant.** The basic variant and the shuffling-only
  variant are not separate builds. `shuffle_en = 0` gives the behaviour of
  the basic variant.
- **Choices made here.** The paper leaves the following open; this design
  fixes them:
  - the round constant entering through the `K` leg of the 4:1 mux;
  - where the PRNG block lives and the `V <= AES_K(V)` update;
  - the swap algorithm and the identity initialisation of the permutation;
  - the order of operations per byte;
  - the host interface and the reset behaviour.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/aes_ref_pkg.sv` is an independent
FIPS-197 reference model. Its S-box finds inverses by search, while the RTL
computes them by exponentiation.

- `tb_grain_aes_top` tests the complete core at its default configuration.
  It checks:
  - the FIPS-197 C.1 vector and random vectors;
  - the exact latencies;
  - the seed load;
  - that every second shuffled encryption is preceded by an extraction;
  - the shuffled output order against a model of the swaps driven by
    `AES_K(V)`;
  - the three-runs-per-two-encryptions cost.
- `tb_sca_campaign` runs a scaled-down measurement campaign. It does 200
  unshuffled and 800 shuffled encryptions of random plaintexts under one
  key. It checks every ciphertext and that byte 0's processing step is
  spread evenly over all 16 steps.
- `tb_aes_ctrl` closes the sequencer with behavioural datapath models.
  The other testbenches test one block each.
- `aes_ctrl` also carries concurrent assertions for its protocol rules.
  They are checked whenever a simulation is built with `--assert`.

To run the top-level test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_grain_aes_top.sv \
    --top-module tb_grain_aes_top -o sim && obj_dir/sim
```

To run another testbench, replace the testbench file and the
`--top-module` name. Every run takes a few seconds at most.

Not modelled: the FPGA fabric itself, and the parallel noise-generating
logic used in the field measurements.
