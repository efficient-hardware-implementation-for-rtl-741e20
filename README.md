# mCrypton-64 encryption core

mCrypton is a 64-bit lightweight block cipher for RFID tags, sensor nodes and
other devices with very little area and power. This core encrypts one 64-bit
block under a 64-bit key in 30 clock cycles. It keeps the area small by
building only one round's worth of hardware and reusing it. The substitution
unit, the largest part, is shared between the data and the key schedule.

At one block per 30 cycles, a 302 MHz clock gives 64 / 30 × 302 MHz ≈ 644 Mbit/s.
Only encryption is implemented.

## The cipher in one page

The 64-bit block is a 4×4 array of 4-bit nibbles. Nibble (i, j) is row i,
column j. In this RTL, nibble (0,0) sits in bits [63:60] and nibble (3,3) in
bits [3:0], row after row (`mc_pkg::state_t`).

One round ρ applies four steps in order:

| step | name | what it does | hardware |
|------|------|--------------|----------|
| γ | nonlinear substitution | nibble (i,j) goes through S-box S((i+j) mod 4) | 16 ROMs of 16×4 bits |
| π | bit permutation | in each column, every output bit is the XOR of three input bits | AND masks and XOR gates |
| τ | row-to-column transposition | nibble (i,j) moves to (j,i) | wiring only |
| σ | key addition | XOR with the 64-bit round key | 64 XOR gates |

An encryption is:

    state = plaintext ^ K0
    repeat 12 times, r = 1..12:   state = σ_Kr(τ(π(γ(state))))
    ciphertext = τ(π(τ(state)))          -- output transformation

There are four S-boxes. S0 and S1 are fixed tables. S2 is the inverse of S0,
and S3 is the inverse of S1. The RTL stores only S0 and S1 (`mc_pkg`). It
derives S2 and S3 at elaboration by inverting those two tables.

Column j of π, with input nibbles a0..a3 from top to bottom, gives:

    b_i = XOR over k = 0..3 of ( m((i + j + k) mod 4) AND a_k )
    m0 = 1110, m1 = 1101, m2 = 1011, m3 = 0111

Each mask clears exactly one bit. Output bit t of b_i is therefore the XOR of
bit t of three of the four nibbles in the column. π is its own inverse.

## Architecture: one round, reused

```
             plaintext          key
                 |               |
          +------v------+  +-----v---------------+
          | state reg   |  | key register U0..U3 |<-- constant ROM (12 x 16 bit)
          +------+------+  +--+------------^-----+
                 |            | U0         | S(U0)
                 v            v            |
          sub_key_sel --> [ γ : 16 S-box ROMs ]-- row 0 --+
                                |
                           [ π ] --> [ τ ] --> [ σ ] --> state reg
                                                 ^
                                            round key reg
```

`mc_round_datapath` holds the state register and one copy each of γ, π, τ
and σ, connected in a chain. A 3-bit operation code from the controller
chooses what the register loads in each cycle. It can be the plaintext, the
initial key addition, a full round, τ alone, π alone, or nothing. The output
transformation τ, π, τ uses the same π and τ units. Small multiplexers feed
those units the state directly.

**The shared substitution unit** is the part that needs the most care.
The key schedule needs an S-box step on a 16-bit key word in every round. It
has no S-boxes of its own. Instead, in the first cycle of each round the
controller raises `sub_key_sel`. The substitution unit then sees the key word
U0 in row 0, with zeros in the other rows. The key schedule takes row 0 of
the result, S0/S1/S2/S3 applied to U0's four nibbles, and builds the round
key from it. The state holds during that cycle. In the second cycle the
unit serves the state, and the whole round γ→π→τ→σ runs in one cycle.

This is why each round takes two cycles. An assertion in `mc_round_datapath`
checks that the key schedule and a round never claim the unit in the same
cycle.

## The 30-cycle schedule

Cycle 0 is the clock edge that samples `enable` while the core is idle.

| cycle | controller state | datapath | key schedule |
|-------|------------------|----------|--------------|
| 0 | IDLE | load plaintext | load key into U |
| 1 | KEY0 | state ^= U (round key 0 is the user key) | hold |
| 2, 4, …, 24 | RKEY | hold; lends γ to the key schedule | round key r → register, rotate U |
| 3, 5, …, 25 | RDATA | full round with round key r | hold |
| 26 | OUT_T1 | τ | |
| 27 | OUT_P | π | |
| 28 | OUT_T2 | τ | |
| 29 | DONE | ciphertext register ← state | |

`done` and the new ciphertext appear right after edge 29, which is 30 cycles
after the start. The core is idle again in that cycle. If `enable` is still
high, edge 30 becomes cycle 0 of the next block, so blocks follow each other
every 30 cycles. While the core is busy, `enable` is ignored. Changes to
`plaintext` and `key` have no effect either, because both are captured at
cycle 0.

The 30-cycle total, the single `enable` input and one cycle per component
are the source design's. How the 30 cycles are split across the steps is this
design's own choice. It is the natural schedule that makes the total come out
at 30.

## Key schedule

`mc_key_schedule` keeps four 16-bit key words U0..U3, loaded from the user
key. For round r = 1..12:

    T     = S(U0) ^ C(r)                       S(U0) from the shared γ unit
    K(r)  = (U1 ^ T, U2 ^ T, U3 ^ T, U0 ^ T)   registered
    U     = (U1, U2, U3, U0 <<< 3)

`mc_key_const_rom` holds the constants C(r), one per round. C(r) is x^(r-1) in
GF(2^4) modulo x^4 + x + 1, repeated in all four nibbles: 1111, 2222, 4444,
8888, 3333, 6666, CCCC, BBBB, 5555, AAAA, 7777, EEEE. The ROM computes them
at elaboration, so no data file is needed.

**Trust level.** The source design fixes these parts of the key schedule:

- the overall structure: an S-box step that makes the round key, a rotation
  that updates the key words, and a memory of twelve constants
- the reuse of the round's substitution unit

The exact word combination, the 3-bit rotation and the constant values follow
the pattern of the mCrypton-64 key schedule. They have not been checked
against a published mCrypton test vector. Using the user key directly as
round key 0 is also this design's choice.

The round function, S-boxes, π, τ, the round count and the output
transformation follow the cipher as defined. The key schedule is the part to
replace if you need bit-exact interoperability with another mCrypton
implementation. Its three lines are in `mc_key_schedule.sv`. The testbench
reference is `ref_round_keys` in `tb/mc_ref_pkg.sv`.

## Interface (`mcrypton_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock; every register is on the rising edge |
| rst_n | in | 1 | asynchronous active-low reset; clears all state |
| enable | in | 1 | start a block; sampled only while idle |
| plaintext | in | 64 | plaintext, captured at cycle 0 |
| key | in | 64 | key, captured at cycle 0 |
| ciphertext | out | 64 | registered; holds until the next block finishes; 0 after reset |
| done | out | 1 | one-cycle pulse when ciphertext has just been updated |
| busy | out | 1 | a block is in flight (cycles 0..29) |

The source design has four ports: plaintext, key, enable and ciphertext, which
is 193 signal pins. `clk`, `rst_n`, `done` and `busy` are this design's
additions.

## Files

| file | content |
|------|---------|
| `rtl/mc_pkg.sv` | state types, S0/S1 tables and inversion, π masks, GF(2^4) doubling, operation enums |
| `rtl/mc_sbox.sv` | one 16×4 S-box ROM, `SEL` picks S0..S3 |
| `rtl/mc_substitution.sv` | γ: 16 S-box ROMs |
| `rtl/mc_permutation.sv` | π |
| `rtl/mc_transposition.sv` | τ |
| `rtl/mc_key_addition.sv` | σ |
| `rtl/mc_key_const_rom.sv` | 12 round constants |
| `rtl/mc_key_schedule.sv` | key register, round key register, round key generation |
| `rtl/mc_round_datapath.sv` | state and ciphertext registers around the shared γ, π, τ, σ |
| `rtl/mc_controller.sv` | 8-state FSM for the 30-cycle schedule |
| `rtl/mcrypton_top.sv` | the core |
| `tb/mc_ref_pkg.sv` | independent reference model (flat 64-bit words, all four S-boxes typed out, π bit by bit) |
| `tb/tb_*.sv` | one self-checking testbench per module |

Everything is written as plain SystemVerilog-2017 and is synthesizable. The
ROMs are arrays that a synthesis tool maps to LUTs.

## Verification

Each module has a testbench. It compares the module against `mc_ref_pkg`,
ends with a `TB_RESULT checks=N failures=M` line, and has a watchdog.

- S-box ROMs: exhaustive, including S2(S0(x)) = x and S3(S1(x)) = x.
- γ, π, τ and σ: each single-bit input plus 2000 random blocks.
- Constant ROM: all addresses.
- Key schedule: 200 keys, all 12 round keys each.
- Datapath: 5000 random operations.
- Controller: the exact operation in each of the 30 cycles, plus back-to-back
  blocks.

`tb_mcrypton_top` runs the whole core at its only configuration. It covers:

- about 50 encryptions, checking each ciphertext and that latency is exactly 30 cycles
- six back-to-back blocks, exactly 30 cycles apart
- plaintext, key and enable changing while a block runs
- a reset in the middle of a block

It counts each mechanism: the key schedule borrowing γ, rounds, output
transformation, back-to-back start, enable ignored while busy, and the
mid-block reset. It fails if any of them never happened.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mc_pkg.sv tb/mc_ref_pkg.sv tb/tb_mcrypton_top.sv --top-module tb_mcrypton_top
./obj_dir/Vtb_mcrypton_top
```

Replace `tb_mcrypton_top` with any other `tb_*` name to test one module. Each
run takes well under a second.

Caveat: the reference model and the RTL both implement the key schedule
described above. They agree with each other, but that does not prove
agreement with other mCrypton implementations; see "Trust level".

## Size

Coarse synthesis of `mcrypton_top` gives:

- 264 flip-flops: state 64, ciphertext 64, key register 64, round key 64, and control
- 16 S-box ROMs plus the constant ROM, kept as memories: 1280 bits
- XOR and multiplexer logic

The source design reports 375 Spartan-3 slices, 302 MHz and 89 mW. Those
figures were not reproduced here.
