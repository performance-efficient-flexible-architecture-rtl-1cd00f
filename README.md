# Flexible m-Crypton encryption core (64/96/128-bit keys)

m-Crypton is a lightweight 64-bit block cipher for RFID tags and sensor
nodes, with three key lengths: 64, 96 and 128 bits. Usually a hardware
implementation supports only one key length. This core supports all three
with one datapath and one key register. The key size is chosen per block at
run time. The data path does not depend on the key size. Only the key
schedule differs between the three sizes, and the differences come down to
a few 16-bit multiplexers around a 128-bit key register. A shorter key is
stored left-aligned in that register, with zeros below it.

The core is iterative: one round per clock cycle. It needs one load cycle
plus twelve round cycles per block. It is written in synthesizable
SystemVerilog and has no memories, only registers: 196 bits of cipher
state plus 8 bits of control.

The architecture follows "Performance-efficient flexible architecture of
m-Crypton cipher for resource-constrained applications" (Singh, Prasad,
Upadhyay, Singh, *Automatika* 65:4, 2024). The places where this RTL had to
choose, or departs from that description, are listed in
[Choices and departures](#choices-and-departures).

## The cipher in one page

**State.** The 64-bit block is a 4x4 matrix of nibbles h0..h15:

```
        col0 col1 col2 col3
row0:   h0   h1   h2   h3        h0  = block[63:60]
row1:   h4   h5   h6   h7        h15 = block[3:0]
row2:   h8   h9   h10  h11       row r = block[63-16r -: 16]
row3:   h12  h13  h14  h15
```

**Round function** rho_K = sigma_K . tau . pi . gamma, applied in that order:

| step | name | what it does |
|------|------|--------------|
| gamma | substitution | The nibble in row r, column c goes through S-box S_((r+c) mod 4). |
| pi | bit permutation | Column by column. Output nibble j of column i is XOR over k of (Q_((i+j+k) mod 4) AND nibble k), with Q0=1110, Q1=1101, Q2=1011, Q3=0111. Each output bit is the XOR of three of the four input bits at the same bit position in that column. |
| tau | transposition | Nibble (i,j) moves to (j,i). |
| sigma | key addition | Row i is XORed with round-key word K[i]. |

Encryption is an initial key addition with K0, then twelve rounds with
K1..K12, then the output transformation phi = tau . pi . tau.

The four S-boxes (hex; entry x at position x):

```
S0: 4 f 3 8 d a c 0 b 5 7 e 2 6 1 9
S1: 1 c 7 a 6 d 5 3 f b 2 0 8 4 9 e
S2: 7 e c 2 0 9 d a 3 f 5 8 6 4 b 1     (S2 = S0^-1)
S3: b 0 a 7 d 6 4 2 c e 3 9 1 5 f 8     (S3 = S1^-1)
```

## The flexible key schedule

This is the part of the design that differs from a single-size m-Crypton
core, and the part that takes the most care.

The key register V holds eight 16-bit words, V[0] = V[127:112] down to
V[7] = V[15:0]. A key of t words uses V[0..t-1]: t = 4, 6 or 8. The words
above t are zero.

**Round constant.** For each round r = 0..12, C_r = x^r in GF(2^4) modulo
x^4 + x + 1. The sequence is 1, 2, 4, 8, 3, 6, c, b, 5, a, 7, e, f. CR is
C_r repeated in all four nibbles. A 4-bit register produces it, stepping
with R = {X2, X1, X0^X3, X3}.

**Round key** K_r, the same logic for every size:

```
M   = S0(V[0]) XOR CR          (S0 on each nibble of V[0])
Mi  = M AND Qi                 Q0=f000  Q1=0f00  Q2=00f0  Q3=000f
K_r = ( V[1]^M0, V[2]^M1, V[3]^M2, X^M3 )
X   = V[0] for a 64-bit key, V[4] for 96- and 128-bit keys    (SEL[1])
```

**Key update.** After each round key the register is updated. `<<<k` is a
16-bit left rotation.

```
64-bit : V <- ( V1, V2, V3, V0<<<3, 0, 0, 0, 0 )
96-bit : V <- ( V5, V0<<<3, V1, V2, V3<<<8, V4, 0, 0 )
128-bit: V <- ( V5, V6, V7, V0<<<3, V1, V2, V3, V4<<<8 )
```

In hardware this is one 16-bit multiplexer per output word. Each has three
used inputs (SEL = 01, 10, 11). The zero words are tied to ground. SEL = 00
is unused. Only two rotators by a fixed amount are needed per size. The
round-key logic is shared, except for the single multiplexer that picks X.

## Micro-architecture

```
            plaintext                         key (128, left-aligned)
                |                                  |
   +-------> [MUX load] ----(+)<---- K_r ----- [round key] <--+
   |                          |                                |
   |                     [C register 64]          [MUX load]--+--> [key update] --> [U register 128]
   |                          |                        ^                                   |
   +-- tau <- pi <- gamma <---+--> phi --> ciphertext  +-----------------------------------+
```

- **`mcrypton_datapath`**: the C register and one round of logic. In the
  load cycle C <- plaintext ^ K0. In each step cycle
  C <- tau(pi(gamma(C))) ^ K_r. The ciphertext is phi(C), taken
  combinationally from the register. There is no output register.
- **`mcrypton_key_schedule`**: a multiplexer picks the master key (load
  cycle) or the U register. It feeds both the round-key generator and the
  key-update network. The update is written back to U every cycle the core
  works. It also contains the round-constant register.
- **`mcrypton_ctrl`**: the only part with no counterpart in the reference
  architecture, which shows just a start line and a select line. It accepts
  a start, counts twelve rounds, pulses `done`, and holds the key size for
  the whole block.

The register count matches the reference architecture's 196 flip-flops:
64 (C) + 128 (U) + 4 (round constant). The controller adds 8 more: busy,
done, a 4-bit round counter and the 2-bit key size.

## Interface and timing (`mcrypton_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous reset, active low |
| start | in | 1 | begin one encryption (accepted only when `busy` is low) |
| key_size | in | 2 | 01 = 64-bit, 10 = 96-bit, 11 = 128-bit; 00 = start refused |
| plaintext | in | 64 | block, sampled in the start cycle |
| key | in | 128 | key, left-aligned: 64-bit key in [127:64], 96-bit in [127:32]; lower bits ignored |
| ciphertext | out | 64 | valid from `done` until the next accepted start |
| busy | out | 1 | rounds in progress |
| done | out | 1 | one-cycle pulse, ciphertext valid |

```
cycle     0      1      2   ...   12     13
start     1      0      0         0      (1: next block)
load      1
busy      0      1      1   ...   1      0
round     K0     K1     K2  ...   K12
done                                     1
```

`plaintext`, `key` and `key_size` are used only in the cycle where the start
is accepted. `done` rises 12 cycles after that cycle. A new start is
accepted in the `done` cycle itself, so back-to-back blocks take 13 cycles
each. A start while busy is ignored. The controller asserts (SVA) that a
running encryption always has a valid key size, and that `done` follows the
twelfth round.

## Choices and departures

These points are either not fixed by the reference architecture or resolved
against part of its description:

- **Bit order.** h0 is the most significant nibble of the block, and V[0]
  the most significant key word. The round key is {K[0],K[1],K[2],K[3]} from
  the top down. The cipher only numbers nibbles and words, so these orders
  are a choice, and they matter for any comparison with external test
  vectors.
- **S-box tables** as listed above, chosen so that S2 = S0^-1 and
  S3 = S1^-1 hold. The cipher requires that relation.
- **Round constants** follow the x^r definition (C2 = 4).
- **Output transformation** is tau . pi . tau, per the cipher's definition.
  A block diagram of the reference architecture labels that chain pi, tau,
  pi. This core does not.
- **Key-word moves are rotations**, not shifts. Block diagrams label them
  "left shift", but a shift would discard key bits.
- **Latency and throughput.** The reference throughput figures correspond to
  12 clock cycles per block (64 x f / 12). This core spends one extra load
  cycle, where the initial key addition is done, so it delivers 64 x f / 13
  back to back. For example, 2231 instead of 2417 Mbit/s at 453 MHz.
- **Controller, reset and handshake** are this design's own. There is a
  synchronous active-low reset, and a start/busy/done handshake.
- **Decryption** is not part of the design. The architecture is for
  encryption only.
- No published known-answer vector was available to check against. The
  outputs are checked against an independent behavioural model written from
  the cipher definition (see below). A mismatch with another m-Crypton
  implementation would most likely come from the bit-order choices above.

## Files

`rtl/`:

| file | content |
|------|---------|
| `mcrypton_pkg.sv` | types, widths, masks, key-size enum, `transpose()` (tau), word/nibble helpers |
| `mcrypton_sbox.sv` | one S-box, `IDX` = 0..3 |
| `mcrypton_gamma.sv` | substitution layer, 16 S-boxes |
| `mcrypton_pi.sv` | bit permutation |
| `mcrypton_sigma.sv` | key addition |
| `mcrypton_phi.sv` | output transformation |
| `mcrypton_datapath.sv` | C register, round loop, output |
| `mcrypton_key_update.sv` | flexible key-register update |
| `mcrypton_round_key.sv` | round-key generator |
| `mcrypton_round_counter.sv` | round-constant register |
| `mcrypton_key_schedule.sv` | key multiplexer, U register, the two above |
| `mcrypton_ctrl.sv` | sequencer |
| `mcrypton_top.sv` | the core |

`tb/`: one self-checking testbench `tb_<module>.sv` per module, plus:

- `mcrypton_ref_pkg.sv`: the reference model. It uses nibble arrays, a
  bit-by-bit pi, and a key schedule on the t real words without padding.
- `tb_common.svh`: check counters, clock and watchdog.

Each testbench prints `TB_RESULT checks=N failures=M`. Coverage:

- `tb_mcrypton_top` encrypts 600 random blocks across all key sizes. It
  checks every ciphertext and the 12-cycle latency. It also counts and
  requires each control case: every key size, back-to-back issue, start
  while busy, refused key size 00, key-size changes, and junk below short
  keys.
- `tb_mcrypton_datapath` and `tb_mcrypton_key_schedule` check the state and
  the round key after every cycle.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mcrypton_pkg.sv tb/mcrypton_ref_pkg.sv rtl/mcrypton_sbox.sv rtl/mcrypton_gamma.sv \
    rtl/mcrypton_pi.sv rtl/mcrypton_sigma.sv rtl/mcrypton_phi.sv rtl/mcrypton_datapath.sv \
    rtl/mcrypton_key_update.sv rtl/mcrypton_round_key.sv rtl/mcrypton_round_counter.sv \
    rtl/mcrypton_key_schedule.sv rtl/mcrypton_ctrl.sv rtl/mcrypton_top.sv \
    tb/tb_mcrypton_top.sv --top-module tb_mcrypton_top
./obj_dir/Vtb_mcrypton_top
```

For another testbench, replace the last file and `--top-module`. The whole
suite runs in well under a minute. The core has no parameters: widths
follow from the cipher. To add decryption or a different interface, change
`mcrypton_ctrl` and `mcrypton_top`. The round and key logic need no change
for encryption.
