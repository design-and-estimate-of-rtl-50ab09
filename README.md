# XO-64: a rolled hardware core for a data-dependent 64-bit block cipher

XO-64 is a small 64-bit block cipher with a 128-bit key, designed for cheap and
fast hardware in wireless devices. Each of its eight rounds combines two kinds of
mixing:

* **a fixed involution S_i**: a substitution-permutation network of 4x4 S-boxes and
  bit permutations that is its own inverse;
* **controlled networks F_32/80**: 32-bit permutation-like networks built from
  2-bit controlled elements. Their 80 control bits are taken from the data
  itself, so the transformation one half of the block undergoes depends on the
  other half.

The key needs no preprocessing. Each round XORs two of the four 32-bit key words
into the data, and decryption is the same circuit with a different choice of key
words. So a new key costs nothing: the key can change with every block.

This repository holds synthesizable SystemVerilog for the whole cipher. The core
is iterative: one round per clock, a new 64-bit block every 8 cycles. That gives
688 Mbit/s at 86 MHz.

## The round

One round `Crypt(L, R, K, K')` works on the two 32-bit halves:

```
A  = S_i(L ^ K)
B  = F_32/80(R ^ K', control = E(A))
L' = S_i(B)
R' = F^-1_32/80(A, control = E(B))
```

The box `E` spreads a 32-bit word over the 80 control bits. The left branch first
steers the right one. The two values then cross over, and the new left value
steers the inverse network applied to the old left branch (see `xo64_round.sv`).

The round is invertible for any keys. Given `(L', R')`, you recover
`B = S_i(L')`, then `A = F_32/80(R', E(B))`, then `L ^ K = S_i(A)` and
`R ^ K' = F^-1_32/80(B, E(A))`. These steps are again the round's own
operations, and S_i is an involution. So if the ciphertext is fed back through
the same eight rounds with the right key words, it unwinds the encryption. The
key words that make this work are fixed by two facts. The final key XOR of
encryption cancels the first key XOR of decryption. The swap between rounds
exchanges the roles of K and K'.

The full cipher is:

```
for j = 1..7:  (L, R) = Crypt(L, R, K_j, K'_j);  (L, R) = (R, L)
(L, R) = Crypt(L, R, K_8, K'_8)
(L, R) = (L ^ K_9, R ^ K'_9)
```

The key schedule is fixed. The key is `{K1, K2, K3, K4}` with K1 the most
significant word.

| j    | 1     | 2     | 3     | 4     | 5     | 6     | 7     | 8     | 9 (final) |
|------|-------|-------|-------|-------|-------|-------|-------|-------|-----------|
| enc  | K1/K2 | K3/K4 | K3/K1 | K4/K1 | K2/K3 | K3/K4 | K1/K2 | K4/K3 | K1/K3     |
| dec  | K1/K3 | K3/K4 | K2/K1 | K4/K3 | K3/K2 | K1/K4 | K1/K3 | K4/K3 | K1/K2     |

The decryption row is exactly what the inversion argument above predicts from
the encryption row: dec j=1 is enc j=9, and for j=2..8 dec j is enc j=10-j with
K and K' exchanged. This is a useful check that the round is wired as intended.

## The controlled network F_32/80

This is the part of the cipher that is least like a conventional SPN.

**Controlled element.** The basic cell (`xo64_ce.sv`) takes two data bits and
one control bit, and applies one of two 2x2 substitutions:

| v | y1          | y2        |
|---|-------------|-----------|
| 0 | x1          | x1 ^ x2   |
| 1 | x1 ^ ~x2    | x2        |

Each substitution is a bijection and its own inverse. Seen as functions of
`(x1, x2, v)`, y1, y2 and y1 ^ y2 are balanced and quadratic, with
non-linearity 2. That is the most a balanced 3-input function can have. So the
control bit enters the output non-linearly. An element fed `x1 = 0, x2 = 1`
gives the same output for both control values. A single control bit therefore
does not always change the output, and the testbenches account for this.

**Network.** F_32/80 (`xo64_f32_80.sv`) has five layers of 16 elements. Element
j of a layer takes bits 2j and 2j+1. Layer l is controlled by a 16-bit
component v_l. Fixed interleavings sit between the layers, over groups of 32,
16, 8 and 4 bits. Inside a group, the first outputs of all elements fill the
left half of the group in order, and the second outputs fill the right half:
position p goes to p/2 (p even) or g/2 + (p-1)/2 (p odd). After the five layers,
every output bit depends on every input bit.

**Inverse.** Every element substitution is an involution. So F^-1_32/80
(`xo64_f32_80_inv.sv`) is the same network traversed backwards: control
components in the order v5..v1, with the inverse interleavings (perfect
shuffles) between the layers.

**Control vector E.** `xo64_ext_e.sv` takes five overlapping 16-bit runs of the
32-bit control word X, wrapping from bit 31 to bit 0:
v1 = x0..x15, v2 = x16..x31, v3 = x5..x20, v4 = x21..x31,x0..x4 and
v5 = x10..x25. This box is wiring only. It is kept as a module because it is a
named part of the round and is tested on its own.

## The involution S_i

`xo64_si.sv` applies, in order:

1. S_0..S_7, one per nibble;
2. the permutation P1;
3. S_0..S_3 on the low half and S_4^-1..S_7^-1 on the high half;
4. P2, which permutes each half in place;
5. S_4..S_7 on the low half and S_0^-1..S_3^-1 on the high half;
6. P3, which also moves bits between the halves;
7. S_0^-1..S_7^-1.

The permutations, in cycle notation over bit positions 1..32:

```
P1 = (1,3,19,17)(2,7,20,21)(4,23,18,5)(6,8,24,22)(11,27,25,9)(10,15,28,29)(12,31,26,13)(14,16,32,30)
P2 = (2,5)(3,9)(4,13)(7,10)(8,14)(12,15)(18,21)(19,25)(20,29)(23,26)(24,30)(28,31)
P3 = (2,5)(3,17)(4,21)(7,18)(8,22)(10,13)(11,25)(12,29)(15,26)(16,30)(20,23)(28,31)
```

Three facts make the box an involution:

* The high-half path of steps 3-5 is the inverse of the low-half path.
* P2 and P3 are involutions.
* P1 equals P3 followed by a half swap.

The S-boxes S_0..S_7 are row 0 of DES S-boxes S1..S8. The tables are in
`xo64_pkg.sv`; each inverse box is found by searching the table.

## The rolled core `xo64`

`xo64.sv` holds one round instance, a 64-bit state register, the captured key
and direction, and a round counter.

* **Input.** A block is accepted when `in_valid && in_ready`:
  * `in_data = {L, R}`;
  * `in_key = {K1, K2, K3, K4}`;
  * `in_dec = 1` selects decryption.

  Key and direction are stored with the block.
* **Rounds.** Each of the next 8 clock edges applies one round, with the half
  swap after rounds 1-7. The 8th edge also applies the final key XOR and writes
  `out_data`. `out_valid` is high for that one cycle. `out_data` holds its value
  until the next result.
* **Throughput.** `in_ready` is high when the core is idle, and also in the
  cycle of the last round. Blocks offered back to back therefore complete every
  8 cycles.
* **No back-pressure.** The output has none: a consumer must take `out_valid`
  when it comes.
* **Reset.** `rst_n` is synchronous and active low.
* **Reduced rounds.** The parameter `ROUNDS` (default 8) can be set to 1..7 to
  build the reduced-round variants used to study diffusion. Rounds
  1..ROUNDS-1 are followed by the swap, and the last one by the final key XOR.
  Latency and block period become ROUNDS cycles. The decryption key order
  exists for eight rounds only, so a reduced core only encrypts meaningfully.

The critical path is one full round: an S_i box (four S-box levels), then
F_32/80 (five element levels), then either the second S_i box or F^-1_32/80,
whose control comes from the F_32/80 output.

## How far this RTL follows the published cipher

These parts follow the cipher's definition directly:

* the round structure;
* the key schedule of both directions;
* the S_i structure with its permutation cycles;
* the E box;
* the layer count and control width of F_32/80;
* eight rounds, one round per clock.

The published description leaves the following open. This design fixes them
itself, so its ciphertexts match another XO-64 implementation only if that
implementation made the same choices:

* **Controlled element.** Only the criteria it must meet are given, plus the
  statement that an "S-type" element is used. The pair above is one that meets
  the criteria.
* **S-boxes.** Only "one 4x4 box from each DES S-box" is given. Row 0 is used.
* **Wiring between the F_32/80 layers.** The network is only drawn, without bit
  numbers. The group interleaving described above is this design's reading of
  the drawing.
* **Direction of the permutation cycles.** A cycle (a1 a2 ... ak) is read as
  out[a1] = in[a2], ..., out[ak] = in[a1]. This is the only reading under which
  S_i is an involution. It matters only for P1.
* **Bit numbering.** Position p is bit p-1, so bit 0 is the LSB. In every S-box
  layer, nibble k is bits 4k..4k+3, and the low half of the word is the left
  branch of S_i.
* **Interface.** The handshake, reset and key capture are this design's own.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `xo64_ce_tb` | all 8 input cases, involution, balance |
| `xo64_sbox4_tb` | all 16 boxes against DES row 0, inverse undoes direct |
| `xo64_si_tb` | known answers, S_i(S_i(x)) = x on 2000 random words |
| `xo64_ext_e_tb` | E against part-selects, walking ones, random |
| `xo64_f32_80_tb` | known answers, inverse on 1000 random pairs, every control bit acts |
| `xo64_f32_80_inv_tb` | known answers, forward box undoes the inverse |
| `xo64_round_tb` | known answers, the round is undone by the inverse steps |
| `xo64_key_sched_tb` | all 18 table entries for two keys |
| `xo64_tb` | full core at its default size (details below) |
| `xo64_nessie_tb` | diffusion statistics for 1 to 8 rounds (details below) |

`xo64_tb` runs:

* known-answer encryptions, each followed by its decryption;
* 200 random encryptions with random idle gaps;
* the decryption of all 200 ciphertexts, which must return the plaintexts.

It checks the 8-cycle latency and the 8-cycle block rate. It also fails if any
of these never happened: encryption, decryption, a direction change, a key
change, a back-to-back accept, a stalled input, an idle cycle.

`xo64_nessie_tb` builds eight cores, with `ROUNDS` = 1..8, and flips each
plaintext bit and each key bit of 100 random samples. It measures four
quantities:

* d1, the mean number of changed output bits;
* dc, completeness;
* da, the avalanche degree;
* dsa, the strict avalanche degree.

From two rounds on, it measures d1 ≈ 32, dc = 1 and da ≈ 0.98-0.99, both for
plaintext bits and for key bits. This agrees with the published figures, which
reach full diffusion after two rounds. dsa comes out at 0.92, against 0.99
published. The gap is sampling noise at 100 samples.

One round is where this design and the published figures differ. For
plaintext bits this core gives d1 = 31.0 and da = 0.96 after one round. The
published values are d1 = 23.2 and da = 0.72. So one round here diffuses more
than the published cipher's one round. The likely causes are this design's own
choices (element pair, S-box rows, network wiring) or a different way of
forming a one-round cipher. The testbench prints the one-round figures and only
checks that one round diffuses less than two.

The known answers come from an independent software model of the cipher, built
with the same choices as this RTL. They therefore pin the RTL to those choices,
not to any external reference vectors; no published test vectors for XO-64 are
known.

Running a testbench with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module xo64_tb -y rtl -y tb +libext+.sv \
          -Irtl rtl/xo64_pkg.sv tb/xo64_tb.sv -o sim && ./obj_dir/sim
```

Replace `xo64_tb` with any other testbench name. Every testbench runs in a few
seconds.

## Files

| file | contents |
|------|----------|
| `rtl/xo64_pkg.sv` | S-box tables, P1/P2/P3, E offsets, key schedule, shared types |
| `rtl/xo64_ce.sv` | controlled element S_2/1 |
| `rtl/xo64_f32_80.sv`, `rtl/xo64_f32_80_inv.sv` | controlled network and its inverse |
| `rtl/xo64_ext_e.sv` | control vector expansion E |
| `rtl/xo64_sbox4.sv` | one 4x4 S-box, direct or inverse |
| `rtl/xo64_si.sv` | involution S_i |
| `rtl/xo64_round.sv` | round transformation |
| `rtl/xo64_key_sched.sv` | round key selection |
| `rtl/xo64.sv` | the rolled core (top level) |
