# Masked AES-128 in one cycle per round with LUT-based masked dual-rail pre-charge logic

This is a first-order masked AES-128 core for encryption and decryption. It
computes one round per clock cycle. Masking splits every secret into two random shares so that no
single wire depends on the secret. The hard part in hardware is that glitches can
recombine shares. This core uses LMDPL (LUT-based masked dual-rail pre-charge
logic) to avoid that. In LMDPL each non-linear gate is split into two layers:

* a **mask-table generator layer**, which sees only the *mask share* `m` of each
  value and fresh randomness, and computes a small lookup table for every
  non-linear gate;
* an **operation layer**, which sees only the *operation share* `o` (the value
  XOR its mask). It works in dual rail (`o` and `~o` on two wires) and uses
  monotonic AND/OR gates only, driven by the registered tables.

The operation layer needs two phases. In the **pre-charge** phase all its wires
are 0. In the **evaluation** phase each dual-rail pair resolves once, to 01 or 10.
Because the gates are monotonic, a wire can only rise once during evaluation,
so the operation layer cannot glitch. A plain LMDPL design therefore loses
every other cycle to pre-charging. This core avoids the loss with two copies of
the round-function operation layer, **RFO1** and **RFO2**, which take turns:
while one evaluates round *n*, the other is pre-charged and waits for round
*n+1*. The mask-table generators run one round ahead and register the tables
for whichever layer evaluates next. AES-128 therefore takes 10 cycles for its
10 rounds, plus one load cycle, in either direction.

## Shares and wire encoding

| value | mask share (single rail) | operation share (dual rail) |
|---|---|---|
| input block (plaintext or ciphertext) | `x0` | `x1` (converted to dual rail inside) |
| key | `k0` | `k1` |
| result | `y0` | `y1` (true rail) |

The plain value is always `mask ^ operation`. In the RTL a dual-rail byte is
`lmdpl_pkg::dr8_t`, a struct `{t, f}`:

* evaluating: `f == ~t`;
* pre-charged: `t == f == 0`.

The linear AES steps (ShiftRows, MixColumns, AddRoundKey, basis changes, the
linear part of the affine map, the key-schedule XORs) are applied to each share
on its own. In the operation layer a dual-rail XOR is built from AND/OR only:
`t = at&bf | af&bt`, `f = at&bt | af&bf`. This keeps pre-charge intact: all-zero
in gives all-zero out. Adding a public constant (the affine constant 0x63, Rcon)
swaps the rails of the bits that are set, and it is applied to the operation
share only.

## The AND gadget

Every non-linear operation is built from one gadget, an AND of two shared bits
`a = a_m ^ a_o` and `b = b_m ^ b_o`:

* `lmdpl_and_mtg` (mask layer) draws a fresh random bit `r`, which becomes the
  result's mask share. It builds an 8-bit table. For `k = {α, β}`:
  `t[k+4] = ((α ^ a_m) & (β ^ b_m)) ^ r` and `t[k] = ~t[k+4]`.
* `lmdpl_and_op` (operation layer) has eight 3-input ANDs, one per table bit.
  Gate `j` computes `s[j] = t[j] & (a rail) & (b rail)`, where it takes the
  true rail of `a_o` if bit 1 of `j mod 4` is 1 and the false rail otherwise.
  The `b_o` rail is chosen the same way by bit 0. Then `x.t = |s[7:4]` and
  `x.f = |s[3:0]`.

During evaluation exactly one `(a rail, b rail)` pair is high, so exactly one of
`s[k*]`, `s[k*+4]` can rise. The result is the operation share of `a & b` under
the new mask `r`. The table is registered between the layers, because it is the
only signal that crosses from the mask domain into the operation domain.

## The masked S-box

`lmdpl_sbox_mtg` and `lmdpl_sbox_op` are mirror images. Each does the same
steps, one on the mask share and one on the dual-rail operation share:

1. Map the byte from the AES polynomial basis into the tower field
   GF(((2²)²)²) (matrix `PHI`). The tower is GF(4) = GF(2)[z]/(z²+z+1),
   GF(16) = GF(4)[w]/(w²+w+z), GF(256) = GF(16)[v]/(v²+v+8).
2. Invert `G = G1·v + G0` as follows:
   `Δ = 8·G1² ^ G1·G0 ^ G0²`, `D = Δ⁻¹`, `G⁻¹ = (G1·D)·v + (G1^G0)·D`.
   The GF(16) inverse uses the same formula one level down, with the GF(4)
   inverse being a squaring. Zero maps to zero.
3. Map back and apply the linear part of the affine map in one matrix
   (`OUT_AFF`). Then add 0x63 on the operation share.

Squarings and scalings are linear. Only the multiplications need gadgets:

* each GF(4) multiplication (Karatsuba) uses 3 AND gadgets;
* each GF(16) multiplication or inversion uses 9;
* the GF(256) inversion uses four GF(16) operations, so **36 gadgets per S-box**.

That means 36 random bits and a **288-bit table** per S-box per round. The
gadgets take their table slices in a fixed order:

| slice | `r` bits | `t` bits |
|---|---|---|
| G1·G0 | 8:0 | 71:0 |
| inverse | 17:9 | 143:72 |
| G1·D | 26:18 | 215:144 |
| (G1^G0)·D | 35:27 | 287:216 |

Inside each slice, the sub-multipliers follow the same pattern. The mask layer's
output mask depends only on the random bits, never on the input mask. The
constants in `lmdpl_pkg` were derived for this tower field and checked against
the AES S-box for all 256 inputs.

## Round datapath and timing

```
             x0^k0 / k0                                  PRNG (720 bit/cycle)
                 |                                              |
          +------v------+  m_q, km_q   +-------------------------v------+
          | mux (load)  |<-------------| lmdpl_rfmtg  (SR, 16 S-box MTG, |
          +-------------+------------->|   MC unless last, + key mask)   |
                                       | lmdpl_kexp_mtg (4 S-box MTG)    |
                                       +---------+--------------+-------+
                                    tables rd odd|              |tables rd even
                                         tbl1_q  v              v tbl2_q
   x1^k1, k1 --> st1_q,rk1_q --> [ lmdpl_rfo RFO1 ] --> st2_q,rk2_q --> [ lmdpl_rfo RFO2 ] --+
                     ^                                                                      |
                     +----------------------------------------------------------------------+
```

Each RFO computes one complete round, combinationally. In encryption:

* key step: RotWord, SubWord through 4 masked S-boxes, Rcon, XOR chain;
* ShiftRows, then 16 masked S-boxes;
* MixColumns, except in round 10;
* AddRoundKey with the new round key.

In decryption:

* backward key step: `w3^w2`, `w2^w1`, `w1^w0`, then `w0 ^ SubWord(RotWord(new w3)) ^ Rcon`,
  with Rcon running from round 10 down to round 1;
* InvShiftRows, then 16 masked inverse S-boxes;
* AddRoundKey with the new (previous) round key;
* InvMixColumns, except in the last round.

InvMixColumns is done as a pre-step, `u = 4·(a0^a2)` and `v = 4·(a1^a3)`
added to the column, followed by the MixColumns network. The inverse S-box
shares the inversion and the gadget tables with the forward S-box. Only the
linear maps around the inversion change, and the 0x63 constant moves to the
input. The mode is a public control bit, so the mode multiplexers do not
touch the masking.

Cycle by cycle, for one block (`start` high in cycle 0):

| cycle | mask-table layer | RFO1 | RFO2 |
|---|---|---|---|
| 0 (load) | builds round-1 tables from `x0^k0`, `k0` into `tbl1_q` | input registers load `x1^k1`, `k1` | pre-charged |
| 1 | builds round-2 tables into `tbl2_q` | evaluates round 1, result into RFO2 registers | pre-charged |
| 2 | round-3 tables into `tbl1_q` | pre-charged | evaluates round 2 |
| … | … | … | … |
| 10 | idle, holds the final mask | pre-charged | evaluates round 10, result to `y1`, mask to `y0` |
| 11 | — | — | `done` = 1 |

At the end of its evaluation cycle, the evaluating layer's input registers are
cleared to zero. So the layer that is not evaluating always sees all-zero
inputs. This is asserted in the RTL and checked in the testbench.

A table register is never written in the cycle in which its own layer reads it.
Round *n*'s tables are written in cycle *n−1* and read in cycle *n*.

## Interface of `lmdpl_aes`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `seed_load`, `seed` | in | 1, 128 | reseed the PRNG at the next edge |
| `start` | in | 1 | accept `x0`,`x1`,`k0`,`k1`,`decrypt` in this cycle. Ignored while `busy`. |
| `decrypt` | in | 1 | 0: encrypt, 1: decrypt |
| `x0`, `x1` | in | 128 | input block shares: plaintext (encrypt) or ciphertext (decrypt) |
| `k0`, `k1` | in | 128 | key shares: the cipher key (encrypt) or the last round key, round key 10 (decrypt) |
| `busy` | out | 1 | rounds in progress |
| `done` | out | 1 | high from 11 cycles after `start` until the next start |
| `y0`, `y1` | out | 128 | result shares, `result = y0 ^ y1` |

For decryption, supply the last round key. A system that holds only the cipher
key can get it by running the AES-128 key schedule once, in software or in a
masked form of its own. The core does not keep round keys.

Byte `i` of a 128-bit word is bits `[127-8i -: 8]`, in the usual AES
column-major order. Parameter `NR` (default 10) is the round count. The
round-constant and key-schedule logic is AES-128 only, so change `NR` only
together with that logic.

## Modules

| module | role |
|---|---|
| `lmdpl_pkg` | dual-rail types, table and randomness widths, tower-field matrices, dual-rail XOR/linear-map helpers, AES helpers |
| `lmdpl_and_mtg` / `lmdpl_and_op` | AND gadget, mask and operation halves |
| `lmdpl_gf4_mul_*`, `lmdpl_gf16_mul_*`, `lmdpl_gf16_inv_*` | masked tower-field building blocks, mask (`_mtg`) and operation (`_op`) halves |
| `lmdpl_sbox_mtg` / `lmdpl_sbox_op` | masked S-box and inverse S-box |
| `lmdpl_rfmtg` | round-function mask-table generator (16 S-boxes) |
| `lmdpl_kexp_mtg` | key-expansion mask-table generator (4 S-boxes) |
| `lmdpl_rfo` | round-function operation layer, data and key |
| `lmdpl_prng` | randomness, 720 bits per cycle |
| `lmdpl_ctrl` | round counter, mode, layer alternation, round constants, done |
| `lmdpl_aes` | top level |

Storage: each of the two table registers holds 20 × 288 = 5760 bits. The state
and key registers hold 4 × 256 dual-rail bits. Add the 256 bits of masks and
the 256 bits of output registers, about 13k flip-flops in all.

## What follows the source design and what is this implementation's own

These parts follow the published design:

* the two-layer gadget with an 8-bit table, eight ANDs and two ORs;
* dual-rail pre-charge logic and monotonic gates only;
* registered tables;
* two alternating operation layers, for one round per cycle;
* mask-table generation one phase ahead;
* a protected key expansion with its own mask-table generator;
* the SR → SB → MC order of the mask round;
* 36 random bits and a 288-bit table per S-box.

These are choices of this implementation:

* **S-box decomposition.** The tower field, the Karatsuba multipliers and all
  constants are chosen here. They happen to give the same randomness and table
  size per S-box as the published design.
* **Pre-charge.** Registers are cleared to all-zero. The load cycle makes the
  latency 11 cycles from `start` to `done`.
* **Register placement.** The mask state is registered once per round. The
  published block diagram shows one more register between SubBytes and
  MixColumns in the mask path.
* **PRNG.** `lmdpl_prng` is a bank of 23 xorshift32 generators. It is a
  functional stand-in with no cryptographic strength. A real device needs a
  proper generator with at least 720 bits per cycle: 576 for the data S-boxes
  and 144 for the key S-boxes.
* **Interface.** The handshake, reset and the single-rail input/output ports
  are this implementation's.
* **Decryption.** The published results cover a combined encryption/decryption
  engine but do not describe its decryption path. Here decryption starts from
  the last round key and runs the standard inverse cipher, one round per cycle,
  in the same two layers. The encryption-only and decryption-only variants are
  not built separately.

## How far it can be trusted

* **Function.** The core is checked against a plain AES-128 model on the
  FIPS-197 example, in both directions, and on random keys and plaintexts with
  random shares. It is
  also checked block by block, down to every S-box input with random masks.
* **Security.** The security rests on properties that RTL simulation cannot
  show:
  * glitch-free monotonic evaluation in the operation layer;
  * independence of the mask layer from the operation shares;
  * no recombination of shares by the synthesis tool.

  Synthesize the operation layer with don't-touch constraints so that the tool
  keeps the AND/OR structure and the rail separation. Never let it merge a
  dual-rail pair into one XOR. The RTL keeps the layers in separate modules
  (`*_mtg` and `*_op`) to make such constraints easy to apply. Power-analysis
  leakage has not been evaluated for this RTL.
* **Pre-charge checks.** The all-zero-in, all-zero-out property of the
  operation layer is checked in simulation for the gadget, the S-box and the
  whole round.

## Simulating

Each testbench is in `tb/` and prints `TB_RESULT checks=N failures=M`. For
example, the full core at default size:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/lmdpl_pkg.sv tb/tb_lmdpl_aes.sv --top-module tb_lmdpl_aes -Mdir obj_aes
./obj_aes/Vtb_lmdpl_aes
```

Building takes about a minute and a half, and the run is instant.

| testbench | covers |
|---|---|
| `tb_lmdpl_and` | AND gadget, exhaustive, including its table and pre-charge |
| `tb_lmdpl_sbox` | masked S-box and inverse S-box for all 256 inputs with random masks and randomness, rail complementarity, pre-charge |
| `tb_lmdpl_round` | `lmdpl_rfmtg` + `lmdpl_kexp_mtg` + `lmdpl_rfo`, one encryption and one decryption round for every round number against a plain AES round and key step |
| `tb_lmdpl_ctrl` | controller schedule cycle by cycle, both modes |
| `tb_lmdpl_prng` | PRNG against a model of its lanes |
| `tb_lmdpl_aes` | whole core, as above: 26 encryptions and 25 decryptions |

`tb_lmdpl_aes` also checks the following and counts how often each happens:

* the 11-cycle latency;
* five evaluations per block for each of RFO1 and RFO2, strictly alternating;
* the idle layer pre-charged in every round;
* no MixColumns in the last round;
* a start while busy being ignored;
* new output shares when the same input shares are encrypted twice;
* a reseed;
* a switch between encryption and decryption.
