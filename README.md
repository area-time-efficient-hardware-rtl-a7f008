# Ed448 signature core

This is an FPGA-oriented hardware core for Ed448 digital signatures: key generation, signing and verification over the Edwards curve Edwards448, with field prime p = 2^448 - 2^224 - 1. The core aims at a good product of area and time rather than at minimum area or maximum speed. It does all of its expensive work on one field multiplier, and that multiplier is built from a single 64x64-bit multiplier.

Four ideas carry the design:

* **Two-level Karatsuba on one small multiplier.** A 448x448-bit product is cut into nine 128x128-bit digit products. These are streamed through a pipelined 64x64-bit multiplier at one digit product every 4 cycles. They are recombined with a "refined" Karatsuba identity that needs very few additions, and reduced modulo p on the way.
* **Point multiplication on the Montgomery curve.** The secret-dependent scalar multiplication runs as a constant-time x-only Montgomery ladder on the curve that is 4-isogenous to Edwards448. Afterwards the Y coordinate is recovered and the point is mapped back to Edwards form. The map back multiplies by 4, so the ladder runs over k/4, two bits shorter.
* **One datapath for everything.** The reduction of 912-bit hash outputs modulo the group order L reuses the field multiplier in a non-modular mode. Signature verification runs a separate program on the same memory, adder and multiplier.
* **A command-level accelerator.** A host microcontroller streams hash input and issues commands. The secret key and its hash prefix never leave the core.

## Structure

The core has three stages that share one datapath.

| stage | unit | file |
|---|---|---|
| top | command FSM of the core | `rtl/ed448_core.sv` |
| top | point-multiplication controller with its 77-word program ROM | `rtl/ecpm_ctrl.sv` |
| top | verification (double-point multiplication) controller with its 71-word program ROM | `rtl/dpm_ctrl.sv` |
| middle | SHAKE256 hash unit, one Keccak round per cycle | `rtl/shake256.sv`, `rtl/keccak_round.sv` |
| middle | reduction modulo L, and (a·b + c) mod L | `rtl/modl_reduce.sv` |
| middle | main memory: 32 × 448-bit register file, 1 write and 2 read ports | `rtl/mem_unit.sv` |
| middle | secret key buffer (clamped scalar and prefix) | `rtl/sk_buffer.sv` |
| lower | modular adder/subtracter, 1 cycle | `rtl/field_alu.sv` |
| lower | Karatsuba field multiplier | `rtl/kara_mult.sv` |
| lower | its 64x64 pipelined schoolbook multiplier | `rtl/psm.sv` |
| lower | its internal product RAM | `rtl/mult_int_ram.sv` |

Shared widths, the constants p and L, and the field-element type `fe_t` are in `rtl/ed448_pkg.sv`.

The top grants the memory and the adder to whichever controller is running. The multiplier goes to the point-multiplication controller, the verification controller or the mod-L unit. An assertion in `ed448_core` checks that at most one of the three is busy at any time.

## The field multiplier (`kara_mult`, `psm`, `mult_int_ram`)

This is the part that takes the most care to follow.

**Digit split.** An operand is cut into four digits in radix 2^112:

    A = a3·2^336 + a2·2^224 + a1·2^112 + a0,  A1 = a3·2^112 + a2,  A0 = a1·2^112 + a0

The top digit is kept 120 bits wide so that the same unit can multiply the 456-bit numbers of the mod-L reduction.

**Top level (Karatsuba on halves).** With A10 = A1 + A0:

    A·B = A1B1·2^448 + (A10B10 - A0B0 - A1B1)·2^224 + A0B0

Modulo p, 2^448 ≡ 2^224 + 1, and this collapses to:

    A·B ≡ (A10B10 - A0B0)·2^224 + (A1B1 + A0B0)   (mod p)

**Middle level (refined Karatsuba).** Each of the three half-products is formed from three digit products. For example:

    A0B0 = (1 - 2^112)·(a0b0 - 2^112·a1b1) + 2^112·a10b10,   a10 = a1 + a0

Compared with the textbook form, this identity saves additions. Each digit sum is at most 128 bits wide.

**Schedule.** The nine digit products are issued in this order, one every 4 cycles:

    a0b0, a1b1, a10b10 | a2b2, a3b3, a32b32 | a20b20, a31b31, a3210b3210

Here a32 = a3 + a2, a20 = a2 + a0, a31 = a3 + a1 and a3210 = a3 + a2 + a1 + a0. The first group gives A0B0, the second A1B1, and the third A10B10: its digits are the sums of the digits of A1 and A0.

A small ROM (`digit_mask`) holds, for each product, which digits are summed to form its operands. The products go into the internal RAM. Each middle-level recombination reads the first two products of its group from the RAM and takes the third straight from the multiplier output. The recombinations happen at cycles 15, 27 and 39 after the start.

**Top-level recombination and reduction.** The term 2^224·(A10B10 - A0B0) is folded modulo p before the sum A1B1 + A0B0 is added (interleaved reduction). One more fold and one conditional subtraction of p then give a canonical result below p.

**Digit multiplier.** `psm` computes a 128x128-bit digit product in four passes of its 64x64-bit multiplier: a0b0, a1b0, a0b1, a1b1 of the 64-bit halves. Each pass result is registered and added, shifted into place, to a 256-bit accumulator. A new digit product can start every 4 cycles while the previous one is still in the pipe. A product is ready 6 cycles after its start.

**Timing.** A multiplication is ready 42 cycles after `start`: 9 × 4 issue cycles, 6 cycles of multiplier latency, and the top and final stages. In non-modular mode (`nonmod = 1`) the same schedule returns the exact 912-bit product.

## Point multiplication (`ecpm_ctrl`)

The command computes Q = [k]P and returns affine Edwards coordinates. It runs as a micro-program. Each micro-instruction loads an input or a constant, or starts an add, subtract or multiply on operands read from the memory. Two loop instructions run the ladder and the inversion exponent.

1. **Input.** The base point arrives already on the Montgomery curve (u, v). For Edwards448 the standard base point maps to u = 5. A projectively randomized copy (λu : λ) also arrives; it is the countermeasure against differential power analysis. λ comes from the host; the core has no random number generator.
2. **Ladder.** The ladder works on X/Z coordinates over the bits 445..0 of k >> 2, with a24 = 39081. Each bit costs one differential addition and one doubling: 10 multiplications and 8 additions. The ladder runs in constant time and with a fixed length.
   - There is no conditional-swap hardware. In the 18 ladder-step instructions, the addresses of (X2, Z2) and (X3, Z3) are exchanged when the current key bit is 1, so the data never moves.
3. **Y recovery.** The Montgomery Y of the result is recovered from P, [k']P and [k'+1]P (Okeya–Sakurai).
4. **Back to Edwards.** The dual 4-isogeny is applied in projective form with one common denominator. This multiplies the point by 4, which makes up for the shortened ladder. One Fermat inversion, Z^(p-2) by a fixed square-and-multiply chain, then gives the affine x and y.

Secret scalars are clamped and are therefore multiples of 4. A signing nonce r is reduced modulo L and usually is not. For such a scalar the controller first replaces k by k + (k mod 4)·L. Because B has order L, this gives the same point, and the new scalar is a multiple of 4.

One point multiplication takes 239,375 cycles from `start` to `done`, and the command takes 239,376.

## Verification (`dpm_ctrl`)

Verification checks [S]B = R + [h]A without two separate scalar multiplications. It computes Q = [S]B + [h](−A) in a single joint double-and-add over the bit pairs (h_i, S_i), which is Strauss' trick. Then it compares Q with R projectively.

**Coordinates.** The loop works on the Edwards curve in projective coordinates. Doubling costs 3 multiplications and 4 squarings. Addition uses the unified Edwards formula:

    A = Z1Z2, B = A², C = X1X2, D = Y1Y2, E = d·C·D, F = B − E, G = B + E,
    X3 = A·F·((X1+Y1)(X2+Y2) − C − D),  Y3 = A·G·(D − C),  Z3 = F·G,   d = −39081

**Table.** The three table points B, −A and B − A are computed first. The bit pair picks one of them by renaming logical addresses 29..31, again with no data movement.

**Timing.** S and h are public, so no side-channel protection is needed. The addition is skipped when a bit pair is 00, and the run time therefore depends on the scalars:

    cycles = 1 + 544 + 446·315 + 530·(number of non-zero bit pairs) + 91

This is at most 377,506 and about 318,000 for random scalars.

## Reduction modulo L (`modl_reduce`)

L = 2^446 − l0 with a 224-bit l0. A 912-bit hash output x = x1·2^456 + x0 is reduced in three rounds that always all run:

    round 1:  x1·l0·2^10 + x0       (2^456 = 2^10·2^446 ≡ 2^10·l0)   → 691 bits
    round 2:  x'1·l0 + x'0          (split at 2^446)                 → 470 bits
    round 3:  x''1·l0 + x''0                                          → 447 bits

A final conditional subtraction of L follows. The products use the field multiplier in non-modular mode.

In multiply-add mode the unit first forms h·s + r on the multiplier and reduces that. This gives the signature scalar S = (r + h·s) mod L.

**Timing.** The unit takes 3 × 43 + 2 cycles, or 4 × 43 + 2 in multiply-add mode.

## Hash and key buffer (`shake256`, `keccak_round`, `sk_buffer`)

**Hash unit.** SHAKE256 uses a 1088-bit rate and a 912-bit (114-byte) output. It absorbs one 136-byte chunk at a time and runs the 24 Keccak-f[1600] rounds at one round per cycle. The unit pads the last chunk itself; `blk_len` gives its number of message bytes. The digest is ready 25 cycles after the last chunk. A single squeeze is enough, because 114 bytes fit in the rate.

**Key buffer.** The key buffer takes the digest of the 57-byte secret key. It keeps the low 57 bytes, clamped, as the scalar s: the two low bits and the top byte are cleared, and bit 447 is set. It keeps the high 57 bytes as the prefix. While the first chunk of the nonce hash is absorbed, the core writes the prefix into bytes 10..66 of that chunk, directly after the 10-byte dom4 header "SigEd448" || 0 || 0. The prefix therefore never appears on a port.

## Using the core (`ed448_core`)

**Handshakes.**
- A command is taken when `cmd_valid` is high and `busy` is low.
- `cmd_done` pulses when the command's result is valid.
- A hash chunk is taken when `hash_blk_valid` and `hash_ready` are both high. Pulse `hash_init` before each message.

| command | effect | cycles (command to done) |
|---|---|---|
| `KEYLOAD` (0) | digest → key buffer (s, prefix) | 1 |
| `MODL_R` (1) | digest mod L → nonce r | 132 |
| `MODL_H` (2) | digest mod L → challenge h | 132 |
| `ECPM_S` (3) | [s]B → `pt_x`, `pt_y`, `pt_enc` (public key) | 239,376 |
| `ECPM_R` (4) | [r]B → `pt_x`, `pt_y`, `pt_enc` (point R) | 239,376 |
| `SIGN_S` (5) | (r + h·s) mod L → `scalar_out` | 175 |
| `CLEAR` (6) | wipe the key buffer, r and h | 1 |
| `VERIFY` (7) | [S]B == R + [h]A → `verify_ok` (S on `ver_s`, h from `MODL_H`) | 309k–378k |

**Sequences.**

- **Key generation:** hash the secret key, `KEYLOAD`, `ECPM_S`. The result on `pt_enc` is the public key A.
- **Signing:**
  1. Hash dom4 || prefix || M, with `hash_ins_prefix` set on the first chunk.
  2. `MODL_R`, then `ECPM_R`; `pt_enc` is now R.
  3. Hash dom4 || R || A || M.
  4. `MODL_H`, then `SIGN_S`.
  5. The signature is R || S.
- **Verification:** hash dom4 || R || A || M, `MODL_H`, `VERIFY`.

**Encoding.** `pt_enc` is the 57-byte point encoding: y in bits 447..0 and the low bit of x in bit 455.

**What the host does.** It forms the hash input, and gives the base point in the Montgomery domain with a fresh λ. For verification it decompresses A and R and gives them, with B, as affine Edwards points.

## Timing against the published figures

The published implementation reports, on an Artix-7 at 123 MHz:
- 376,095 cycles for key generation;
- 376,120 cycles for signing;
- 650,123 cycles for verification.

This RTL needs about 239,400, 239,900 and 309,000–378,000 cycles. It reaches fewer cycles mainly because its recombination and modular adders work on the full width in one cycle. The published design uses a 128-bit digit-serial adder for them, so this RTL is very likely larger and slower to clock. No FPGA synthesis or timing results come with this RTL.

## Where this RTL departs from the published architecture

- **Adders.** Recombinations and field additions use full-width (448- to 912-bit) adders and canonical results. The published design keeps 128-bit digits in a redundant representation with a digit-serial adder. The multiplication schedule and the Karatsuba structure are the same. The middle recombinations run two cycles earlier than the published i·12 + 5 cycle marks.
- **Main memory** holds full 448-bit words instead of 128-bit digits.
- **Choices made in this RTL.** These are not given by the published architecture:
  - the micro-instruction formats and programs;
  - the ladder, recovery and isogeny formulas in projective form with a single inversion;
  - the k + (k mod 4)·L adjustment;
  - the command set;
  - the host interface;
  - in-core prefix insertion;
  - the multiply-add mode of the mod-L unit;
  - the clamping in the key buffer, which follows the standard Ed448 key expansion.
- **Verification** uses a plain joint double-and-add with a 3-point table. The published design uses a modified Strauss method whose details are not given.
- **Not included:**
  - the "highly protected" variant, which re-randomizes the point in every ladder step at the cost of two extra multiplications per step;
  - a random number generator;
  - point decompression and message formatting, which are left to the host.

## Testbenches and simulation

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. The testbenches are:

| testbench | what it checks |
|---|---|
| `tb_psm` | products, the 4-cycle issue rate and the 6-cycle latency |
| `tb_mult_int_ram` | read and write ports |
| `tb_kara_mult` | random and edge-case operands in both modes, and the 42-cycle latency |
| `tb_field_alu` | modular add and subtract |
| `tb_mem_unit` | read and write ports |
| `tb_keccak_round` | single rounds against known states |
| `tb_shake256` | digests of 0, 3, 135, 136 and 300-byte messages, and the 25-cycle latency |
| `tb_modl_reduce` | reduction and multiply-add, with their cycle counts |
| `tb_sk_buffer` | clamping, prefix and clear |
| `tb_ecpm_ctrl` | seven scalars against a reference double-and-add, and the cycle count |
| `tb_dpm_ctrl` | valid and tampered signatures, and the cycle count |
| `tb_ed448_core` | end-to-end run at full size |

`tb/ed448_ref_pkg.sv` holds the reference field and curve arithmetic that the testbenches compare against.

`tb_ed448_core` runs the whole core at its default parameters. For two keys it performs key generation, signing of a 20-byte message, verification, and rejection of a forged signature. It compares the public keys and the signatures byte for byte with signatures from an independent Ed448 software implementation. It also counts each mechanism, and fails if one never occurs: multi-chunk hashing, prefix insertion, non-modular multiplier use, nonce adjustment, ladder swaps and skipped verification additions. It runs in about 10 seconds.

To simulate with Verilator, for example the full test:

    verilator --binary --timing -Wno-fatal --top-module tb_ed448_core -y rtl -y tb \
        rtl/ed448_pkg.sv tb/ed448_ref_pkg.sv tb/tb_ed448_core.sv -o sim
    ./obj_dir/sim

The block testbenches run the same way with their own `--top-module`. `ed448_ref_pkg.sv` is only needed by the benches that import it.

**Trust.** All testbenches pass. The arithmetic of every block is checked against independent references. The end-to-end results match standard Ed448 signatures bit for bit. Timing closure, resource use and side-channel behaviour on silicon or FPGA have not been evaluated.
