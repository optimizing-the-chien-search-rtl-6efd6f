# Divider-free Chien search over GF(2^8), built from GF(2^4) arithmetic

A Reed-Solomon decoder finds its error positions as the roots of an error
locator polynomial. For four errors over GF(2^8) that polynomial is usually
written `x^4 + s1 x^3 + s2 x^2 + s3 x + s4`, with `s = A4^-1 * (S5..S8)`.
`A4` is the 4x4 Hankel matrix of the syndromes. Forming `s` in that way needs
a GF(2^8) divider or inverter, which is the most expensive field operator.
The Chien search then tests all 255 non-zero field elements as roots.

This design removes the divider and shrinks the rest of the arithmetic with
two ideas:

1. **Scale by the determinant.** Multiplying the locator by `det(A4)` gives
   ```
   det(A4) x^4 + s'1 x^3 + s'2 x^2 + s'3 x + s'4,     s' = Adj(A4) * (S5, S6, S7, S8)
   ```
   This polynomial has the same roots, and every coefficient is a sum of
   products of syndromes. Only multipliers and XORs are needed.
2. **Compute in GF((2^4)^2).** Each GF(2^8) element is held as a pair of
   GF(2^4) nibbles. A GF(2^8) product then costs three small GF(2^4)
   multipliers. Squaring and raising to the fourth power become pure XOR
   networks on the nibbles. That makes `x^2` and `x^4` almost free, so they
   can be formed in parallel with the multiplications.

The RTL is a complete machine. Syndromes go in as bytes. The machine works out
`det(A4)` and `s'` on a small micro-programmed GF(2^4) processor. A one-point-per-cycle
Chien search unit then streams out the roots.

## The field representation

This is the part everything else depends on. Read it before changing any
constant.

* **GF(2^4)** uses the polynomial `x^4 + x^3 + 1`. A nibble `a3a2a1a0` stands
  for `a3 t^3 + a2 t^2 + a1 t + a0`, and `alpha16 = t = 4'h2`.
* **GF(2^8)** is `GF(2^4)[beta] / (beta^2 + beta + gamma)` with
  `gamma = alpha16 = 4'h2`. An element is the pair `C = C0 + beta*C1`. It is
  stored as the packed struct `gf256_t = {c1, c0}`, so the byte is
  `{C1, C0}`.
* From this the unit equations follow:
  ```
  product : C0 = A0 B0 + gamma A1 B1         C1 = (A0+A1)(B0+B1) + A0 B0
  square  : D0 = A0^2 + gamma A1^2           D1 = A1^2
  4th pow : E0 = A0^4 + gamma^2 A1^4 + gamma A1^4      E1 = A1^4
  ```
* The primitive element used for the search is `alpha256 = (C1, C0) = (4'hD, 4'hB)`.
  Its minimal polynomial is `x^8 + x^4 + x^3 + x^2 + 1`, the usual RS field
  polynomial. So a byte in ordinary polynomial basis maps linearly onto the pair
  form. `gf256_to_gf16` sends `alpha^0 .. alpha^7` to
  `01 DB 74 DE C8 F3 7C 10` (hex, `{C1,C0}`) and XORs the images of the set
  bits.

The source fixes the pair form and the reduction rule, but it does not print
the GF(2^4) polynomial, `gamma` or the GF(2^8) polynomial. The values above
are the only choice that reproduces every field value of its worked example.
That is twenty printed `alpha^k -> (nibble, nibble)` pairs, covering the
syndromes, the cofactors, the coefficients and the table of locator values.
The GF(2^4) polynomial also agrees with the one printed multiplier cone (see
`gf16_mul`). If you need another field, every constant lives in `gf_pkg`,
`gf16_mul`, `gf16_sq`, `gf16_pow4`, `gf16_gamma_mul` and `gf256_to_gf16`.

## Arithmetic units

All of these are combinational.

| module | function | structure |
|---|---|---|
| `gf16_mul` | `x*y` in GF(2^4) | shared sums `x2^x3`, `x1^x2^x3`, `x0^..^x3`, then 4 ANDs + XOR per output bit; bit 0 is `x0y0 ^ x3y1 ^ (x2^x3)y2 ^ (x1^x2^x3)y3` |
| `gf16_sq` | `a^2` | 3 XORs |
| `gf16_pow4` | `a^4` | 4 XORs: `y0=a0^a1^a3, y1=a2^a3, y2=a2, y3=a1^a2` |
| `gf16_gamma_mul #(POWER)` | `gamma^POWER * a` | shift with conditional XOR of `1001` per step |
| `gf16_add` | `a+b` | XOR |
| `gf256_mul` | GF(2^8) product | 3 `gf16_mul`, 4 `gf16_add`, 1 gamma multiplier; `A0*B0` feeds both output adders |
| `gf256_sq` | GF(2^8) square | 2 squarers, gamma, 1 adder |
| `gf256_pow4` | GF(2^8) fourth power | 2 X^4 circuits, gamma^2 and gamma on `A1^4`, 2 adders |
| `gf256_to_gf16` | polynomial basis to pair | 8x8 XOR matrix |

A GF(2^4) multiplier has an AND level below an XOR tree that is three levels
deep. The squarer and the fourth-power circuit have at most two XOR levels.
This depth gap is why `x^2`, `x^4` and products can run side by side.

## Divider-free coefficients: `elp_coeff_unit`

Entry `c` of `Adj(A4) * b` equals the determinant of `A4` with column `c`
replaced by `b = (S5..S8)` (Cramer). The unit therefore evaluates five 4x4
determinants:

| matrix | gives |
|---|---|
| `A4` | `coef[0] = det(A4)` |
| `A4`, column 4-k replaced by `b` | `coef[k] = s'k`, k = 1..4 |

Each determinant uses a Laplace expansion along rows 0-1 against rows 2-3.
Over a field of characteristic 2 all signs vanish:
```
det = sum over the 6 column pairs (i,j) of
      (M0i M1j + M0j M1i) * (M2k M3l + M2l M3k)      {k,l} = complement of {i,j}
```
That is five GF(2^8) products per pair, 30 per determinant and 150 in all.
Sums are XORs in the unit. Every product goes to the GF(2^4) processor
through a `mul_start / mul_a / mul_b -> mul_done / mul_y` request port, one at
a time. Each takes 12 cycles, so start to `done` is 1801 cycles.

Only the four-error case is handled. With fewer errors `A4` is singular,
`det(A4) = 0`, and the scaled polynomial says nothing about the roots. A full
decoder would first find the number of errors from the rank of `A_v` and use the
matching smaller matrix. That step is not part of this design.

## The micro-programmed GF(2^4) processor: `gf16_processor`

This is the processor that carries out GF(2^8) operations as sequences of
GF(2^4) micro-operations.

```
            In0 ─┬───────────┬──────────────┐
            In1 ─┼──┬────────┼──┬───────────┼──┐
                 │  │        │  │           │  │
   regfile  ──►  MUL(E1) ADD(E2) gamma(E3) X^2(E4)     X^4(E0, reads In1)
   R0..R7          └──── interface (one-hot AND-OR) ──► Out0 ─► R[d0]
                                                 X^4 ─► Out1 ─► R[d1]
   uROM ─► IR ─► 2-bit decoder ─► E1..E4        IR.e0 ─► E0
```

* `gf16_machine1` ("Machine 1") holds the four units and the output
  interface. The one enabled unit drives `Out0`.
* `gf16_idecoder` turns the 2-bit opcode into the one-hot enables E1..E4.
* The X^4 unit is enabled by the instruction's `e0` bit and writes through
  `Out1`. So a Machine-1 operation and an X^4 operation can retire in the
  same cycle.
* `gf16_uprog_rom` holds three routines. On entry, `(A1,A0)` is in R1/R0 and
  `(B1,B0)` in R3/R2. The result `(Y1,Y0)` ends up in R7/R6.

| routine | entry | steps |
|---|---|---|
| MUL  | 0  | `A1B1`, `A0B0`, `A0+A1`, `B0+B1`, `(A0+A1)(B0+B1)`, `C1 = ..+A0B0`, `gamma A1B1`, `C0 = A0B0 + gamma A1B1` |
| SQR  | 8  | `A0^2`, `D1 = A1^2`, `gamma A1^2`, `D0` |
| POW4 | 12 | `E1 = A1^4`; `A0^4` on X^4 in parallel with `gamma A1^4`; `gamma^2 A1^4`; two adds to `E0` |

Instruction word (`instr_t` in `gf_pkg`):
`{last, op[1:0], w0, e0, s0[2:0], s1[2:0], d0[2:0], d1[2:0]}`.

Timing: `start` is taken in IDLE. After one fetch cycle, one instruction
executes per cycle. `done` pulses one cycle after the last instruction, and
`y` then holds. Start to `done` is 10 cycles for MUL, 6 for SQR and 7 for
POW4. An assertion checks that the two write ports never target the same
register.

## Chien search: `chien_search`

The register `x` starts at `alpha^0` and is multiplied by `alpha256` every
cycle. For the current `x` the unit computes in parallel:

* `x^2` with `gf256_sq`
* `x^4` with `gf256_pow4`
* `x^3 = x^2 * x` with a `gf256_mul`

Four more multipliers weight the powers with the coefficients, and an XOR tree
adds `s'4`. A zero sum is a root. The unit streams `root_valid`, `root_idx = i`,
`root_val = sigma(alpha^i)` and `root_hit` for N = 255 cycles. It counts the
roots and keeps the exponents of the first four in `root_loc`. Start to `done`
is N + 1 cycles.

A root `alpha^i` means an error at code position `i`, counting from the
coefficient of `x^0` of the received polynomial. The locator is in the
"roots are the locators" form, `X^4 + s1 X^3 + ...`. It is not in the
reciprocal form `prod (1 - X_i x)`.

## Top level: `chien_top`

```
syn[8] bytes ─► 8 x gf256_to_gf16 ─► elp_coeff_unit ◄──► gf16_processor
                                          │ coef[5], coef_valid
                                          ▼
                                     chien_search ─► root stream, root_count, root_loc, done
```

To use it, pulse `start` while `busy` is low, with `syn[0..7] = S1..S8` held
for that cycle. Syndromes are in polynomial basis with
`x^8+x^4+x^3+x^2+1`.

1. `coef_valid` pulses 1801 cycles later. `coef[0..4]` then hold `det(A4)`
   and `s'1..s'4` in pair form.
2. The search starts on the next cycle.
3. `done` follows 256 cycles after `coef_valid`.

A `start` while busy is ignored.

Size after generic synthesis: about 1,170 word-level cells and 340 flip-flop
bits. The micro-program ROM is 32 x 17 bits.

## Where this design makes its own choices

The source gives the field arithmetic, the unit structures, the processor's
blocks and the divider-free formulation. The following are this design's
choices:

* **The field polynomials, gamma and alpha256.** They were recovered from the
  worked example, as described above.
* **The coefficient method.** The source expands each `s'k` symbolically into
  sums of syndrome products and estimates about 44 multiplier delays per
  coefficient. Here Cramer determinants with a 2x2-minor Laplace expansion are
  used instead: 30 GF(2^8) products per coefficient.
* **The processor's register file, instruction format, routine addresses and
  bus use.** These include X^4 reading In1 and writing Out1, and unary units
  reading In0. The source shows the units, buses, micro-program store,
  instruction register and 2-bit decoder, but no storage and no encoding. In the
  source the X^4 enable E0 comes from the instruction decoder. Here it is a
  separate instruction bit, because a 2-bit decoder has only four outputs.
* **Where the processor is used.** The processor computes the coefficients.
  The Chien search uses its own dedicated composite-field units, so it can test
  one point per cycle. The SQR and POW4 routines are exercised by the
  processor's own testbench. The full machine only calls MUL.
* **Sequencing and handshakes**, and active-low asynchronous reset everywhere.
* **Speed.** The source's speed claims are given in multiplier delays. They are
  not comparable with cycle counts, and they were not reproduced.

## Verification

Each testbench in `tb/` is self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference
arithmetic in `tb/gf_ref_pkg.sv` is written independently of the RTL
structure. It uses shift-and-add products with explicit reduction, a
polynomial-in-beta product for the pair form, and a permutation-expansion
determinant.

| testbench | covers |
|---|---|
| `tb_gf16_units` | all GF(2^4) units, exhaustively |
| `tb_gf256_units` | `gf256_mul` for all 65,536 pairs, plus the squarer and fourth power |
| `tb_gf256_to_gf16` | every byte; that the map preserves products; the example's syndromes |
| `tb_gf16_machine1` | decoder and Machine 1, every opcode and operand pair |
| `tb_gf16_processor` | 604 MUL/SQR/POW4 routine runs; latency and the done pulse |
| `tb_elp_coeff_unit` | worked example (`det = a^71`, `s' = a^146, a^65, a^149, a^77`); 20 random syndrome sets; 1801-cycle latency |
| `tb_chien_search` | 14 polynomials with known roots; every `sigma(alpha^i)` value, count, locations, timing |
| `tb_chien_top` | end to end at default size. It covers the worked example, including `sigma(a^4) = a^220` and `sigma(a^254) = a^210`, and 12 random four-error patterns. It checks timing and counts products, roots, non-roots and ignored starts. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/gf_pkg.sv tb/gf_ref_pkg.sv rtl/*.sv tb/tb_chien_top.sv \
    --top-module tb_chien_top -Mdir obj_tb_chien_top
./obj_tb_chien_top/Vtb_chien_top
```

Every testbench finishes in well under a second.

Known lint messages:

* `UNUSEDPARAM`: modules that import `gf_pkg` without using all of its
  constants.
* `SYNCASYNCNET`: the reset is used both asynchronously by the flops and
  synchronously by the assertions' `disable iff`.
