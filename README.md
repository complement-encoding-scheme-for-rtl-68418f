# Pre-encoded NR4SD multiplier

Many DSP kernels (FIR filters, transforms) multiply a stream of run-time
samples A by coefficients B that are fixed at design time and read from a ROM.
A Modified Booth (MB) multiplier has to recode B on every cycle, and that
recoder sits on the critical path. This design recodes the coefficients
once, ahead of time, and stores the result in the ROM instead. The format is
the **Non-Redundant radix-4 Signed-Digit (NR4SD)** form. The radix-4 digit
count is the same as in MB, but each digit has only four possible values. So
each digit fits in 2 bits, and the ROM grows by only one bit per word
(n+1 bits instead of n). An MB digit stored as ready-made selection signals
would take 3 bits per digit, a 3n/2-bit ROM. At run time each 2-bit digit only
goes through two gate levels to become the select lines of its partial
product generator.

The RTL is a complete, synthesizable 16-bit system: a 512-word coefficient
ROM, the multiplier datapath, a sequencing controller, and a combinational
pre-encoder that converts coefficients into ROM words. It computes one exact
32-bit product per clock cycle.

## The number representation

A coefficient B has n = 2k bits, two's complement. It is written as k radix-4
digits, B = Σ d_j·4^j.

* **Digits 0 … k-2** are NR4SD digits, stored as 2 bits `{h, l}`. There are two
  digit sets, selected by the `VARIANT` parameter:
  * `NR4SD_MINUS` (default): d = −2h + l, so d ∈ {−2, −1, 0, +1}.
  * `NR4SD_PLUS`: d = +2h − l, so d ∈ {−1, 0, +1, +2}.

  Each set has exactly four values, so every digit string is unique: the
  representation is non-redundant.
* **Digit k-1**, the most significant, is stored in Modified Booth form. It
  has 3 bits `{neg, two, one}` and d ∈ {−2 … +2}. A four-value digit cannot
  also absorb the carry coming up from the lower digits. A five-value top
  digit covers exactly the two's complement range of n bits.

The ROM word has n+1 bits:

| bits        | content                               |
|-------------|---------------------------------------|
| `[2j+1:2j]` | `{h, l}` of NR4SD digit j, j < k-1     |
| `[n:n-2]`   | `{neg, two, one}` of the top MB digit |

### Off-line conversion

The conversion goes from the least significant digit up, with a carry c
(c = 0 at digit 0). Digit j takes the bit pair (b_2j+1, b_2j) and the incoming
carry. Two half adders rewrite them as one digit of the chosen set and an
outgoing carry:

* NR4SD−: b_2j + c = 2c' + l (ordinary half adder), then
  b_2j+1 + c' = 2c_out − h (the sum bit has negative weight: h = XOR, c_out = OR).
* NR4SD+: b_2j + c = 2c' − l (negative sum: l = XOR, c' = OR), then
  b_2j+1 + c' = 2c_out + h (ordinary half adder).

The top digit is −2·b_n-1 + b_n-2 + c, written in Booth form.

Example, n = 8, B = 0x37 = 55:

* NR4SD−: digits (from the top) 1, 0, −2, −1, which gives 64 + 0 − 8 − 1 = 55.
* NR4SD+: digits 1, −1, 2, −1, which gives 64 − 16 + 8 − 1 = 55.

This conversion exists twice: as the elaboration-time function
`nr4sd_pkg::preencode`, which fills the ROM, and as the combinational module
`nr4sd_preencoder`, which the top exposes on `coef_in`/`coef_enc` for building
ROM images.

## The datapath (`nr4sd_multiplier`)

```
 ROM word ─┬─ digit 0 ─ nr4sd_encoder ─3─ nr4sd_ppg ─ PP0 ────┐
           ├─ digit 1 ─ nr4sd_encoder ─3─ nr4sd_ppg ─ PP1·4 ──┤
           │   ...                                            │
           └─ top digit (3 bits, MB) ──── mb_ppg ── PPk-1·4^(k-1)┤
 constant 1010…1011 · 2^n ───────────────────────────────────────┤ csa_tree ─ S,C ─ cla_adder ─ P
 carry-in vector 0 c_k-1 0 … 0 c_1 0 c_0 ────────────────────────┘
```

**Encoders.** `nr4sd_encoder` turns `{h, l}` into three one-hot select lines
`{two, one_m, one_p}`. The lines are all zero for digit 0. For NR4SD− the
`two` line means −2; for NR4SD+ it means +2. Each line is a single 2-input
AND.

**Partial product generators.** Each generator forms digit·A over n+1 bits.
A is sign-extended, and 2A is A shifted left by one.

* `nr4sd_ppg`: bit i is an AND-OR of a_i, ¬a_i and a_i-1 (or ¬a_i-1 for −2),
  selected by the one-hot lines.
* `mb_ppg` (top digit): bit i is ((one·a_i) | (two·a_i-1)) XOR neg, the usual
  Booth selector.

A negative multiple is produced as its one's complement, plus a carry-in bit
`cin`:

* NR4SD−: cin = one_m | two.
* NR4SD+: cin = one_m.
* MB: cin = neg.

So the NR4SD generators need no XOR stage and no separate sign line. The MB
one does.

**Sign extension by constant.** This is the least obvious part. Each
partial-product row is a signed (n+1)-bit number at offset 2j. Instead of
sign-extending every row to 2n bits, each generator outputs its row with the
sign bit *inverted*. The identity −s = (1 − s) − 1 moves the "−1" of every row
into one constant:

```
SIGN_CONST = −2^n · Σ_{j=0}^{k-1} 4^j   (mod 2^2n)
```

For n = 16 this is `0xAAAB_0000`: the n-bit pattern 1010…1011 placed at bit
n. The k carry-in bits go into one more row, c_j at bit 2j. With zeros
between them they fit in n bits. So the tree adds k+2 rows of 2n bits: 10
rows for n = 16. The result is exact modulo 2^2n, and because the product of
two n-bit numbers fits in 2n bits, P is the exact two's complement product.

**CSA tree and adder.** `csa_tree` is a Wallace tree. Each level replaces
every group of three rows by a sum row and a carry row shifted left by one,
until two rows remain. For 10 rows that takes 5 levels (10 → 7 → 5 → 4 → 3 → 2). `cla_adder` is a
Kogge–Stone parallel-prefix carry-lookahead adder with ⌈log2 W⌉ prefix levels.

## The system (`nr4sd_premult_top`)

```
 start/base/count ─ mult_ctrl ─ cen_n, addr ─ coef_rom (512 × 17, sync) ─┐
                        │ a_take                                         ├─ nr4sd_multiplier ─ [P reg] ─ p
 a_in ──────────────────┴──────────────── [A reg] ───────────────────────┘
```

* `coef_rom`: synchronous ROM. When `cen_n` (active low) is low at a clock
  edge, it reads `addr`, and the word is valid after that edge. While `cen_n`
  is high its output holds.
* `mult_ctrl`: a three-state machine, IDLE → ISSUE → DRAIN.
  * A `start` pulse while idle latches `base_addr` and `count` (0…512).
  * In ISSUE it reads one word per cycle, at addresses base, base+1, …,
    wrapping at 512. It raises `a_take` in every such cycle.
  * It delays each read by the two pipeline stages to make `p_valid`, and
    marks the final product with `p_last`/`done`.
  * A `start` pulse while busy is ignored. A count of 0 returns to idle
    without reading.

### Timing

| cycle | what happens                                                      |
|-------|-------------------------------------------------------------------|
| t     | `a_take` = 1; `a_in` must hold the operand for word `addr`          |
| t+1   | ROM word and registered A drive the combinational multiplier      |
| t+2   | `p` = A·B, `p_valid` = 1                                           |

The throughput is one product per cycle. A run of n words takes n cycles of
reads, plus 2 cycles to drain the pipeline.

### Ports of the top

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset of the control registers |
| `start` | in | 1 | begin an operation |
| `base_addr` | in | 9 | first coefficient address |
| `count` | in | 10 | number of coefficients |
| `a_in` | in | N | operand A, two's complement |
| `a_take` | out | 1 | `a_in` is taken this cycle |
| `busy` | out | 1 | operation in progress |
| `p`, `p_valid`, `p_last`, `done` | out | 2N, 1, 1, 1 | product and its markers |
| `coef_in` → `coef_enc` | in → out | N → N+1 | side pre-encoder, independent of the datapath |

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | operand and coefficient width, even, ≥ 4. 24 also works. |
| `DEPTH` | 512 | ROM words |
| `VARIANT` | `NR4SD_MINUS` | digit set of the low digits |
| `COEF_SET` | 0 | which built-in coefficient set fills the ROM |
| `INIT_FILE` | `""` | if set, a `$readmemh` image of encoded (N+1)-bit words replaces the built-in set |

The built-in sets (`nr4sd_pkg::coef_value`) are pseudo-random. Words 0–3 hold
the corner values −2^(N−1), 2^(N−1)−1, 0 and −1. Real coefficients are loaded
through `INIT_FILE`, with each word produced by `nr4sd_preencoder` or
`preencode`.

## What follows the architecture and what is this design's own

These parts follow the published architecture:

* the NR4SD digit sets and the Booth top digit
* the (n+1)-bit ROM word and the 512-word synchronous ROM
* the chain of 2-to-3-bit encoder, partial product generator, CSA tree and
  carry-lookahead adder
* the 1010…1011 constant and the interleaved carry-in vector
* operand widths of 16 and 24 bits

These parts are this design's own choices:

* the bit layout of the ROM word and the gate equations of the encoders and
  generators; the generators are written as AND-OR logic, and mapping them
  onto NAND/NOR gates, so that no inverter is needed on A, is left to
  synthesis
* the active-low chip enable, and the ROM output holding while disabled
* the Wallace tree and Kogge–Stone adder, which stand in for library
  components
* the registers around the combinational multiplier, and so the 2-cycle
  latency
* the controller and its start/count/`a_take` interface (the architecture
  only says a state machine sequences the data flow)
* the reset scheme and the built-in coefficient sets

The architecture has two variants of equal standing, NR4SD− and NR4SD+. Both
are built. NR4SD− is the default.

The baseline multipliers this scheme is usually compared with are not
included: a conventional MB multiplier, and a fully pre-encoded MB multiplier
with a 3n/2-bit ROM. Neither is area or power characterised here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog. The testbenches
compare outputs with values computed independently, mostly through the digit
definitions in `tb/tb_ref_pkg.sv`.

| testbench | what it checks |
|-----------|----------------|
| `tb_nr4sd_encoder` | all 4 digits, both sets |
| `tb_nr4sd_ppg`, `tb_mb_ppg` | every digit × corner and random A |
| `tb_csa_tree` | 3, 10 and 14 rows, random |
| `tb_cla_adder` | W = 32 and 13, carry-chain corners and random |
| `tb_nr4sd_preencoder` | all 65 536 16-bit coefficients, both sets, and all of N = 8 |
| `tb_coef_rom` | all 512 words of two ROMs, 1-cycle latency, hold with `cen_n` high |
| `tb_coef_rom_file` | a ROM loaded from `tb/coef_rom_init.hex` (16 encoded corner and sample coefficients) feeding the multiplier |
| `tb_nr4sd_multiplier` | 20 000 random and corner products at N = 16 (both sets), all 65 536 at N = 8 |
| `tb_mult_ctrl` | address sequence and wrap, read count, latency, `done`, start while busy, count 0 |
| `tb_nr4sd_premult_top` | the default system end to end (see below) |
| `tb_nr4sd_workloads` | 20 coefficient sets × 512 words for both digit sets at N = 16, and both sets at N = 24: 21 504 products |

`tb_nr4sd_premult_top` runs the system at its default size. It first streams
all 512 coefficients in one operation, then runs:

* a run that wraps the address space
* a single-word run
* a zero-length run
* runs with a start pulse while busy

It checks every product, the 2-cycle latency and one-word-per-cycle
throughput. It also counts how often each mechanism occurs, and fails if any
never does:

* every NR4SD digit value
* every Booth digit value
* negative products
* address wrap
* idle ROM cycles
* ignored starts
* side pre-encoder conversions

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nr4sd_pkg.sv tb/tb_ref_pkg.sv tb/tb_nr4sd_premult_top.sv --top-module tb_nr4sd_premult_top
./obj_dir/Vtb_nr4sd_premult_top
```

Run from the directory that holds `rtl/` and `tb/`: `tb_coef_rom_file` opens
`tb/coef_rom_init.hex` by that relative path. Every testbench finishes in seconds. Linting a module alone works the same way:
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/nr4sd_pkg.sv rtl/<module>.sv`.

Lint reports one warning, `SYNCASYNCNET` on `rst_n`. It comes from the
controller's assertion: the assertion's `disable iff` samples the
asynchronous reset synchronously. The warning is harmless.
