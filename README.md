# Multiplierless programmable FIR filter on the extended double base number system

A programmable FIR filter must multiply every input sample by N coefficients
that can change at run time. Fixed-coefficient tricks (shared shift-and-add
networks built for known constants) do not apply, and N general multipliers
are expensive. This design replaces the multipliers with a network that only
adds, shifts and selects:

* one shared **power-of-b generator (POBG)** forms x, 3x, 9x, 27x and 81x,
  one adder per power;
* each tap picks at most three of these multiples with small multiplexers
  (**power-of-b selector, POBS**), shifts each by one of a few hardwired
  amounts, gives it a sign, and adds the three in a carry-save adder
  (**double base coefficient generator, DBCG**);
* programming a coefficient means writing the multiplexer selects, shift
  selects and signs of its tap. They come from a 64-word look-up table.

This works because every signed 8-bit coefficient can be written in an
*extended double base number system* (EDBNS) with at most three terms of the
form ±2^a·3^k. Next to the EDBNS filter, the RTL also holds a sequential
**distributed-arithmetic (DA)** FIR filter with partial 4-input LUTs, a second
way to build a programmable filter without multipliers. The two filters are
independent and sit side by side in `fir_top`.

## The number representation behind the control word

A coefficient c (signed, 8 bits) is split as

    |c| = 2^e · f,  f odd (the fundamental),  e = trailing zeros of |c|
    f   = Σ_{t=0..2} en_t · (±) 2^{a_t} · 3^{k_t}

Only the 64 odd fundamentals 1, 3, …, 127 need a table entry. Even values
reuse the entry of their fundamental and add the factor 2^e. Negative values
reuse the entry of |c| with every term sign inverted. This split halves the
table, and makes the sign free.

Term position t cannot reach every power and every shift. Each position has a
reduced input set, fixed in `edbns_pkg`:

| term t | powers of 3 its POBS mux offers (2-bit select) | shifts its shifter mux offers (3-bit select) |
|---|---|---|
| 0 | 1, 9, 27, 81 | 0, 3 |
| 1 | 1, 3, 27, 81 | 0 |
| 2 | 1, 3, 27, 81 | 1, 2, 4, 5, 6, 7 |

These sets are the result of an exhaustive design-time search. It considered
every minimum-term signed representation of every fundamental, then chose the
sets that cover all 64 fundamentals with the fewest distinct shifts per
position. With these sets, 5 fundamentals need one term (1, 3, 9, 27, 81), 56
need two, and 3 need three (103, 115, 121). Three worked examples:

* 115 = +2^3·1 − 2^0·1 + 2^2·27 (terms 0, 1 and 2);
* 13 = +1 + 2^2·3 (terms 0 and 2);
* −104 = −(2^3 · 13): the word of 13, both signs inverted, e = 3.

One table word is `term_vec_t`: three `term_ctrl_t` fields {en, neg, bsel[1:0],
asel[2:0]}, with term 0 in the low bits (21 bits). A tap's control word
`tap_ctrl_t` adds `esh[2:0]` = e (24 bits). `edbns_encoder` builds it from a
coefficient in one combinational step: it takes the magnitude, counts trailing
zeros, looks up the fundamental, and inverts the signs for a negative
coefficient. For c = 0 it disables all terms.

Changing the base, the number of terms or the coefficient width means
regenerating both the sets in `edbns_pkg` and the table in `edbns_lut`. The
datapath modules read both from the package. The testbench `tb_edbns_lut`
evaluates every word back into a number, so it catches a table that does not
match the sets.

## EDBNS datapath

**`pobg`**: forms the powers p[k] = x·3^k. The depth-optimised form (the
default, `DEPTH_OPT = 1`) uses 3x = x + 2x, 9x = x + 8x, 27x = 3x + 24x and
81x = 9x + 72x. That is four adders and at most two adder levels, because
b² − 1 = 8 is a power of two. With `DEPTH_OPT = 0` the powers are chained,
p[k] = p[k−1] + (p[k−1] << s), with b = 2^s + 1. The chain also gives b = 5
(`BS = 2`, `GROW = 10`). The rest of the filter is only set up for b = 3. The
outputs are DW + 7 bits wide.

**`pobs`**: three 4-input multiplexers per tap, with the input sets in the
table above. A POBG output fans out only to the multiplexers that can use it.

**`dbcg`**: each term passes through a multiplexer over hardwired shifts,
which is the programmable shifter. Then the term is kept, negated (`~v + 1`)
or zeroed. One 3:2 carry-save layer and one carry-propagate adder give f·x,
and a final left shift by `esh` gives c·x. The whole unit works in
DW + 8 = 16 bits. A single term can overflow 16 bits (up to 2^7·81·x), but the
sum f·x always fits (|f·x| ≤ 127·128). Two's complement arithmetic modulo 2^16
is therefore exact, and no wider adders are needed.

**`tm_mcm`**: one `pobg` plus N copies of `pobs` + `dbcg`. Given x and N tap
control words, it outputs the N products h[i]·x. It is purely combinational.

**`edbns_fir`**: the filter, y[n] = Σ_{i=0}^{N−1} h[i]·x[n−i], in transposed
direct form. It consists of the products from `tm_mcm` and a chain of N−1
adders and registers, with `z[i] <= prod[i] + z[i+1]` and
`y <= prod[0] + z[1]`.

* Samples: x is taken on every rising edge where `x_valid` is high. One cycle
  later `y_valid` is high and `y` holds y[n]. The result is full precision,
  DW + 8 + clog2(N) bits (23 bits for N = 100), with no rounding. A new sample
  can come every cycle.
* Coefficients: when `coef_we` is high, `coef_data` is encoded and stored as
  the control word of tap `coef_addr`. The write takes effect at that edge.
  This is a transposed form, so the new value multiplies samples that arrive
  after the write. Products already in the delay line keep the old value.
  Writes and samples can be interleaved freely.
* Reset (`rst_n`, asynchronous, active low) sets all coefficients and the
  delay line to zero.

The critical path is combinational from the sample to the delay line: POBG
(2 adders), POBS mux, shift mux, negate, CSA, adder, even shift and the
structural adder. Add a register after `x` or after `tm_mcm` if timing needs
it.

## Distributed-arithmetic filter

`da_fir` evaluates y = Σ c_n·x[k−n] one bit position at a time. Bit b of all N
stored samples forms an N-bit vector. Its inner product with the coefficients
is read from LUTs. The N-input LUT is split into ⌊N/L⌋ partial L-input LUTs
(`da_partial_lut`, L = 4 by default), plus one LUT of N mod L inputs when N is
not a multiple of L. The LUT outputs are added.

* Accumulation starts at the most significant bit: acc = −f(b = BX−1) for the
  sign bit, then acc = 2·acc + f(b) for each lower bit.
* Handshake: a sample is taken when `x_valid && x_ready`. The filter is then
  busy for BX = 8 cycles. In the cycle after the last step, `y_valid` pulses
  with the result, and `x_ready` is high again. The filter accepts at most one
  sample every BX + 1 cycles.
* Coefficients: a write to tap n goes to the partial LUT that holds tap n.
  That LUT stores its L coefficients and recomputes all 2^L subset sums on the
  write edge, so it is ready in the next cycle. Write while the filter is idle.
* Defaults: N = 16, L = 4, BX = 8, CW = 8. The output is CW + BX + clog2(N) + 1
  bits.

## Top level

`fir_top` has parameters `E_N` (EDBNS taps, 100), `E_DW` (EDBNS sample width,
8), `D_N` (16), `D_L` (4) and `D_BX` (8). Ports prefixed `e_` belong to the
EDBNS filter and ports prefixed `d_` to the DA filter. Only `clk` and `rst_n`
are shared. After coarse synthesis the default top comes to about 8,500
word-level cells, 5,450 flip-flop bits and the 1,344-bit coefficient table
(64 × 21). The EDBNS filter accounts for about 8,250 cells and 4,694
flip-flop bits: 100 × 24 control bits plus the 23-bit delay line.

## Parameters you can change

* `edbns_fir`/`tm_mcm`: `N` (taps) and `DW` (sample width) are free.
* `da_fir`: `N`, `L`, `BX` and `CW` are free (BX ≥ 2).
* The coefficient width (8), the base (3), the term count (3) and the
  selector sets are bound to the table in `edbns_lut`. Change them only
  together with a new table.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line. The expected values are computed
independently with integer arithmetic:

| testbench | what it proves |
|---|---|
| `tb_pobg` | all 256 inputs, for b = 3 chained, b = 3 depth optimised and b = 5 |
| `tb_pobs` | every select of every term mux gives the intended power |
| `tb_dbcg` | random terms, controls and shifts, plus exact products |
| `tb_edbns_lut` | each of the 64 words evaluates to its fundamental and uses at most 3 terms |
| `tb_edbns_encoder` | each of the 256 coefficients encodes to itself; e is the trailing-zero count |
| `tb_tm_mcm` | 8 taps, 20 coefficient sets × 256 inputs against c·x |
| `tb_edbns_fir` | 12 taps, random stream with gaps, reprogramming mid-stream, 1-cycle latency |
| `tb_da_partial_lut` | L = 4 and L = 3, all entries after each write |
| `tb_da_fir` | 10 taps (two 4-input LUTs and one 2-input LUT), back-pressure, BX + 1 cycle interval |
| `tb_edbns_tap_sweep` | 10-, 25-, 50-, 75- and 100-tap filters side by side, random coefficients, 300 samples each |
| `tb_fir_top` | both filters at default size: 100-tap EDBNS and 16-tap DA filter; counts each mechanism and fails if one never happens |

`tb_fir_top` covers reprogramming while samples flow, even, negative and zero
coefficients, one-, two- and three-term coefficients, sample gaps, DA stalls
and negative DA samples. It checks about 3,000 values.

To run a testbench with Verilator 5 from the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/edbns_pkg.sv tb/edbns_ref_pkg.sv tb/tb_fir_top.sv \
        --top-module tb_fir_top -Mdir obj_tb_fir_top -o sim
    ./obj_tb_fir_top/sim

Replace `tb_fir_top` with the testbench you want to run. `tb/edbns_ref_pkg.sv`
holds the reference decoding of control words that the EDBNS testbenches use.
To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/edbns_pkg.sv
rtl/fir_top.sv`. Verilator reports package constants that a module does not
use, and two bits of the fundamental in `edbns_encoder` that are not read:
bit 0 is always 1, and the top bit is always 0.

## What is specified and what was chosen

The organisation comes from the filter design this RTL implements: a shared
POBG, per-tap POBS and DBCG, multiplexers over hardwired shifts, a carry-save
sum, a table indexed by odd fundamentals with even values derived from them,
b = 3 with powers up to 81, three terms, 8-bit coefficients and up to 100
taps. The depth-optimised POBG and the DA filter with partial 4-input LUTs
come from the same source. The following are this design's own choices:

* signed coefficients and signed terms;
* the particular selector sets, shift sets and table contents, which come from
  the search described above. The original search and mux-minimisation
  algorithms were not available, so a different search may pick other sets
  or more compact ones;
* deriving e and the sign with logic instead of storing them;
* the 16-bit modular datapath in the DBCG;
* the transposed direct form, the write port, the valid signals, the latency
  and the reset;
* 8-bit samples;
* for the DA filter: N = 16, MSB-first accumulation, the handshake, and
  partial LUTs built from registers that recompute their subset sums on each
  write. Reconfigurable FPGA LUT primitives would be the alternative;
* a DA throughput of one output per BX clock steps, which is what bit-serial
  evaluation gives.

The EDBNS datapath is fixed to b = 3. The POBG alone also supports b = 5, but
no selectors or table exist for that base.
