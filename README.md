# Bi-Recoder FIR filter

A 3-tap direct form FIR filter for 8-bit samples and 8-bit fixed coefficients, in which
every tap multiplier is a *Bi-Recoder* multiplier: the multiplier operand is taken two
bits at a time, so an 8x8 product needs only four partial products instead of eight. The
partial products are compressed by a Wallace tree and added by a *reduced complexity
square-root carry-select adder* (SQRT CSLA), which also forms the filter's accumulation
chain. The aim of the architecture is less logic and a shorter critical path than a
multiplier built from one partial product per bit and a carry-select adder with
duplicated sum logic.

```
            x[n]        x[n-1]        x[n-2]
 x_in ──┬──[z^-1]──┬──[z^-1]──┐
        │          │          │
      (×h0)      (×h1)      (×h2)      each × is a bi_recoder_mult
        │          │          │
        └────(+)───┴───(+)────┘        each + is an 18-bit rc_sqrt_csla
                         │
                     [y_out reg] ── y_out (18 bits)
```

All arithmetic is unsigned. Default coefficients are h = 27, 228, 27.

## Bi-Recoder partial products (`bi_recoder_ppg`)

Bits `b[2k+1:2k]` of the multiplier select one of four values for partial product `k`:

| bit pair | partial product |
|----------|-----------------|
| 00       | 0               |
| 01       | a               |
| 10       | a << 1          |
| 11       | a + (a << 1) = 3a |

This is radix-4 recoding without negative digits, unlike Booth recoding. The only
value that is not a wire shift is 3a. It is computed once per multiplier by a 10-bit
reduced SQRT CSLA and shared by all four selections. Each partial product is 10 bits
wide, since 3 × 255 = 765 needs 10 bits. Partial product `k` has weight 4^k. For an 8-bit
multiplier that gives four rows, `pp[0..3]`, at shifts 0, 2, 4 and 6.

## Wallace reduction (`wallace_reducer`)

The four shifted rows (16 bits each) are reduced to two rows by rows of full adders
(3:2 counters). At each level the rows are taken three at a time; one 3:2 row produces
a sum row and a carry row, and the carry row is shifted up by one. Leftover rows pass
through. Four rows take two levels: rows 0–2 become two rows, and those two plus row 3
become the final two. The module is generic in row count and width. Carries out of the
top bit are dropped, which is exact because an 8x8 product fits in 16 bits. Bit 0 of
the carry row is always 0.

## Reduced complexity SQRT CSLA (`rc_sqrt_csla`, `rc_csla_group`)

This is the least familiar part of the design.

**Group layout.** A square-root carry-select adder splits the word into groups that grow
by one bit each. For 16 bits the groups are:

| group | bits     | width | implementation |
|-------|----------|-------|----------------|
| 0     | [1:0]    | 2     | ripple-carry adder (`ripple_carry_adder`) fed by `cin` |
| 1     | [3:2]    | 2     | `rc_csla_group` |
| 2     | [6:4]    | 3     | `rc_csla_group` |
| 3     | [10:7]   | 4     | `rc_csla_group` |
| 4     | [15:11]  | 5     | `rc_csla_group` |

Group g ≥ 1 starts at bit `2 + (g-1)(g+2)/2`; `fir_pkg` computes this. Other widths use
the same sequence with the last group cut short: 10 bits for the 3a adder (2, 2, 3, 3)
and 18 bits for the filter's accumulators (2, 2, 3, 4, 5, 2).

**What "reduced" means.** In the conventional BEC (binary-to-excess-1 converter) form of
this adder, every group above the first computes its sum twice. A ripple-carry adder
assumes carry-in 0, a BEC derives the carry-in-1 result from it, and a multiplexer picks
one of the two using the carry from the group below.

The reduced group drops that duplication:

* Bit 0 is a full adder that takes the group's carry in directly.
* Every higher bit is a half adder giving `p = a ^ b` and `g = a & b`.
* The carry moves up the group as `c[i] = g[i] | (p[i] & c[i-1])`.
* Each sum bit is `sum[i] = p[i] ^ c[i-1]`.

The half adders of all groups do not depend on any carry, so they settle in parallel.
Only the short carry logic of each group waits for the carry from below. No multiplexer
and no second copy of the sum are needed.

Functionally, a chain of these groups is an exact adder. The grouping decides how the
logic is organised, not the result.

## Filter (`bi_recoder_fir`, top)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | synchronous reset, active low |
| `in_valid`  | in  | 1     | `x_in` holds a new sample |
| `x_in`      | in  | 8     | sample x[n], unsigned |
| `out_valid` | out | 1     | `y_out` was loaded on the last clock edge |
| `y_out`     | out | 18    | y[n] = Σ h[k]·x[n−k], full precision |

**Timing.** On each rising edge with `in_valid` high, the filter does three things:

* It takes `x_in`.
* It shifts the two z⁻¹ registers.
* It loads `y_out` with the output for that sample.

Tap 0 uses `x_in` combinationally, so the output belongs to the sample that arrives on
the same edge. `out_valid` is `in_valid` delayed by one clock. The filter accepts one
sample per clock with a latency of one clock. Between samples, `y_out` holds its value.
Reset clears the sample history and the output.

The combinational path per clock runs from `x_in` through one multiplier (3a adder,
selection, two Wallace levels, 16-bit adder) and two 18-bit adders to the output
register. There are no pipeline registers.

**Parameters.**

| parameter | default | meaning |
|-----------|---------|---------|
| `TAPS`    | 3       | number of taps |
| `W`       | 8       | sample and coefficient width; must be even |
| `COEFF`   | `{8'd27, 8'd228, 8'd27}` | packed array, `COEFF[k]` multiplies x[n−k] |
| `OUT_W`   | `2*W + $clog2(TAPS)` = 18 | output width |

The sample is the multiplicand. The coefficient is the recoded operand, so its bit-pair
selections are constant for a fixed filter. 27 = `00 01 10 11` and 228 = `11 10 01 00`,
so the default coefficients use every selection code.

## Sources and design choices

These points follow the design this RTL implements:

* Bi-Recoder selection rule, four 10-bit partial products for 8 bits, and Wallace
  reduction of four rows to two.
* 16-bit SQRT CSLA group boundaries.
* Group structure: a full adder on the lowest bit with the carry in, half adders above.
* 3 taps, 8-bit samples, 8-bit fixed coefficients, direct form structure.

These are choices made here:

* Coefficient values. None were specified.
* Unsigned arithmetic.
* Full-precision 18-bit output.
* Which operand of each multiplier is recoded.
* Sharing one 3a adder among the four selections.
* The row grouping in the Wallace tree.
* The use of the reduced SQRT CSLA for the 3a adder and the accumulation chain.
* The `in_valid` strobe, the output register and the synchronous reset.
* The `cin` port on the adder. The 16-bit adder this follows ties its carry in to 0; every
  instance here does the same.

Known departures and limits:

* The RTL is written at the bit/word level (XOR/AND expressions, loops), not as a gate
  netlist. Gate counts of the reduced groups (26, 39, 52 and 65 gates for groups of 2, 3,
  4 and 5 bits, against 43, 61, 84 and 107 for the BEC form) were not reproduced or
  checked.
* The reported FPGA results were not reproduced. They were about 20 ns for the multiplier
  and 9.5 ns, 33 slices and 48 LUTs for the filter.
* The comparison designs were not built: the conventional BEC-based SQRT CSLA and the
  compressor-based adder, used in place of the reduced SQRT CSLA.
* The Wallace tree works on whole rows. It does not use the half-adder/bit-level
  reduced-complexity Wallace scheme.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rc_csla_group`  | 4- and 5-bit groups, every input combination against a + b + cin |
| `tb_rc_sqrt_csla`   | 16-bit adder, corner and 20 000 random vectors; a carry crosses every group boundary |
| `tb_bi_recoder_ppg` | all 65 536 operand pairs; each partial product = a × bit-pair value; all four codes used |
| `tb_wallace_reducer`| 4×16 and 7×12 row reduction, random and partial-product-shaped rows |
| `tb_bi_recoder_mult`| all 65 536 8x8 products against a × b |
| `tb_bi_recoder_fir` | top at default parameters (see below) |

`tb_bi_recoder_fir` runs the filter at its default parameters:

* It applies an impulse, which must reproduce 27, 228, 27.
* It applies a full-scale step.
* It runs a random stream of 3000 cycles with idle gaps and a reset in the middle.

It compares each output with an integer reference model and checks the one-clock
latency of `out_valid` and that the output holds between samples. It also counts that
each of these happened at least once:

* an accepted sample
* an idle cycle
* a reset
* an output above 16 bits
* a full-scale sample
* each recoder code

To simulate with Verilator, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/fir_pkg.sv tb/tb_bi_recoder_fir.sv \
          --top-module tb_bi_recoder_fir --Mdir obj_fir
./obj_fir/Vtb_bi_recoder_fir
```

Replace the testbench name to run any other testbench. Verilator warns about the unused
`cout` pins of adders whose carry out is not needed. The warning is harmless.

## Files

| file | content |
|------|---------|
| `rtl/fir_pkg.sv`            | word lengths and SQRT CSLA group-layout functions |
| `rtl/ripple_carry_adder.sv` | full-adder chain, lowest adder group |
| `rtl/rc_csla_group.sv`      | reduced carry-select group |
| `rtl/rc_sqrt_csla.sv`       | reduced complexity SQRT CSLA |
| `rtl/bi_recoder_ppg.sv`     | Bi-Recoder partial product generator |
| `rtl/wallace_reducer.sv`    | Wallace row reduction |
| `rtl/bi_recoder_mult.sv`    | Bi-Recoder multiplier |
| `rtl/bi_recoder_fir.sv`     | 3-tap direct form FIR filter (top) |
