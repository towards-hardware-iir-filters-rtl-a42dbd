# Last-bit accurate Direct Form I IIR filter

A fixed-point filter usually disagrees with its floating-point model. The
coefficients are rounded and every product and sum is rounded, and in a
recursive filter those errors go round the loop and grow. This design fixes
the error instead of the word lengths. For any input, the output differs from
the output of the same filter computed with infinite precision by less than
one unit in the last place of the output format:

    |y_out(k) - y(k)| < 2^LSB_OUT        (last-bit accuracy)

The only thing a user chooses is the coefficients, the input format and the
output LSB. Every internal width follows from those three and is no wider
than the bound needs. The coefficients are real numbers (`real` parameters).
They are never rounded to a fixed-point format first. Instead, each constant
multiplier is built from look-up tables whose entries are the exactly rounded
products.

The filter is the Direct Form I recurrence

    y(k) = sum_{i=0..NB} B[i] u(k-i) - sum_{i=1..NA} A[i] y(k-i)

and the RTL targets LUT-based FPGAs: no DSP blocks, 6-input tables
(`ALPHA = 6`).

## Datapath

```
 u(k) ──┬──[z^-1]──[z^-1]── ... (NB taps, tap_delay_line)
        │     │        │
        ▼     ▼        ▼
   ┌──────────────────────────────────────────────────┐
   │ fix_sopc: sum of products by B[0..NB], -A[1..NA] │◄── y~(k-1) .. y~(k-NA)
   │  fix_real_kcm per constant → tables → bitheap_sum │        ▲
   └──────────────────────────────────────────────────┘        │
        │ y~(k), format (MSB_OUT, LSB_EXT)                     │
        └──►[z^-1]──[z^-1]── ... (NA taps, tap_delay_line) ────┘
                 │ y~(k) register
                 ▼
            final_round ──► y_out, format (MSB_OUT, LSB_OUT)
```

A single sum of products (SOPC) computes `y~(k)` from the current input, the
delayed inputs and the delayed values it computed before. Its result is
accurate to the *extended* LSB `LSB_EXT`, which lies several bits below the
output LSB. The value fed back is this extended `y~(k)`. The loop never sees
the final rounding to `LSB_OUT`, so the loop cannot amplify that rounding.
Tests show why this matters. If the feedback is cut to output precision,
nearly every output sample of the default filter misses the bound.

All arithmetic wraps modulo `2^(MSB_OUT+1)`. The products and partial sums
may overflow that range (in the default filter the product `a_2 * y(k-2)` alone can exceed
3 while the range is [-2, 2)). But the true result always fits, so the
wrapped sum is still correct.

### Formats

A format `(m, l)` is two's complement with MSB at bit weight `2^m` (which
counts `-2^m`) and LSB at `2^l`, so a word has `m - l + 1` bits. The input is
`(0, LSB_IN)`.

| quantity | rule | default |
|---|---|---|
| output MSB | `MSB_OUT = ceil(log2(<<H>> + 2^(LSB_OUT-1)))` | 1 |
| extended LSB | `LSB_EXT = LSB_OUT - 1 - ceil(log2 <<H_eps>>)` | -24 |
| guard bits of the SOPC | `g = ceil(log2 E_half)`, see below | 6 |
| internal word | `MSB_OUT - (LSB_EXT - g) + 1` | 32 bits |

`<<H>>` is the worst-case peak gain of the filter: the l1 norm of its impulse
response, which is the largest output magnitude an input bounded by 1 can
produce. `<<H_eps>>` is the same measure for `1 / (1 + sum A[i] z^-i)`. That
is the filter through which the SOPC's own rounding errors travel round the
loop. The error budget works like this:

* the final rounding costs at most half an output LSB;
* the SOPC errs by less than `2^LSB_EXT`, and the loop amplifies this by at
  most `<<H_eps>>`, which `LSB_EXT` keeps within the other half.

Both peak gains must be computed when the filter is chosen. `MSB_OUT` and
`LSB_EXT` are parameters. Give them values from an overestimate of the peak
gains: an underestimate breaks the guarantee. The default values come from
400,000-sample truncated impulse responses in double precision
(`<<H>> = 1.574`, `<<H_eps>> = 1651.3`). Those impulse responses have decayed
below 1e-300, but the sum is not a certified bound. Narrow-band filters have
poles close to the unit circle and large `<<H_eps>>`. They need many extra
bits: 12 for the default, up to 20 in the filters tested below.

## The sum of products (`fix_sopc`)

`fix_sopc` is a stand-alone operator: `r ~ sum C[i] x[i]` with
`|r - sum| < 2^LSB_R`. Each input has its own format. The result MSB is given
by the user and the result wraps above it. Its accuracy argument is local:

1. Every constant gets a multiplier whose worst error is known before it is
   built, counted in *internal* LSBs (`2^(LSB_R - g)`):
   * `c = 0`: nothing is built, error 0;
   * `|c| = 2^k`: the input is just shifted. The error is 0 if no bit falls
     below the output LSB, otherwise below 1;
   * any other real `c`: `D` tables, each rounded to nearest, so the error
     is below `D/2`.
2. These bounds are summed. `g` is the smallest count of guard bits that
   keeps their total within half an output LSB. In half-LSB units this is
   `g = ceil(log2 E_half)`.
3. All table outputs are added *exactly*: fixed-point addition does not
   round.
4. Half an output LSB is added, folded into one table's contents at no cost,
   and the `g` guard bits are dropped. This truncation is a round to
   nearest, and it adds at most another half output LSB.

The guard-bit rule follows the error bound strictly. Counts published for
this method are one bit lower (5 where this RTL uses 6 on the default
filter; they correspond to `ceil(log2 E)` in whole LSBs). This RTL keeps the
extra bit so that the bound holds as derived.

### Constant multipliers (`fix_real_kcm`, `kcm_table`)

An input word of `W` bits is read as a number in radix `2^ALPHA`: it is cut
into `D = ceil(W / ALPHA)` chunks. The most significant chunk may be narrower
and is a signed digit, since the word is two's complement. The other chunks
are unsigned. The product is

    c * x = sum_k c * d_k * 2^(weight of chunk k)

and each term `c * d_k` comes from a table addressed by the chunk. The table
holds the product rounded to the internal LSB. With `ALPHA = 6`, one output
bit of a table is exactly one 6-input LUT. The table contents are computed
during elaboration, from the `real` coefficient, by the functions in
`fixiir_pkg`. If a small constant makes every entry of a chunk's table round
to zero, that table is not built. Its error is still counted.

The multiplier does not add its own table outputs. It passes them on as
separate rows, so that all the rows of all the multipliers are added in one
place.

Each table is only as wide as its own entries need. A low chunk's table
holds small products, so its row is short. Its rows are two's complement
numbers, but they are not sign-extended to the full word. The trick is that
a `w`-bit signed value `t` equals the unsigned pattern `t` with its sign bit
inverted, minus `2^(w-1)`. Each table therefore enters the heap as a short
non-negative row (sign bit inverted), and owes a correction of `-2^(w-1)`.
The SOPC adds up during elaboration all the corrections of all the tables
and the rounding bit. It folds that one constant into the contents of a
single table, the most significant table of input 0. That table is
sign-extended in full, so its own width does not depend on the constant.
Signed arithmetic then costs nothing beyond a few inverted bits.

### Bit heap (`bitheap_sum`)

The rows (all aligned to the internal LSB, most of them short and
non-negative) are reduced by levels of 3:2 carry-save compressors. Each level turns
every three rows into two. When two rows are left, a single carry-propagate
adder finishes the sum. The schedule depends only on the row count, which
the SOPC computes during elaboration. For the default filter that is 26
tables: 35 possible, 9 neglected.

## Interface and timing (`fix_iir_dfi`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset; clears all taps (zero initial state) |
| `in_valid` | in | 1 | `u` carries a new sample this cycle |
| `u` | in | `1-LSB_IN` | input sample, format `(0, LSB_IN)` |
| `out_valid` | out | 1 | `y_out` carries a new sample |
| `y_out` | out | `MSB_OUT-LSB_OUT+1` | output, format `(MSB_OUT, LSB_OUT)` |
| `y_ext` | out | `MSB_OUT-LSB_EXT+1` | the fed-back value `y~(k)`, format `(MSB_OUT, LSB_EXT)` |

The filter takes one sample per clock. On a rising edge with `in_valid`
high, both delay lines shift and `y~(k)` is registered. `y_out` is then
available in the following cycle, with `out_valid` high (latency 1 cycle).
With `in_valid` low the state holds. The whole sum of products is one
combinational path from the registers back to the registers. It is not
pipelined, because a pipeline stage inside a recursive loop would change the
filter.

Parameters: `NB`, `NA` (orders), `B[NB+1]`, `A[NA]` (real coefficients,
`A[0]` being `a_1`), `LSB_IN`, `LSB_OUT`, `MSB_OUT`, `LSB_EXT`, `ALPHA`.

The default filter is a 4th-order elliptic band-pass filter. Its passband is
[0.50, 0.51] of the Nyquist band, with 1 dB ripple. Its stopbands are
[0, 0.49] and [0.52, 1], with 20 dB attenuation. The output has 12
fractional bits and so does the input. The coefficients were designed with a
standard elliptic design routine. To use another filter, set the
coefficients and the orders, and recompute `MSB_OUT` and `LSB_EXT` with the
two formulas above. Table contents, guard bits, table count and the heap
follow automatically.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_fix_iir_dfi` | the default filter end to end, against a double-precision model of the ideal filter, every sample; the bound `< 2^-12`, the one-cycle latency, a mid-stream reset. The stimulus is an impulse, random samples with idle cycles, and the worst-case input `±u_max·sign(h(K-k))` of both signs, which pushes the output toward its peak and makes internal terms wrap. 22,123 checks; largest error 0.52 LSB. |
| `tb_fix_iir_workloads` | the same check on five other band-pass filters (see below) |
| `tb_fix_sopc` | random sums, accuracy `< 2^LSB_R` modulo the range; guard bits against hand counts; a mix of zero, ±2^k and general constants |
| `tb_fix_real_kcm` | sum of terms against `c·x` for tables, zero, exact and truncating powers of two |
| `tb_kcm_table` | every entry of four tables within half a unit of the exact product |
| `tb_bitheap_sum` | heaps of 1 to 35 rows against a plain sum |
| `tb_tap_delay_line`, `tb_final_round` | against reference models |

The workload testbench covers the extremes of the two filter families this
method was demonstrated on, plus the middle of the first one (all with 12-bit input and output):

| filter | order | extra bits `LSB_OUT-LSB_EXT` | g | internal word | max error |
|---|---|---|---|---|---|
| Butterworth, passband [0.45, 0.55], stopbands to 0.43 / from 0.57 | 18 | 18 | 8 | 40 | 0.54 LSB |
| Butterworth, same passband, stopbands to 0.32 / from 0.68 | 6 | 6 | 6 | 26 | 0.58 LSB |
| Butterworth, same passband, stopbands to 0.21 / from 0.79 | 4 | 4 | 5 | 23 | 0.66 LSB |
| elliptic, passband [0.05, 0.06] | 4 | 17 | 6 | 37 | 0.53 LSB |
| elliptic, passband [0.97, 0.98] | 4 | 20 | 6 | 40 | 0.51 LSB |

Simulation is a strong check of the datapath, but the accuracy *guarantee*
rests on the error analysis above and on the peak gains being overestimated.

## Where this RTL departs from the method as published

* **Peak gains** are evaluated offline as truncated sums in double precision,
  not with certified multiple-precision bounds. They are parameters, so
  certified values can be plugged in.
* **Table contents** are computed in double precision during elaboration.
  This is exact rounding as long as a product stays well below 2^53 internal
  LSBs. It limits the internal word to 64 bits (checked by an assertion).
* **Guard bits**: one more than the published counts (see above).
* **Tables of power-of-two constants** (plain shifts) and the one table
  that carries the merged constant are sign-extended in full. All other
  tables use the complemented-sign-bit scheme described above.
* **Input bounds** are given as MSB positions, not as maximum magnitudes.
  A magnitude bound would only narrow the table of the most significant
  chunk, and every table is already sized from its own entries. For the
  default filter, the top chunks are 1 bit (input) and 2 bits (feedback)
  wide, and every one of their digits can occur, so nothing would be saved.
* **Bit heap compression** is a plain carry-save tree, not an optimised
  compressor allocation.
* **Coefficients, input LSB, reset, handshake and latency** are this
  design's choices. The published Butterworth family used order 20 at its
  narrow end, and the elliptic family order 6 near passband 0.97. The
  standard design routines used here give 18 and 4.

## Simulating

With Verilator 5 (packages first):

```
verilator --binary --timing -Irtl rtl/fixiir_pkg.sv tb/tb_fix_iir_dfi.sv \
          --top-module tb_fix_iir_dfi -o sim && obj_dir/sim
```

Any other testbench works the same way (`tb_fix_iir_workloads` also needs
`-Itb` for `iir_bench.sv`). All files are SystemVerilog-2017. The RTL is
synthesizable. The tables are constant arrays, which FPGA tools map to LUTs.

## Files

* `rtl/fixiir_pkg.sv`: elaboration-time arithmetic (table entries, chunking,
  error bounds, guard bits)
* `rtl/fix_iir_dfi.sv`: the filter (top)
* `rtl/fix_sopc.sv`: last-bit accurate sum of products by real constants
* `rtl/fix_real_kcm.sv`: multiplier by a real constant, table based
* `rtl/kcm_table.sv`: one rounded-product table
* `rtl/bitheap_sum.sv`: exact multi-operand adder
* `rtl/tap_delay_line.sv`: delay line
* `rtl/final_round.sv`: rounding to the output format
* `tb/`: testbenches, with `tb/iir_bench.sv` as a reusable per-filter bench
