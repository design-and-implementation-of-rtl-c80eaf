# A-OMS look-up-table multipliers and FIR filter

A memory-based multiplier replaces `X * A`, with `A` a coefficient, by a
table read. A plain table for a 5-bit input `X` needs 32 words. Two facts
shrink it:

* **Antisymmetric product coding (APC).** Write `X = {x4, X_L}`. When
  `x4 = 1`, `X*A = 16A + X_L*A`. When `x4 = 0`, `X*A = 16A - (16 - X_L)*A`.
  Both cases need only a multiple of `A` addressed by four bits, plus an add
  or subtract against `16A`. That halves the table.
* **Odd-multiple storage (OMS).** Every nonzero 4-bit multiplier is an odd
  number shifted left by 0 to 3 places. Storing only the odd multiples and
  shifting the read word halves the table again.

Combined ("A-OMS"), the table holds nine words of `W+4` bits: `A, 3A, 5A,
..., 15A` and `2A`. This repository contains that multiplier, a variant with
APC alone, and an N-tap transposed FIR filter built from A-OMS tables. In the
filter, all taps share the address logic, so only the tables are per tap.

## How one digit is multiplied

`aoms_lut_mult` (and each tap of the filter) forms

    AX = 16A + sign * (LUT[d] << s),     sign = +1 if x4 = 1, -1 if x4 = 0

from a 5-bit unsigned digit `X` and a `W`-bit two's complement coefficient
`A`. The address generator (`aoms_agc`) is the part that takes the most care:

1. **Shift count.** `s = {s1, s0}` is the number of trailing zeros of
   `X_L = x3..x0`. It is 3 for `X_L = 0000`.
   `s1 = NOR(x0, x1)` and `s0 = NOT x0 AND (x1 OR NOT x2)`. Negating a
   number does not change its trailing zeros, so `s` can come from `X_L`
   directly, before any negation.
2. **Odd part.** `X_L` is shifted right by `s`, filling with `NOT x4`,
   which gives `y3..y0`. For `x4 = 1` the APC word is `X_L`, and its odd
   part is `y` itself. For `x4 = 0` the APC word is `16 - X_L`. Its odd part
   is the two's complement of `y` over the `4 - s` bits left after the
   shift. `y` is odd, so that complement only inverts bits 1..3. The ones
   filled in at the top turn into zeros.
3. **Address.** `d2..d0 = (y3..y1) XNOR x4`, which is (odd part - 1) / 2,
   and `d3 = NOT y0`. `d3 = 1` only when `X_L = 0000`, and it selects the
   ninth word, `2A`.
4. **RESET.** `RESET = d3 AND x4`, true only for `X = 10000`. It zeroes the
   table output, so that `AX = 16A + 0`. For `X = 00000` the ninth word
   `2A`, shifted by 3, gives `16A`, and `16A - 16A = 0`.

| X (x4=1)      | X (x4=0)      | address d | stored word | shift s |
|---------------|---------------|-----------|-------------|---------|
| 10001, 10010, 10100, 11000 | 01111, 01110, 01100, 01000 | 0 | A   | 0,1,2,3 |
| 10011, 10110, 11100 | 01101, 01010, 00100 | 1 | 3A  | 0,1,2 |
| 10101, 11010 | 01011, 00110 | 2 | 5A  | 0,1 |
| 10111, 11110 | 01001, 00010 | 3 | 7A  | 0,1 |
| 11001 | 00111 | 4 | 9A  | 0 |
| 11011 | 00101 | 5 | 11A | 0 |
| 11101 | 00011 | 6 | 13A | 0 |
| 11111 | 00001 | 7 | 15A | 0 |
| 10000 (RESET, word forced to 0) | 00000 | 8 | 2A | 3 |

The rest of the chain follows that table. `aoms_decoder` turns `d` into
nine one-hot word lines: a 3-to-8 decoder on `d2..d0`, disabled by `d3`,
plus `w8 = d3 AND (d2..d0 = 0)`. `aoms_lut` returns the selected word, or
zero under RESET. `aoms_barrel_shifter` shifts it left by `s` into `W+5`
bits. `aoms_sign_mod` negates it when `x4 = 0`. A final adder adds `16A`.
`W+5` bits hold every product of a 0..31 digit and a `W`-bit signed
coefficient, so the wrap-around arithmetic is exact.

## APC-only variant

`apc_lut_mult` uses the same identity without odd-multiple storage. The
4-bit address is `X_L` when `x4 = 1`, and `-X_L mod 16` when `x4 = 0`. The
table holds `j*A` for `j = 1..15`. Address 0 is not stored and reads as
zero. The input `00000` would map to address 0 with a minus sign and give
`16A`, so for that one input the `16A` term is dropped. The A-OMS version
needs no such special case, because of its ninth word.

## FIR filter (`aoms_fir`)

`y[n] = sum_k h[k] x[n-k]` in transposed form: `acc[k] <= x*h[k] +
acc[k+1]`, `y = acc[0]`. Samples are `L`-bit unsigned and arrive one per
clock. Coefficients are `W`-bit two's complement.

* **Operand decomposition.** A sample is cut into `P = ceil(L/5)` five-bit
  digits. The default `L = 8` gives two digits, the upper one padded with
  zeros.
* **Shared addressing.** Each digit gets one `aoms_agc` and one
  `aoms_decoder`. Their word lines, RESET, shift and sign go to every tap.
  This is where the filter saves: N times fewer address generators and
  decoders than N separate multipliers.
* **Memory core.** One `aoms_lut` per tap, with `P` read ports.
* **Per tap and digit.** Barrel shift, sign modification, then `+16*h[k]`.
* **SA cell** (`aoms_sa_cell`). Per tap, it adds the digit products with
  weights `32^p` in a balanced tree that has one register per level.
* **AS cells.** The adder-delay chain.

### Timing

Pipeline registers: input, address/decode, table read, `+16h`, each SA tree
level (`ceil(log2 P)`), and the AS chain. A sample taken at clock edge `e`
affects `y` right after edge `e + 4 + ceil(log2 P)`. The first output that
covers all taps, `y[N-1]`, comes after `N + 4 + ceil(log2 P)` edges. Edges
are counted from the one that takes `x[0]`, which counts as 1:

| N \ L | 8  | 16 | 32 |
|-------|----|----|----|
| 8     | 13 | 14 | 15 |
| 16    | 21 | 22 | 23 |
| 32    | 37 | 38 | 39 |
| 64    | 69 | 70 | 71 |
| 128   | 133| 134| 135|

These figures are the published latencies for this LUT-based filter, and
the stage cut was chosen to reproduce them. The testbenches check the cases
N = 8 (all three L), N = 16 and N = 32 (L = 8 and 16).

### Coefficients

`coef_we`/`coef_idx`/`coef_data` writes one tap per cycle. The tap's nine
table words are recomputed from the coefficient in that cycle and are in use
from the next one. Outputs already in flight when a coefficient changes mix
old and new values. Write the coefficients before streaming, or discard
about `N + 6` outputs after a change. A synchronous `rst` clears all
coefficients and the pipeline.

## Top level (`aoms_top`)

| port group | meaning |
|---|---|
| `clk`, `rst` | clock, synchronous active-high reset |
| `fir_x[L]`, `fir_y[L+W+log2 N]` | filter sample in, filter output |
| `fir_coef_we`, `fir_coef_idx`, `fir_coef_data` | filter coefficient write |
| `mul_x[5]`, `mul_load`, `mul_coef[MW]` | input and coefficient load of the two stand-alone multipliers |
| `mul_ax`, `apc_ax` | A-OMS and APC-only products of `mul_x` (combinational) |

Parameters and defaults: `N = 16` taps, `L = 8`, `W = 8` (filter);
`MW = 5`, `M_INIT = 11` (multiplier coefficient after reset).

## Files

| file | content |
|---|---|
| `rtl/aoms_pkg.sv` | digit width, table size, table word function |
| `rtl/aoms_agc.sv` | address generation and control |
| `rtl/aoms_decoder.sv` | 4-to-9 word-line decoder |
| `rtl/aoms_lut.sv` | nine-word table, multi-port, loadable |
| `rtl/aoms_barrel_shifter.sv` | left shift by 0..3 |
| `rtl/aoms_sign_mod.sv` | selective negation |
| `rtl/aoms_lut_mult.sv` | A-OMS digit multiplier |
| `rtl/apc_lut_mult.sv` | APC-only digit multiplier |
| `rtl/aoms_sa_cell.sv` | digit shift-add tree |
| `rtl/aoms_fir.sv` | transposed FIR filter |
| `rtl/aoms_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/fir_check_harness.sv` | filter driver and convolution reference used by the filter testbenches |
| `tb/tb_fir_table1.sv` | filter at 16 and 32 taps, 8- and 16-bit samples |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/aoms_pkg.sv tb/tb_aoms_top.sv --top-module tb_aoms_top -o sim
    ./obj_dir/sim

Substitute any other `tb_*` name. `tb_aoms_top` runs the design at its
default parameters. It sweeps both stand-alone multipliers over all inputs
for several coefficients. It runs two coefficient sets through the 16-tap
filter, 200 samples each, and checks every output against a direct
convolution, plus the 21-cycle latency. It also counts how often each
mechanism occurs (table RESET, ninth word, each shift count, sign reversal
and pass-through, coefficient reload), and fails if one never does. The unit
testbenches are exhaustive where the input space allows. That covers the
address generator, the decoder, the shifter, the sign modifier and both
multipliers for every 5-bit coefficient.

## Where this design makes its own choices

* The control equation for `s0` is the form that yields the trailing-zero
  count; the scheme cannot work with any other function.
* The ninth word is `2A`. This is the value that makes `X = 00000` come out
  as zero after a shift of 3.
* Coefficients are two's complement and inputs unsigned. Both multipliers
  would need a separate sign treatment for signed samples.
* The table is a register file with a coefficient load port, so
  coefficients are run-time programmable. A fixed coefficient is the reset
  value, with `load` held low.
* The 8-bit filter coefficient width, the pipeline cut, the SA tree shape,
  the reset behaviour and the coefficient write port are not taken from a
  specification. They are chosen for simplicity and to match the published
  latencies.
* In the APC-only multiplier, the input `00000` drops the `16A` term.
* The stand-alone multipliers take one 5-bit digit. A 6-bit input needs two
  digits and an SA cell, as in the filter.
* No area or timing figures are claimed. The published area comparisons
  come from an FPGA flow and do not carry over to this RTL.
