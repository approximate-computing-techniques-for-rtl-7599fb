# Approximate shift-adds FIR filter

A fixed-coefficient FIR filter does not need multipliers: every product
`h_i * x` is a sum of shifted copies of `x`, and the products of all taps can
share their partial sums. This RTL builds such a multiplierless filter — a
10-tap low-pass filter in transposed form — and adds two ways of trading
output accuracy for hardware, both set by parameters:

* **Adder removal (architectural level).** An adder of the shared
  multiplication graph is deleted, and the node it drove is rewired to an
  existing node or the input, shifted left to come as close as possible to
  the value that is gone.
* **Copy-of-operand adders (logic level).** Adders keep their ripple-carry
  structure only on the upper bits. The lowest `K` bits of the result are
  copied from one operand, which removes `K` full adders per adder. `K` is
  set per group of adders.

With every parameter at its default the filter is exact. Audio and image
processing tolerate small output errors, and there the approximate versions
are meant to save area and power at a given signal-to-noise ratio.

## The filter

The filter computes `y[n] = sum_{i=0}^{9} h_i x[n-i]` with

    h = -22, -13, 60, 193, 302, 302, 193, 60, -13, -22

quantised to 10 bits. The input is 10-bit two's complement. The output and
all internal sums are 20 bits, twice the input width, and wrap modulo 2^20.
A full-scale input can exceed this range (sum |h_i| × 512 = 757,760 > 2^19),
and the output then wraps as two's complement.

The transposed form splits the filter in two parts:

* **MCM block** (`mcm_block`, multiple-constant multiplication). It
  multiplies the current sample by all ten coefficients at once.
* **Register-add block** (`register_add`). A chain of 9 adders and 9
  registers adds each product to the delayed partial sum of the later taps:

      r[8] <= h9*x
      r[i] <= h(i+1)*x + r[i+1]
      y     = h0*x + r[0]

### The multiplication graph

Because the coefficients are symmetric, five distinct products are needed.
Six adders/subtractors produce them, plus two negations and free shifts:

| node  | computed as      | depth | adder kind used                   |
|-------|------------------|-------|-----------------------------------|
| 15x   | (x<<4) − x       | 1     | unshifted operand is subtrahend   |
| 17x   | x + (x<<4)       | 1     | add                               |
| 11x   | 15x − (x<<2)     | 2     | shifted operand is subtrahend     |
| 13x   | 15x − (x<<1)     | 2     | shifted operand is subtrahend     |
| 151x  | 15x + (17x<<3)   | 2     | add                               |
| 193x  | (13x<<4) − 15x   | 3     | unshifted operand is subtrahend   |

The outputs are −22x = −(11x<<1), −13x = −(13x), 60x = 15x<<2, 193x, and
302x = 151x<<1. Taps i and 9−i share a product. The two negations are always
exact.

## The copy-of-operand adder

`coa_addsub` is the basic element of every approximation. It is the part of
the design that takes the most care to understand.

**Plain addition, no shift.** An n-bit adder with `K` approximate bits:

* copies the low `K` bits of operand A straight to the result;
* feeds the upper `n−K` bits of both operands to a ripple-carry adder;
* uses A's bit `K−1` as that adder's carry-in.

Take 4-bit `1011 + 0011` with `K = 2`. The low bits `11` are copied. The
upper part computes `10 + 00 + 1 = 11`. The result is `1111` (15), not 14.

**Addition with a shifted operand.** In a shift-adds graph, one operand is
usually shifted left by `S`, so its low `S` bits are zero. An exact adder
already needs no logic there: the low `S` result bits are the other
operand's. The approximation starts above the shift:

* the low `S+K` bits are copied from the unshifted operand;
* the ripple-carry adder covers bits `S+K` and up;
* the carry-in is the unshifted operand's bit `S+K−1`.

For example, `11 + (3<<2)` with `K = 2` gives 27 instead of 23. The copied
operand is always the unshifted one.

**Subtraction.** The approximate adder has no carry input, so a subtractor
only inverts the subtrahend. Two cases occur:

* `U − (B<<S)`: the shifted operand is the subtrahend. Copy `U`'s low bits.
  The upper adder adds `~(B<<S)`.
* `(B<<S) − U`: the unshifted operand is the subtrahend. Copy the low bits of
  `~U`, and use `~U[S+K−1]` as the carry-in.

**Error model.** With `Bs = B<<S` and `L = S+K`, the result equals the exact
one plus:

    add:         e =  U[L-1]·2^L − Σ_{i=S}^{L-1} Bs_i·2^i
    U − Bs:      e = −2^S + U[L-1]·2^L − Σ_{i=S}^{L-1} ~Bs_i·2^i
    Bs − U:      e = −1 + ~U[L-1]·2^L − Σ_{i=S}^{L-1} Bs_i·2^i

The testbenches check the hardware against these formulas, not against a
copy of its structure.

**`K = 0` is exact.** That includes the +1 carry-in of a subtractor, so an
exact group really is exact. Applying the "invert only" rule at `K = 0`
would leave an error of −2^S. This is a deliberate choice of this design.

## Approximation knobs

All of them are parameters of `approx_fir_top`:

| parameter     | effect                                                         |
|---------------|----------------------------------------------------------------|
| `K_RA`        | approximate bits of all 9 register-add adders                  |
| `K_D1`        | approximate bits of the depth-1 MCM adders (15x, 17x)          |
| `K_D2`        | approximate bits of the depth-2 MCM adders (11x, 13x, 151x)    |
| `K_D3`        | approximate bits of the depth-3 MCM adder (193x)               |
| `REMOVE`      | 6-bit mask of deleted MCM adders, bit 0 = 15x, 1 = 17x, 2 = 11x, 3 = 13x, 4 = 151x, 5 = 193x |

Adders are grouped by their depth in the MCM graph because their errors
behave differently. An error made at depth 1 is shifted left, and so
magnified, by the adders after it. Shallow adders therefore tolerate fewer
approximate bits than deep ones. The register-add adders are the largest
group, and they usually take the most approximate bits. `S + K` must stay
below 20.

**Adder removal** works on any subset of the six MCM adders. The rewiring
is worked out at elaboration by the constant function
`fir_approx_pkg::rewire()`, at x = 1:

1. Removed adders are handled from the shallowest to the deepest.
2. Each one is replaced by the input, or by a remaining adder of smaller
   depth. That source is shifted left by 0 to 10 bits. The pick is the
   value closest to what the removed adder computed in the original graph.
3. The values of all later nodes are then updated before the next removal
   is handled.

Examples:

* **15x and 193x (`REMOVE = 6'b100001`).** Without 15x, the later nodes
  become 17x, 12x, 14x, 152x and 208x. 193x is then replaced by
  12x<<4 = 192x. For x = 1 the summed absolute error over the ten outputs is
  E = 20.
* **193x alone.** The rule gives 13x<<4 = 208x (E = 30 at x = 1).
* **All six adders.** Every node becomes a shifted input: 16x, 16x, 8x, 16x,
  128x and 256x.

A tie is settled in this order: the input first, then the lower node number,
then the smaller shift. Choosing which adders to remove is an offline search
that minimises E. It is not part of the hardware.

## Accuracy

`tb_snr_sweep` measures the accuracy of the knobs. It compares each
approximate filter with the exact one on ten streams of 2000 pseudo-Gaussian
samples and reports the mean SNR. E is the summed absolute error of the ten
MCM outputs at x = 1.

| `K_RA,K_D1,K_D2,K_D3` | `REMOVE`    | mean SNR | E  |
|-----------------------|-------------|----------|----|
| 1,0,0,0               | –           | 90.6 dB  | 0  |
| 4,0,0,0               | –           | 72.4 dB  | 0  |
| 5,0,0,3               | –           | 56.8 dB  | 94 |
| 7,0,0,4               | –           | 49.9 dB  | 94 |
| 8,0,2,6               | –           | 38.7 dB  | 1682 |
| –                     | 15x         | 27.3 dB  | 48 |
| –                     | 17x         | 27.2 dB  | 32 |
| –                     | 11x         | 35.8 dB  | 12 |
| –                     | 13x         | 21.2 dB  | 68 |
| –                     | 151x        | 21.7 dB  | 60 |
| –                     | 193x        | 27.8 dB  | 30 |
| –                     | 15x + 193x  | 37.2 dB  | 20 |

Read the table with these points in mind:

* Copy-of-operand adders degrade the output gradually. Approximate bits in
  the register-add chain cost little accuracy.
* Removing a whole adder costs 20 to 35 dB of SNR at once. For this small
  filter that is one sixth of its MCM adders.
* Two removals can beat one. With 15x gone, the 193x node drifts to 208x.
  Removing it as well rewires it to 192x, which is close to the true value
  again.
* E measured at x = 1 does not rank configurations the way the SNR does,
  because approximate adders err differently for different inputs.

## Interface and timing (`approx_fir_top`)

| port                  | dir | width | meaning                                         |
|-----------------------|-----|-------|-------------------------------------------------|
| `clk`                 | in  | 1     | clock, rising edge                              |
| `rst_n`               | in  | 1     | synchronous, active-low; clears the registers   |
| `x_valid`             | in  | 1     | `x_in` holds a new sample                       |
| `x_in`                | in  | 10    | signed sample                                   |
| `y_out`               | out | 20    | filter output for the sample on `x_in`          |
| `y_valid`             | out | 1     | equals `x_valid`                                |
| `ex_x`                | in  | 8     | input of the 51x/77x example                    |
| `ex_y51`, `ex_y77`    | out | 15    | 51·`ex_x` and 77·`ex_x`                         |

The filter takes one sample per clock while `x_valid` is high. While it is
low, the registers hold.

There is no register on the input or the output. `y_out` depends
combinationally on `x_in`, so a sample's output is valid in the cycle the
sample is presented (zero latency). The registers take the new partial sums
on the following rising edge. If the filter must be registered for timing,
add a register outside it.

## The 51x / 77x example

`mcm_51_77` is a small, separate illustration of sharing partial sums in a
multiplication by two constants. It is brought out on its own ports of the
top and is not connected to the filter. `GRAPH_BASED` selects one of two
forms:

* **Common-subexpression form, four adders:** 17x = 16x + x,
  51x = 68x − 17x, 81x = 17x + 64x, 77x = 81x − 4x.
* **Graph-based form, three adders:** 3x = x + 2x, 51x = 3x + 48x,
  77x = 128x − 51x.

Both forms are exact.

## How far to trust it; departures

What is checked:

* The copy-of-operand adder is checked against its closed-form error model
  on 36,000 random vectors in 12 configurations. Both worked examples above
  are checked too.
* The MCM block is checked over all 1024 inputs, in ten configurations. Five
  of them remove adders, and their rewiring is checked against a separately
  written search.
* The filter is checked sample by sample against a direct convolution (exact
  configuration) and against a software model (approximate configurations).
  The full-size test also checks the impulse response.

Choices made here, not fixed by the method:

* Every adder is 20 bits wide. A synthesised filter would trim each adder to
  the bits its operands can reach. The copied bits save logic either way.
* In the register-add adders the product is the copied operand. Neither
  operand is shifted there, so either choice is possible.
* The valid handshake, the synchronous active-low reset and `K = 0` meaning
  exact are this design's own choices.
* The rewiring target is the original value of the removed adder. Removed
  adders never serve as sources. Ties are settled as described above.
* The default configuration is exact. The approximate settings are examples
  chosen for the tests, not tuned settings for this filter.
* The knob set is limited to this one 10-tap filter. Longer filters
  (30–120 taps, 8–16-bit coefficients) need their own coefficients and
  multiplication graph. `register_add` takes any `N`, but a new `mcm_block`
  would have to be written for each such filter.
* The searches that choose which adders to remove and which `K` to give each
  group run offline. They are not part of the hardware.

## Files

| file                            | contents                                                  |
|---------------------------------|-----------------------------------------------------------|
| `rtl/fir_approx_pkg.sv`         | widths, coefficients, MCM graph table, rewiring function  |
| `rtl/coa_addsub.sv`             | copy-of-operand adder/subtractor                          |
| `rtl/mcm_block.sv`              | multiplication graph of the filter                        |
| `rtl/register_add.sv`           | transposed-form register-add chain                        |
| `rtl/mcm_51_77.sv`              | 51x / 77x example                                         |
| `rtl/approx_fir_top.sv`         | top: filter plus example                                  |
| `tb/fir_ref_pkg.sv`             | reference models (adder error model, rewiring, MCM model) |
| `tb/tb_*.sv`                    | self-checking testbenches, one per module                 |
| `tb/tb_approx_fir_full.sv`      | filter at default parameters: impulse and random samples  |
| `tb/tb_snr_sweep.sv`            | 13 configurations on noise input, SNR report              |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fir_approx_pkg.sv tb/fir_ref_pkg.sv tb/tb_approx_fir_top.sv \
        -y rtl +libext+.sv --top-module tb_approx_fir_top -Mdir obj_top
    ./obj_top/Vtb_approx_fir_top

Replace the testbench name to run the others. `tb_mcm_51_77` needs neither
package. To try another approximation, change the parameters of `dut_logic`
in `tb_approx_fir_top.sv` and the matching `V_*` table entries, which feed
the reference model. The test prints the resulting SNR.
