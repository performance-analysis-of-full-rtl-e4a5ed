# Bit-sliced third-order CIC decimator for a 1-bit delta-sigma stream

A delta-sigma ADC produces one bit per clock at a high oversampling rate. A
cascaded integrator-comb (CIC) filter turns that stream into multi-bit words at
a lower rate while removing most of the out-of-band quantisation noise. It needs
no multipliers: it is built from adders and registers only. This RTL builds the
filter the way a full-custom layout would. Every stage is a column of identical
**bit cells**, and each cell holds one full adder and one D flip-flop. A stage of
W bits is W cells with the carry rippling from cell to cell. The whole
third-order filter, one bit wide, is therefore six adders and six flip-flops, and
the 20-bit filter is twenty such slices side by side.

Design point (all of these are the parameter defaults):

| quantity | value |
|---|---|
| filter order N | 3 |
| decimation factor R | 64 |
| differential delay M | 1 |
| input | 1 bit per clock, straight binary |
| sampling clock fs | 2.56 MHz (one input bit per rising edge) |
| output rate fs/R | 40 kHz |
| word width W | 20 bits, two's complement |

The word width follows the usual CIC growth rule W = N·log2(R·M) + B_in + 1 sign
bit = 3·6 + 1 + 1 = 20.

## Signal path

```
ds_bit ─► coder ─► integ 1 ─► integ 2 ─► integ 3 ─► downsampler ─► comb 1 ─► comb 2 ─► comb 3 ─► dout
         (+1/-1)  └──────── clocked every fs edge ───┘  (1 in R)   └── advance on the strobe ──┘
```

* **Coder** (`cic_coder`). It maps a modulator `1` to +1 and a `0` to −1,
  sign-extended to W bits. Bit 0 is therefore always 1, and every other bit is
  `~ds_bit`.
* **Integrators** (`integrator_stage`, three of them). Each computes
  `y[n] = x[n] + y[n-1]` modulo 2^W, at every clock.
* **Downsampler** (`downsampler`). It counts 0 … R−1. In the clock where the
  count is R−1 it raises `strobe`. At the next edge it copies the last
  integrator output into a holding register, so only every R-th integrator value
  reaches the combs.
* **Combs** (`comb_stage`, three of them). Each computes `y[m] = x[m] − x[m−M]`.
  Their registers advance only on `strobe`, so they run at fs/R.
* `dout` is the output of the last comb.

The overall response is H(z) = ((1 − z^−RM)/(1 − z^−1))^N. This is N cascaded
moving sums of length R·M. Its DC gain is (R·M)^N = 2^18. A stream of all ones
therefore settles at dout = +262144, and all zeros at −262144. The group delay is
N(RM−1)/2 = 94.5 input clocks.

### Why the integrators may overflow

The integrators receive ±1 at every clock and are never cleared, so they leave
the 20-bit range almost at once. This is intended. Every stage is a modulo-2^W
adder, and the chain as a whole is linear modulo 2^W. The true output is bounded
by ±2^18, which fits in 20 signed bits. So the combs' differences recover it
exactly, whatever wrapping happened before them. No saturation logic is needed,
and adding some would break the filter. The one rule is that all stages must
have at least W bits. Here they all have exactly W, with no register pruning.

## The bit cells

The filter consists of the following cells:

**Full adder** (`hybrid_full_adder`). This cell has the three-module hybrid
structure:
* Module 1 forms `XNOR(a, b)`.
* Module 2 forms the sum as a second XNOR, of that node and `cin`.
* Module 3 forms the carry from the same node. When `a == b` the carry is `a`,
  otherwise it is `cin`.

Writing Module 3 as this 2-to-1 selection is a choice made here. Only its
function (carry generation) is fixed. In silicon this cell is a 16-transistor
circuit chosen for low power. The RTL keeps its module partitioning but not its
transistor-level form.

**Delay element** (`delay_ff`). A rising-edge D flip-flop with Q and QB outputs,
plus two additions: an asynchronous active-low reset to 0 and a clock enable.

**Integrator cell** (`integrator_cell`). This is one bit of an accumulator:
* adder input A is this bit of the stage input;
* adder input B is the cell's own flip-flop Q;
* the carry comes from the cell below;
* the adder's sum goes both to the flip-flop D and to the stage output;
* the carry out goes to the cell above.

The stage output is the adder output. So within one clock, a change at the
coder ripples combinationally through all three integrators: 3 × 20 full-adder
carry stages.

**Comb cell** (`comb_cell`). This is one bit of a subtractor against a delayed
copy:
* the input bit drives both adder input A and the flip-flop D;
* the flip-flop's inverted output QB drives adder input B.

Across the stage, the adders therefore form `x + ~x_delayed + cin0`. `comb_stage`
ties the carry into bit 0 to 1, which makes this exactly the two's-complement
difference `x − x_delayed`. If M > 1, the single flip-flop becomes a chain of M
flip-flops clocked by the same enable.

## Timing and interface of `cic_decimator`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sampling clock fs |
| `rst_n` | in | 1 | asynchronous, active low; clears every register |
| `ds_bit` | in | 1 | modulator bit, sampled at every rising edge |
| `dout` | out | W | two's-complement output word |
| `dout_valid` | out | 1 | high for one clock when `dout` has just changed |

Count input bits from 0, starting at the first rising edge after reset is
released.
* The holding register loads at the edge that takes bit R·k + R − 1, for
  k = 0, 1, ….
* At that same edge every comb register advances.
* In the following clock `dout_valid` is high, and `dout` holds
  y[k] = Σ_j h[j]·x[R·k + R − 1 − j]. Here h is the impulse response above, and
  inputs before reset count as 0.
* `dout` then stays constant for R clocks.

The first N outputs contain the start-up transient. They are still exact values
of the formula above.

The design uses a single clock. In the original structure the comb section runs
on its own clock at fs/R. Here the comb registers are clocked by fs and enabled
by the one-in-R `strobe`. The register-level behaviour is the same, but there is
no second clock domain. `downsampler` asserts that `strobe` comes exactly every
R clocks.

Parameters of the top are `N`, `R`, `M` and `W`. W defaults to the growth rule
above, computed by `cic_pkg::cic_bout`. Choose W at least that value, or the
output wraps.

## Files

Each module is in its own file under `rtl/`:
* `cic_pkg.sv`: design-point constants and the width rule.
* `hybrid_full_adder.sv`, `delay_ff.sv`: the two primitive cells.
* `integrator_cell.sv`, `comb_cell.sv`: the bit cells.
* `integrator_stage.sv`, `comb_stage.sv`: W-bit ripple chains of bit cells.
* `cic_coder.sv`, `downsampler.sv`: the coder and the rate switch.
* `cic_decimator.sv`: the top.

## Verification

Every module has a self-checking testbench in `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=… failures=…` and stops itself through a watchdog if it hangs.

* Cells and stages are checked against arithmetic models, on exhaustive or
  random stimulus. This covers wrap-around of the integrator carry chain, comb
  delays M = 1 and 2, and the downsampler at R = 64 and R = 5.
* `tb_cic_decimator` runs the top at its default size for 100 output words.
  Its reference does not use the recursive structure: it convolves the ±1 input
  with the N-fold convolution of a length-RM box, then decimates. The stimulus
  is random bits, then a run of ones, then a run of zeros, then a biased stream.
  The testbench checks every output word exactly, the valid timing and the
  holding of `dout` between updates. It also confirms that full scale of both
  signs and integrator wrap-around actually occurred.
* `tb_cic_decimator_params` repeats the exact comparison at other sizes:
  (N, R, M) = (3, 16, 2), (2, 8, 1) and (4, 32, 2). It uses the harness
  `tb/cic_check_harness.sv`.
* `tb_cic_sine_workload` feeds the filter from a behavioural first-order
  delta-sigma modulator, `tb/sdm1_model.sv`, which uses real arithmetic. The
  inputs are a 2.5 kHz sine at half scale, a 10 kHz sine at 0.8 of full scale,
  and a DC level of −0.3. Besides the exact check, the output divided by 2^18 must
  track the analog input within 1 % of full scale. The input is delayed by
  94.5 clocks and scaled by the filter's sinc³ gain at that frequency. The
  observed deviation is about 0.25 % at worst.

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cic_pkg.sv tb/tb_cic_decimator.sv \
          --top-module tb_cic_decimator -o sim && ./obj_dir/sim
```

For lint only: `verilator --lint-only -Wall -Irtl rtl/cic_pkg.sv rtl/cic_decimator.sv`.
The remaining lint warnings are benign:
* the asynchronous reset also appears in the assertion's `disable iff`;
* some package constants are unused in some files;
* one flip-flop output is unused in the comb cell, because only QB feeds the
  adder.

## Departures from, and additions to, the original filter

* **Only the logic function is implemented.** The original work compares four
  transistor-level full adders: 28-transistor static CMOS, pseudo-NMOS, a
  16-transistor hybrid and a 14-transistor modified hybrid. It compares their
  power, delay and power-delay product at supply voltages of 1.0 to 1.4 V in
  130 nm CMOS, and lays out the 16-transistor version. All four have the same
  logic function. The RTL uses the three-module form of the hybrid cell, and
  none of the power or delay figures carries over to it.
* **Clock enable instead of a divided clock**, as described above.
* **Reset.** An asynchronous active-low reset was added to every register. The
  original delay element is a plain edge-triggered flip-flop.
* **Coder mapping.** The mapping 1 → +1, 0 → −1 was chosen here. The original
  only calls for a conversion of the modulator bit to two's complement.
* **Decimation phase.** The first output is taken after the R-th input bit,
  also a choice made here.
* **Full width everywhere.** All six stages are 20 bits wide, with no Hogenauer
  pruning. That is 120 bit cells in total. The original text quotes a count of
  60 adders for a 20-bit filter. The RTL follows the stated 20-bit word and order
  3, which need 6 × 20 adders.
* **Differential delay.** M = 1 is the default, because that is what gives the
  20-bit output width. M = 2 is supported and tested.
* **Not included.** The analog delta-sigma modulator is not part of the RTL. Its
  bit stream is the `ds_bit` input. A first-order behavioural model exists only
  for simulation. First order was chosen because a third-order CIC filter should
  be at least one order above its modulator.
