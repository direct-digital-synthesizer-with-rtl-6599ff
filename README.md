# ROM-less direct digital synthesizer (8-bit phase, 7-bit segmented DAC)

A direct digital synthesizer (DDS) makes a sine wave of programmable frequency
from a fixed clock. It adds a frequency control word (FCW) to a phase register
every clock, turns the phase into a sine amplitude, and converts that amplitude
to a voltage. This design was built for very high clock rates (13 GHz in a
bipolar InP technology). It keeps everything narrow so that each stage fits in
one clock cycle:

* an **8-bit phase accumulator** made of registered full adders with a plain
  ripple carry, with no pipeline registers in the carry chain;
* a **phase-to-sine converter made only of logic gates**, with no lookup
  ROM. It works on the six phase MSBs and uses quadrant symmetry;
* a **7-bit segmented current-steering DAC**: three coarse bits of 16 current
  units each and four binary fine bits of 8, 4, 2 and 1 units, which gives 64
  output levels.

The output frequency is `f_out = FCW * f_clk / 256`. FCW = 1 to 128 gives 128
steps of `f_clk/256` up to `f_clk/2`. At a 13 GHz clock that is 50.78125 MHz
per step, up to 6.5 GHz. At FCW = 128 the circuit acts as a divide-by-two.

```
          fcw[7:0]
             |
   +---------v----------+  phase[7:2]  +-----------------+  dac_code  +---------------+
   | phase_accumulator  |------------->| phase_converter |----------->| segmented_dac |--> vout_diff
   | 8 x full_adder_reg |  (S7..S2)    |  gates + reg    |  7 bits    | (behavioural) |
   +--------------------+              +-----------------+            +---------------+
```

## Files

| file | contents |
|---|---|
| `rtl/dds_pkg.sv` | widths, the `dac_code_t` struct (coarse / fine fields), the `code_units()` helper |
| `rtl/full_adder_reg.sv` | one accumulator bit: a full adder with a registered sum that feeds back |
| `rtl/phase_accumulator.sv` | 8 cells in a ripple-carry row |
| `rtl/phase_converter.sv` | gate-level phase-to-sine logic, with an optional output register |
| `rtl/segmented_dac.sv` | behavioural model of the analog DAC (not synthesizable) |
| `rtl/dds_top.sv` | the three stages wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Phase accumulator

Each `full_adder_reg` cell holds one phase bit. Its sum output is a register.
On every clock edge the register takes `sum ^ in ^ c_in`, where `in` is the
FCW bit. The cell's carry out goes combinationally to the next cell. Eight
cells in a row therefore do the whole `phase <= phase + fcw` in one cycle. The
carry path through all eight adders is the critical path of the synthesizer.
It trades speed for fewer registers, which means less power and an easier
clock tree than a pipelined accumulator.

`phase_accumulator` brings out the carry into bit 0 (`c_in`) and the carry out
of bit 7 (`c_out`). `dds_top` ties `c_in` low and brings `c_out` out as
`wrap`. `wrap` is high in the cycle before the phase wraps past 255.

## Phase-to-sine conversion

This is the least obvious part of the design. The two phase LSBs are dropped.
The remaining bits S7..S2 are used as follows:

1. **Quarter-wave address.** `A = S5^S6, B = S4^S6, C = S3^S6, D = S2^S6`.
   When S6 is set, the address runs backwards, so the second and fourth
   quarters retrace the first quarter and the first quarter alone makes a
   half-wave.
2. **Magnitude split.** The quarter-wave magnitude (0..31) is a coarse bit
   `M = A + B*C` worth 16 units plus a 4-bit fine part `F(A,B,C,D)`.
3. **Half-wave.** S7 selects the half-wave. For S7 = 0 the DAC level is
   `32 + 16*M + F`. For S7 = 1 it is `31 - (16*M + F)`. This is obtained by
   inverting the fine bits and re-coding the coarse bits:

   | DAC bit | logic | S7 = 0 | S7 = 1 |
   |---|---|---|---|
   | DAC6 (16 units) | `~S7` | 1 | 0 |
   | DAC5 (16 units) | `~M*S7 + ~S7` | 1 | `~M` |
   | DAC4 (16 units) | `M*~S7` | `M` | 0 |
   | DAC3..DAC0 | `F ^ S7` | `F` | `15 - F` |

   The coarse bits form a thermometer code, 000 / 010 / 110 / 111. Two
   samples half a period apart always add up to 63 units.

The fine part is defined by this rounded-down sine of the centre of each
quarter-wave sample, capped at 15 while M is 0:

```
F(k) = min(15, floor(31.5 * sin(2*pi*(k + 0.5)/64)) - 16*M(k)),   k = {A,B,C,D}
k  : 0 1 2  3  4  5 6 7 8 9 10 11 12 13 14 15
F  : 1 4 7 10 13 15 2 5 7 9 11 12 13 14 15 15
```

In `phase_converter.sv` each of the four bits of F is written as a minimal
sum of products in A..D, so synthesis sees only gates. The one place the
result departs from an ideal rounded sine is address 5: the magnitude there
would be 16, but M = A + B*C is still 0, so F stops at 15. This costs nothing
measurable.

**Spectral quality.** With an ideal DAC the only errors are phase truncation
(8 to 6 bits) and amplitude rounding. Under those conditions the spurious-free
dynamic range (SFDR) is 35.1 dBc at FCW = 1. The worst case over FCW 1..127 is
32.2 dBc, reached at several words including FCW = 126. In the fabricated circuit, with its
simpler gate mapping and real DAC errors, the measured SFDR ranged from 34 dBc
at low FCWs down to 26.7 dBc at FCW = 126. The simulated worst case of that
circuit's mapping was 28.4 dBc. The end-to-end testbench requires at least
28.4 dBc for every FCW and at least 34 dBc at FCW = 1.

## DAC

`segmented_dac` is a behavioural model of an analog block. It counts active
current units, `16*(DAC6+DAC5+DAC4) + 8*DAC3 + 4*DAC2 + 2*DAC1 + DAC0`, and
reports a differential voltage `(units - 31.5) * UNIT_V`. The default
`UNIT_V` of 3.2 mV gives a swing of about +/-100 mV. `T_SETTLE` adds a
transport delay. The model ignores mismatch, glitches and nonlinearity, so it
only stands in for the real converter in simulation. Synthesis tools cannot
map it. Because of its `real` port, `dds_top` is a simulation top. The
synthesizable core is `phase_accumulator` plus `phase_converter`.

## Timing

All registers use the rising edge of `clk` and reset asynchronously to zero
with `rst_n` low.

* `fcw` is sampled every clock. A new word changes `phase` one clock later.
  The word can change at any time, with no reset needed.
* `phase_converter` registers its output (`OUT_REG = 1`), so `dac_code`
  follows `phase` by one clock. Set `OUT_REG = 0` for a purely combinational
  converter. Then the accumulator and converter logic share one cycle.
* The DAC model is combinational, plus `T_SETTLE`.

## Where this RTL goes beyond or departs from the original circuit

The following parts follow the original circuit:

* the accumulator structure and width;
* the truncation to S7..S2;
* the inverted-address equations;
* the coarse split `M = A + B*C`;
* DAC6 and DAC4;
* the XOR of the fine bits with S7;
* the DAC weights.

The following are this implementation's own choices:

* **Fine-bit logic.** F is derived from the rounded sine formula above. It is
  not the original circuit's simplified gate mapping. It uses a few more gates
  and gains about 4 dB of worst-case SFDR. The most significant fine bit
  differs from the simple form `((B^C)+A)` at only 2 of the 16 addresses.
* **DAC5** uses the complement of M in the lower half-wave, so that the lower
  half exactly mirrors the upper half.
* **The converter output register**, the **reset**, and bringing out the
  phase, carry out and DAC code for observation.
* **The DAC output scale** and the DAC model itself.

The clock tree of the original circuit has no RTL counterpart. Every register
here simply shares `clk`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_full_adder_reg` checks the carry and the registered sum against a
  software model, with random inputs.
* `tb_phase_accumulator` checks the phase and carry against integer
  arithmetic with random FCWs and carries. It checks one-clock latency, a
  256-clock period at FCW = 1, and a 2-clock period at FCW = 128.
* `tb_phase_converter` covers all 64 phases. It checks against a reference
  computed with `$sin`, checks half-wave symmetry, and checks the one-clock
  latency of the registered version.
* `tb_segmented_dac` covers all 128 codes. It checks the unit count, the
  voltage, and 64 distinct levels.
* `tb_dds_top` runs the full design at its default sizes. It checks phase,
  carry and DAC level every clock. It sweeps FCW 1..128, switching on the fly,
  and takes a 256-point DFT of the output for each word. From that it checks
  that the fundamental sits at bin FCW, the SFDR limits above, and the
  divide-by-two at FCW = 128. It measures a 256-clock period at FCW = 1
  (50.78125 MHz at 13 GHz). It also counts accumulator wraps, mirrored
  quarters, lower half-waves, coarse-bit changes and FCW changes.

## Simulating

With Verilator 5:

```
verilator --binary --timing --top-module tb_dds_top \
  rtl/dds_pkg.sv rtl/full_adder_reg.sv rtl/phase_accumulator.sv \
  rtl/phase_converter.sv rtl/segmented_dac.sv rtl/dds_top.sv tb/tb_dds_top.sv
./obj_dir/Vtb_dds_top
```

The run takes well under a second and prints the period at FCW = 1, the SFDR
at FCW = 1 and 126, the worst SFDR of the sweep, and the mechanism counts. To
test one block, swap in its testbench and leave out the files it does not use.

## Changing it

* `phase_accumulator` is parameterized by `WIDTH`, but the converter is tied
  to the six-bit phase S7..S2 and the 7-bit DAC code in `dds_pkg`. A wider
  accumulator only needs `dds_top` to take its top six bits, as it already
  does through `ACC_WIDTH` and `PHASE_BITS`.
* A different amplitude mapping means new sums of products for `fine_mag` and
  possibly a new `M`. Also update the reference function in
  `tb_phase_converter` and `tb_dds_top`, whose comments give the formula.
