# DDS function generator: seven waveforms from one 24-bit phase accumulator

This is a digital function generator built on direct digital synthesis (DDS).
A 24-bit phase register runs from a 50 MHz clock. Every clock it adds a
frequency code `L`, and the wrapping phase is turned into a waveform sample.
Four waveforms come from 8192-entry, 8-bit tables: sine, triangle, Gaussian
pulse and sinc pulse. Two come straight from the phase bits with no table:
square and sawtooth. The seventh is white noise from a 60-bit pseudo-random
shift register. A selector passes one of the seven to an 8-bit output code
for an external DAC, which gives 0 to 5 V.

Changing the frequency only changes `L`, so the output can hop from one
frequency to another on the next clock without a phase jump.

## Frequency code and phase accumulator

With `N = 24` phase bits and `F_clk = 50 MHz`:

    f_out = F_clk * L / 2**N          L = 2**N * f_out / F_clk

| target                     | L        | samples per period |
|----------------------------|----------|--------------------|
| resolution step, 2.98 Hz   | 1        | 2**24              |
| 1 MHz (main operating point) | 335544 | 50                 |
| 5 MHz                      | 1677722  | 10                 |
| 10 MHz                     | 3355443  | 5                  |

`L = 335544` is 2**24/50 truncated, so "1 MHz" is really 999 999.4 Hz.
The table ROMs are addressed by the top `B = 13` bits of the phase
(`phase[23:11]`). The low 11 bits only add fractional phase, so the table is
read at a steady average rate. They are not interpolated.

`phase_accumulator` is the only arithmetic in the design: one 24-bit adder
and register. The top module has one accumulator shared by the four ROMs. The
square and sawtooth generators each have their own accumulator, driven by
the same `L` and reset, so all three stay in step.

## The waveform tables

Each ROM is an 8192 x 8 array filled when the design is elaborated. A
function in the module evaluates the waveform formula once per address, so
no data file is needed. A synthesis tool that evaluates `initial` blocks
(most FPGA flows do) turns this into an initialised block ROM. Reads are
synchronous: `data` appears one clock after `addr`.

| ROM              | sample at address k                                    | range    |
|------------------|--------------------------------------------------------|----------|
| `rom_sin`        | 128 + floor(127 sin(2 pi k / 8192))                   | 1..255   |
| `rom_triangular` | floor(k/16) for k < 4096, 511 - floor(k/16) after      | 0..255..0|
| `rom_gaussian`   | floor(255 exp(-(A i / X)^2)), i = k - 4095, X = 1365  | 0..255   |
| `rom_sinc`       | 128 + floor(127 sinc(pi i / (4096 T))), i = k - 4095  | 100..255 |

Points that are easy to get wrong:

* **Offset binary.** The sine and sinc are signed waves. An offset of 128
  (half of 2^8) makes them unsigned, so the DAC sees 0..255 and
  mid-scale is 128. The triangle and Gaussian are unsigned already.
* **Pulse centre.** The Gaussian and sinc tables hold one pulse over the
  index range -4095..+4096. Index i is stored at address i + 4095, so the
  peak (255) is at address 4095, just below the middle of the period.
* **Which sinc.** `sinc(x)` here is the normalised sinc,
  sin(pi x)/(pi x), with x = pi i/4096. The argument therefore sweeps about
  +/-pi^2, which gives the main lobe and about three side lobes on each side.
  The lowest side lobe reaches code 100. With the other reading,
  sin(x)/x, only the main lobe would show. That reading is the broken
  variant the sinc testbench is checked against.
* **Pulse width parameters.** `rom_sinc` has `T = T_NUM/T_DEN`: T = 1 by
  default, and 2/3 gives a narrower main lobe with more side lobes.
  `rom_gaussian` has `A` (1 by default) and `X = 1365` (about 4096/3, so the
  pulse falls to exp(-9) at the table ends). `A = 2` halves the pulse width.
  The original formula for the Gaussian width, x = a*4096/3, makes `a` cancel
  out of the exponent. This design keeps X fixed and scales only by A, so
  that a = 2 really gives a different pulse.

## Waves without a table

* `sawtooth_gen`: the top 8 phase bits already form a ramp that rises once
  per period and drops to 0 when the accumulator wraps.
* `square_gen`: the phase MSB is 0 for the first half of each period and 1
  for the second. It drives all 8 output bits, so the output is 0 or 255 with
  50 % duty.

Both register their output, so they have the same delay as a ROM read.

## Pseudo-noise generator

`noise_gen` is a 60-bit shift register clocked at 50 MHz. The bit shifted in
is NOT(q[59] XOR q[58]), i.e. XNOR feedback from taps 60 and 59 of the
primitive polynomial x^60 + x^59 + 1. The sequence therefore repeats only
after 2^60 - 1 clocks, about 731 years at 50 MHz. An XNOR register locks up
only when all bits are one. Reset clears it to zero, which is a state on the
maximal cycle.

The noise sample is the low 8 register bits. Consecutive samples are shifted
copies of each other, so the noise is white in amplitude but not independent
from sample to sample. Right after reset the sequence starts out very
structured, a known property of sparse feedback. The taps and the output bits
are this design's choice; the register length and the XOR-plus-NOT feedback
are the original's.

## Selector, output timing and reset

`wave_sel` (type `dfsg_pkg::wave_t`):

| code | wave     | code | wave     |
|------|----------|------|----------|
| 0    | sine     | 4    | square   |
| 1    | triangle | 5    | sawtooth |
| 2    | Gaussian | 6    | noise    |
| 3    | sinc     | 7    | output 0 |

`wave_mux` registers its output, so `dac_data` is registered. Every wave
reaches `dac_data` two clocks after the phase (or noise state) it comes from.
For a table wave that is the ROM read, then the selector. A change of
`wave_sel` shows on the next clock.

`rst` is synchronous and active high. It clears every accumulator, the noise
register and `dac_data`. The ROM output registers have no reset. So on the
first clock after `rst` is released, a table wave shows one stale sample read
before the reset, while the other waves show 0. From the second clock on,
every wave follows the restarted phase.

## Top-level ports (`dfsg_top`)

| port        | dir | width | meaning                                |
|-------------|-----|-------|----------------------------------------|
| `clk`       | in  | 1     | 50 MHz reference clock                 |
| `rst`       | in  | 1     | synchronous reset, active high         |
| `freq_code` | in  | 24    | frequency code L                       |
| `wave_sel`  | in  | 3     | waveform select                        |
| `dac_data`  | out | 8     | unsigned sample for the DAC            |

Parameters `N = 24`, `B = 13`, `M = 8` and `K = 60` are the original design's
sizes. The DAC and the 50 MHz oscillator are external parts. How `L` and
`wave_sel` are set (switches, a host) is left to the user.

## Resources

After generic synthesis the top has 262 144 ROM bits (4 x 8192 x 8), 157
flip-flops (three 24-bit accumulators, the 60-bit noise register and the
output registers) and three 24-bit adders. The original target was a
Cyclone II EP2C20, which has 52 M4K blocks: 212 992 data bits, or 239 616
with the parity bits. The four full-period tables therefore do not all fit in
that device's block memory. Building with fewer tables at once, or storing a
quarter-wave sine, would make them fit.

## Departures and choices

Taken from the original description: the 24-bit accumulator with a 13-bit
ROM address, the 50 MHz clock, the four 8192 x 8 tables and their formulas,
the memoryless square and sawtooth, the 60-bit XOR/NOT noise register, the
seven-way 8-bit selector and the 8-bit DAC output.

Chosen here, where the original gives no detail:

* the select encoding and the zero output for code 7;
* the synchronous ROM read and the output registers, which set the
  two-clock latency;
* the synchronous active-high reset and the all-zero noise reset state;
* the noise taps (60, 59) and the low 8 bits as the sample;
* the top 8 phase bits as the sawtooth, and MSB-high as the second half of the
  square;
* one accumulator shared by the ROMs, with separate ones in the square and
  sawtooth generators;
* the sinc normalisation and the Gaussian `A` scaling described above.

## Files

`rtl/`
* `dfsg_pkg.sv`: sizes, the 1 MHz code, the `wave_t` encoding
* `phase_accumulator.sv`
* `rom_sin.sv`, `rom_triangular.sv`, `rom_gaussian.sv`, `rom_sinc.sv`
* `sawtooth_gen.sv`, `square_gen.sv`, `noise_gen.sv`
* `wave_mux.sv`
* `dfsg_top.sv`

`tb/`
* `dfsg_ref_pkg.sv`: reference waveform formulas and the noise-register step
* `dac8_model.sv`: behavioural 0..5 V DAC, for simulation only
* `tb_<module>.sv`: one self-checking testbench per module
* `tb_pulse_variants.sv`: the T = 2/3 sinc and a = 2 Gaussian tables

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself. From
the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/dfsg_pkg.sv tb/dfsg_ref_pkg.sv tb/tb_dfsg_top.sv \
        --top-module tb_dfsg_top
    ./obj_dir/Vtb_dfsg_top

To run another testbench, replace `tb_dfsg_top` with its name. Simulation
takes under a second for each.

What the testbenches check:

* **ROM testbenches.** All 8192 samples are read in random order and
  compared with the formula, computed independently in `dfsg_ref_pkg`. They
  also check hand-worked values (peaks, zero crossings, table ends) and the
  one-clock read latency.
* **Generator testbenches.** The output is compared clock by clock with a
  model accumulator or shift register. They check the 1 MHz rate (99 or 100
  periods in 5000 clocks), 50 % square duty, reset, and the maximal period
  of the noise feedback at K = 4 (15 clocks).
* **`tb_dfsg_top`.** Runs the full-size design with default parameters. It
  predicts every output code from a model, selects each wave and the unused
  code, and changes `L` (1 MHz, 5 MHz, random codes). It resets in mid-run,
  checks the 1 MHz rate on the sawtooth and sine, checks the one-LSB step
  (L = 1 moves the sawtooth by one code after 2^16 clocks) and checks the
  5 V peak at the DAC model. It fails if any of these never happens.

Not simulated: the full 2^60 - 1 noise period. That follows from the
polynomial being primitive, and only the 4-bit version is measured.
