# Band-pass sigma-delta DAC with 4th order vector-feedback mismatch shaping

This design produces a very clean tone in a narrow band around Fs/4 from only
32 unit current cells. It uses two noise shapers in series:

1. A **band-pass sigma-delta modulator** cuts each input sample down to a
   5-bit code. The code is the number of cells to switch on. The quantisation
   noise goes to frequencies above and below Fs/4.
2. A **dynamic element matching (DEM)** block picks *which* cells carry that
   code. Real current cells mismatch by about 1–2 %. If code k always used
   cells 0..k-1 (thermometer coding), that mismatch would show up as
   distortion right at the tone. The DEM gives each cell its own small noise
   shaper, so each cell's usage error (and so its mismatch) is also pushed
   away from Fs/4.

The digital part (tone generator, modulator, DEMs) is synthesizable
SystemVerilog. The chip part has synthesizable digital cells (input registers,
clock manager, switch drivers) and behavioural real-valued models of the
current-steering DAC and its bias generator.

```
 ftw,amp ─► dds_tone_gen ─► sd_modulator ─code(5)─┬─► dem_crfb4  (4th order VFB DEM) ─┐
                 16-bit sine      3rd order BP     ├─► dem_erfb2  (2nd order ERFB DEM) ─┼─► dem_mux ─DATA[31:0]─► bpdac_chip
                                  6th order        └─► thermo_coder (no DEM)         ───┘   mode
 bpdac_chip: clock_manager ─► input_registers ─► switch_driver ─► cdac ◄─ bias_gen ─► Iout+ / Iout-
```

All blocks take one sample per clock. The top is `bpdac_top`. Shared types
(`code_t`, `dem_mode_e`) are in `bpdac_pkg`.

## The modulator (`sd_modulator`)

The prototype is a 3rd order low-pass loop: three delaying integrators
z⁻¹/(1−z⁻¹) in a chain, with feedback gains a = (1, 3, 3) from the quantizer
output. Its NTF is exactly (1−z⁻¹)³ and its STF is z⁻³. Substituting z⁻¹ → −z⁻²
turns each integrator into a resonator at Fs/4. The band-pass modulator then
has NTF = (1+z⁻²)³, with all six zeros at Fs/4, and STF = z⁻⁶. The input is fed
in negated, so the STF is +z⁻⁶.

- **Number format.** Signed fixed point with `FRAC` = 12 fractional bits. One
  quantizer step (one cell) is 2¹². A 16-bit input therefore spans ±8 steps.
- **Quantizer.** Rounds to the nearest step and clips to −16..15. The output is
  `code = level + 16`. Dither of ±¼ step comes from a 16-bit LFSR
  (`dither_lfsr`) and can be switched off.
- **No overload.** The NTF is an FIR filter with Σ|h| = 8. With dither the
  quantizer error is at most ¾ step, so the quantizer input never leaves
  ±13.5 steps for any input up to full scale. `clipped` exists only as a check.
- **Measured in simulation.** A tone at 0.2517·Fs, at −8 dB of the input full
  scale, has 105 dB of tone-to-noise in a ±2.5 % band.
- **Not done.** The modulator has no zero-optimising resonator feedback. All
  its zeros sit at Fs/4.

## The 4th order vector-feedback DEM (`dem_crfb4`, `vq2`)

This is the core of the design and the hardest part to follow.

**Per-cell loop filter.** Every cell i has its own 4th order CRFB loop
(cascade of resonators with distributed feedback). Its only input is its own
1-bit usage sv_i: a single-bit feedback path. The low-pass prototype is:

```
x1 = I'(−a1·sv − g1·x2)    x2 = I(x1 − a2·sv)
x3 = I'(x2 − a3·sv − g2·x4) x4 = I(x3 − a4·sv)     sy = x4
I = z⁻¹/(1−z⁻¹)  (delay in the forward path)   I' = 1/(1−z⁻¹)  (delay in the feedback path)
```

The gains are powers of two: a = (2⁻⁹, 2⁻⁶, 2⁻², 2⁻¹), c = 1 and
g = (2⁻¹¹, 2⁻⁸), so the filter needs only shifts and adds. The g loops move
two pairs of NTF zeros off Fs/4 to widen the band they cover. Both pairs sit
inside ±2.5 % of Fs/4. Every z⁻¹ is again replaced by −z⁻². In hardware:

- a delaying section is two registers: `p = −(x + u)` and then `x = p`;
- a non-delaying section is `x[n] = u[n] − x[n−2]` with a two-deep history.

**Selection.** The vector quantizer switches on the `code` cells with the
largest sy, ties going to the lower index. A cell that has been used a lot gets
a low sy and drops back. Because of the resonators, "a lot" is measured at
Fs/4.

**Common mode.** All 32 filters see usage patterns that add up to the code,
and the code holds a large Fs/4 tone. The common part of the states would
therefore grow without limit. After each update, the minimum over the 32
cells is rounded down to a whole cell unit (2^FB) and subtracted from every
state register. Differences between cells decide everything, so the
selection stays the same, and every register stays bounded. The states are
signed, `FB` = 12 fractional bits, `DW` = 24 bits. In band-pass use they stay
within about 4 cell units. The headroom is for abusive codes, such as 0 and 31
alternating.

**Two-stage VQ without an extra loop delay.** `vq2` is pipelined:

- **Stage 1.** Subtract the minimum. Shift every entry left by the
  leading-zero count of their OR, which drops redundant MSBs and loses no
  LSB. Compare the top 5 bits of every pair (coarse sort).
- **Stage 2.** Settle equal pairs on the remaining bits, then on the index.
  Count each cell's rank and switch the cell on if its rank is below `code`
  (fine sort).

A plain pipeline stage would add a delay inside the DEM loop and make it
unstable. Instead, `vq2` reads `p4`, the register between the two delays of
the last −z⁻² section. That register already holds *next* cycle's sy. Stage 2
in cycle n+1 therefore ranks exactly sy[n+1], and the loop behaves as if the
VQ took no time. The code for cycle n+1 goes straight to stage 2.

**Timing.** Give `code` every clock. `sv` is that cycle's selection
(combinational from the VQ register). `data` is `sv` registered.

**How good the coefficients are.** In the end-to-end simulation (tone at
0.2517·Fs, ±2.5 % band, Hann window, averaged over cells) the in-band power of
a cell's usage error is:

| scheme | in-band usage error |
|---|---|
| thermometer | 49.8 dB |
| 4th order CRFB DEM | 11.2 dB |
| 2nd order ERFB DEM | −0.4 dB |

The 4th order DEM is therefore about 39 dB better than thermometer coding.
In this narrow band, however, it does **not** beat the 2nd order DEM, whose
double zero sits exactly at Fs/4. A search over power-of-two sets found none
that did while keeping the states bounded. The coefficients are parameters
(`A*_SH`, `G*_SH`) and are the first thing to revisit. Better values would
come from a proper NTF synthesis (4th order, out-of-band gain 1.5, optimised
zeros) rounded to powers of two. The reference model in `tb_dem_crfb4` has
the default shifts written in. Edit them there too when you change the
parameters.

## The 2nd order error-feedback DEM (`dem_erfb2`) and the thermometer coder

`dem_erfb2` is the conventional scheme the main DEM is compared with:

- sf = H(z)·se, with H(z) = −(2z⁻² + z⁻⁴);
- sy = sf − min(sf);
- the `code` largest sy are switched on, and se = sy − sv.

Each cell's usage is then shaped by (1+z⁻²)². Its VQ is a single-cycle
pairwise ranking, and all its values are small integers (9 bits).
`thermo_coder` switches on cells 0..code−1.

`dem_mux` registers one of the three, selected by `mode`
(`DEM_CRFB4`, `DEM_ERFB2`, `DEM_THERMO`). All three always run, so a mode
switch is clean from the next clock.

## The DAC chip (`bpdac_chip`)

- **`clock_manager`.** Selects the pad clock or the pad clock divided by 2
  (`div_sel`). It makes the two latch phases and releases the reset two clocks
  after the pad reset. Its phase generator pulses `trig` once every 256 chip
  clocks, for triggering external equipment.
- **`input_registers`.** Each cell is two latches open on opposite phases
  (master while the clock is low, slave while it is high). Together they take
  DATA at the rising edge. The latches are deliberate, and the tools report
  them as latches.
- **`switch_driver`.** An AND and an inverter give `sw_p = d & en` and
  `sw_n = ~sw_p`. During reset every cell is steered to Iout−.
- **`cdac`** (behavioural). Each cell steers `iunit·gain_i` to Iout+ or
  Iout−. It has two mismatch options, both off by default:
  - one deliberately wrong cell (`CORRUPT_IDX`, `CORRUPT_ERR`);
  - a fixed Gaussian error of standard deviation `MISMATCH_SIGMA` on every
    cell. The errors are drawn at time 0 from `MISMATCH_SEED` by a 32-bit
    linear congruential generator and the Box–Muller transform, so one seed
    always gives the same chip.
- **`bias_gen`** (behavioural). Gives iunit = VREF/REXT, the current that the
  OTA loop sets through the external resistor and mirrors to the cells.

What the models leave out: output resistance, glitch energy, switch crossing
points, the dummy feed-through switches and OTA dynamics. These are analog
properties.

## Narrow-band SFDR with mismatched cells

`tb_bpdac_mismatch` runs three complete DACs side by side:

- one with 2 % Gaussian cell mismatch (seed 7);
- one with cell 16 made 2 % too strong. Thermometer coding switches that cell
  near mid-scale, so it gives the worst distortion;
- one with ideal cells.

The tone is at 0.2517·Fs, exactly on a bin of an 8192-point DFT. The
narrow-band SFDR is the tone power against the largest other bin within ±2.5 %
of the tone, in dBc:

| input (dB below DDS full scale) | −2 | −20 | −40 | −60 |
|---|---|---|---|---|
| 2 % Gaussian, 4th order CRFB DEM | 97.2 | 77.0 | 57.0 | 39.7 |
| 2 % Gaussian, 2nd order ERFB DEM | 101.8 | 87.8 | 66.9 | 50.1 |
| 2 % Gaussian, thermometer | 79.9 | 61.5 | 42.2 | 21.0 |
| cell 16 +2 %, 4th order CRFB DEM | 112.6 | 95.5 | 75.4 | 54.0 |
| cell 16 +2 %, 2nd order ERFB DEM | 116.1 | 94.5 | 72.9 | 57.1 |
| cell 16 +2 %, thermometer | 90.9 | 70.0 | 53.4 | 30.7 |
| ideal cells (any scheme) | ≈116 | ≈97 | ≈74 | ≈59 |

- **Ideal cells.** SFDR is set by the modulator's in-band noise floor, so it
  falls dB for dB with the input.
- **Both DEMs.** They recover most of what thermometer coding loses: 17–22 dB
  with Gaussian mismatch, 20–25 dB with the corrupted cell.
- **Short of the target.** With 2 % Gaussian mismatch the 4th order DEM
  reaches about 97 dB rather than close to the ideal 116 dB, and the 2nd order
  DEM is about 5 dB better. With the single corrupted cell the two are within
  a few dB of each other. This is the coefficient weakness described above.

The test checks that, at −2 dB:

- both DEMs beat thermometer coding by 15 dB or more;
- both DEMs reach at least 90 dB.

It takes about 5 s.

The lowest input the DDS can make is one amplitude LSB. That is −90 dB of the
DDS full scale, which is itself half the quantizer range (about −96 dB of the
quantizer's full scale).

## Latency through the whole path

| stage | delay |
|---|---|
| DDS | 3 clocks |
| modulator code register | 1 clock (the loop's own STF delay is 6 samples) |
| DEM output register | 1 clock |
| mux register | 1 clock |
| chip input register | next rising edge |

## Files and how to simulate

`rtl/` holds one module or package per file. `rtl/sine_qtr.hex` is the DDS
quarter-wave table. Entry k is round(32767·sin(2π(k+0.5)/4096)) for
k = 0..1023. It is read with `$readmemh("rtl/sine_qtr.hex")`, so run from the
directory that holds `rtl/`.

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one:

```
verilator --binary --timing --assert -Irtl rtl/bpdac_pkg.sv tb/tb_bpdac_top.sv --top-module tb_bpdac_top
./obj_dir/Vtb_bpdac_top
```

The reference models in the testbenches are written independently of the RTL:

- **`tb_sd_modulator`.** Error-feedback form of the same NTF; bit-exact.
- **`tb_dem_crfb4`.** Time-indexed difference equations and a
  repeated-maximum selection.
- **`tb_vq2`.** Random vectors with many ties.
- **`tb_dem_erfb2`.** Its own model of the loop.
- **`tb_dds_tone_gen`.** Ideal sine within 2 LSB.
- **`tb_bpdac_top`.** Runs all defaults end to end and checks:
  - cell count against the code, every clock;
  - the chip currents;
  - modulator in-band tone-to-noise of 60 dB or more;
  - both DEMs at least 20 dB below thermometer coding in band;
  - a mode switch, dither off, and the divided chip clock (trigger period
    doubles), each of which must happen.

  It takes about a second.
- **`tb_bpdac_mismatch`.** The SFDR sweep above.
- **`tb_cdac`.** Also checks that the Gaussian option gives a 1–3.5 % spread
  with the unit current as its mean.

## Trust and departures

**Taken as described:**

- 3rd order band-pass modulator made from a low-pass prototype with
  z⁻¹ → −z⁻²;
- 5-bit quantizer, with dither in front of it;
- 32 unary cells;
- single-loop 4th order CRFB mismatch filters with power-of-two gains;
- minimum subtraction;
- two-stage coarse/fine VQ that reads the filter one register early;
- 2nd order ERFB DEM and a mux to compare them;
- two-latch input registers;
- AND/inverter complementary drivers;
- a clock manager with divider, mux, synchroniser and trigger.

**This design's own choices:**

- all coefficient values and number formats;
- dither amplitude;
- tie rule;
- reset behaviour;
- DDS structure;
- trigger period;
- the thermometer mode in the mux.

**Known weak point.** The 4th order DEM's coefficients do not reproduce the
expected advantage over the 2nd order DEM in a ±2.5 % band. Its SFDR with
2 % mismatch is about 97 dB, well short of the 116 dB of ideal cells (see
above).

**Not modelled:**

- timing at 100 MHz;
- pads, buffer trees and any analog non-ideality.

**Input-level limit.** The DDS amplitude has 15 bits below full scale. Input
levels below about −90 dB of the DDS full scale (about −96 dB of the
quantizer's full scale) cannot be set.
