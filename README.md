# ROM-less direct digital synthesizer with direct FM/PM and PRBS dithering

This is synthesizable SystemVerilog for a direct digital synthesizer (DDS) of the kind built as a
5 GHz SiGe MMIC for radar chirps and phase-coded pulses. It is ROM-less: no sine table sits
between the phase and the DAC. A sine-weighted, segmented current-steering DAC turns the phase
word straight into a sine amplitude. It also keeps the frequency and phase words open to change
on every clock. Fast DDS chips usually pipeline the phase accumulator, which fixes the frequency
word. This design uses plain ripple carry adders instead, so a new frequency word acts at the
next clock edge and a new phase word acts at once.

The key numbers come from the chip this RTL models: a 24-bit frequency word (FCW), a 12-bit
phase word (PCW), an 11-bit DAC phase word, 10-bit amplitude resolution, and a 13-bit PRBS for
one-bit phase dithering. On the chip, clock rate, output power and SFDR are properties of the
CML circuits and the analog DAC. This RTL does not model them.

## Data path

```
            +---------------------------+
 fcw[23:0] -+->  24-bit ripple adder ----+--> DFFs (24) --+--> acc_phase[23:0]
            |         ^                                   |
            |         +-----------------------------------+
            |
 acc_phase[23:12] --+
 pcw[11:0] ---------+--> 12-bit ripple adder --> [11:1] --> phase_word[10:0]
 prbs & dither_en --+    (carry in)                             |
                                                                v
                                                     sine-weighted DAC --> dac_code[9:0]
```

One clock gives one output sample. Per clock:

* `phase_accumulator`: `acc(n+1) = acc(n) + fcw(n) mod 2^24`. The adder is a
  `ripple_carry_adder`, a chain of 24 `full_adder` cells. The register is the only storage in
  the data path. The output frequency is `fcw / 2^24 * f_clk`, for example
  `0x180800 / 2^24 * 5 GHz = 469.36 MHz`.
* `phase_modulator`: the accumulator is cut to its top 12 bits. A 12-bit ripple adder adds the
  PCW to them, and its carry in takes the dither bit. The top 11 bits of the sum go to the DAC.
  PCW `0x800` is half a turn, a 180 degree step.
* `prbs_lfsr`: a 13-bit Fibonacci LFSR with period 8191. Its last stage is the dither bit.
  Adding a random 0 or 1 at the 12-bit LSB, half an LSB of the DAC word on average, spreads the
  phase-truncation spurs into noise. The average phase stays correct. `dither_en` gates the bit.
* `sine_weighted_dac`: the 11-bit phase word becomes a 10-bit amplitude (next section).

The adders and the DAC are combinational between the accumulator register and the outputs.
`phase_word` and `dac_code` therefore follow the register directly, and they follow `pcw` within
the same cycle. Nothing is pipelined. This matches the chip, where the FCW, the PM adder and the
DAC follow the accumulator flip-flops with no further register.

## The sine-weighted DAC

This is the least obvious part of the design. The 11-bit phase word is read as

| bits  | name | role |
|-------|------|------|
| 10    | MSB  | half wave: mirrors the output about the pi point |
| 9     | quad | second MSB: 1's complement of the core in quadrants 2 and 4 |
| 8..0  | core | quarter-wave phase, 0 .. 511 |

**Folding.** `ones_complementor` inverts the core when `quad` is set, so the DAC core only ever
sees a phase climbing from 0 to pi/2 or falling back. The MSB then mirrors the result, so the
9-bit quarter-wave magnitude becomes a 10-bit signed amplitude.

**Segmentation.** The 9-bit core is split into a coarse part and a fine part, so that no DAC
needs 511 cells:

* Coarse DAC, 6 bits (core 8..3). Its 8 x 8 cell matrix is thermometer coded by a 3-7 row
  decoder on core 8..6 and a 3-7 column decoder on core 5..3. Coarse code `c` turns on cells
  `0 .. c-1` (`coarse_dac_switch_matrix`).
* Eight fine DACs, 3 bits each (core 2..0). Core 8..6, the coarse row, also picks which fine DAC
  conducts, through a second 3-7 row decoder turned into a one-of-eight select. A 3-7 column
  decoder turns on the first `f` of its 7 cells (`fine_dac_switch_matrix`).

The row select is the trick. The sine's slope changes across the quarter wave, so each coarse
region has its own fine DAC, scaled to that region's slope.

**Sine weighting.** A cell is not a binary-weighted current. Each cell holds however many unit
currents make the sum follow the sine. So the sum of the enabled cells is already the
amplitude, and no look-up table is needed. `current_source_array` gives the cells these
weights, counted in unit currents:

```
S(p)              = round(510 * sin(pi/2 * (p + 0.5) / 512))        p = 0 .. 512
coarse level(c)   = S(8c)     = always-on cell S(0) + switched cells k < c,
                                switched cell k weighs S(8k+8) - S(8k)
fine level_r(f)   = round(f * (S(64r+64) - S(64r)) / 64)            r = core 8..6
amplitude A(core) = S(8 * (core>>3)) + fine level_(core>>6)(core & 7)
dac_code          = 512 + A   when MSB = 0
                    511 - A   when MSB = 1
```

This gives a largest coarse cell of 13 unit currents. On the chip that cell carries 338 uA at
26 uA per unit. The fine DACs hold 11 units in all in the steepest region, down to 1 unit near
the peak. These are the sizes of the chip's arrays. The peak of 510 rather than 511 is this
design's choice: it keeps coarse plus fine at or below 511, so `dac_code` fits in 10 bits.
`dds_pkg` computes the weights at elaboration time with an integer Taylor series for sin(), so
there is no table file to keep in step with the formula.

`dac_code` is an offset-binary stand-in for the differential output current. It covers
0 .. 1023 and is symmetric about 511.5. All 2048 phase words come within 1.9 LSB of an ideal
10-bit sine. Each fine DAC is shared by the eight coarse steps of its region, so its fixed
weights only approximate each step. At three quarter-wave codes (383, 447 and 495, where a
region ends) the last fine level overshoots the next coarse level by one unit, and the
amplitude drops by 1 LSB. The segmentation accepts this error in exchange for far fewer cells.
The real array's unit currents, mismatch, the four-way split of each source, the random
placement of the sources in the matrix, and the output load and filter are not modelled.

## Interfaces and timing

`dds_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | sample clock |
| `rst` | in | 1 | synchronous, active high: clears the accumulator, loads PRBS seed `13'h1FFF` |
| `fcw` | in | 24 | frequency word. Sampled every clock edge. |
| `pcw` | in | 12 | phase word. Combinational into `phase_word`/`dac_code`. |
| `dither_en` | in | 1 | 1 = PRBS bit into the PM adder's carry in |
| `dac_code` | out | 10 | amplitude, offset binary |
| `phase_word` | out | 11 | DAC phase word |
| `acc_phase` | out | 24 | accumulator register |
| `acc_wrap` | out | 1 | accumulator carry out in the cycle that overflows |
| `prbs` | out | 1 | dither bit (LFSR last stage) |

Latency: an FCW applied before edge `n` shows up in `acc_phase` after edge `n`. `pcw` and the
dither bit reach `dac_code` with no clock at all.

## Where this RTL follows the chip and where it chooses

Taken from the chip: every width above, the 1-bit PRBS on the PM adder's carry in, the 13-bit
Fibonacci structure and its 8191 period, the truncations (24 to 12 bits, then 12 to 11), the
complementor on the second MSB, the 6 + 3 segmentation with 3-7 row and column decoders, the
fine-DAC selection by the top three core bits, MSB mirroring, ripple carry adders for both
adders, and the largest cell of 13 units.

Choices made here, where the chip's design is not published:

* The LFSR taps are stages 13, 12, 10 and 9. Any maximal-length set gives the same period.
  Reset loads all ones.
* Reset is synchronous and active high, for both the accumulator and the PRBS.
* There is a `dither_en` input. How the chip turns dithering off is not known.
* The cell weights come from the formula above rather than from a measured array. The 64th
  coarse position is an always-on cell of 1 unit, which gives a coarse total of 510 units.
  The chip's coarse array is quoted at 512.
* The offset-binary output code, and the `acc_wrap` observation port.
* The per-cell thermometer logic, which is the usual two-dimensional rule.

Not built: the analog reconstruction filter after the DAC, whose characteristics are not known,
and the package, pads and CMOS-to-CML input interfaces.

## Verification

Every module except the one-bit `full_adder` (covered by the adder test) has a self-checking
testbench in `tb/`, named `tb_<module>`. The testbenches
compare against models written independently of the RTL. `tb_dds_ref_pkg` recomputes the DAC
transfer with floating-point `$sin`.

* Adders: corner carries through all bits, and random operands.
* Accumulator: a random FCW every clock, carry out, reset. FCW 0x180800 returns to zero after
  exactly 8192 clocks.
* PRBS: period exactly 8191, 4096 ones and 4095 zeros, every non-zero state once.
* Decoders, switch matrices, complementor: exhaustive.
* Current array: every quarter-wave code, and single-cell weights (largest 13 units, fine
  DACs 11 and 1 units).
* DAC: all 2048 phase words against the reference. Also the mirror rule
  `code(p) + code(p+1024) = 1023` and quarter-wave symmetry.
* `tb_dds_top`: end-to-end at full size, checked cycle by cycle. It runs FCW 0x180800 and
  0x3FCFE7 with dither off and then on, 180 degree PCW steps, an FCW ramp, random FCW/PCW
  every clock, and a mid-run reset. Output periods counted over 20000 clocks match
  `20000 * fcw / 2^24`. Each mechanism (wrap, dither carry, dither off, FM, PM step, quadrant
  complement, mirror, reset) is counted and must occur.
* `tb_dds_workloads`: the two modulation measurements made on the chip. The first is a chirp,
  an FCW ramp from 0 to 0x00AD9C that rises by one each clock. The second is FCW = 7 over one
  full output period (2,396,746 clocks), with the PCW toggled between 0 and 0x800 at every
  quarter period. At each toggle the output must jump to its mirror image.

## Simulating

Verilator 5 with `--timing`. The package files go first:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dds_pkg.sv tb/tb_dds_ref_pkg.sv tb/tb_dds_top.sv --top-module tb_dds_top
./obj_dir/Vtb_dds_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`. For one block, replace
`tb_dds_top` with `tb_<module>`. `tb_dds_workloads` runs for about 2.5 million clocks, a few
seconds. Lint alone: `verilator --lint-only -Wall -y rtl rtl/dds_pkg.sv rtl/dds_top.sv`.
Lint leaves a few unused-signal warnings. They are deliberate: the dropped carry out of the
modulo-2^12 PM adder, the unused low accumulator bits, and internal observation nets in the
top.

To change the DAC's shape, edit `sine_level`, `coarse_weight` and `fine_weight` in
`rtl/dds_pkg.sv`. The reference in `tb/tb_dds_ref_pkg.sv` must change with them. The adder
widths are parameters of `ripple_carry_adder` and `phase_accumulator`. The DAC partition
(6 + 3 bits, eight fine DACs) is fixed by the package constants and the 3-7 decoders.
