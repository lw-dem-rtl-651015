# LW-DEM: a 12-bit current-steering DAC with lightweight dynamic element matching

A current-steering DAC makes its output by adding up current sources. No two
sources are exactly equal. In a plain binary-weighted DAC the same sources
always represent the same code, so their mismatch becomes a fixed,
code-dependent error, and a sine wave comes out with harmonic spurs.
*Dynamic element matching* (DEM) changes, sample by sample, which physical
sources stand for each binary weight. The same mismatch then becomes
broadband noise, and the spurious-free dynamic range (SFDR) rises.

The usual form is random-rotation binary-weighted selection (RRBS). It puts a
barrel shifter in front of the sources and rotates it by a number drawn from
a pseudo-random number generator (PRNG) every sample. The PRNG costs area and
power, and a longer random cycle needs a wider PRNG. **Lightweight DEM (LW-DEM)
drops the PRNG.** It takes each rotation number from low-order bits of the
input code itself, which real signals keep random enough. What remains of the
randomizer is three 3-bit barrel shifters and some wiring.

This repository holds synthesizable SystemVerilog for the digital half of such
a 12-bit DAC. It also holds a behavioural model of the analog half (current
switches and sources), so the whole converter can be simulated: the switch
patterns, the output current, and the effect of DEM on spurs and on the
static transfer curve.

## The converter at a glance

```
            +-----------+  code B12..B1
 din[11:0] ->| input FFs |----+--------------------------------------------+
            +-----------+    |                                            |
                             |  B12..B10   +---------------+  7            |
                             +-----------> | barrel shifter|--/--> 7 x I_MSB  (512 u)
                             |  R={B1,B4,B7}+---------------+              |
                             |  B9..B7     +---------------+  7            |
                             +-----------> | barrel shifter|--/--> 7 x I_ULSB (64 u)
                             |  R={B2,B5,B8}+---------------+              |
                             |  B6..B4     +---------------+  7            |
                             +-----------> | barrel shifter|--/--> 7 x I_LSB  (8 u)
                             |  R={B3,B6,B9}+---------------+              |
                             |  B3..B1 (no DEM) -------------------/3--> 4,2,1 x I_LLSB
                                                  |
                                 all 24 selects -> clocked switch drivers
                                                  -> differential current switches
```

- **Bit names.** B1 is the code's LSB (`din[0]`) and B12 its MSB. One LLSB
  unit ("u") is I_FS / 4095.
- **Segments.** The code is cut into four 3-bit segments: MSB, ULSB (upper
  LSB), LSB and LLSB (lower LSB).
- **Unary segments.** The three upper segments each drive seven equal
  elements through a barrel shifter.
- **LLSB segment.** It drives three binary sources directly. Its weight is so
  small that shuffling it would gain nothing.
- **Sizes.** The prototype full scale is 8 mA, at 25 MS/s.

## How one segment selects its elements

A 3-bit code b2 b1 b0 has to turn on b0·1 + b1·2 + b2·4 of the seven equal
elements I0..I6.

- **Without rotation** the elements are grouped in binary weights: I0 is the
  group of b0, I1–I2 the group of b1, and I3–I6 the group of b2.
- **With rotation R** the whole grouping turns left by R places. The group of
  b0 then starts at element R, and the groups of b1 and b2 follow it, wrapping
  from I6 back to I0.
- **Modulo 7.** There are seven elements, so the rotation is taken modulo 7,
  and R = 7 gives the same selection as R = 0.

Examples (group label of I6..I0):

| code | R | I6 I5 I4 I3 I2 I1 I0 | elements on |
|------|---|----------------------|-------------|
| 5 (101) | 4 | b1 b1 b0 b2 b2 b2 b2 | I0..I4 |
| 6 (110) | 7 | b2 b2 b2 b2 b1 b1 b0 | I1..I6 |
| 7 (111) | 1 | b2 b2 b2 b1 b1 b0 b2 | all |
| 4 (100) | 2 | b2 b2 b1 b1 b0 b2 b2 | I5, I6, I0, I1 |

The number of elements that are on always equals the code value. Only which
elements are on changes.

Rotation also softens glitches. Take the mid-code step 011 → 100:

- Without rotation, all seven elements switch.
- If the new sample comes with rotation R = 0..7, then 7, 5, 3, 1, 1, 3, 5
  and 7 elements switch: four on average.

`lwdem_barrel_shifter` builds the grouping with plain wiring. It then rotates
in three stages of 1, 2 and 4 places. The three stages add up modulo 7 by
themselves, so R = 7 needs no special case.

## Where the rotation numbers come from (Method-I)

In LW-DEM mode the three rotation numbers are taken from bits B1..B9:

| rotation step | MSB shifter | ULSB shifter | LSB shifter |
|---------------|-------------|--------------|-------------|
| 4 places (rotation bit 2) | B1 | B2 | B3 |
| 2 places (rotation bit 1) | B4 | B5 | B6 |
| 1 place  (rotation bit 0) | B7 | B8 | B9 |

So R_MSB = {B1,B4,B7}, R_ULSB = {B2,B5,B8} and R_LSB = {B3,B6,B9}. The
reasoning behind this choice:

- **Bits used.** Bits B10..B12 are never used. For slow signals they hardly
  change, and using them costs about 4 dB of SFDR in simulation.
- **Row assignment.** The three lowest bits B1..B3 change the most, so they
  get the largest step. B1, the busiest bit of all, goes to the MSB shifter,
  whose elements carry the most weight.
- **The alternative.** Assigning the bits by columns instead ("Method-II":
  B1..B3 to the MSB shifter, B7..B9 to the LSB shifter) leaves the LSB
  segment barely shuffled. It is not built.
- **Timing of the rotation.** The rotation of a sample comes from the same
  sample's code. There is no extra state: the randomizer is memoryless.

`lwdem_rotation_select` also has two comparison modes (`dem_mode_e`):

- **`DEM_OFF`** sets every rotation number to 0. This gives the plain
  binary-weighted DAC.
- **`DEM_EXT`** takes the rotation numbers from the `ext_rot` input, e.g. from
  an external PRNG for conventional RRBS.

The prototype was measured in both of these configurations. The encoding and
the `ext_rot` port are this implementation's own.

## Pipeline and timing

One sample per clock:

1. **Edge k.** `din` (and `ext_rot`) are captured in the input flip-flops.
2. **Between edges k and k+1.** The rotation logic and the barrel shifters
   settle. This path is combinational.
3. **Edge k+1.** The clocked switch drivers capture all 24 selects. They
   drive `sw_p` and its complement `sw_n` to the differential switch pairs.
   An assertion checks that the two are complementary.

The latency is therefore two clocks from `din` to the switches and to the
model's output current. `mode` is not registered. It acts on the code that
sits in the input flip-flops. Reset is asynchronous and active low. It clears
the input flip-flops and steers every element to the negative output.

## Files

| file | what it is |
|------|------------|
| `rtl/lwdem_pkg.sv` | sizes, `dem_mode_e`, `sw_ctrl_t` (the 24 switch controls: `msb`, `ulsb`, `lsb` 7 bits each, `llsb` 3 bits) |
| `rtl/lwdem_input_reg.sv` | input flip-flop bank |
| `rtl/lwdem_rotation_select.sv` | Method-I rotation numbers, DEM off / external modes |
| `rtl/lwdem_barrel_shifter.sv` | 3-bit randomizer: grouping and rotation of one segment |
| `rtl/lwdem_switch_driver.sv` | clocked complementary switch drivers |
| `rtl/lwdem_digital.sv` | digital half: all of the above, synthesizable |
| `rtl/lwdem_current_array.sv` | behavioural model of the switches and current sources (`real` outputs) |
| `rtl/lwdem_dac.sv` | top: digital half + analog model |
| `tb/lwdem_ref_pkg.sv` | independent reference model of the selection rule, a 15-bit LFSR |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the two below |

The digital half synthesizes to 69 flip-flops (12 input bits, 9 external
rotation bits and 48 switch-driver outputs) and about 25 word-level cells
of rotation and mode logic.

## The analog model

`lwdem_current_array` is a behavioural model, not synthesizable logic:

- **Sources.** It holds 7 × 512, 7 × 64 and 7 × 8 unit sources, plus 4, 2
  and 1 unit binary sources: 4095 units = `I_FS` (default 8 mA).
- **Outputs.** Each source goes to `iout_p` when its `sw_p` is high and to
  `iout_n` when its `sw_n` is high.
- **Mismatch.** Parameter `SIGMA` gives every source a fixed random error. A
  source of W units gets a relative error of SIGMA/√W, as if it were W unit
  cells in parallel. `SIGMA` = 0 (the default) is an ideal array.

The bias network, the clock buffer, the output load and any timing effects
(switching skew, output impedance) are not modelled. The model therefore
shows static mismatch and what DEM does with it, and nothing else.

## How far it has been checked

Every module has a self-checking testbench that prints `TB_RESULT checks=N
failures=M`:

- **`tb_lwdem_barrel_shifter`.** All 64 code/rotation pairs against a formula.
  The worked rotation examples above, and those of a 6-bit example in which
  the lower three bits of the code rotate the upper three. The 7-5-3-1-1-3-5-7
  glitch counts.
- **`tb_lwdem_rotation_select`.** Method-I bits, independence from B10..B12,
  and both comparison modes.
- **`tb_lwdem_input_reg`, `tb_lwdem_switch_driver`.** Capture, one-clock
  latency, reset, complementary outputs.
- **`tb_lwdem_current_array`.** Output current = I_FS·value/4095 for random
  switch patterns, split current, and visible mismatch.
- **`tb_lwdem_digital`, `tb_lwdem_dac`.** End to end at default parameters:
  about 6700 samples of random codes, a sine and edge codes, in all three
  modes. Every switch gate is checked against the reference model, with the
  two-clock latency, and the output current is checked as well. Each mode, a
  mode switch, wrapped rotations, rotation 7, a DEM selection that differs
  from the binary one, and reset must all occur.
- **`tb_lwdem_tones`.** The prototype's two test tones at 25 MS/s, with
  5 % unit mismatch. The tones are coherently sampled over 4096 points: 197
  cycles ≈ 1.20 MHz and 2041 cycles ≈ 12.46 MHz. A DFT of the output gives:

  | mode | SFDR 1.2 MHz | SFDR 12.46 MHz | elements switched, 12.46 MHz |
  |------|--------------|----------------|------------------------------|
  | DEM off | 66.4 dB | 66.4 dB | 74 854 |
  | LW-DEM | 75.7 dB | 75.7 dB | 64 326 (−14 %) |
  | RRBS, LFSR rotation | 76.0 dB | 74.8 dB | 63 882 |

  LW-DEM gains about 9 dB, about as much as RRBS, without any PRNG. The
  absolute SFDR is higher than a real chip's, because only static mismatch is
  modelled. With a static model both tones reach the same set of codes, which
  is why their SFDR values coincide. Near Nyquist, LW-DEM switches 14 % fewer
  elements than binary-weighted selection. The published simulation reports
  19.7 % fewer. It also has LW-DEM 1.9 % below RRBS, which this model does not
  reproduce: here RRBS switches 0.7 % fewer elements.

  A second part sweeps eight tones from 0.07 MHz to Nyquist. It adds a fourth
  rotation source, driven through `ext_rot`: bits B4..B12 of the same code,
  laid out like Method-I. DEM raises the SFDR by about 9 dB at every tone.
  B1..B9 comes out 0.5 dB ahead of B4..B12, but that figure is of little
  weight. With static mismatch only, every full-scale coherent tone uses the
  same codes, so code-derived rotation gives the same SFDR at every
  frequency. The penalty of using the slow upper bits, a few dB in the
  published simulations, depends on effects this model lacks.

  The testbench asserts only that both DEM modes raise the SFDR at every tone
  and that LW-DEM switches less than plain binary near Nyquist.
- **`tb_lwdem_static`.** All 4096 codes, with and without LW-DEM, error
  against the end-point line. The largest errors are similar: 2.3 LLSB
  without DEM, 3.1 LLSB with LW-DEM. Without DEM the error keeps its sign over
  long runs of codes (35 sign changes). With LW-DEM it changes sign 1377
  times, so on average the output lies close to the ideal line.

## Choices this implementation makes

These points are not fixed by the LW-DEM scheme itself:

- **Latency.** Two clocks, with the switch drivers built as plain flip-flops.
- **Reset.** Asynchronous and active low. The code resets to 0, and every
  element is steered to the negative output.
- **Comparison modes.** The `DEM_OFF` / `DEM_LW` / `DEM_EXT` mode input and
  the `ext_rot` port. The mapping from a wide PRNG to the three rotation
  numbers is left to whoever drives `ext_rot`. The testbenches use three
  3-bit slices of a 15-bit LFSR (x^15 + x^14 + 1).
- **Shifter circuit.** The shifter is written as a three-stage logarithmic
  rotator. Any circuit with the same selection rule will do.
- **Analog model.** Its mismatch law, and both-on/both-off switch behaviour.

## Simulating

With Verilator 5 (no other tools are needed):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/lwdem_pkg.sv tb/tb_lwdem_dac.sv --top-module tb_lwdem_dac -Mdir obj_dac
./obj_dac/Vtb_lwdem_dac
```

Replace `tb_lwdem_dac` with any other testbench name. Every testbench runs in
well under a second. To lint the synthesizable part:

```
verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/lwdem_pkg.sv rtl/lwdem_digital.sv
```

Things you might change:

- **Mismatch study.** Set `SIGMA` and `SEED` on `lwdem_dac` (as
  `tb_lwdem_tones` does) to try other mismatch levels.
- **Rotation scheme.** To try another bit assignment, edit the `lw_rot` line
  in `lwdem_rotation_select.sv` and the matching `ref_rot` function in
  `tb/lwdem_ref_pkg.sv`.
- **Segment width.** `lwdem_barrel_shifter` takes any segment width
  (`SEG_W`). The 12-bit wiring in `lwdem_digital` and the Method-I table
  assume 3-bit segments.
