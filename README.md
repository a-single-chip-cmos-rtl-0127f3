# Agile function generator: a DDS with a 10-bit current-steering DAC

This is the RTL of a single-chip function generator built around direct
digital synthesis (DDS). A phase register advances by a programmable step on
every clock. The phase is turned into an amplitude sample, and a 10-bit
current-steering DAC turns each sample into a current. With a 100 MHz clock the
output covers dc to 35 MHz in 0.0233 Hz steps. A new frequency reaches the DAC 19 clocks (190 ns) after it is committed
(a new phase offset or waveform a few clocks sooner), and the waveform carries
on from its current phase, with no jump. Four waveforms are
available: sine, ramp (triangle), saw-tooth and random. Phase modulation comes
from a 12-bit phase word, and the DAC can be powered down.

The digital part (`dds_core` and everything below it) is synthesizable
SystemVerilog. The DAC's analog parts (its current cells and bias generator) are
behavioural models with real-valued currents. They are accurate enough to check
the codes and the power-down, but they do not model noise, mismatch or glitches.

## Block structure

```
 8-bit bus ──► input_ctrl_reg ──update──► freq_phase_reg
                                          │ftw[31:0]   │ptw[11:0]   │ctrl (wave, pd)
                                          ▼            │            │
                                 phase_accumulator     │            │
                                          │phase[13:0] ▼            │
                                          └──────► phase_adder      │
                                                       │            │
                                                       ▼            ▼
                                 phase_to_amp (sine_lut ─ coarse/fine ROM,
                                               triangle, saw-tooth, lfsr_noise)
                                                       │ dout[9:0]
                                                       ▼
                       dac10:  dac_digital (latch ─ segment_decoder ─ latch)
                               current_steering_array ◄── bias_generator (pd)
                                                       │
                                                   ioutp / ioutn
```

| module | role |
|---|---|
| `afg_top` | the chip: `dds_core` plus `dac10` |
| `dds_core` | digital part: registers, accumulator, phase adder, converter |
| `input_ctrl_reg` | collects bytes from the 8-bit microcontroller bus |
| `freq_phase_reg` | the words the DDS runs with; loaded all at once by `update` |
| `phase_accumulator` | 32-bit accumulator in 8 pipelined 4-bit segments |
| `phase_adder` | adds the phase word (phase modulation) |
| `phase_to_amp` | waveform selection, output register and strobe latch |
| `sine_lut` | quarter-wave sine from two small ROMs |
| `sine_coarse_rom`, `sine_fine_rom` | the compressed sine tables |
| `lfsr_noise` | random samples |
| `dac10` | DAC: `dac_digital` + `bias_generator` + `current_steering_array` |
| `dac_digital` | code latch, thermometer decoder, switch latch |
| `segment_decoder` | 6 MSBs → 63 thermometer bits, 4 LSBs passed through |
| `current_steering_array` | behavioural: 63 × 16-LSB and 1/2/4/8-LSB current cells |
| `current_steering_cell` | behavioural: one cell's make-before-break switch timing |
| `bias_generator` | behavioural: reference current, LSB current, power-down |
| `afg_pkg` | widths, waveform enum, control-word struct, register addresses |

The chip's clock generator is not modelled: `clk` enters directly.

## Programming

The controller writes one byte per clock with `wr` high:

| `addr` | contents |
|---|---|
| 0, 1, 2, 3 | frequency tuning word (FTW) bits 7:0, 15:8, 23:16, 31:24 |
| 4 | phase tuning word (PTW) bits 7:0 |
| 5 | PTW bits 11:8 in `data[3:0]` |
| 6 | control: `data[1:0]` waveform (0 sine, 1 ramp, 2 saw-tooth, 3 random), `data[2]` power-down |
| 7 | ignored |

Writes only change a staging register. The generator keeps running on the
old words until a one-clock pulse on `update` copies all of them at once into
`freq_phase_reg`. That way the frequency, phase and waveform always change
together. All interface signals are taken to be synchronous to `clk`. The
register map, the `update` strobe and this synchronous protocol are this
design's own choices. Only the 8-bit width of the interface comes from the
original design.

Output frequency and phase offset:

    f_out = f_clk · FTW / 2^32            (0.02328 Hz per LSB at 100 MHz)
    phase offset = PTW · 360° / 4096      (0.0879° per LSB)

Some example tuning words at 100 MHz: 2 MHz is 85 899 346, 25 MHz is
2^30, and 35 MHz is 1 503 238 554.

## The 19-stage path

From the edge that samples `update` to the DAC current switches, a new word
passes through 19 register stages:

| stages | where | count |
|---|---|---|
| 1 | `freq_phase_reg` | 1 |
| 2–9 | `phase_accumulator` (first-change latency) | 8 |
| 10 | `phase_adder` | 1 |
| 11–15 | `sine_lut`: fold, ROM read, sum, round/clip, sign | 5 |
| 16 | waveform selection register | 1 |
| 17 | output strobe latch → `dout` | 1 |
| 18 | DAC code latch | 1 |
| 19 | DAC switch-control latch (after the thermometer decoder) | 1 |

So `dout` changes 17 clocks after the update edge (counting that edge as 1),
and the DAC currents start to change 0.2 ns after the 19th (the switch-driver
delay) and settle 0.35 ns after it.
The 19-stage depth and the 190 ns switching time come from the original design.
How the stages are split among the blocks is this design's own choice. Two
things are fixed by the original: the latch before the DAC, and the latch,
decoder, latch order inside the DAC.

The phase word takes a shorter path than the tuning word. It enters at the
phase adder, so a PTW change shows on `dout` 9 clocks after the update edge. A
waveform change shows after 8.

### Pipelined accumulator

To keep every adder short enough for a 100 MHz clock, the accumulator is
split into eight 4-bit segments. Each segment adds its slice of the FTW plus
the carry that the segment below registered on the previous clock. Segment k
therefore works k clocks behind segment 0. Two sets of registers line the
segments back up:

- A skew delays FTW slice k by k clocks on the way in.
- A de-skew delays sum k by 7−k clocks on the way out.

Together they make the result exactly equal to an ordinary 32-bit accumulator
delayed by 7 clocks. Only the top 14 bits leave, because only those are used
for amplitude conversion. The segment width is the `SEG_W` parameter. Changing
it changes the pipeline depth, and with it the 19-stage total.

### Phase modulation

The 12-bit PTW is a fraction of a full turn, so it is added to the top 12 of
the 14 phase bits. The sum wraps modulo one turn.

This follows the 0.0879° resolution given for the phase word. The original
block diagram instead shows the two quadrant bits bypassing the adder. Read
literally, the offset would then stay within one quadrant, in 0.022° steps. This
design departs from that reading.

## Phase to amplitude: the compressed sine

This is the least obvious part of the design.

**Quarter-wave symmetry.** The 14-bit phase p is read as follows:

| bits | role |
|---|---|
| `p[13]` | the sign of the sine |
| `p[12]` | whether the phase runs up or down through the quarter wave |
| `p[11:0]` | position within the quarter wave |

When `p[12]` is 1, the low 12 bits are complemented. Each step x of the quarter
wave stands for the angle (x + ½)·π/8192. With that half-step offset,
complementing x gives exactly π/2 minus the angle. Folding therefore needs
no +1 correction, and the two halves of the wave are exact mirror images.

**Sunderland split.** The folded 12-bit phase is cut into three 4-bit fields,
A, B and C. The identity sin(a+b) = sin a·cos b + cos a·sin b, with b small, is
approximated as sin a + cos a·sin b:

    coarse[A,B]  = round(511 · sin((256A + 16B + 8)·π/8192))                 256 × 9 bits
    fine[H,C]    = round(2044 · cos((1024H + 512)·π/8192) · sin((C − 7.5)·π/8192))
                   with H = A[3:2]                                            64 × 4 bits, signed
    magnitude    = clip((4·coarse + fine + 2) >> 2, 0, 511)

The coarse value is the sine at the centre of a group of 16 phase steps. The
fine value is the signed correction from that centre to step C. It is stored in
quarter LSBs and ranges over −6…+6. The cosine in the fine table is taken at
the centre of one quarter of the quadrant, which is why it needs only `A[3:2]`.

Together the two tables hold 2560 bits. A full-wave table would hold
16384 × 10 = 163 840 bits, so the compression is 64:1, the figure given for the
original chip. Over all 16384 phases the magnitude is within 1 LSB of the
rounded ideal 511·|sin|. It is exact for 74 % of them.

The original chip uses a "modified Sunderland" method with a 64:1 ratio but
does not give its partition or word widths. The split above is this design's
own choice: it reaches that ratio while staying within 1 LSB.

**Output coding.** Samples are offset binary: 512 + m on the positive half
wave and 511 − m on the negative half. Mid-scale is therefore 511.5, and a
sample and the one half a period later always add up to 1023.

The tables are in `rtl/sine_coarse_rom.hex` (one 3-digit hex word per line,
address {A,B}) and `rtl/sine_fine_rom.hex` (one 4-bit two's-complement digit
per line, address {H,C}). Both are read with `$readmemh` by a path relative to
the directory the simulator or synthesis tool runs in, which must be the one
holding `rtl/`. To change the split, recompute the tables from the formulas
above.

**Other waveforms.** These come straight from the phase, after the same delay
as the sine:

- **saw-tooth**: `p[13:4]`, rising through the period, then jumping back.
- **ramp**: a triangle, `p[12:3]` in the first half period and its complement
  in the second.

The original design says only that both come "directly from the phase register".
Taking "ramp" to mean the triangle is this design's reading.

**Random**: a 23-bit LFSR with polynomial x^23 + x^18 + 1 (seed 0x5A5A5 after
reset). It is stepped 10 times per clock, so every sample is 10 fresh bits. It
runs independently of the tuning word.

## DAC

`dac10` follows a 6/4 segmented current-steering architecture:

- The six MSBs are decoded into 63 thermometer bits, one for each identical
  16-LSB current source.
- The four LSBs switch binary-weighted 1, 2, 4 and 8 LSB sources.
- A latch before the decoder and one after it make all 67 switches change on
  the same edge.
- An assertion in `dac_digital` checks that the latched controls are always a
  thermometer code.

Each cell steers its current to `ioutp` when its control bit is 1 and to
`ioutn` otherwise. In silicon a cell is a long-channel PMOS cascode source with
a minimum-length PMOS differential switch pair. An NMOS driver makes the two
complementary switch controls asymmetric: turning a switch on is fast and
turning it off is slow. On every transition, therefore, the new switch closes
before the old one opens. For a moment both conduct, and the current source is
never left without a path, which keeps glitches small.

`current_steering_cell` models exactly this timing:

- The closing switch closes 0.2 ns after the control edge. That is the driver
  delay quoted for the circuit.
- The opening switch opens 0.35 ns after the edge. This figure is an assumption:
  only "slower than turn-on" is specified.

`current_steering_array` instantiates the 67 cells. It gives a cell with both
switches closed half its current on each side. So `ioutp + ioutn` stays at 1023
LSB currents at every instant, and during the overlap `ioutp` sits halfway
between the old and the new code. An assertion flags any cell with both
switches open. Matching, output impedance and glitch energy are not modelled.

The bias generator's model works as follows:

- The reference current is `iref = vref / rext`.
- The cells' LSB current is `iref1 = 0.0282 · iref`.
- `iref2` is a copy of `iref`.
- In power-down, all of them are zero.

With `vref` = 1.2 V and `rext` = 1 kΩ the LSB current is 33.84 µA. That
matches the 0.846 mV per LSB into 25 Ω specified for the original chip.
The 1.2 V, the 1 kΩ and the mirror ratio are this design's assumptions.

Power-down is bit 2 of the control word. It switches off only the DAC bias:
the digital part keeps running, and `dout` stays valid.

## Simulating

Every testbench is self-checking and ends with a
`TB_RESULT checks=N failures=M` line. Run from the directory that contains
`rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        --top-module tb_afg_top -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/afg_pkg.sv tb/afg_ref_pkg.sv tb/tb_afg_top.sv
    ./obj_dir/Vtb_afg_top

Replace `tb_afg_top` with any `tb/tb_<module>.sv` to test one block.
`tb/afg_ref_pkg.sv` holds the reference waveform functions that the system-level
tests share.

`tb_afg_top` runs the whole chip at its default size, with no parameter
overrides. It drives the bus the way a microcontroller would. A cycle-level
model predicts every `dout` sample and every DAC current. Sine samples must be
within 1 LSB. Triangle, saw-tooth, random and the currents must match exactly.

The test also checks:

- 19 clocks from `update` to a DAC change
- 40, 500 and 700 zero crossings in 2000 clocks for 2 MHz, 25 MHz and 35 MHz
- a 90° phase step
- every waveform
- power-down
- 40 random reconfigurations

It counts how often each mechanism occurred:

- frequency switches
- phase changes
- waveform switches
- power-down cycles
- accumulator wraps
- samples of each waveform
- writes made while the generator was running

A mechanism that never occurred counts as a failure. The test takes well
under a second.

`tb_afg_spectrum` measures spectral purity. It programs sines of about
2, 10, 25 and 35 MHz and records 4096 samples of `ioutp − ioutn` for each. The
tuning word is k·2^20, so that exactly k periods fit in the record. A direct DFT
then gives the spurious-free dynamic range. With ideal current cells the
result is 63.3 dBc at every frequency. That is the limit set by 10-bit
amplitude quantization and the compressed sine, and the test requires at least
45 dBc. On real silicon the analog DAC dominates: the original chip measured
better than 45 dBc.

The block tests compare each block with an independent model:

| block | compared with |
|---|---|
| `sine_lut` | `$sin` over the full circle, for all 16384 phases, with no folding in the model |
| `phase_accumulator` | a plain 32-bit accumulator |
| `lfsr_noise` | a bit-serial model of the sequence |
| ROMs | their formulas, entry by entry |
| DAC pieces | the code ↔ current relation |

## Synthesis

`dds_core` synthesizes to about 454 flip-flops, plus the two ROMs as
initialised memories. The sizes of the parts are:

| part | flip-flops |
|---|---|
| accumulator with its skew registers | 175 |
| phase-to-amplitude converter | 171 |
| input and active registers | 2 × 47 |

`dac_digital` adds 77 flip-flops and a 63-output comparator decoder. The
analog models (`bias_generator`, `current_steering_array`, and `dac10` and
`afg_top`, which contain them) use `real` ports and are for simulation only.

## Departures and limits

- **Phase word.** It is added across the full turn, not only within a
  quadrant as the original block diagram suggests (see *Phase modulation*).
- **ROM partition, output coding and half-step phase offset.** These are this
  design's own choices. The 64:1 ratio is met.
- **Update rate.** The original chip quotes a maximum update rate of 38 MS/s
  without saying how the interface achieves it. Here one byte or one update is
  accepted per clock, so a full 7-byte reload plus update takes 8 clocks.
- **Clock generator.** It is not modelled.
- **Analog behaviour.** The analog behaviour that sets the published spectral
  figures is outside what RTL can show: the > 45 dBc SFDR, the −115 dBc/Hz phase
  noise and the glitch behaviour all come from the DAC circuit and layout.
- **Reset.** An asynchronous active-low reset clears all registers. The
  generator then idles at frequency 0, phase 0, sine, powered up. Once the
  pipeline has filled, `dout` sits at mid-scale (512).
