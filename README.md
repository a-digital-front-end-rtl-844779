# FERMI: a digital front end and readout module for LHC calorimetry

A calorimeter at the LHC delivers a new sample on every channel at each bunch
crossing, every 15 ns. Those samples have to be kept on the detector until
the first and second level triggers decide which time frames are wanted.
FERMI digitises a group of channels right at the detector and does the rest
of the work digitally in the same module:

- linearises the samples;
- forms the first level trigger sum and flags pulses;
- stores every sample in a fault-tolerant pipeline memory;
- on request, reads out a time frame either in full or as filtered values.

This repository holds synthesizable SystemVerilog for the digital part of one
module. It also holds a self-checking testbench for every block and for the
whole module.

One FERMI module (`fermi_top`) has:

- **twelve acquisition channels** on three identical channel ICs of four channels each. Only nine channels are used; the fourth channel of each IC is a spare that can replace a failed channel.
- **a service part**: first level trigger, output stage and controller.

```
 analog in ─► ADC ─► LUT ─┬─────────────────────────► data memory (per IC) ◄── write pointers
 (x12)      10 bit  16 bit │                            │  ECC, 2 banks, CAM
                           ▼                            ▼
                     channel sum (per IC)        readout controller ◄── frame pointers
                           │                      FPB ─► sequencer ─► filter ─► readout register
                           ▼
                     module sum ─► integrator ─► 12-bit trigger word (global clock)
                           └──────► CFD ─► pulse / mild / severe pile-up flags
 command links ─► controller ─► every setting, LUT and filter-weight loading, clock server, alarm
```

## The acquisition channel

### Two A/D converter candidates

Two A/D converters are described for the channel. Neither is declared final,
so the digital side of both is built. `fermi_top` has a parameter
`ADC_ARCH` that selects one:

- **`ADC_ARCH = 0` (default): parallel successive approximation (`psa_adc`).**
  - A 10-bit converter is made of 12 successive-approximation channels. Each one:
    - takes *k* = 2 clocks to sample and auto-zero its comparator;
    - then takes 10 clocks for the binary search.
  - The channels are skewed by one clock each, so one finished code leaves every clock.
  - The module generates per channel:
    - the S/H and auto-zero controls;
    - the DAC code of the current trial.
  - It collects the comparator decision and the results.
  - The comparators, S/H switches and the reference ladder are analog and sit outside, on the `psa_*` ports.
  - Latency: a code is registered 10 clocks after the edge that ends its sampling.
- **`ADC_ARCH = 1`: pipeline flash.**
  - **Conversion scheme:**
    - A 5-bit flash converter produces the top bits. It carries one redundant bit.
    - A two-step subranging flash converter then handles the residue: 3 bits from 8 coarse comparators, then 3 bits from 8 fine comparators.
  - **`flash_adc_coder`** does the following:
    - registers the thermometer codes;
    - codes each bank by counting ones, which tolerates bubbles;
    - drives the LSB string select from the coarse result;
    - delays the flash result to meet its fine bits;
    - forms `flash*32 + residue − 16`, saturated to 10 bits.
  - **`adc_phase_gen`** derives all timing from a 268 MHz master clock, four ticks per 15 ns slot:
    - the comparator phases: comparison for two ticks, reset for one, auto-zero for one;
    - the phases of five interleaved subtract-and-hold circuits.
  - **SU&H phase plan:** circuit *i* samples in slot *i*. It subtracts and predicts in slot *i+2*, holds for the coarse comparison in slot *i+3* and for the fine one in slot *i+4*, all modulo 5.

### Linearisation table (`lut`)

The analog front end compresses the signal. A 1024 × 16 table per channel
holds the inverse of the whole analog transfer function and turns the 10-bit
code into a 16-bit linear sample. Latency is two clocks. The mode is set by
the controller:

| mode | behaviour |
|---|---|
| `LUT_NORMAL` | table addressed by the registered ADC code |
| `LUT_LOAD` | each write strobe puts the word in the W register; the next clock it is written at the counter address and the counter advances |
| `LUT_TEST` | the counter advances every bunch crossing and addresses the table. A pattern loaded earlier then plays back into the memory and the trigger, as if it came from the detector. |
| `LUT_BYPASS` | emergency path: the registered 10-bit code goes to the output unchanged (zero-extended) |

The bypass can also be set for single channels with a mask register. It
serves a channel whose table has failed once no spare channel is left.

## First level trigger and pulse detection

**Summation.** The trigger sum is formed in two steps.

1. `channel_sum` adds the enabled channels of one channel IC. Each channel has its own enable bit.
2. `l1_integrator` adds the three IC sums into the module sum.

**Integration.** The module sum is then integrated by a filter whose coefficients are 1 for the newest `length` samples (1–8) and 0 otherwise. It is shifted right by `shift` and limited to 12 bits; a word that would overflow saturates at 4095.

**Hand-over to the global clock.** The word is registered once in the internal clock domain. It is registered again on the global clock, whose phase differs by a programmable delay.

**Latency.** The trigger word appears on the first global edge after internal edge *X*+3, where *X* is the edge at which the newest sample in the window enters the memory.

The sum adders carry a **modulo-3 residue check**. The residue of the sum is
recomputed from the residues of the inputs and compared. A mismatch raises an
error to the controller one clock after the sum.

### Constant-fraction discriminator (`cfd`)

Pulse detection works on the module sum *s*. It forms

    c(t) = s(t − D) − F · s(t) / 16,      D = 1..3,  F = 0..15

*c* is negative on the rising edge of a pulse. It crosses zero at the same
fraction of the pulse height whatever the amplitude. A pulse is flagged on
the clock where:

- the previous *c* was negative;
- the current *c* is non-negative;
- the sum is at or above the programmed **veto** level, so noise is rejected.

Each detected pulse opens two "pulse detected" windows, one short and one
long, each with a programmable length. A further detection while the long
window is open raises the **mild pile-up** flag; while the short one is open,
the **severe pile-up** flag. The three flags are delayed by 0–7 clocks
(`align`) to line up with the trigger word. They go out with the trigger word
and are stored with every sample.

## Pipeline memory and its fault tolerance (`data_memory`)

This is the most involved block. There is one memory per channel IC.

### Write path (one word per clock)

| step | what happens |
|---|---|
| 1 | Each of the four 18-bit channel words (16-bit sample, pulse flag, pile-up flag) may be replaced by a diagnostic word. |
| 2 | The **crossover switch** (`crossover_switch`) drops the channel marked as left out and packs the other three into 54 bits. Lanes below the left-out channel take their own channel; the others take the next channel up. |
| 3 | A SEC-DED (extended Hamming) encoder widens the 54 bits to 61. |
| 4 | The **write pointer** comes from the external address generator as a 15-bit SEC-DED code word around a 10-bit address. It is registered, corrected and registered again. A diagnostic counter can replace it. |
| 5 | The word is written two clocks after it is presented. |

### Two toggling banks and the odd/even check

The memory is two single-port banks, selected by the address LSB. Successive
writes must therefore alternate even and odd addresses. A flip-flop toggles
with every write and is compared with the LSB of each pointer. A mismatch
means the address generator misbehaves and sets a status bit.

A read is accepted (`rd_ready`) in any clock where it targets the bank that
is not being written. Because writes alternate, a read waits at most one
clock. Read data and its error bits follow two clocks after acceptance.

### Associative memory (`assoc_memory`)

A 10-cell, two-port associative memory stands in for faulty locations. An
address can be entered into it in two ways:

- by the controller;
- automatically, when a read finds an uncorrectable word.

From then on, writes and reads of that address go to the cell.

### Duplication and status

The pointer decoder and the data encoder are built twice and compared.
A spy register keeps the last raw code word read. Sticky status bits:

| bit | meaning |
|---|---|
| 0 | corrected data error |
| 1 | uncorrectable data error |
| 2 | corrected pointer error |
| 3 | uncorrectable pointer error |
| 4 | odd/even mismatch |
| 5 | duplicate mismatch |
| 6 | associative memory full |

## Output stage (`readout_controller`, `digital_filter`)

**Loading a frame.**
- The pointers of a requested time frame arrive one per `pstrobe`, SEC-DED coded.
- They are corrected and go into a 16-entry frame pointer buffer.
- `load` ends the set, latches the mode and starts the readout at once.

**Readout.** The sequencer walks through the nine active channels. For each
channel it reads all pointers of the frame.

- **Full mode:** every sample is placed in the 32-bit readout register, one datum at a time. The sequencer waits for `strobe`, which says the register has been read, before it produces the next datum. The word is `{channel[3:0], 7'b0, pointer uncorrectable, memory uncorrectable, memory corrected, word[17:0]}`.
- **Filtered mode:** the samples go through the inner-product filter with weight bank 0 or 1. Only one result per channel is output: `{channel[3:0], result[27:0]}`, with `ro_filt` set.

The filter holds two banks of up to 16 signed 8-bit weights. Each weight is
stored with its residue modulo 3.

**Skew form.** The filter works in *skew form*: bit *j* of a word travels
*j* clocks behind bit 0.

**Multiplier.** The multiplier is a pipelined array of carry-save rows, one
clock per row.
- The sample word travels down the rows in parallel.
- Row *k* adds the sample, shifted by *k*, when weight bit *k* is set. The weight's sign bit subtracts.
- No later row touches bit *k* of the product, so that bit is final after row *k*.
- The product therefore leaves in skew form.
- Rows beyond the weight width only resolve the remaining carries, one bit per row.

**Accumulator.** The accumulator is a column of bit slices.
- Each slice is one full adder with a sum flip-flop and a carry flip-flop.
- Slice *j* adds three things: its held sum bit, product bit *j* from multiplier row *j*, and the carry that slice *j−1* produced one clock earlier.
- A carry therefore climbs one slice per clock and meets the bits of its own product there.
- No carry chain in the filter is longer than one bit, whatever the word width.

The clear and last-sample marks of a frame ride along the same diagonal.
The result bits are de-skewed by delay lines and leave together.

**Latency.** The latency follows the rule L = n_bits + log2 N. With 24-bit
products and 16 samples the result leaves 28 clocks after the last sample.

**Residue check.** In parallel, the residues of weights and samples are
multiplied and added modulo 3. If the residue of the result disagrees,
`ro_err` is raised. This catches faults in the weights, the multiplier or
the accumulator.

Diagnostic registers can replace the pointers and the memory data, to test
the output path on its own.

## Controller (`fermi_controller`)

Commands arrive on a main serial link and a back-up link with the same
command set.

**Frame format.** Each frame is 25 bits, sent MSB first while the link's
`valid` is high:
- an 8-bit register address;
- 16 data bits;
- an even parity bit.

**Error handling.**
- A bad frame is dropped and counted in `link_err`.
- A gap in `valid` restarts the frame.
- When both links complete a frame in the same clock, the main link wins.

**Timing.** A register changes two clocks after the last bit of its frame.

| addr | bits | function |
|---|---|---|
| 0x00 | [1:0] mode, [5:2] channel (15 = all) | LUT mode of all channels, and the channel that table writes go to |
| 0x01 | [11:0] | per-channel LUT bypass |
| 0x02 | [15:0] | LUT word, written through W |
| 0x03 | – | LUT counter clear |
| 0x04 | [11:0] | trigger-sum channel enables |
| 0x05 | [5:0] | left-out channel of each IC, 2 bits per IC |
| 0x06 | [3:0] length, [8:4] shift | integrator |
| 0x07 | [1:0] D, [5:2] F, [8:6] align | CFD |
| 0x08 | [15:0] | CFD veto level |
| 0x09 | [5:0] short, [11:6] long | pile-up windows |
| 0x0A | [3:0] diag word select, [4] counter addressing, [5] readout data diag, [6] pointer diag | diagnostics |
| 0x0B | – | clear memory status |
| 0x0C | [15:0] | diagnostic sample |
| 0x0D | [9:0] address, [11:10] IC | enter a faulty address |
| 0x0E | [14:0] | diagnostic pointer code |
| 0x10 | [7:0] weight, [8] bank, [12:9] index | filter weight; the residue is computed here |
| 0x11 | [11:0] | calibration amplitude; fires a calibration pulse |
| 0x12 | [15:0] | DC level of the analog inputs |
| 0x13 | [0] | clock enable |
| 0x14 | [15:0] | clock burst of this many clocks |
| 0x15 | [7:0] | clock phase setting |

**Clock server.** It gates acquisition (`acq_en`): the memory is written only
while the clock is enabled or a burst is running.

**Alarm.** The controller ORs the module's error reports into a sticky
`alarm`. The reports are:
- sum residue error;
- uncorrectable memory word;
- odd/even mismatch;
- duplicate mismatch;
- associative memory full;
- uncorrectable pointer;
- filter residue error;
- link errors.

## Timing summary (internal 67 MHz clock)

| path | latency |
|---|---|
| analog sample (edge ending S/H) → memory write edge | 13 clocks (PSA: 10 conversion + 1 output + 2 LUT) |
| newest sample's write edge → trigger word | 3 internal clocks + next global edge |
| CFD flag after the sample that completes the zero crossing | align + 3 clocks |
| read accepted → data | 2 clocks |
| last filter input → filter result | 28 clocks |

## Where this design goes beyond, or departs from, the description

**Sizes chosen here:**
- The memory holds 1024 words (10-bit address). The required depth depends on the trigger latency, for which no number is given.
- The frame pointer buffer holds 16 pointers.
- Filter weights are 8 bits wide.
- Pile-up windows are up to 63 clocks, and the integration window up to 8 samples.

**Formats chosen here:** the command-frame format, the register map and the
32-bit readout word layout.

**Behaviour chosen here:**
- The exact CFD formula and the sense of its comparisons.
- Saturation at 12 bits in the integrator.
- Automatic marking of bad addresses in the associative memory.
- The read/write arbitration of the memory banks.

**Not built to the letter:**
- In the filter, the weight bits are held with the sample in each multiplier row; they are not delivered skewed from the weight memory. The latency rule's bit count is read as the product width.
- The flags stored with a sample are those produced in the same clock. They belong to a sum several clocks older; whoever reads the memory removes that fixed offset.

**Alternatives not built:** the document also mentions options it does not
choose:
- a general digital filter in place of the 1/0 integrator;
- an adder/convolver for the first level trigger.

**Outside this RTL:**
- the analog compressor;
- the comparators, S/H circuits and DACs of both converters;
- the DC level DAC;
- the calibration pulse generator;
- the external address generator;
- the board-level controller with its optical links.

For the DC level DAC and the calibration pulser, only their settings leave the module as ports.

## Files

Each `rtl/` file has a header comment that describes the block's interface
and timing.

| file | content |
|---|---|
| `rtl/fermi_pkg.sv` | sizes, flag and word structs, mode enums, Hamming and modulo-3 helpers |
| `rtl/fermi_top.sv` | the module |
| `rtl/psa_adc.sv`, `rtl/flash_adc_coder.sv`, `rtl/adc_phase_gen.sv` | converter logic |
| `rtl/lut.sv`, `rtl/channel_sum.sv`, `rtl/l1_integrator.sv`, `rtl/cfd.sv` | channel and trigger path |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv`, `rtl/crossover_switch.sv`, `rtl/assoc_memory.sv`, `rtl/data_memory.sv` | memory |
| `rtl/readout_controller.sv`, `rtl/digital_filter.sv` | output stage |
| `rtl/fermi_controller.sv` | controller |
| `tb/tb_<block>.sv` | self-checking testbench of each block |

## Simulating

Every testbench checks the block against values it computes itself. Each
one ends by printing `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/fermi_pkg.sv tb/tb_fermi_top.sv \
          --top-module tb_fermi_top -Mdir obj_top -o sim
./obj_top/sim
```

Substitute any other `tb_<block>` for `tb_fermi_top`.

`tb_fermi_top` runs the whole module at its default size, with twelve PSA
converters, for 40 000 clocks. It takes about 10 s.

**Models used.** The testbench supplies behavioural models of:
- the analog converter front end: a random pulse train, scaled per channel, sampled by each SA channel's S/H and compared with its DAC code;
- the address generator: sequential coded pointers, one in 61 with a flipped bit;
- the external readout controller.

**Checks.**
- It loads all twelve tables over the command link and programs the module.
- It checks all ~10 800 trigger words exactly.
- It reads six time frames, alternating full and filtered mode, and checks every word.
- It fails if any of these never happened:
  - trigger saturation;
  - pulse, mild and severe pile-up flags;
  - both readout modes;
  - read stalls;
  - corrected pointers.

`tb_fermi_top_flash` runs the same module with `ADC_ARCH = 1`.

**Flash converter model.** Each channel's comparator banks are driven by a
model:
- the flash bank sees each sample with a threshold error of up to ±15 LSB, which the redundant bit must correct;
- the coarse bank sees the residue three slots later;
- the fine bank compares that residue against the resistor string the module's LSB switch control selects.

**What the run exercises.** Besides the trigger and readout checks above, it
covers:
- the emergency table bypass;
- test-pattern playback: every channel must deliver consecutive table entries;
- a calibration pulse.
