# Voice link with echo and reverb

Two FPGAs carry a voice signal over a three-wire serial link and add an echo
or a reverb on the way. The master FPGA samples the voice with a two-channel
14-bit SPI ADC (LTC1407A-1), keeps 12 bits, halves the sample rate, and mixes
each sample with delayed copies of earlier samples held in a 4096 × 12 block
RAM. It then sends the result in a 28-bit frame: fifteen ones, a zero, and
the 12 data bits. The slave FPGA watches the incoming bit stream for that
pattern, takes the 12 bits behind it, and writes them to a 12-bit SPI DAC
(LTC2624). A small separate design that plays a stored sine period to the DAC
is included for bringing up the DAC on its own.

The design targets a Spartan-3E class board with a 50 MHz clock. The analog
parts (signal source, programmable pre-amplifier, the ADC and DAC chips, the
output amplifier and speaker) are outside the RTL. The ADC and DAC appear in
the testbenches as behavioural models of their SPI pins.

```
                 master_fpga (clk_m)                                  slave_fpga (clk_s)
 ADC pins  ┌───────────┐  25 kHz  ┌──────────┐ 12.5 kHz ┌────────────┐  ┌──────────┐ link_clk ┌──────────┐  ┌────────────┐  DAC pins
 ─────────►│adc_spi_rx │─────────►│downsample│─────────►│effect_unit │─►│ frame_tx │─────────►│ frame_rx │─►│ dac_spi_tx │─────────►
 ◄─────────│ AD_CONV,  │ 12 bit   │   ÷2     │          │ + delay_ram│  │ 28-bit   │link_data │ 28-bit   │  │ 32-bit SPI │
           │ SCK, MISO │          └──────────┘          │ 4096 × 12  │  │ frames   │ (+ GND)  │ register │  │ word       │
           └───────────┘                                └────────────┘  └──────────┘          └──────────┘  └────────────┘
                                                                                  sine_dac_test (separate DAC bring-up design)
```

## Sample rates and delays

This is the part that fixes every number in the effect path.

| Point in the chain             | Rate      | Clocks per sample (50 MHz) |
|--------------------------------|-----------|----------------------------|
| ADC conversions (`AD_CONV`)    | 25 kHz    | 2000                       |
| Delay line, frames, DAC updates| 12.5 kHz  | 4000                       |

The effect delays are set in seconds:

| Effect, mode        | Delays (s)                   | Gains                 | Delays (samples at 12.5 kHz) |
|---------------------|------------------------------|-----------------------|------------------------------|
| Echo, mode 1        | 0.32                         | 1                     | 4000                         |
| Echo, mode 2        | 0.128                        | 1                     | 1600                         |
| Reverb, mode 1      | 0.04, 0.08, 0.16, 0.32       | 1/2, 1/4, 1/8, 1/16   | 500, 1000, 2000, 4000        |
| Reverb, mode 2      | 0.016, 0.032, 0.064, 0.128   | 1/2, 1/4, 1/8, 1/16   | 200, 400, 800, 1600          |

A delay in samples is the delay in seconds times the rate of the delay line.
At the 25 kHz ADC rate the 0.32 s delays would need 8000 words, twice the
4096-word memory. This design therefore halves the rate before the memory
(`downsample`, factor 2). At 12.5 kHz every delay fits, the longest taking
4000 of the 4096 words. The factor of two and the method (keep one sample of
each pair, with no anti-alias filter) are choices made here. The delays,
gains and memory size are the design's. The delays live in `voice_pkg`
(`tap_delay`, `tap_shift`, `tap_count`), so a different rate means editing
one table.

## The effect engine (`effect_unit`, `delay_ram`)

Both effects are FIR sums over one circular buffer:

```
echo:   y[n] = x[n] + x[n-D]
reverb: y[n] = x[n] + x[n-D1]/2 + x[n-D2]/4 + x[n-D3]/8 + x[n-D4]/16
```

`delay_ram` is a simple dual-port RAM with one write port, one synchronous
read port and read-before-write on a collision, so it maps onto block RAM.
`effect_unit` keeps a write pointer `wp`. Tap *t* is read at `wp - D_t`, which
wraps modulo 4096. When a sample is accepted, the unit:

1. Latches `x` and the `mode` and starts the accumulator at `x`.
2. For each tap, presents the address (one clock) and adds the returned word,
   arithmetically shifted right by the tap's gain exponent (one clock).
   Echo has one tap with shift 0. Reverb has four taps with shifts 1 to 4.
3. Writes `x` at `wp`, advances `wp` and outputs the sum, saturated to 12 bits.

The latency from `in_valid` to `out_valid` is 4 clocks for an echo and 10
for a reverb. `in_ready` is low during those clocks. A sample period is
4000 clocks, so the unit is idle almost all the time. Because the taps are
read one after another, one read port is enough. A parallel design would
need four ports or four RAM copies.

A gain-1 echo of two full-scale samples overflows 12 bits, so the sum is
clipped to −2048…2047. Gains are floor divisions (arithmetic shifts).

After reset the unit writes zeros to all 4096 words, one per clock. The
first delayed copies are therefore silence rather than stale RAM contents.
At the default rates this drops the first delay-line sample, which arrives
during the clear. The mode is sampled per sample. A mode change takes effect
on the next sample, and the new taps read whatever history the buffer holds.

## The ADC read-out (`adc_spi_rx`)

Every 2000 clocks the block raises `AD_CONV` for 8 clocks. The LTC1407A-1
samples both inputs on that edge. The block then runs 34 `SPI_SCK` cycles at
6.25 MHz and shifts in `SPI_MISO` on each rising edge. The word is: 2 idle
bits, channel 0 (14 bits, MSB first), 2 idle bits, channel 1, 2 idle bits.
The converter returns the result of the *previous* `AD_CONV`, so the data are
one sample late. That latency, the bit layout and the channel order follow
the converter's timing diagram. The 34-cycle count is read from the idle
cells around the two fields. The results are taken as two's complement.
The voice is taken from channel 0, upper 12 bits. The SCK rate and the
rising-edge sampling are choices made here. The pre-amplifier gain is not
programmed by this RTL.

## The inter-FPGA link (`frame_tx`, `frame_rx`)

The link has three wires: clock, data and ground. The master drives a
free-running 1 MHz link clock (`CLK_HALF` = 25). Data change after the
falling edge and are sampled on the rising edge. A frame is

```
 first bit                                                       last bit
 1 1 1 1 1 1 1 1 1 1 1 1 1 1 1   0   d11 d10 ... d0
 └──────── 15 ones ─────────┘ zero   └─ 12 data bits ─┘      (28 bits)
```

and the line idles low between frames. A frame takes 28 µs of each 80 µs
sample period. The data bits go MSB first; that order is a choice made here.

The slave runs on its own clock. It passes the link clock and data through
two-flop synchronizers, so the link clock must stay below a quarter of the
slave clock. On every rising link-clock edge it shifts the data bit into a
28-bit register. After each shift it compares the upper 16 bits with
`1111_1111_1111_1110`. On a match, the lower 12 bits are a sample.

No explicit framing state is needed. The pattern's only zero is its last
bit, and the data field (12 bits) is shorter than the run of ones (15). So
with frames sent back to back or separated by low idle bits, the pattern can
only line up at a true frame boundary. If a bit error breaks the pattern,
that frame is skipped. A flipped bit can sometimes form a shifted pattern and
produce one wrong sample; nothing corrects data bits. `frame_tx` counts
samples offered while a frame is still in flight (`drops`). `frame_rx`
counts frames taken (`frames`).

## The DAC block (`dac_spi_tx`)

Each sample becomes one 32-bit SPI word to the LTC2624, sent MSB first:

| Bits sent (first → last) | Field                                  |
|--------------------------|----------------------------------------|
| 8                        | don't care (0)                         |
| 4                        | command, `CMD` = `0011` (write and update) |
| 4                        | address, `ADDR` = `0000` (DAC A; `0001` B, `0010` C, `0011` D, `1111` all) |
| 12                       | data, unsigned, MSB first              |
| 4                        | don't care (0)                         |

`DAC_CS` stays low for 65 × `SCK_HALF` clocks (5.2 µs by default). The DAC
executes the word on its rising edge. The samples are signed and the DAC is
unsigned, so `slave_fpga` inverts the sign bit (offset binary, silence =
2048). `dac_clr_n` holds the DAC cleared during reset. The command code, the
choice of output A and the sign conversion are choices made here; the field
layout and address codes are the converter's.

## DAC bring-up design (`sine_dac_test`)

This design is independent of the link. A 64-entry ROM holds one sine
period, `round(2048 + 2047·sin(2πk/64))`. It is computed at elaboration by a
real-valued Taylor series, so no data file is needed. One entry goes to the
DAC every 2000 clocks, which gives a 390.6 Hz sine on output A. The ROM
length and the rate are choices made here.

## Files

`rtl/`:

| File                | Contents |
|---------------------|----------|
| `voice_pkg.sv`      | widths, frame pattern, `effect_mode_t`, delay/gain table |
| `adc_spi_rx.sv`     | ADC conversion timing and SPI read-out |
| `downsample.sv`     | rate ÷ `FACTOR` |
| `delay_ram.sv`      | 4096 × 12 simple dual-port RAM |
| `effect_unit.sv`    | echo / reverb controller and mixer |
| `frame_tx.sv`       | frame generator and link transmitter |
| `frame_rx.sv`       | link receiver and frame decoder |
| `dac_spi_tx.sv`     | LTC2624 SPI writer |
| `sine_dac_test.sv`  | sine ROM player for the DAC |
| `master_fpga.sv`, `slave_fpga.sv` | the two FPGAs |
| `voice_link_top.sv` | both FPGAs joined, plus the sine test beside them |

`effect_mode_t` has four values: `ECHO_M1`, `ECHO_M2`, `REVERB_M1` and
`REVERB_M2`. The top has two clocks, `clk_m` and `clk_s`, and one
asynchronous active-low reset, `rst_n`. It brings out the ADC and DAC pins,
the link wires and a few observation outputs. These are the processed
sample, the received sample and the drop and frame counters.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. It
also holds the chip models `ltc1407a_model.sv` and `ltc2624_model.sv`, and
`tb_ref_pkg.sv`, a reference model of the effects. The reference takes the
delays from the times in seconds at 12.5 kHz and does not use `voice_pkg`.
Every testbench prints `TB_RESULT checks=N failures=M` and ends with a
watchdog.

- `tb_effect_unit` covers 8500 samples in all four modes with full-scale
  random input. It checks every output, the latency and saturation.
- `tb_master_fpga` goes from ADC pins to link wires. It runs 4600 frames with
  reduced rates (`SAMPLE_DIV` = 300, `LINK_HALF` = 5) and the full memory.
- `tb_voice_link_top` runs the whole system at its defaults. The two clocks
  are 50 MHz and 49.02 MHz. The run covers 4300 processed samples (0.34 s of
  audio, about 17 M clocks, roughly 30 s of simulation), so the 0.32 s echo
  is heard. It switches through all four modes, and every DAC code is
  compared with the reference. It also counts the memory clear,
  down-sampling, both effects, saturation, the mode switches, the DAC
  updates and the sine test, and fails if any of them never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/voice_pkg.sv tb/tb_ref_pkg.sv tb/tb_voice_link_top.sv \
  --top-module tb_voice_link_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another. `tb_ref_pkg.sv` is needed only by
the testbenches that import it. The RTL is plain synthesizable SystemVerilog
with no vendor primitives. The RAM and ROM are written as arrays.

## Where this RTL goes beyond the design's description

- **Rates and sample coding.** The design gives the 50 MHz clock only
  implicitly, through the board. It gives the ADC rate only as "about
  25 kHz". The down-sampling factor, the SPI and link clock rates, two's
  complement from the ADC, offset binary to the DAC, and saturation are all
  choices made here.
- **Link.** Bit order, edges, the free-running link clock and the slave-side
  synchronizer are choices made here. The "error correction" of the link is
  only the frame-pattern check described above. Data bits are not protected.
- **Memory clear and mode input.** The clear after reset, the drop of input
  during it, and how a mode is selected (a 2-bit input) are choices made
  here.
- **Not in the RTL.** The pre-amplifier gain setting over SPI is not here;
  the design names the programmable pre-amplifier but not how it is set.
  Nor are the analog parts.
