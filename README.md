# 76-channel lock-in read-out for broadband stimulated Raman spectroscopy

Broadband stimulated Raman scattering (SRS) measures a whole vibrational
spectrum at once. A broadband pump beam and a narrow-band Stokes beam hit the
sample. The Stokes beam is switched on and off at a modulation frequency
`f_m` of 1-10 MHz. The pump light that leaves the sample is spread over a
photodiode array, so each photodiode sees one Raman line. The Raman effect
shows up as a modulation of a few parts per million at `f_m` on top of a
large, noisy DC level. A lock-in amplifier per photodiode pulls it out.

This RTL is the digital part of a 76-channel instrument of that kind. Ten
plug-in modules each hold an 8-channel analog front-end IC and a 16-channel
16-bit ADC. The IC amplifies the signal and reference photocurrents, balances
them, subtracts them and demodulates them with an on-chip mixer. An FPGA then
finishes the lock-in in the digital domain for all 76 channels in parallel.
The RTL covers:

* the FPGA firmware: ADC read-out, clock-domain crossing, reference
  synthesis, 76 DSP lanes and the IC configuration link;
* the digital blocks inside each custom IC: the configuration shift
  registers, and a behavioural model of the mixer clock generator.

## The main idea: two-step down-conversion

An analog mixer that demodulates straight to DC adds its own slow offset
drift to the result. That drift is a few mV over ten minutes, far above a
ppm-level Raman signal. So the design does not let the analog mixer go to
DC:

1. The IC mixer is driven at `f_dm1 = f_m + f_mid`. The Raman signal comes
   out at a low intermediate frequency `f_mid` (a few kHz), next to the
   mixer's offset `V_os`, which sits at DC.
2. The ADC samples that. In each lane the FPGA multiplies every sample by a
   sine at `f_dm2 = f_mid`. The Raman signal moves to DC, and the analog
   offset moves up to `f_mid`.
3. A first-order low-pass filter sets the lock-in bandwidth.
4. An integrate-and-dump stage then sums exactly one period of `f_mid`.
   Its frequency response has zeros at every multiple of `f_mid`, so it
   removes the offset (now at `f_mid`) and the `2*f_mid` product of step 2.

The price is a factor sqrt(2) in SNR, because the second mixing folds noise
from both sidebands. So this mode pays off only for slow, long
measurements, where drift is what limits resolution. For fast measurements,
*direct mode* sets `f_dm1 = f_m`, and the lane's multiplier is bypassed
(`two_step_en = 0`).

The three reference frequencies must stay locked together. The `dds` has
one phase accumulator for `f_m` and one for `f_dm1`, both on the 64 MHz
clock. The sine's phase is not a third accumulator: it is the difference of
the two (`phase_dm1 - phase_m`). That way `f_dm2` equals `f_dm1 - f_m`
exactly, at every tuning word, and never drifts against the two square waves.

## Data path and clocks

```
             clk_spi (40 MHz)          |            clk_dsp (64 MHz)
 ADC m --SDO--> spi_adc_rx --words--> async_fifo --> lane router --> dsp_channel x76 --> res[l]
        <-CS_n-                        (Gray ptrs)   (module m,        demodulator
                                                      ch c -> lane       iir_lpf
                                                      8m+c)              gated_integrator
                                                           dds --sine--^   |
                                                           dds --f_m----> mod_clk (optical modulator)
                                                           dds --f_dm1--> dm1_clk -> mixer_clkgen (per IC)
 cfg_serializer --sclk/sdi[m]/load--> asic_cfg_shiftreg (per IC) --> ic_cfg
```

**ADC read-out (`spi_adc_rx`, one per module).** The 40 MHz clock is the SPI
clock. It is forwarded to the ADC, and one bit arrives per cycle. A frame
works like this:

* `CS_n` stays high for `CONV_CYCLES` (64) clocks while the ADC converts.
* `CS_n` then goes low for 256 clocks. That is 16 channels of 16 bits,
  channel 0 first, MSB first, in two's complement.

The ADC changes SDO on the falling edge, and the reader samples it on the
rising edge. One frame is 320 clocks, which gives 125 kS/s per channel.
After each 16th bit the reader emits a `{chan, data}` word.

**Clock-domain crossing (`async_fifo`, one per module).** This is a standard
two-clock FIFO, 16 words deep. Its pointers cross domains in Gray code
through two flip-flops. The read side pops a word whenever the FIFO is not
empty, and the writer fills at most one word per 16 SPI clocks, so the
FIFO never holds more than one or two words. An overflow would set the
sticky `cdc_overflow` flag.

**Lane routing.** ADC channels 0..7 of module `m` carry the AC (demodulated)
outputs of IC channels 0..7 and go to lane `8*m + c`. The tenth module
feeds only lanes 72..75, which makes 76 lanes in all. ADC channels 8..15
carry the IC's DC outputs, used by the host to normalise the Raman signal to
the average light level. The last value of every ADC channel, AC and DC, is
held in `mon_sample`.

**Lane (`dsp_channel`).** Each lane works only when one of its own samples
arrives, once every 512 DSP clocks, so plain registers and two multipliers
are enough:

| stage | operation | output width | latency |
|---|---|---|---|
| `demodulator` | `y = x * sine` (two-step) or `y = x * 2^15` (direct) | 32 | 1 clk |
| `iir_lpf` | `y += a * (x - y)`, `a = lpf_coef / 2^16`, one multiplier, 16 extra state fraction bits | 32 | 1 clk |
| `gated_integrator` | sum of `gi_len` samples, then restart | 48 | 1 clk after the `gi_len`-th |

Scaling: the sine is Q1.15 with a peak of 32767. Consider an input tone
`A*sin(2*pi*f_mid*t)` in phase with the DDS sine. In two-step mode the
tone gives `gi_len * A * 32767 / 2` per result. In direct mode a DC input
`x` gives `gi_len * x * 32768`. The -3 dB bandwidth of the IIR is about
`a * f_s / (2*pi)`, with `f_s` the ADC sample rate.

The instrument's "fast acquisition" mode (a spectrum in under 100 us) and
"high-resolution" mode (milliseconds) use the same hardware with different
settings. For example, at 125 kS/s:

* fast: `gi_len = 12` gives a spectrum every 96 us;
* high-resolution: `gi_len = 125` gives a spectrum every millisecond.

In two-step mode `gi_len` must be `f_s / f_mid`, a whole number, for the
notches to land on `f_mid` and `2*f_mid`. For example, with `f_s = 125` kHz
and `f_mid = 2.5` kHz, `gi_len = 50`.

## Reference and tuning

All frequencies are set through 32-bit tuning words:
`f = ftw * 64 MHz / 2^32`, with a resolution of 0.0149 Hz.

* `mod_clk`: MSB of the `f_m` accumulator. It drives the Stokes modulator.
* `dm1_clk`: MSB of the `f_dm1` accumulator. It drives the IC mixers.
* `sine`: quarter-wave table of 256 entries, indexed by the top 10 bits of
  `phase_dm1 - phase_m`. Entry `i` is `round(32767 * sin((i + 0.5) * pi / 512))`.
  The table is computed during elaboration by a fixed-point Taylor series,
  and its error is at most 1 LSB. The output comes 2 clocks after the phase.

`phase_clr` restarts both accumulators together. Example settings:

| setting | `ftw_m` | `ftw_dm1` |
|---|---|---|
| `f_m = 1 MHz`, `f_mid = 2.5 kHz` | 67108864 | 67276636 |
| direct mode | `ftw_m` | equal to `ftw_m` |

The square waves are accumulator MSBs, so their edges fall on the 64 MHz
grid: 15.6 ns of jitter. At the top of the 1-10 MHz range that is a large
part of a period. A board with a cleaner clock synthesiser would replace
these two outputs. The sine, the part that matters for the second
demodulation, is unaffected.

Each sample is multiplied by the sine value of the moment it reaches its
lane. ADC channel `c` arrives about `16*(c+1)` SPI clocks after the
conversion, so the lanes see a small phase lag. At `f_mid = 2.5` kHz that is
about 6 degrees for the last channel, and the tone amplitude shrinks by
`cos(lag)`, under 0.6 %. Phase calibration, if needed, belongs to the host.

## Custom IC digital blocks

**Configuration (`cfg_serializer` -> `asic_cfg_shiftreg`).** Each IC has a
configuration register per channel, `CFG_BITS = 8` bits here. The registers
form one serial chain per IC.

* The FPGA drives a shared clock `cfg_sclk`, which runs at `clk_dsp / (2*CFG_DIV)`.
* The FPGA also drives a shared `cfg_load` and one data line per IC.
* A load shifts `8*CFG_BITS` bits: channel 7 first, MSB first.
* One extra clock edge with `cfg_load` high then copies the chain into the
  registers that drive the analog channel. The analog settings therefore
  change once, not bit by bit.

A full load takes `(8*CFG_BITS + 1) * 2*CFG_DIV` DSP clocks. The meaning of
the bits (gains, bias trims and so on) is not defined here. `ic_cfg` shows
what each IC holds.

**Mixer clocks (`mixer_clkgen`, behavioural).** The IC's passive
double-balanced mixer is four transmission gates. Two non-overlapping phases
and their complements drive them. Each phase is the AND of the clock (or its
inverse) and a copy delayed by `DEAD`, so one pair opens before the other
closes. The model uses a simulation delay, so it is not synthesisable logic.
In silicon it is a delay chain.

## What is outside the RTL

The analog front end is not modelled:

* transimpedance amplifiers with DC-current feedback;
* AGC loop of VGAs, peak stretchers and integrator;
* subtractor stages and the mixer switches themselves;
* off-chip filter.

Also outside are:

* the photodiode arrays and the ADC chips;
* the DAC for the VGA control voltage;
* the DAC and ADC for the microscope's X/Y/Z scan;
* the FPGA clock manager and the USB 3.0 link to the PC.

All of their signals are ports of `crimson_top`. Two further ports need a
source in a real system:

* run-time settings: tuning words, `lpf_coef`, `gi_len`, mode and clears;
* clocks: `clk_spi` at 40 MHz and `clk_dsp` at 64 MHz.

They would come from a host register block and a clock manager.

## Choices that are this design's own

The block structure follows the platform, and so do these facts:

* 76 lanes, 10 modules, 8 channels per IC;
* 16-channel 16-bit SPI ADCs;
* the 40 MHz and 64 MHz clocks and a two-clock FIFO between them;
* a DDS with a sine and two square outputs;
* multiplier, then one-multiplier first-order IIR, then integrator with
  notches at `k*f_mid`;
* `f_dm2 = f_mid = f_dm1 - f_m`;
* a shift register per IC channel and four non-overlapping mixer clocks.

Chosen here:

* the ADC frame format and conversion gap (`CONV_CYCLES`, and with it the
  125 kS/s rate);
* the assignment of ADC channels to AC and DC outputs, and the lane
  numbering;
* all word widths, and the coefficient format `Q0.16`;
* integrate-and-dump as the integrator;
* deriving the sine phase from the two accumulators;
* FIFO depth, configuration protocol and width, and reset synchronisers.

The IC's mixer clocks are generated from the FPGA's `dm1_clk`. The IC can
also be described as deriving them from the external (laser) clock, but
two-step mode needs `f_dm1` to differ from the laser-locked `f_m`, so here
the IC is clocked by the synthesised `f_dm1`, which is what the platform's
block diagram shows.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `crimson_pkg` | `N_MODULES`, `CH_PER_IC`, `N_LANES` | 10, 8, 76 | platform size |
| `crimson_pkg` | `ADC_CHANNELS`, `ADC_BITS` | 16, 16 | module ADC |
| `crimson_pkg` | `SINE_BITS`, `PHASE_BITS`, `COEF_BITS`, `GI_CNT_BITS` | 16, 32, 16, 16 | DSP widths |
| `crimson_top` | `CONV_CYCLES` | 64 | SPI clocks with CS_n high per frame |
| `crimson_top` | `FIFO_AW` | 4 | log2 CDC FIFO depth |
| `crimson_top` | `CFG_BITS`, `CFG_DIV` | 8, 4 | IC configuration width and clock divider |
| `crimson_top` | `MIX_DEAD` | 2 | mixer dead time (model, time units) |
| `dds` | `LUT_ABITS` | 8 | quarter-wave table address bits |

After synthesis, the top at its defaults comes to:

* about 3,700 word-level cells;
* 20,500 flip-flop bits;
* 7,300 memory bits: the sine table and ten FIFOs;
* two multipliers per lane in the RTL, 152 in all.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/adc_spi_model.sv` is
a behavioural ADC used by the read-out tests. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/crimson_pkg.sv tb/tb_crimson_top.sv --top-module tb_crimson_top -o sim
./obj_dir/sim
```

Replace `tb_crimson_top` with any other `tb_<module>`.

`tb_crimson_top` runs the whole design at its default sizes, all 76 lanes
and ten ADC models, in about 4 ms of simulated time (a few seconds to run).
It checks:

* a configuration load into all ten ICs;
* direct mode: every lane's result is bit-exact against `gi_len * x * 2^15`;
* two-step mode: each lane gets an offset plus a tone at `f_mid`. Each
  result is within -3 %/+1 % of `gi_len * A * 32767 / 2`;
* two-step mode: offset alone is suppressed below 1 % of full scale;
* the DC-channel monitor;
* that the reference and mixer clocks toggle.

`tb_offset_drift` runs the whole design as a bench test of drift rejection.
It feeds a line of 328 LSB on an offset that drifts by 40 LSB in 3.2 ms,
and compares eight consecutive results in each mode, scaled to ADC LSB:

| mode | mean | spread of the eight results |
|---|---|---|
| direct | 357.9 | 35.0 (follows the drift) |
| two-step | 326.4 | 0.31 |

The block testbenches check each unit against models in the testbench:

* a floating-point reference for the IIR and the whole lane;
* `$sin` for the DDS table;
* a queue for the FIFO;
* exact latency and frame timing for the SPI reader and the serialiser.

Not verified: behaviour with real ADC timing margins, and FIFO
metastability (the simulator has no X).
