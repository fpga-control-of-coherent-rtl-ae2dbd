# FPGA control firmware for coherent pulse stacking

Coherent pulse stacking (CPS) gets high pulse energy out of fiber lasers.
A 400 MHz oscillator pulse train is cut into a short burst (13 pulses here)
by an amplitude modulator (AM), and a phase modulator (PM) gives each pulse a
prescribed phase. Reflecting resonant cavities then store the early pulses
and release all the energy together with the last pulse. This only works
while two things hold:

* the AM, a LiNbO3 Mach-Zehnder, sits exactly at the minimum of its
  transfer function between bursts. Its bias drifts with temperature.
* each cavity's round-trip phase stays at its own prescribed value. The
  cavity mirrors sit on PZTs, and acoustic and thermal noise move them.

This firmware closes both loops once per kHz trigger. It works on the fast
ADC and DAC streams of a 400 MS/s converter card, which the FPGA sees as
8-sample words at 50 MHz, and it drives the AM bias and the cavity PZTs
through an AD5628 octal 12-bit slow DAC over SPI. All logic is
synthesizable SystemVerilog in `rtl/`. Self-checking testbenches in `tb/`
include an end-to-end test with models of the modulator, two cavities and
the slow DAC.

The structure follows the published description of FPGA control for CPS.
That system used an ML605 (Virtex-6) board, an FMC110 card (ADS5400 ADC,
DAC5681Z DAC), an XM105 card with an AD5628 and an analog switch, and a
Gigabit-Ethernet link to a host. It gives the blocks, the data flow and the
control laws. Widths, handshakes, register layout and timing details are
this design's own choices; each module's header says which is which.

## Data format and timing

| quantity | value | origin |
|---|---|---|
| fast ADC sample | 12 bits in a 16-bit lane (4 + 12), signed | described |
| stream word | 8 lanes = 128 bits, lane 0 the oldest sample, one word per 50 MHz cycle | described (8 samples per word) |
| processing clock | 50 MHz, single clock for all logic | clock described, single domain is this design's |
| trigger | kHz; the rising edge starts one iteration | described |
| iteration budget | 50 000 cycles (one 1 kHz period) | derived |
| fast DAC word | 8 x 16-bit signed | 16-bit DAC described, format assumed |
| slow DAC code | 12 bits (AD5628) | part |
| phase | 16 bits signed, full turn = 65536 (1 LSB = 0.0055 deg) | this design |

`pkg cps_pkg` (`rtl/cps_pkg.sv`) holds these constants and the types built
on them.

An iteration runs as follows. `trig_ctrl` synchronises the trigger and makes
a one-cycle `trig`. Both DAC buffers start their waveforms, the bias loop
starts its test-step sequence and the cavity loop starts its capture. The
iteration is over when the cavity loop and, if enabled, the bias loop have
both reported done. `trig_ctrl` latches the length of the iteration in
cycles. A trigger edge that arrives while an iteration is still running is
not started and is counted as an overrun. An iteration that reaches the
budget is aborted and counted as a timeout.

## Cavity phase lock (`cavity_ctrl`)

This is the core of the design. The phase of a stacking cavity cannot be
read directly. It shows up in how the 13 pulses of the burst interfere at
the cavity output: each pulse's photodiode amplitude is a fixed function of
the cavity phase. The firmware reduces the 13 samples to one complex number
whose angle tracks the phase:

    x + i*y = sum_{k=1..13} p_k * (a_k + i*b_k)

Here p_k is the k-th pulse sample and a_k + i*b_k is a calibrated vector
that the host determines for each cavity and writes into the firmware. A
rectangular-to-polar conversion (CORDIC) then gives an amplitude and the
phase, and a PI loop moves the PZT until the phase equals the intended
phase.

The steps, per trigger:

1. **Capture (`data_buf`).** After `cap_delay` cycles, three stream words
   (24 consecutive samples at 2.5 ns, so one sample per optical pulse) are
   written into a 24 x 12-bit dual-ported RAM. Word j, lane k lands at
   address 8j + k. The first captured word is the one present
   `cap_delay + 1` cycles after `trig`.
2. **Dot product (`dot_product`).** Reads addresses `pulse_offset ..
   pulse_offset+12` and accumulates both sums, one sample per cycle. It
   uses signed 16-bit coefficients and 32-bit sums.
3. **CORDIC (`cordic`).** A vectoring-mode CORDIC with 16 iterations after
   an exact +-90 degree pre-rotation. The CORDIC gain is removed by one
   multiply.
4. **PI (`pi_ctrl`, one per cavity).** The error is intended phase minus
   measured phase, formed at 16 bits so it wraps the short way round. The
   integrator (Q16 in DAC codes) is clamped to the DAC range. The output is
   integrator + kp*error, clamped to 0..4095, and `sat` marks a clamp.
   While a cavity's enable is low, its PI holds the host-set initial code.
5. **Output.** The new code is posted to the slow DAC on channel 1 + c. A
   record (cavity, phase, error, code, saturation, trigger number) goes to
   the circular buffer.

**Placing the burst.** `cap_delay` moves the 24-sample window in steps of 8
samples, and `pulse_offset` (0..11) picks the 13 samples inside it. The
delay counts from the internal `trig`, which comes 3 cycles after the
trigger input rises. If the burst reaches the ADC word W cycles after the
input edge, starting at lane L, use `cap_delay = W - 4` and
`pulse_offset = L`.

**Several cavities on one ADC.** Each cavity has its own photodiode, but one
analog switch routes them to a single ADC channel. The cavities are served
in turn, one per trigger. `sw_sel` moves to the next cavity as soon as an
iteration ends, so the switch has almost a whole trigger period to settle
before that cavity is measured. With NCAV cavities, each one is updated at
the trigger rate / NCAV.

**Latency.** `done` comes `cap_delay + 40` cycles after `trig`: capture
`cap_delay + 4`, dot product 15, CORDIC 18, PI 2 and output 1.

**Calibration (host side).** The vector a_k + i*b_k must make the angle of
x + iy follow the cavity phase. The testbenches use a synthetic cavity
whose pulse k reads A*cos(2*pi*k/13 + phi). For it, a_k = C*cos(2*pi*k/13)
and b_k = -C*sin(2*pi*k/13) make x + iy proportional to exp(i*phi). A real
cavity needs its own measured vector. The firmware treats the vector as
data.

## Modulator bias lock (`bias_ctrl`)

The AM output is P*(1 - cos(psi)), with psi set by the bias plus the drive
signal. At the working point, the minimum, a small positive and a small
negative voltage give the same output, and zero gives less than either.
Each trigger, `bias_ctrl`:

1. adds +dither, 0 and -dither in turn to every lane of the AM DAC stream.
   Each step lasts `step_len` cycles, the first starts at `step_start`, and
   the add saturates at the 16-bit limits. Put the steps after the burst
   waveform.
2. sums ADC channel A (the modulator monitor, all 8 lanes) over three
   windows. The windows are the same, shifted by `adc_lat` cycles to cover
   the DAC -> modulator -> photodiode -> ADC path. The results are R+, R0
   and R-.
3. moves the bias code proportionally:
   `bias <- bias - (kp * (R+ - R-)) >>> 16`. The loop is proportional only.
   A positive `kp` is correct when the photodiode signal grows with light;
   a negative one inverts the sense.
4. applies the **modulo reset**: if the new code would leave 0..4095, it is
   moved by `wrap_step` codes back into range. The transfer function is
   periodic, so the next minimum is an equally good working point. Set
   `wrap_step` to the bias change that lands on the next minimum, expressed
   in slow-DAC codes. For a transfer function of the shape above, minima
   are 2*V_pi apart in voltage, i.e. 2*pi apart in modulator phase. Without this, a drifting null would eventually push the
   bias against the DAC limit.
5. reports `at_min` (R0 below both R+ and R-) and `wrapped`, and posts the
   code to slow-DAC channel 0.

The update lands at window time `step_start + adc_lat + 3*step_len + 2`.
Window time 0 is the cycle after `trig`.

The register defaults are dither 1000, start 64, length 16, latency 8,
kp 256, wrap 2048 and initial code 2048. They are starting values for
bring-up, not calibrated numbers.

## Slow DAC (`slow_dac`, `spi_master`)

Both loops post channel updates. `slow_dac` keeps one pending code per
AD5628 channel, where a newer code replaces one not yet sent. It always
sends the lowest pending channel as a 32-bit "write to and update channel n"
frame: `0000 0011 cccc dddddddddddd 00000000`. `spi_master` shifts it out
MSB first. DIN changes after rising SCLK edges and the DAC samples on
falling edges, with SYNC_n low for the frame. SCLK is clk/(2*SPI_DIV),
12.5 MHz by default, and one frame takes 131 cycles (2.6 us). Counters
report frames sent, requests that had to wait and requests that were
replaced.

## Buffers to and from the host

* `dac_buf` (AM and PM) is a 1-to-8 RAM. The host writes 16-bit samples;
  each trigger plays `dac_len` words, and outside playback the output is 0.
* `adc_buf` (channels A and B) is an 8-to-1 RAM. Writing 1 to register
  0x0B arms both buffers. The next trigger captures `ADC_WORDS` words, and
  the host then reads single samples at leisure. The snapshot stays
  unchanged until the buffers are armed again.
* `circ_buf` (one for cavity records, one for bias records) holds the last
  `REC_DEPTH` 64-bit records. Every record carries the trigger number, and a
  running record count tells the host where the newest one is. Long phase
  recordings, for example for a noise spectrum, therefore keep their
  timing.

## Host bus and register map (`cps_top`)

This design has no network stack. The original system reaches the host over
Gigabit Ethernet/UDP; here a simple synchronous bus stands where that link
would connect. `host_we` writes `host_wdata`. `host_re` returns
`host_rdata` one cycle later.

| address | content |
|---|---|
| 0x0000 | control: bit 0 bias enable, bit 1+c cavity c enable |
| 0x0001 | capture delay (cycles) |
| 0x0002 | pulse offset (0..11) |
| 0x0003..0x0009 | bias: dither, step start, step length, ADC latency, kp, wrap step, initial code |
| 0x000A | DAC playback length (words) |
| 0x000B | write 1: arm both ADC snapshots |
| 0x0010 + 4c + {0,1,2,3} | cavity c: intended phase, kp, ki, initial PZT code |
| 0x0020..0x0023 | triggers, overruns, timeouts, last iteration length |
| 0x0024 | {wrapped, at_min, 4'b0, bias code} |
| 0x0025..0x0027 | R+, R0, R- |
| 0x0028, 0x002C | slow-DAC frames; {replaced, waited} |
| 0x0029 | {ADC B ready, ADC A ready} |
| 0x002D | {bias records wrapped, cavity records wrapped, slow DAC busy, PM playing, AM playing} |
| 0x002A, 0x002B | cavity / bias records written |
| 0x0030 + 4c + {0,1,2,3} | cavity c: phase, amplitude, last error, PZT code |
| 0x1000 + {c, k[3:0], im} | calibrated vector, write only |
| 0x2000 + s / 0x3000 + s | ADC A / B snapshot sample s |
| 0x4000 + s / 0x5000 + s | AM / PM waveform sample s, write only |
| 0x6000 + 2e + h / 0x7000 + 2e + h | cavity / bias record e, 32-bit half h |

The records have these layouts:

* cavity: `{trigger[15:0], saturated, cavity[2:0], code[11:0], error[15:0], phase[15:0]}`
* bias: `{trigger[15:0], at_min, wrapped, 2'b0, code[11:0], (R+ - R-)[31:0]}`

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| NCAV | 2 | cavities served in turn, at least 2 |
| BUDGET | 50000 | cycles per iteration before timeout |
| ADC_WORDS | 256 | snapshot length, words (2048 samples) |
| DAC_WORDS | 256 | waveform length, words |
| REC_DEPTH | 1024 | records per circular buffer |
| SPI_DIV | 2 | SCLK divider |

NCAV = 2 and the 13-pulse, 24-sample capture follow the original system.
The buffer depths, the budget and the SPI rate are this design's choices.

## Departures and omissions

* **Not included:** the converter-card drivers (the ADS5400/DAC5681Z
  interfaces and the 400 MHz to 8-sample conversion), the GMII Ethernet and
  UDP firmware, and the clock generation. The top takes and gives the
  128-bit streams and one 50 MHz clock, and exposes the simple host bus in
  place of the network link.
* The original design uses an existing CORDIC core; the one here is a
  plain iterative implementation of the same function.
* The original separates the sampling, processing and trigger clock
  domains. Here everything beyond the converters, the host side included,
  runs on the processing clock. The buffers have separate read and write
  clock ports, so a host clock can be introduced there.
* The original calls the bias wrap a "modulo pi" reset without giving its
  size in volts or codes. Here it is the register `wrap_step`, so any size
  can be set.
* Which ADC channel watches the modulator and which the switched cavity
  photodiodes, the slow-DAC channel numbers, the placement of the bias test
  steps, all gain formats, and the overrun and timeout policies are this
  design's choices.
* With two cavities on one 1 kHz trigger, each cavity is updated at
  500 Hz. The original reports phase-noise peaks up to 400 Hz, so a
  single-cavity trigger or a faster trigger may be needed where that
  bandwidth matters.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/cps_pkg.sv tb/tb_cps_top.sv --top-module tb_cps_top
    ./obj_dir/Vtb_cps_top

Replace `tb_cps_top` with any other testbench. To run all of them:

    for f in tb/tb_*.sv; do t=$(basename $f .sv)
      verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
          --Mdir obj_$t rtl/cps_pkg.sv $f --top-module $t >/dev/null &&
        ./obj_$t/V$t | grep TB_RESULT
    done


| testbench | what it shows |
|---|---|
| `tb_cps_top` | the whole design at default parameters, with models of the modulator, two cavities and the AD5628; see below |
| `tb_cps_record` | phase recording at default parameters: the host drains the record buffer while it wraps twice, no record is lost, and the spectrum of each cavity's phase series shows the injected tone at the right frequency |
| `tb_cavity_ctrl` | phase measurement against a model cavity, alternation, latency, lock of two cavities, abort |
| `tb_bias_ctrl` | step placement and saturation, window sums, proportional step, both modulo resets, at_min, timing |
| `tb_trig_ctrl` | trigger latency, iteration length, overrun, timeout |
| `tb_data_buf`, `tb_dot_product`, `tb_cordic`, `tb_pi_ctrl` | the cavity datapath stages against reference arithmetic |
| `tb_adc_buf`, `tb_dac_buf`, `tb_circ_buf` | buffer ordering, playback and snapshot discipline |
| `tb_spi_master`, `tb_slow_dac` | AD5628 frames, edge timing, per-channel latest-wins sharing |

`tb_cps_top` programs the design over the host bus and runs about 400
iterations. The modulator null drifts, which forces a modulo reset. It
also provokes an overrun and a timeout. It then checks that:

* the bias sits at the null;
* both cavities are within 150 LSB (0.8 degrees) of their intended phases;
* the records alternate cavities and carry consecutive trigger numbers;
* the ADC snapshot holds the burst;
* both DAC waveforms played.

It takes well under a second. `tb/ad5628_model.sv` is the behavioural model
of the slow DAC's serial input that the testbenches use.
