# Digital phase meter for rotating-machinery vibration

This design measures vibration on a rotating machine, such as a power generator. It finds the
**phase angle of one harmonic of the vibration signal relative to a once-per-revolution trigger
(SYNC)**, to 1 degree, and also reports the harmonic's peak-to-peak amplitude. The harmonic can be
0.5, 1 or 2 times the rotation frequency.

The vibration signal arrives already digitised by an A-D converter running at its own fixed rate
(10.24 to 102.4 kHz). The core idea is to **sample that signal a second time, at exactly 45 points
per revolution**, whatever the speed:

* A frequency multiplier turns SYNC into 45 sampling strobes per revolution.
* Because the sampling follows the rotation, a fixed digital band-pass filter centred on
  2*pi*k/45 tracks harmonic k at any speed from 1 to 1000 rev/s.
* A zero-crossing detector then locates the filtered sine's positive-going crossing. Each sample
  spans 8 degrees of shaft angle, and linear interpolation refines the crossing to 1 degree.

Everything is one clock domain at 32 MHz. The filter's multiplications use one shift-add
multiplier (16 cycles per product) and a small single-port RAM for coefficients and filter states.
This keeps the logic small enough for one modest FPGA.

```
            SYNC ──► freq_multiplier ──► smp_strobe (45 per revolution) ──┬──► sample_counter ── index
                      (16 MHz tick)                                       │                       │
 adc_data/adc_valid ─► latest-sample register ─► iir_filter (4 x biquad) ─┴► y(n) ─┬► peak_detector ──► pp
                                                    ▲   │                          └► zero_cross_detector ► phase
                                                    │   ▼                                     ▲
                                                   coef_ram  ◄── bus_interface ◄──────────────┘ (results)
                                                                   ▲   │
                                                             system bus (host)
```

## Files

| file | contents |
|---|---|
| `rtl/phase_meter_pkg.sv` | widths, constants, the RAM request struct, RAM word layout, bus register map |
| `rtl/phase_meter_top.sv` | one channel: all blocks wired together, RAM included |
| `rtl/freq_multiplier.sv` | SYNC period measurement and the 45-per-revolution strobes |
| `rtl/sample_counter.sv` | index of the current sample within the revolution |
| `rtl/iir_filter.sv` | serial 8th-order filter controller and datapath |
| `rtl/shift_add_mult.sv` | 16x16 signed multiplier, one bit per cycle |
| `rtl/coef_ram.sv` | 32 x 16-bit coefficient and state RAM |
| `rtl/peak_detector.sv` | positive and negative peaks, peak-to-peak report |
| `rtl/zero_cross_detector.sv` | crossing detection, interpolation by successive subtraction |
| `rtl/bus_interface.sv` | host access to the RAM and the results; RAM arbitration |
| `tb/tb_*.sv` | one self-checking testbench per module, the end-to-end test and two application tests |

## Frequency multiplier: where the sampling instants come from

The multiplier counts 16 MHz ticks (every second clock) between SYNC rising edges. At each edge the
count becomes the period T, and a new revolution of strobes starts:

* Strobe 0 is issued on the SYNC tick itself (`smp_first`).
* Strobe k (k = 1..44) follows at tick ceil(k*T/45) after SYNC.

These instants come from an accumulator, not a divider. Every tick it adds 45; when the sum
reaches T, it subtracts T and issues a strobe. Strobe 45 would fall on the next SYNC, which
restarts the sequence. The spacing therefore always comes from the *previous* revolution's
period:

* If the machine speeds up, the next SYNC arrives before strobe 44, so that revolution has fewer
  samples.
* If the machine slows down, no more than 44 strobes follow a SYNC, and sampling pauses until the
  next SYNC.

The strobe timing error is under one tick (62.5 ns). At 1000 rev/s one revolution is 16,000
ticks, so the error is about 0.02 degrees.

`period_valid` stays low, and no strobes are issued, until two SYNC edges have been seen. It also
drops when the 24-bit counter saturates. That happens when SYNC is slower than about 1 Hz.

## The filter engine

### Arithmetic

Each of the four sections is a transposed-direct-form-II biquad:

```
y     = b0*x + w1
w1'   = b1*x + a1*y + w2
w2'   = b2*x + a2*y
```

Section j's output is section j+1's input. **The feedback coefficients are added**, so a filter
with the usual denominator 1 + d1 z^-1 + d2 z^-2 is loaded with a1 = -d1 and a2 = -d2.

All values are 16-bit two's complement with 14 fraction bits (Q2.14, range -2 to +2 - 2^-14).
Inside a section:

* Products are 32-bit (Q4.28) and are summed at full precision.
* A sum is truncated to 14 fraction bits (rounded towards minus infinity) when it is stored as y
  or as a state.
* A stored value that overflows saturates at the range limits.

### Schedule and timing

There is one multiplier and one RAM port. A section's five products (b0x, b1x, a1y, b2x, a2y) are
formed back to back, 16 cycles each, so **a section takes exactly 80 cycles**. While one product is
being formed, the RAM fetches the next coefficient and the old states. The exact cycle plan is in
the header of `rtl/iir_filter.sv`:

* w1' is written at cycle 48.
* w2' is written when the last product completes, which is cycle 0 of the next section.

Per sample the filter needs:

* 2 cycles to fetch the first coefficient;
* 4 x 80 = 320 cycles for the sections;
* 1 finishing cycle.

`y_valid` follows `start` by 324 cycles, so at 32 MHz strobes can come at up to 98.7 kHz. The
fastest case is 45 strobes at 2 kHz, i.e. the second harmonic at 1000 rev/s, which is 90 kHz. If a
strobe arrives while the filter is busy, it is dropped and the sticky `overrun` status bit is
set.

### RAM layout

Section j uses words 8j to 8j+7:

| offset | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| word | b0 | b1 | b2 | a1 | a2 | w1 | w2 | unused |

The states are ordinary RAM words. Software clears them (writes 0) after loading new
coefficients, or leaves them alone to retune without a transient.

### Coefficients

Coefficient design is not part of the hardware. The reference design uses two 4th-order filters in
cascade:

* a Butterworth band-pass with a passband of 0.95 to 1.05 times the centre 2*pi/45;
* an all-pass chosen so that the total delay is exactly 45 samples, i.e. one revolution. The
  filter then adds no phase at the centre frequency.

Its coefficient values are not available here. The end-to-end testbench uses four simple
resonators instead and allows for their phase shift when it computes the expected result.

To measure harmonic k, centre the band-pass at 2*pi*k/45.

## Phase and amplitude

The **zero-crossing detector** watches successive filter outputs y(n-1), y(n). A crossing lies
between them when y(n-1) < 0 and y(n) >= 0. The position inside the 8-degree interval is

```
k = floor( 8*|y(n-1)| / (y(n) + |y(n-1)|) )        (0..8)
```

computed by repeated subtraction: start from 8|y(n-1)| and subtract the divisor while the
remainder is not smaller than it. This takes at most 9 cycles. The phase is
`(8 * index_of_y(n-1) + k) mod 360`. The interpolation truncates, so the result is on average
half a degree low.

The **peak detector** forms p(n) = y(n) - y(n-1):

* y(n) becomes the positive peak when p(n), y(n) and y(n-1) are all > 0 and p(n+1) < 0.
* y(n) becomes the negative peak when all three are < 0 and p(n+1) > 0.

Peaks persist until replaced. Peak-to-peak = |positive peak| + |negative peak|. It is 17 bits
unsigned, with 14 fraction bits.

**Reporting.** Both results are reported once per revolution. The report is made when the filter
output of sample index 0 (the SYNC sample) has been processed. By then the check for a crossing
between the last sample of the old revolution and the first of the new one is complete. This is
about 324 cycles after SYNC, not at SYNC itself.

* If a revolution has several crossings, its first one is reported.
* `phase_found` is 0 for a revolution with none, which is normal at half the rotation frequency.

## Accuracy limits the hardware does not remove

* **Double sampling.** Each strobe takes the converter's latest sample, which is up to one
  converter period old. The mean delay is between 0.25 and 0.5 converter periods. In degrees this
  is 360 * f_rot * delay, which grows with speed. At 102.4 kHz the error stays under 1 degree only
  up to about 1138 rev/s. At 10.24 kHz the limit is about 114 rev/s.
* **Oversampling.** When 45 * f_rot exceeds the converter rate, some converter samples are used
  more than once. This acts as a short moving average, with a delay of (R-1)/2 strobes and a small
  attenuation. R is the ratio of the two rates.

Both delays are known from the converter rate and the measured period (register `PERIOD`), so
host software can subtract them. The end-to-end testbench includes half a converter period in its
expected phase.

## System bus

The bus is synchronous, with 16-bit words. The host holds `bus_cs`, `bus_we`, `bus_addr` and
`bus_wdata` until `bus_ack` pulses. Read data is valid in `bus_rdata` during the `bus_ack` cycle.

* Register accesses complete in one cycle.
* RAM accesses wait while the filter is running, at most one filter run (324 cycles).

| address | register |
|---|---|
| 0x00-0x1F | coefficient/state RAM |
| 0x20 | PHASE: bit 15 = a crossing was found, bits 8:0 = degrees |
| 0x21 / 0x22 | PP_LO / PP_HI: peak-to-peak amplitude, bits 15:0 / bit 16 |
| 0x23 | STATUS: bit 0 = new result, bit 1 = period valid, bit 2 = overrun (reading clears bits 0 and 2) |
| 0x24 / 0x25 | PERIOD_LO / PERIOD_HI: SYNC period in 16 MHz ticks |
| 0x26 | INDEX: current sample index |

The top also brings the results, the strobes and the filter output out as plain ports.

## Where this RTL departs from the original design or fills gaps

The block structure, N = 45, the 16 MHz multiplier tick, the 16-bit Q2.14 arithmetic, four
transposed-DF-II sections, the 16-cycle shift-add multiply, 80 cycles per section, the 16-byte
RAM slot per section, and the peak and zero-crossing rules all follow the original design. The
rest is this implementation's own choice:

* **Frequency multiplier.** The original circuit is published elsewhere; an accumulator
  (rate-multiplier) scheme is used here instead.
* **Coefficient RAM.** It is an on-chip, 16-bit-wide synchronous array. The original used an
  external byte-wide static RAM.
* **Bus and arbitration.** The bus protocol, register map and arbitration are new.
* **Filter arithmetic.** Truncation, saturation, the RAM access plan and the overrun rule are new.
* **Interpolation stop rule.** The rule used gives the integer part of the quotient. The original
  wording of the recursion could also be read as giving one more than that.
* **Reporting.** The reporting instant, keeping the first crossing, and the modulo-360 wrap are
  new.
* **Converter input.** The 12-bit converter word is placed in bits 14..3 of the filter word, so
  converter full scale is +-1.0.
* **Channels.** There is a single channel. The original prototype had four channels on two FPGAs;
  the single-chip, single-channel version is the one proposed.
* **Analog front end.** The programmable-gain amplifier, anti-alias filter and A-D converter are
  outside this RTL. Their output is the `adc_data` / `adc_valid` input.

## Verification

Every module has a self-checking testbench that prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_shift_add_mult` | corner and random products, exact 16-cycle latency |
| `tb_coef_ram` | write/read-back, read latency, hold |
| `tb_sample_counter` | index after each strobe, reset at SYNC, saturation |
| `tb_freq_multiplier` | period, strobe count per revolution (steady, faster, slower), exact strobe times, saturation with a narrow counter |
| `tb_iir_filter` | every output against a bit-exact Q2.14 model; resonator and random coefficients (saturation exercised); 324-cycle latency; states left in RAM; overrun |
| `tb_peak_detector` | sine revolutions against max-min; random data against the peak rule |
| `tb_zero_cross_detector` | interpolated phase against the integer formula and the true sine phase; boundary crossings; no-crossing revolution; report timing |
| `tb_bus_interface` | RAM access through the bus, waiting for the filter, register map, clear-on-read status |
| `tb_phase_meter_top` | end to end, at the default parameters (see below) |

`tb_phase_meter_top` runs the whole chip against a model of the machine and the converter. It:

1. loads the filter over the bus;
2. runs at 1000 rev/s with a 102.56 kHz converter;
3. runs at 250 rev/s with a 10.24 kHz converter, so converter samples are reused;
4. speeds the machine up;
5. reloads the filter over the bus while it runs, to measure the second harmonic;
6. reloads it again to measure a component at half the rotation frequency, which crosses zero
   only in every second revolution;
7. overdrives the filter at 2500 rev/s.

Steady-state phases must be within 3 degrees of the value expected from the signal, the filter's
computed phase and the converter delay. The tolerance is wider by the shift that other signal
components leaking through the test resonators can cause. That shift is large only in the
half-frequency case. Amplitudes must be within 5 % plus harmonic leakage. It
counts each mechanism (short revolutions, reused samples, bus waits, second-harmonic and
half-frequency results, overruns) and fails any that never occurred.

To run one test with Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/phase_meter_pkg.sv \
          tb/tb_phase_meter_top.sv --top-module tb_phase_meter_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The end-to-end test simulates about 4
million cycles and takes a couple of seconds.

### Application tests

Two more benches drive the full chip with a single sine and the four-resonator test filter:

* `tb_workload_rates` covers the specified operating range: all four converter rates (102.4,
  51.2, 25.6 and 10.24 kHz) at 100 rev/s, then 1000 rev/s and 10 rev/s at 102.4 kHz. After 9
  settling revolutions per setting, each reported phase must be within 2 degrees of the expected
  value. The 10 rev/s setting is 3.2 million cycles per revolution, so this bench runs for about
  half a minute.
* `tb_workload_noise` adds white noise with a standard deviation of 0.212 times the sine
  amplitude at 1000 rev/s and collects 150 revolutions. With the test filter the phase error has
  a mean of about 0.1 degree and a variance of about 1.5 square degrees. The bench requires a mean
  within 1.5 degrees and a standard deviation under 2.5 degrees. The variance depends on the
  filter bandwidth, so a narrower filter would give less.

### Known limits of the testing

* The reference band-pass/all-pass coefficients were not available, so the zero-phase property
  of the original filter is not reproduced.
* Noise performance was simulated only with the test filter, whose bandwidth differs from the
  reference filter's.
