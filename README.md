# MFC field controller: FPGA signal processing for multi-cavity LLRF control

A single klystron can drive many superconducting cavities (the ILC RF scheme
puts 24 or more on one klystron). The controller then does not regulate each
cavity on its own. It regulates the **vector sum** of all cavity probe
signals, and it has to do so with very little delay, because every nanosecond
of group delay limits the loop gain. This RTL is the FPGA signal processing of
a 33-channel field control board built for that job (the "MFC", multichannel
field control module):

* 32 IF channels from four 8-channel, 12-bit, 65 MS/s ADCs with LVDS outputs:
  24 cavity probes and 8 auxiliary inputs, such as the cryomodule phase references.
* One 14-bit parallel ADC channel on the klystron output, used by a fast inner
  klystron loop.
* Down-conversion of every channel to I/Q with per-channel cosine/sine tables
  that also carry gain and phase calibration.
* Vector sum, CIC filtering, setpoint comparison, gain and klystron
  linearization, feedforward, and up-conversion to four 14-bit DAC channels.
* Host-writable tables and diagnostic waveform buffers, reached from the
  board's DSP or crate CPU over a simple bus.

From ADC word to DAC word the data path takes **9 samples, 138 ns at 65 MHz**.

## Signal flow

```
 4 x 8 LVDS lanes ──► serial_to_parallel (x4) ──► downconv ch1..ch32 ──┐
 klystron ADC ─────► parallel_latch ────────────► downconv ch33 ──┐    │
                                                                   │    ▼ ch1..24
                                                                   │  vector_sum (I,Q)
                                                                   │    ▼
                                                                   │  cic_filter (I), cic_filter (Q)
                                                                   │    ▼
                                                  pulse_timer ──► error_calc   (setpoint tables)
                                                  (t_addr)         │    ▼
                                                                   │  gain_stage   (gain tables x linearizer)
                                                                   ▼    ▼
                                                             kly_loop ► ff_sum (feedforward tables)
                                                                        ▼ drive I/Q
                                                    upconverter x4 ──► DAC1 A/B, DAC2 A/B
 acq_ctrl ──► diag_buffer x11 (ADC, Ix, Qx, I/Q vector, I/Q error, I/Q error x gain, I/Q out)
 host_if  ──► every table, buffer and control register
```

Channels 25 to 32 are down-converted and can be viewed in the diagnostic
buffers. They do not enter the loop. Phase references in them are meant to be
processed by the DSP, which then rewrites the setpoint tables.

## Clocking and the 9-sample pipeline

There is one clock, `clk`: the ADCs' LVDS bit clock at 6 x 65 MHz = 390 MHz.
Each lane carries two bits per bit-clock period, so a 12-bit word takes six
clocks. The deserializers assemble the words and raise `sample_ce` for one
clock per sample. Every later register is enabled by `sample_ce`, so each
stage advances once per 65 MHz sample. All latencies below are in samples.

| stage | module | latency |
|---|---|---|
| down-conversion | `downconv` | 1 |
| vector sum | `vector_sum` | 1 |
| CIC filter (integrator, comb) | `cic_filter` | 2 |
| setpoint error | `error_calc` | 1 |
| loop gain | `gain_stage` | 1 |
| feedforward / klystron sum | `ff_sum` | 1 |
| up-conversion (products, sum) | `upconverter` | 2 |
| **total** | | **9 (138 ns)** |

The published description of the board gives the vector sum, the CIC filter,
the feedforward adder, the up-converter and the 9-cycle total. The one-sample
figures for down-conversion, error and gain are this design's split of the
remaining three samples. To keep each of those stages at one sample, the
table reads happen one sample early:

* The down- and up-converter tables are read with the address of the next
  sample (`tbl_addr_next`).
* The gain stage multiplies the gain-table value by the linearizer value one
  sample before the error arrives.

Channel 33 passes through one extra register, the parallel latch, before its
down-converter. Its loop (`kly_loop`: filter, error, gain) takes three samples
and joins the main path at `ff_sum`.

**Timing closure.** The RTL is written for the 390 MHz bit clock with clock
enables. Every path from one enabled register to the next therefore has six
clocks, and a synthesis flow should constrain it as a 6-cycle multicycle path.
Another option is to move the data path to a 65 MHz clock, with a clock-domain
crossing after `serial_to_parallel`.

## Down-conversion: tables instead of a local oscillator

`downconv` multiplies each sample by `cos[n]` and `sin[n]`. These are two
18-bit tables of 256 words per channel, and the host writes them. A shared
counter steps through the tables once per sample and wraps at
`R_DC_LEN + 1` entries. To down-convert an IF of `p/N` cycles per sample,
load N entries (N ≤ 256) and set `R_DC_LEN = N - 1`. For example, the ILC
IF of 13 MHz sampled at 1313/21 MHz is 21 cycles in 101 samples, so N = 101.
The entries are:

```
cos[n] = round(G * 2^17 * cos(2*pi*p*n/N + phi))      (clip to ±(2^17-1))
sin[n] = round(G * 2^17 * sin(2*pi*p*n/N + phi))
```

Here G is the channel gain (|G| < 1 for full range) and phi its phase offset.
Folding G and phi into the tables calibrates each cavity probe for free before
the vector sum. The outputs are `x * table / 2^12`, which is 18 bits and cannot
overflow. For channel 33 the divisor is `2^14`.

The CIC filter is a first-order boxcar of M = 8 samples, with no decimation.
It sums the last eight vector-sum values and shifts the result right by 8: by
3 for M and by 5 for the 24 channels. It removes the 2·IF term and the noise
above the loop bandwidth. A longer M gives more filtering but adds delay to the
loop.

## The feedback loop and its number formats

All loop signals are 18-bit two's complement numbers, saturated at every adder
and multiplier.

| table | addressed by | format | used in |
|---|---|---|---|
| setpoint I/Q (`TID_SP_*`) | pulse index | same scale as the filtered vector sum | `error = setpoint - vector` |
| gain I/Q (`TID_G_*`) | pulse index | 1.0 = 4096 | `out = error * g / 4096` |
| linearizer 0 | drive amplitude | 1.0 = 65536 | `g = gain * lin / 65536` |
| feedforward I/Q (`TID_FF_*`) | pulse index | drive scale | `drive = fb + ff + kly` |
| klystron setpoint, gain, linearizer 1 | as above | as above | `kly_loop` |
| up-converter A/B (x4) | up-converter counter | 1.0 = 65536 | `dac = (I*A + Q*B) / 2^20` |

* **Pulse index.** `pulse_timer` restarts at 0 on a start trigger (the
  `start_trig` rising edge, or a write of bit 3 of `R_CTRL`). It then advances
  one entry every `R_TBL_DIV + 1` samples, which by default is 1 µs. After
  entry 2047 it holds, so the last entries apply between pulses. Setpoint,
  gain and feedforward tables can therefore follow the fill and flat-top of
  an RF pulse up to 2.05 ms long.
* **Linearizer index.** This is `max(|I|,|Q|) + min(|I|,|Q|)/2` of the drive,
  divided by 512 and clipped to 255. The index is updated every sample from
  the drive of the sample before. Loading 1/(klystron gain at that drive
  level) makes the loop gain independent of klystron compression.
* **Loop gain.** The I error is multiplied by the I gain and the Q error by the
  Q gain. There are no cross terms. A rotation of the loop phase is done in the
  up-converter tables instead.
* **Enables.** `R_CTRL` bits 0, 1 and 2 switch the feedback, feedforward and
  klystron-loop terms into the drive. With only bit 1 set, the system runs
  open loop on the feedforward tables.
* **Up-conversion.** With constant tables (A = 65536, B = 0 on one DAC;
  A = 0, B = 65536 on the other), DAC1 A/B carry the baseband I and Q for an
  external vector modulator. With cosine/sine tables they carry an IF signal.
  The two DAC2 outputs get the same drive, with their own tables.

## Diagnostics and host access

`acq_ctrl` starts on the same trigger as the pulse. It writes all eleven
2048-word buffers on every `R_ACQ_DIV + 1`-th sample, which gives 1 MSample/s
by default, until the buffers are full. `R_DIAG_CH` selects the channel shown
in the raw-ADC and Ix/Qx buffers.

The host bus is word addressed, with 20 address bits and 32 data bits. Each
access is a one-clock `bus_wr_en` or `bus_rd_en` strobe. Read data comes back
with `bus_rvalid` exactly three clocks after `bus_rd_en`. A table write takes
effect two clocks after the strobe. Reads and writes must not be issued in the
same clock; an assertion in `host_if` checks this. Tables can be rewritten
while the loop runs, which is how the DSP updates setpoints between pulses.

| addr[19:16] | region | rest of the address |
|---|---|---|
| 0 | control registers | [3:0]: 0 CTRL, 1 DC_LEN, 2 UC_LEN, 3 TBL_DIV, 4 ACQ_DIV, 5 DIAG_CH, 6 LPF_K, 7 STATUS (busy, done, pulse active) |
| 1 | down-converter tables | [14:9] channel 0..32, [8] cos/sin, [7:0] word |
| 2 | pulse tables | [14:11] table id 0..9 (`TID_*` in `mfc_pkg`), [10:0] word |
| 3 | linearizers | [8] cavity/klystron, [7:0] word |
| 4 | up-converter tables | [10:9] up-converter, [8] A/B, [7:0] word |
| 5 | diagnostic buffers (read only) | [14:11] buffer id (`BUF_*`), [10:0] word |

The reset values are: all loop terms off, table lengths 256, both dividers 64,
klystron filter shift 4. Reset does not clear tables.

## What is taken from the board description and what is not

Taken from the published description of the board:

* the block structure and the order of the signal chain;
* 32 + 1 channels, of which 24 are cavity channels;
* 12-bit ADCs with 6x DDR LVDS, and the 14-bit parallel klystron ADC;
* 18-bit, 256-deep, host-writable down-conversion tables;
* the CIC filters, setpoint, gain, linearizer and feedforward tables;
* the fast klystron loop with its low-pass filters;
* four up-converters feeding 14-bit DACs;
* the diagnostic buffers and the 1 MSample/s acquisition rate;
* the 9-cycle, 138 ns group delay.

This design's own choices:

* number formats and saturation;
* the LVDS bit order and the frame marker;
* the CIC order (1) and length (8);
* the low-pass type (first-order IIR, `y += (x-y)/2^k`);
* the depth (2048) and time stepping of the pulse tables;
* linearizer indexing by drive amplitude;
* the per-stage latencies not listed in the table above;
* the bus protocol, address map and registers;
* feeding DAC2 from the same drive as DAC1.

Known departures and gaps:

* **Buffer depth.** The board's test measurements record 16k samples. These
  buffers hold 2048 words each. Eleven 16k buffers would need 3.2 Mbit, more
  than the 1.5 Mbit on the FPGA. Long records are meant to go to external
  SDRAM, which this RTL does not include.
* **Klystron ADC rate.** The 14-bit klystron ADC is a 105 MHz part. Here it
  is latched once per 65 MHz sample, like the other channels, so its
  down-converter tables share the same counter.
* **Triggers.** The board has two external trigger inputs and eight
  backplane triggers. Their individual uses are not specified, so the RTL
  has one start trigger, plus the software trigger.
* **DAC rate.** The DACs run at up to 260 MHz. The up-converters produce one
  word per 65 MHz sample, with no interpolation.
* **Not included:**
  * the 1.2 Gb/s LVDS serial links and the DSP serial port: only their line
    rates are known, not their framing or payload;
  * the SDRAM interface;
  * everything outside the FPGA: ADCs, DACs, clock distribution, DSP, VXI
    interface chip, memories.

## Resources

Yosys counts 1.12 Mbit of table and buffer RAM in the default top. The
target, a Cyclone II EP2C70, has 1.5 Mbit. The main loop has 82 multipliers of
at most 18 x 18 bits:

* 66 in the down-converters;
* 8 in the two gain stages;
* 8 in the up-converters.

Built from the device's 9-bit multiplier elements they need 164 of its 300.

## Files and simulation

`rtl/` holds one module per file:

* `mfc_pkg.sv`: shared constants, the address map and the `host_req_t` /
  `cfg_t` types;
* `dp_table.sv` and `host_table.sv`: the dual-port RAM used by every table;
* `mfc_fpga.sv`: the top.

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`.

`tb_mfc_fpga` runs the whole design at its default parameters. It serializes
random samples onto the LVDS lanes, loads all tables over the bus, and
compares all four DAC outputs on every clock against a bit-exact reference
model of the chain. It then:

* steps through a full 2048-entry pulse quickly;
* measures the 9-sample group delay with a step input;
* runs one complete pulse and acquisition at the default 1 µs / 1 MS/s rates;
* reads all eleven buffers back over the bus and compares them with the model.

It simulates about 1 M clocks in a few seconds.

`tb_mfc_vsum6` measures the process gain of the vector sum through the whole
design. It feeds a noisy 13 MHz IF, sampled at 1313/21 MHz, into six cavity
channels with different phases, and uses 101-entry rotation tables. It reads
the filtered vector sum back from the buffers. Compared with one channel, the
6-channel sum has six times the amplitude and a 7.8 dB better
signal-to-noise ratio, which is 10·log10(6). The board's measurement showed
about 8 dB. The testbench's opening comment gives the method.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mfc_fpga \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mfc_pkg.sv tb/tb_mfc_fpga.sv -o sim
./obj_dir/sim
```

Replace `tb_mfc_fpga` with any other testbench name to run a single block.
The testbenches use only two-state values. Everything the design reads is
reset or written before use; table RAM is not reset.
