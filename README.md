# FPGA controller for a 1 GHz DDS frequency synthesizer

A direct digital synthesizer (DDS) chip of the AD9858 kind makes a clean,
fast-switching RF signal from a 32-bit frequency tuning word (FTW):

    f_out = FTW * 1 GHz / 2^32        (one FTW step = 0.233 Hz)

The chip is fast. It has four frequency profiles, a built-in linear sweep and
a parallel register port. But it has to be told what to do in nanosecond-precise
cycles, and it knows nothing about the units an operator thinks in. This
controller sits between a slow host (a PC) and the DDS. It runs on a 50 MHz
clock and has four jobs:

* It takes simple commands from the host: BCD frequencies in 10 Hz units, a
  deviation code, a mode.
* It works out every word the DDS needs: FTWs, the sweep step word, and the
  sweep restart time.
* It writes those words over the 13 function-data lines (5 address and 8 data)
  and drives the 7 control lines.
* It keeps the time-critical parts of each mode running without the host:
  * it feeds an FM stream from an ADC;
  * it switches TDM profiles;
  * it restarts the chirp.

The target is a synthesizer with these specifications:

| Item | Requirement |
|---|---|
| Frequency range | 20–100 MHz |
| Accuracy | 10 Hz |
| Switching time | ≤ 20 µs |
| FM deviations | 8, 15, 30 or 100 kHz, from a 14-bit ADC sampled at 500 kHz |
| Chirp steps | 12.5, 25 or 50 kHz |
| TDM | up to four frequencies |

The RTL does a frequency change in 35 clocks (0.7 µs), counted from the host's
last byte to the DDS frequency update.

## Block structure

```
 host ──desc/byte/strobe──► input_fsm ──latch/go──► func_data_decoder
                                                    │  bcd_to_ftw
                                                    │  ramp_rate_calc
                               ┌────────────────────┴──────────────┐
                               ▼                                   ▼
                           func_regs                            timers ──► adc_convert (500 kHz)
                               │                                   │ trg_tdm / trg_crp / trg_fm
 adc_data(14) ─► adc_data_conv ─► ddfs_data_gen ◄── step/load ── output_fsm ◄── start, rf_on
                                  ff_gen, ff_fm_gen,               │
                                  tdm_gen, crp_gen                 │
                                   │ 13 function-data lines        │ 7 control lines
                                   ▼                               ▼
                                              DDS chip
```

| Module | Role |
|---|---|
| `ddfs_controller` | Top level. Its ports are exactly the lines to the host, the DDS and the ADC. |
| `input_fsm` | Synchronises the data-ready strobe. Has the decoder latch and then process one descriptor/byte pair. Counts commands that arrive too early. |
| `func_data_decoder` | Decodes commands. Contains the descriptor and data buffers, the frequency accumulator (32 bits), the ramp-rate accumulator (16 bits) and the deviation register. It also holds the "FTW − ΔF" step, the BCD→FTW converter and the ramp-rate computation. |
| `bcd_to_ftw` | 8 packed BCD digits in 10 Hz units → FTW. |
| `ramp_rate_calc` | Chirp sweep duration in controller clocks. |
| `func_regs` | Everything the generators need: the FTWs of all modes, the chirp step and ramp-rate words, the mode, the TDM count and the deviation code. |
| `timers` | Three 32-bit interval timers. TDM dwell gives `trg_tdm`. Chirp restart gives `trg_crp`. The ADC timer gives `trg_fm` and the `adc_convert` square wave, and resets to 100 clocks (500 kHz). |
| `adc_data_conv` | Turns an ADC sample into a frequency offset (ΔFTW) by split-and-add. |
| `ddfs_data_gen` | Holds the four write-list generators. Muxes them by mode and registers the chosen byte into the address and data buffers that drive the port. |
| `ff_gen`, `ff_fm_gen`, `tdm_gen`, `crp_gen` | Combinational write lists: step number → (address, data, FUD after, last). |
| `output_fsm` | Walks the write list and makes the write strobe and FUD. Reacts to the triggers. Drives the profile-select lines, the RF switch and the DDS reset. |
| `ddfs_pkg` | Shared types and constants: DDS addresses, control words, the deviation table function, and the structs for the port. |
| `strobe_sync`, `interval_timer` | Small helpers. |

## Commands

Each command is one descriptor byte and one data byte, presented together with
a rising edge on `data_ready_strobe`. The high nibble of the descriptor names
the quantity. Its two low bits say which byte this is, least significant first.

| Descriptor | Quantity | Bytes | Format |
|---|---|---|---|
| `0x` | fixed frequency | 4 | packed BCD, 8 digits, 10 Hz units |
| `1x` | FM centre frequency | 4 | BCD |
| `2x`–`5x` | TDM frequency 0–3 | 4 | BCD |
| `6x` | chirp start frequency | 4 | BCD |
| `7x` | chirp stop frequency | 4 | BCD |
| `8x` | chirp step (a frequency) | 4 | BCD |
| `9x` | chirp ramp-rate word | 2 | binary |
| `A0` | FM deviation code | 1 | 0–3 = 8, 15, 30, 100 kHz |
| `B0` | mode | 1 | bits 1:0 select FF, FM, TDM or chirp; bits 3:2 give the TDM frequency count − 1 |
| `Cx` | TDM dwell time | 4 | binary, in 20 ns clocks |
| `Dx` | ADC period | 4 | binary, in clocks; the reset value is 100 |

Example: 100 MHz is written as `00/00`, `01/00`, `02/00`, `03/10`. That is BCD
`10000000` × 10 Hz, and the register ends up holding FTW `0x19999999`.

Timing rules for the host:

* The byte with index 3 of a frequency starts the conversion. The register is
  written 4 clocks later.
* A chirp parameter also re-runs the sweep-time division, which takes about 72
  clocks.
* Leave at least 100 clocks (2 µs) between strobes. A strobe that arrives while
  the decoder is busy is dropped and counted on `cmd_overruns`.
* The commands only load registers. A rising edge on `start_strobe` makes the
  controller program the DDS in the selected mode. Send it again after changing
  a frequency in FF mode.

## Arithmetic

### BCD to FTW

The exact value is FTW = floor(f · 2^32 / 10^9). With f = N · 10 Hz this is
N · 0.04294967296. The conversion goes in two steps:

1. The digits become a binary N (below 10^8, so 27 bits).
2. N is multiplied by K = ceil(2^80 · 10 / 10^9), and the top 32 bits of the
   product are kept: `(N·K) >> 48`.

K is rounded up, so the error of K·2^-48 is positive and below N·2^-48. That is
too small to carry the result across an integer. The result is therefore exactly
the floor for every 8-digit input. The testbench checks it against a 64-bit
reference, including values whose exact FTW sits just below an integer.
Latency is 2 clocks.

### Split-and-add for FM

In FM mode each 14-bit ADC sample D (unsigned, offset binary) has to become a
frequency offset:

    ΔFTW = D · (Δf / 2^14) · (2^32 / 10^9)

A 14×32 multiply every 2 µs is not needed. D is cut into seven 2-bit slices
v_k, for k = 0..6, with weights 4^k. For each deviation and each slice there is
a four-entry table:

    T[dev][k][v] = round(v · 4^k · Δf_dev · 2^18 / 10^9)     (2^32 / 2^14 = 2^18)

ΔFTW is the sum of the seven looked-up words, added in a tree:
((s0+s1)+(s2+s3))+((s4+s5)+s6). The output is registered.

The 112 table words are computed at elaboration time from this formula, so
changing a deviation means changing `dev_hz()` in `ddfs_pkg`. Each word is rounded
on its own, so the sum can differ from the exactly rounded product by at most
seven half-steps, i.e. under 1 Hz.

The full ADC range spans Δf, so the deviation is the peak-to-peak swing. The
centre FTW is stored already reduced by the offset of mid-scale (code 8192).
The FM FTW is then `base + ΔFTW`. Mid-scale input gives the centre frequency,
and the swing is ±Δf/2 around it.

### Chirp restart period

In sweep mode the DDS adds the step word DFTW to its frequency once every
(RRW+1) ramp-clock periods. The ramp clock is f_clk/8, i.e. 8 ns. The sweep
from start to stop therefore lasts

    T = |FTW_stop − FTW_start| / DFTW · (RRW+1) · 8 ns

which in 50 MHz clocks is

    period = ceil(|ΔFTW| · (RRW+1) · 400 / (DFTW · 1000))

`ramp_rate_calc` works this out with a 64-bit numerator and a 64-step restoring
divider. It takes 67 clocks and clamps the result to 32 bits. A zero step gives
period 0, which stops the timer.

For 45→65 MHz with RRW = 0 the results are:

| Step | DFTW | Restart period |
|---|---|---|
| 12.5 kHz | 53 687 | 641 clocks (12.8 µs) |
| 25 kHz | 107 374 | 321 clocks |
| 50 kHz | 214 748 | 161 clocks |

The result loads the chirp timer. Each timer trigger issues one FUD, and the
chirp control word tells the DDS to clear its frequency accumulator on FUD, so
the sweep restarts at the start frequency.

## DDS port sequencing

Every byte write takes four clocks (80 ns):

| Clock | Name | What happens |
|---|---|---|
| 1 | SETUP | `ddfs_data_gen` loads the entry for the current step into its address/data buffers |
| 2 | ADDR | Address and data are on the port |
| 3 | WR | `wr_n` is low for one clock (20 ns) |
| 4 | HOLD | `wr_n` is back high; address and data are still held |

So each write has 20 ns of setup before the strobe and 20 ns of hold after it,
and the port runs at 12.5 M writes/s. That is well under the chip's 100 MHz
limit. An entry flagged "FUD after" is followed by one clock of FUD. All control
lines are registered.

The write lists, in the order the mode flow charts give:

| Mode | List | After the list |
|---|---|---|
| FF | 4 control-register bytes (single tone), 4 FTW bytes to profile 0 (0x0A–0x0D), FUD. 8 writes. | Idle |
| FM | Same as FF, with FTW = base + ΔFTW taken at the moment the list starts | Each `trg_fm` (every ADC period) snapshots base + ΔFTW again and rewrites the 4 FTW bytes and FUD: about 20 clocks out of every 100 |
| TDM | Control register, then for each programmed profile p (0x0A, 0x10, 0x16, 0x1C) 4 FTW bytes and FUD | Each `trg_tdm` moves the profile-select lines PS1:PS0 to the next profile, wrapping after the last programmed one. No register is written. |
| Chirp | Control register (sweep on, accumulator auto-clear), start FTW, DFTW (0x04–0x07), RRW (0x08–0x09), FUD | Each `trg_crp` issues a bare FUD |

Timers run only in the mode that uses them, and they restart from zero when
their mode's list ends. A start strobe that arrives during a list is remembered
and served once the list has ended. After reset the DDS reset line is held high
for 16 clocks.

The seven control lines are `dds_ctrl_t`: `rf_sw`, `reset`, `ps[1:0]`, `fud`,
`rd_n` and `wr_n`. `rd_n` is never used, because the controller does not read
the chip, and stays high. `rf_sw` follows the `rf_on` input. It is synchronised
and registered.

## Departures and open points

* **BCD unit.** The LSB is 10 Hz, matching the 10 Hz accuracy requirement.
  Settings with a 1 Hz or 2 Hz digit cannot be entered, although the DDS itself
  resolves 0.23 Hz. `bcd_to_ftw` has `UNIT_HZ` and `DIGITS` parameters. The
  decoder and the command format assume 8 digits.
* **Descriptor codes, mode byte and binary word formats** are this design's.
  Only the use of descriptors 00–03 for the four frequency bytes, LS byte first,
  follows the original design.
* **DDS register addresses and control words.**
  * The register addresses come from the AD9858 register map.
  * The control words are placeholders: all zero for single tone, and bits 21
    and 19 for sweep enable and frequency-accumulator auto-clear.
  * Check the control-word bits against the datasheet before connecting real
    silicon. They are in `ddfs_pkg` (`CFR_*`).
* **Sweep clock.** The sweep-time formula assumes the DDS ramp clock is f_clk/8
  (`DDS_SYNC_DIV`).
* **Handshakes.** The four-clock write cycle, the host handshake, the overrun
  counter and the pending start are choices made here.
* **FM deviation.** Deviation is treated as peak-to-peak (full ADC scale = Δf).
  If peak deviation is meant, double the values in `dev_hz()`.
* **Timer periods** are loaded as binary clock counts. The ADC timer resets to
  100 clocks (500 kHz). The TDM and chirp timers reset to 0, i.e. stopped.
* **Not included:**
  * the DDS chip;
  * the ADC;
  * the host software.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
compares against values worked out independently, in 64-bit integer arithmetic
inside the testbench, and checks the latencies. The testbenches print
`TB_RESULT checks=N failures=M` and have a watchdog.

`tb/ad9858_model.sv` is a behavioural model of the DDS register port. It has an
I/O buffer written on the rising edge of `wr_n`, and FUD copies the buffer into
the active registers. It flags setup and hold violations.

`tb/ddfs_controller_tb.sv` runs the top level at its default parameters as host,
DDS and ADC, and covers:

* **FF:** the 100 MHz example, plus nine frequencies from 20 MHz to 400 MHz.
  Switching time is measured at 35 clocks.
* **FM:** 45 MHz with 15 kHz and then 100 kHz deviation, and a 25 kHz sine on
  the ADC.
  * Every update lies within the band.
  * Updates come every 100 clocks.
  * The swing is checked for each deviation.
  * One held sample per deviation is checked exactly.
* **TDM:** four frequencies, with the profile sequence and a 200-clock dwell.
* **Chirp:** 45→65 MHz in 12.5 kHz steps. The sweep registers and the
  641-clock restart are checked.
* **Other:** RF on/off and a dropped early command.

The testbench counts how often each of these mechanisms happened and fails if
one never did.

To run it with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ddfs_pkg.sv rtl/*.sv tb/ad9858_model.sv tb/ddfs_controller_tb.sv \
  --top-module ddfs_controller_tb
./obj_dir/Vddfs_controller_tb
```

To run a block testbench, list `rtl/ddfs_pkg.sv` first, then the block and its
sub-modules, then `tb/<block>_tb.sv`. Each run builds and simulates in a few seconds.
