# BPM signal-processing firmware: from undersampled button signals to beam position

A button beam position monitor (BPM) in an electron storage ring has four
pickup electrodes (buttons) around the vacuum chamber. Each bunch passing by
induces a signal whose 500 MHz component grows as the beam gets closer to that
button. This RTL is the FPGA firmware that turns the four button signals into a
calibrated beam position (X, Y) and a charge value, at an output rate that can
be chosen between 20 MHz and about 10 kHz.

The central idea is **direct undersampling**: there is no analog mixer. The RF
front end only amplifies and filters the 500 MHz signals, and 16-bit ADCs
sample them at up to 160 MS/s. Aliasing folds 500 MHz down to an intermediate
frequency (IF) — 20 MHz at 160 MS/s — and everything else is digital:
a downconverter per channel takes the IF to baseband and filters it, a CORDIC
takes the amplitude, and a final stage forms positions in IEEE-754 single
precision.

The structure (per-channel imbalance scaling, NCO/mixer, 5th-order CIC with
48-bit accumulators, 8th-order decimate-by-2 CIC compensation FIR, two
run-time programmable FIRs of up to 1024 taps with decimation 1..16 and one
multiplier each, CORDIC amplitude, single-precision position, fixed-point
charge, feed-forward correction of the front end's temperature drift, a
512k-sample raw-data recorder, a position recorder, run-time
control of everything, an AGC and a crossbar switch in the front end) follows
a published design for the Swiss Light Source BPM upgrade. Word widths,
handshakes, register map, filter coefficients and several mechanisms are this
implementation's own; they are listed in [Own choices](#own-choices-and-departures).

## Signal flow

```
   per channel c = 0..3
   adc[c] ─┬─► gain_scaler ─► ddc ─► cordic_amp ─► temp_comp ◄── rffe_temp
           │                   │                      │
           │     nco ─► iq_mixer ─► cic_decim ─►      │ amplitudes, ADC-channel order
           │     comp_fir ─► FIR1 ─► FIR2             ▼
           │     (÷4..32, ÷2, ÷1..16, ÷1..16)     xbar_reswap ─► xbar_swap
           │                                          │ amplitudes, button order
           ├─► agc ─► rffe_atten[c]                   ▼
           │                                     position_calc ─► pos_x, pos_y, charge
           └─► adc_capture ─► QDR port                │
                                                      └─► pos_recorder ─► DDR2 port
   register bus ◄─► bpm_regs (all settings, read-back)
```

Everything runs in one clock domain, the ADC sample clock. `adc_valid` may
be held high (one sample per clock, the normal case) or be used to feed a
slower sample stream.

## The decimation cascade and the one-multiplier budget

This is the part that takes the most care to configure.

| stage | decimation | notes |
|---|---|---|
| CIC, 5th order | r = 4..32 (`REG_CIC_R`) | gain r^5, removed by `REG_CIC_SHIFT` |
| compensation FIR, 9 taps | 2 (fixed) | unity DC gain, fixed coefficients |
| FIR1 | 1..16 (`REG_FIR1_DEC`) | 1..1024 taps (`REG_FIR1_TAPS`), 1 = bypass |
| FIR2 | 1..16 (`REG_FIR2_DEC`) | 1..1024 taps (`REG_FIR2_TAPS`), 1 = bypass |

Total decimation is r·2·d1·d2, from 8 to 16384; at 160 MS/s that is 20 MHz
down to 9.766 kHz. The reset setting is 16·2·16·8 = 4096 (39.0625 kHz) with
both FIRs bypassed, and an NCO at f_s/8.

**CIC scaling.** The CIC input is 18 bits; its output is
`(accumulator >>> shift)` saturated to 24 bits. For unity gain use
`shift = 5·log2(r)` (r a power of two); to use the full 24-bit range with a
full-scale input, use `shift = 5·log2(r) − 6`. The integrators use wrap-around
48-bit arithmetic, which is exact for a CIC as long as the output fits,
and the 48 bits hold the worst case 18 + 5·log2(32) = 43 bits.

**FIR order limit.** FIR1 and FIR2 each have a single multiply-accumulate
unit that processes one tap per clock. A new output is due every
(clocks between inputs) × (own decimation) clocks, so the order may not
exceed that product. With one ADC sample per clock:

* FIR1 input arrives every 2r clocks, so FIR1 taps ≤ 2r·d1 (≤ 1024 at r = 32,
  d1 = 16);
* FIR2 input arrives every 2r·d1 clocks, so FIR2 taps ≤ 2r·d1·d2.

If a setting breaks the limit, the filter drops the output whose start came
too early and pulses `overrun`; the register block latches this in
`REG_STATUS[2]` (cleared by writing `REG_STATUS`). The pipeline lets a new
output start on the clock in which the previous one issues its last tap, so
the limit is exact (taps = budget is allowed; the full-size testbench runs
FIR1 at 1024 taps with a 1024-clock budget).

**Coefficients.** Signed Q2.16 in 18 bits (65536 = 1.0, range −2..+2).
Coefficient k multiplies the sample k inputs back. They live in a RAM per
filter, written through the register bus at addresses 0x800 + k (FIR1) and
0xC00 + k (FIR2); one write reaches that filter in both the I and Q paths of
all four channels. They can be rewritten while running, so filters and
decimations can be changed to suit another machine or operating mode without
rebuilding the firmware. The FIR output is `sum >>> 16`, saturated to 24 bits.
Each FIR keeps 2×MAX_TAPS samples so that samples arriving during a long
computation never overwrite one still in use. After reset the sample RAM is
not cleared, so the first outputs of a filter (until `taps` inputs have
arrived) contain old data.

**Compensation filter.** The 9 fixed taps
`2201, −4812, −6381, 20705, 42110, 20705, −6381, −4812, 2201` (Q2.16, sum
65536) are a least-squares fit that makes the CIC and compensation filter
together flat up to 0.1 of the compensation filter's input rate. The target is
a composite flatness better than 0.01 dB from DC to 0.01·f_s (1.6 MHz at
160 MS/s). This is met at CIC ratios 4 and 8: 0.004 dB and 0.008 dB. At r = 16
that band reaches 0.16 of the CIC output rate, and a 9-tap filter leaves
0.5 dB of droop there. At r = 32 the band lies beyond the output Nyquist
frequency. The stop band of the compensation filter alone is about −21 dB.
For another operating point, replace the `COEF` parameter of `comp_fir`;
FIR1 and FIR2 can also absorb residual droop.

## Downconversion

`nco` is a 27-bit phase accumulator (frequency step f_s/2^27 = 1.19 Hz at
160 MHz; `f_IF = fcw · f_s / 2^27`, so f_s/8 is `fcw = 2^24`) followed by a
pipelined CORDIC rotator that produces 18-bit cosine and sine (amplitude
131071, error below 3 LSB). `iq_mixer` forms I = x·cos and Q = −x·sin, scaled
so that a full-scale tone gives a full-scale baseband value of half the 18-bit
range; thus for an IF tone `A·cos(ωn + φ)` the DDC output is
`I + jQ = A·e^{jφ}` when the CIC shift gives unity gain and the FIRs have unity
DC gain. The ADC sample is delayed inside `ddc` to match the NCO pipeline.

## Amplitude, crossbar and position

`cordic_amp` computes sqrt(I² + Q²) by 18 CORDIC vectoring steps with the
CORDIC gain removed by a constant multiply (24-bit unsigned result, a few LSB
error).

The front end contains a crossbar that can exchange opposite buttons
(A↔C, B↔D), so that slow drifts and non-linearities of one analog channel are
shared by both buttons of a pair. `xbar_reswap` drives this switch
(`xbar_swap`), toggling every `REG_XB_PERIOD` output samples while
`REG_CTRL[4]` is set, drops the next `REG_XB_BLANK` samples after each switch
(the filters still hold data from before it; set this to at least the filter
memory in output samples plus one), and swaps the amplitudes back into button
order. Disabling returns the switch to straight, again with blanking.

`position_calc` forms, with buttons A = top right, B = top left,
C = bottom left, D = bottom right and S = A + B + C + D:

* X = kx · ((A + D) − (B + C)) / S, Y = ky · ((A + B) − (C + D)) / S, as
  IEEE-754 single precision in mm (kx, ky unsigned Q8.16, default 10 mm);
* charge = (S · kq) >> 16 as a 32-bit unsigned integer (kq Q8.16, default 1.0).

The ratio is computed to 24 fraction bits by a pipelined divider, multiplied
by the geometry factor and converted to floating point by truncation
(relative error about 1e-6). S = 0 gives X = Y = 0. This is a linear
difference-over-sum model; no higher-order non-linearity correction is made.

## Temperature drift correction

The gain of each analog channel changes with the front-end board
temperature, by a few tenths of a percent per degree and slightly differently
per channel. Unequal changes move the computed position, on the order of
µm per degree. `temp_comp` removes this in feed-forward fashion: the board
temperature `rffe_temp` (signed, 1/256 degree per LSB, from the front-end
sensor) and a coefficient per channel give a gain
`g_c = 1 + k_c · (T − T_ref)`. Each channel amplitude is multiplied by g_c
before the crossbar re-swap, because the drift belongs to the analog path and
not to the button. `k_c` (`REG_TK0+c`) is signed, in units of 2^-32 per LSB of
T − T_ref, so 0.3 %/degree is about 50 000. Measure it per channel by
recording amplitudes against temperature, and use the negative of the
measured slope. `REG_TEMP_REF` is the temperature at which the gains were
calibrated; the correction is switched on with `REG_CTRL[5]`. The model is
linear: for a drift `1/(1 + a·dT)` it is exact, and for `1 + a·dT` it leaves
`a²·dT²`.

## Per-channel calibration and AGC

`gain_scaler` multiplies each raw ADC sample by `REG_GAIN0+c` (unsigned
Q2.16) to remove channel-to-channel amplitude imbalance before the
downconversion, saturating to 16 bits.

`agc` measures the peak of |adc| over windows of 2^16 samples. With
`REG_CTRL[3]` set, the front-end attenuation code `rffe_atten[c]`
(6 bits, meant as 0.5 dB steps, 0..31.5 dB) goes up one step after a window
whose peak exceeded `REG_AGC_HI` and down one step after a window whose peak
stayed below `REG_AGC_LO`. With the bit clear it follows `REG_ATT0+c`. Each
channel is controlled independently; since a gain step changes that
channel's amplitude, run it with thresholds far enough apart, or only between
measurements, when position accuracy matters.

## Data recording

**Raw data** (`adc_capture`, QDR port): write `REG_CTRL` bit 0 (arm), then bit
1 (trigger). From the next sample on, 2^19 words `{adc3, adc2, adc1, adc0}`
(512k samples per ADC) are written to consecutive addresses at the sample
rate, then `REG_STATUS[0]` (done) is set. Read back by writing an address to
`REG_CAP_ADDR` and, a few clocks later, reading `REG_CAP_LO`/`REG_CAP_HI`.
Port: one request per clock, `qdr_we` or `qdr_re` with `qdr_addr`; read data
returns with `qdr_rvalid` after any fixed or variable latency.

**Positions** (`pos_recorder`, DDR2 port): while `REG_CTRL[2]` is set, every
result becomes a 128-bit record `{sequence, charge, Y, X}` written to a ring
buffer of 2^24 records. The port is valid/ready (`ddr_we` held with stable
address and data until `ddr_ready`); a 16-entry FIFO absorbs stalls and
records that do not fit are counted in `REG_REC_DROP`. `REG_REC_PTR` is the
next address. The recorded time span is 2^24 divided by the output rate
(7 minutes at 39 kHz, almost half an hour at 9.8 kHz).

The position stream `pos_valid/pos_x/pos_y/charge` is also a top-level output,
for a fast feedback link.

## Register map

Register bus: `reg_wr` or `reg_rd` for one clock with a 12-bit word address;
read data comes with `reg_rvalid` on the next clock. Addresses are defined in
`bpm_pkg`.

| addr | name | access | content |
|---|---|---|---|
| 0x000 | ID | R | 0x5B9B0001 |
| 0x001 | CTRL | RW | [0] arm capture (pulse), [1] trigger capture (pulse), [2] record positions, [3] AGC on, [4] crossbar on, [5] temperature correction on |
| 0x002 | NCO | RW | frequency word, 27 bits |
| 0x003/0x004 | CIC_R / CIC_SHIFT | RW | 4..32 / 0..63 |
| 0x005/0x006 | FIR1_DEC / FIR1_TAPS | RW | 1..16 / 1..1024 |
| 0x007/0x008 | FIR2_DEC / FIR2_TAPS | RW | 1..16 / 1..1024 |
| 0x009..0x00B | KX, KY, KQ | RW | Q8.16 |
| 0x00C/0x00D | XB_PERIOD / XB_BLANK | RW | output samples |
| 0x00E/0x00F | AGC_HI / AGC_LO | RW | peak thresholds, ADC counts |
| 0x010..0x013 | GAIN0..3 | RW | Q2.16 |
| 0x014..0x017 | ATT0..3 | RW | manual attenuation |
| 0x018 | TEMP_REF | RW | calibration temperature, Q8.8 degrees (reset 25) |
| 0x01C..0x01F | TK0..3 | RW | temperature coefficients, 24-bit signed |
| 0x020 | STATUS | R, W clears [2] | [0] capture done, [1] capturing, [2] FIR overrun seen, [3] crossbar state |
| 0x021..0x023 | POS_X, POS_Y, CHARGE | R | latest result |
| 0x024/0x025 | REC_PTR / REC_DROP | R | recorder |
| 0x026 | CAP_ADDR | RW | write: read raw memory at this address |
| 0x027/0x028 | CAP_LO / CAP_HI | R | raw word read back |
| 0x029 | TEMP | R | front-end temperature input |
| 0x030..0x033 | AMP0..3 | R | latest button amplitudes |
| 0x034..0x037 | ATT_RB0..3 | R | applied attenuation |
| 0x800..0xBFF | FIR1 coefficient k | W | Q2.16 |
| 0xC00..0xFFF | FIR2 coefficient k | W | Q2.16 |

## Latencies

| block | latency |
|---|---|
| gain_scaler, iq_mixer | 1 clock |
| nco | 20 clocks (18 CORDIC stages + 2) |
| cic_decim | 1 clock after every r-th input |
| comp_fir | 1 clock after every 2nd input |
| fir_decim | taps + 3 clocks after the starting input (1 clock in bypass) |
| cordic_amp | 20 clocks |
| temp_comp | 1 clock (temperature/coefficient changes: 2 clocks) |
| xbar_reswap | 1 clock |
| position_calc | 28 clocks |

## Files

`rtl/` holds one module per file; `bpm_pkg.sv` has the shared widths,
configuration structs and register map; `bpm_fpga_top.sv` is the top.
`pipe_div.sv` is a helper of `position_calc`. `tb/tb_<module>.sv` is a
self-checking testbench for each module; `tb_bpm_fpga_top.sv` runs the whole
design end to end at reduced memory sizes and makes every mechanism happen
(decimation change, FIR bypass, FIR overrun, crossbar switching, raw capture,
recording with memory stalls and FIFO overflow, temperature drift with and
without correction, AGC up and down), and
`tb_bpm_fpga_top_full.sv` runs the top with all parameters at their defaults:
a 1024-tap FIR1 at its full budget, a full 512k-sample capture and position
recording (about 20 s of simulation time on a desktop machine). `tb_workload_4096.sv` runs the power-up configuration
(total decimation 4096, 39.0625 kHz) at default sizes and checks the output
spacing. It also checks that every X/Y is within 100 nm of the exact value
for the ADC codes delivered. The worst error seen is 42 nm, from the
firmware's own arithmetic (filters, CORDIC, division). Note that
quantizing this noise-free 10 000-count tone to integers already moves the
ideal position by more than 100 nm. With a real, noisy signal the filters
average that quantization away.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/bpm_pkg.sv tb/tb_bpm_fpga_top.sv --top-module tb_bpm_fpga_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog
ends it with a failure if it hangs. The design has two-state semantics in
mind: every register that is read is reset (except RAM contents).

## Own choices and departures

Taken from the published design: direct undersampling with 16-bit ADCs at up
to 160 MS/s and a 20 MHz IF; per-channel scaling for amplitude imbalance;
NCO with about 2 Hz tuning steps; 5th-order CIC with 48-bit accumulators
running at the ADC rate; 8th-order compensation FIR decimating by 2; FIR1 and
FIR2 with 1..1024 taps, decimation 1..16, one multiplier each, order limited by
the decimation product, order 1 = bypass; run-time change of ratios and
coefficients; total decimation 8..16384; CORDIC amplitude; the chain once per
channel; positions in single-precision float and charge as a fixed-point
integer; 512k-sample raw data recording; position recording whose duration
depends on the update rate; an AGC that measures the ADC level and sets the
front-end gain; a crossbar with re-swapping in the FPGA; feed-forward
correction of temperature drift from the front-end sensor with per-channel
coefficients; 10 mm geometry
factor; 31.5 dB gain range of the front end.

Chosen here, because the published design does not give them:

* single clock domain; simple register bus and address map; memory ports
  (single-request SRAM port, valid/ready DDR port) instead of real QDR II /
  DDR2 controllers;
* NCO by CORDIC rotation, 27-bit phase; 18-bit oscillator and mixer words,
  Q = −x·sin;
* CIC range 4..32 (implied by the total range), run-time output shift,
  differential delay 1; fixed compensation coefficients (computed here);
* 24-bit filter data, 18-bit Q2.16 coefficients, 2×MAX_TAPS sample buffer,
  overrun flag;
* pipelined CORDIC vectoring with 18 stages;
* difference-over-sum position with the button layout given above; Q8.16
  calibration factors; truncating float conversion;
* crossbar period/blanking control and re-swapping on the amplitudes rather
  than on the raw samples;
* temperature correction as a linear gain per analog channel, applied to the
  amplitudes; sensor and coefficient formats;
* AGC as a windowed peak detector with two thresholds and 0.5 dB steps;
* single-shot arm/trigger capture; 128-bit position records, 2^24-record ring
  buffer, 16-entry FIFO.

Not included: the RF front end (amplifiers, filters, crossbar switch,
heaters, pilot tone), the ADCs, the QDR II SRAM and DDR2 SDRAM with their
controllers, the control-system interface on the system FPGA (VME64x), the
link to the global orbit feedback (its protocol is not defined), on-FPGA FFT
analysis, and parallel position outputs at several bandwidths. For those,
instantiate a second decimation cascade after the compensation filter.
The top-level ports are where these parts connect.
