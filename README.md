# Multigate transcranial Doppler: FPGA receive processing

A pulsed-wave Doppler sends an ultrasound burst into the skull and listens to
the echo. Blood moving at a given depth shifts the phase of the echo from
that depth a little from one burst to the next. The shift per burst gives the
flow velocity. A *multigate* system does this at many depths at once: every
echo line is cut into range gates and each gate is followed over slow time
(burst to burst).

This RTL is the part of such a system that must run at the ADC rate. It takes
14-bit RF samples at 64 MHz from up to two probes. For every probe, every
gate and every burst it delivers one 16-bit complex (I/Q) baseband sample,
with the strongest slow-time clutter from stationary tissue already removed.
That is 100 gates × 4 kHz × 2 × 16 bit ≈ 13 Mbit/s per probe instead of
64 MS/s × 14 bit. Everything after that runs in software: the final clutter
filter, velocity estimation, the colour M-mode map, FFT spectrograms and
directional audio. It is not part of this RTL.

## Signal chain of one channel (`rx_channel`)

```
adc_data ─► ddc ─► cic_decimator (I) ─► gain_sat ─►┐
  14 b       │ 28 b        35 b             16 b   ├► wall_filter_bank ─► gain_sat ×2 ─►┐
             └───► cic_decimator (Q) ─► gain_sat ─►┘   38 b per I/Q        16 b        mux ─► out_i/out_q
                                            └──────────── bypass (out_sel=1) ─────────────┘
```

`digitds_fpga` (the top) contains two independent copies of this chain, one
per probe, for bilateral examinations. The copies share only clock and reset.
All top-level ports other than `clk` and `rst_n` are arrays indexed by
channel.

### Demodulator (`ddc`)

Each RF sample is multiplied by a cosine (giving I) and a minus sine (giving
Q) at the transmit frequency. This moves the echo band to 0 Hz, and a flow
towards the probe shows up as a positive frequency. The references come from
six ROMs. Each holds one period of `round(8191·cos(2πn/P))` or
`round(−8191·sin(2πn/P))`, and they are computed at elaboration. The defaults
are P = 32, 16 and 8 samples, i.e. 2, 4 and 8 MHz. A 3-to-1 multiplexer per
multiplier picks the frequency (`freq_sel`). The reference phase restarts at
`line_sync`, so every line is demodulated with the same phase relative to the
transmit burst. That is what makes the slow-time phase meaningful. Latency is
2 clocks.

### Gate integration (`cic_decimator`)

This is a single-stage CIC filter: an integrator at 64 MHz, a decimator, and a
comb (differentiator) at the output rate. With one stage the output is simply
the sum of the last R products, so each output is one **range gate**
R samples long:

* R = 128 gives a 2 µs gate (about 1.5 mm of tissue) and 0.5 MS/s.
* The frequency response is a sinc with nulls at multiples of 64 MHz / R.
* The DC gain is R (42 dB at 128).

R (`decim`) is set at run time and latched at `line_sync`. It runs up to
`R_MAX` = 128. The value 0 is read as 1, and values above `R_MAX` are read as
`R_MAX`. After `line_sync` the filter emits gates 0…99, tagged with the gate
number and a last-gate flag, then waits for the next line. The word grows from
28 to 35 bits. The integrator is allowed to wrap in two's complement, because
the comb removes the wrap exactly. `STAGES` can be raised (each stage adds
log2(R_MAX) bits), but the default is one stage.

### Gain and saturation (`gain_sat`)

Two places in the chain keep only 16 bits of a wider word: 16 of the 35 CIC
bits, and 16 of the 38 wall filter bits. Each of these stages is an arithmetic
right shift by a run-time amount (`cic_shift`, `wf_shift`), then clipping to
[−32768, 32767]. The shift acts as the digital gain. Clipped samples are
reported on `cic_sat` / `wf_sat`. Rounding is by truncation (towards −∞).

### Wall filter bank (`wall_filter_bank`): the hard part

The wall filter is a 64-tap FIR high-pass along slow time. One is applied to I
and one to Q of every gate: 200 filters for 100 gates. All of them share one
set of 64 programmable 16-bit coefficients. The filter removes the large,
nearly constant echo of vessel walls and tissue.

The bank has only two multipliers, so it runs **serially**. When a gate's new
sample arrives, the bank:

1. writes the sample into that gate's history, then
2. spends 64 clocks on one multiply-accumulate per clock each for I and Q,
   `y = Σ c[k]·x[n−k]`.

The next gate can be taken as soon as those 64 clocks are over, which fits
into the 128 clocks between gates at the usual R.

**History memory.** The history is a 6400 × 32-bit RAM: 100 gates × 64 taps
× {Q,I}. It is addressed `gate·64 + slot`. Every gate receives exactly one
sample per line, so all gates share one circular write slot `wp`. The slot
advances once the last gate of a line is taken. Tap k of a gate is read at
`slot = wp − k (mod 64)`. The slot used for the reads is latched when the
sample is accepted, so the line can close while a gate is still being
filtered. On an FPGA this RAM maps naturally onto 25 blocks of 256 × 32.

**Cycle budget.** The schedule is:

| Cycle | What happens |
|---|---|
| A | Sample accepted and written; it is also forwarded as tap 0, so no read has to wait for the write |
| A+1 … A+63 | Registered reads of taps 1…63 |
| A+1 … A+64 | MACs |
| A+64 | `in_ready` high again |
| A+65 | 38-bit result on `out_valid` |

So a gate may come every 64 clocks or slower (R ≥ 64). A gate that arrives
while the bank is busy is **dropped** and reported on `wf_overflow`. The slot
advances when the last gate of a line is accepted, or dropped, so the
histories stay aligned to lines.

**Clearing and accumulator width.** After reset the bank spends 6400 clocks
writing zeros to its history and its coefficients. During that time
`wf_ready` is low. Load the coefficients after it ends. The accumulators are
38 bits: 64 products of 16×16 bits cannot overflow them.

A delay-line canceller is the coefficient set (1, −1, 0, …). Other
coefficient sets give a high-pass or band-pass.

### Final multiplexer

`out_sel` = 0 sends the wall-filtered stream. `out_sel` = 1 sends the gain
stage output straight after the CIC, which bypasses the wall filter (raw
gated I/Q). In bypass the wall filter keeps running, so its histories stay
current. The output is registered.

## Timing summary

Take a line whose `line_sync` is in cycle T0, with decimation R. Gate g
appears on `out_*` in:

* cycle **T0 + (g+1)·R + 3** in bypass;
* cycle **T0 + (g+1)·R + 68** through the wall filter (the top's
  `N_TAPS + 4`).

At a 4 kHz burst rate a line is 16 000 clocks long, and 100 gates of 128
samples take 12 800 of them. Only `decim` is latched at `line_sync`. Change
the other settings and coefficients between lines.

## Parameters and sizes

| Parameter | Default | Where |
|---|---|---|
| `N_CH` | 2 | top: probes / channels |
| `N_GATES` | 100 | gates per line |
| `N_TAPS` | 64 | wall filter length (power of two) |
| `R_MAX` | 128 | largest decimation factor |
| `PER0..2` | 32, 16, 8 | `ddc`: reference period in samples (2, 4, 8 MHz) |
| `STAGES` | 1 | `cic_decimator` |

`digitds_pkg` holds the shared widths. After synthesis one channel has about
206 kbit of RAM, and the top about 417 kbit.

## What follows the source description and what does not

The source description gives the following, and this RTL follows it:

* the chain;
* the 14/28/35/16/38-bit widths;
* six reference ROMs with two 3-to-1 multiplexers and two multipliers;
* a single-stage CIC with run-time decimation (typically 128);
* 100 gates;
* 64 programmable taps run serially with two MACs;
* the 6400 × 32 state memory and the 64 × 16 coefficient memory;
* gain/saturation stages before and after the wall filter;
* a final multiplexer;
* two receive channels;
* the 64 MHz clock.

The following are choices made here:

* **The three demodulation frequencies.** The defaults are 2/4/8 MHz and are
  parameters.
* **The sign convention and the restart of the reference phase at
  `line_sync`.**
* **The pipelining.** The DDC has 2 clocks of latency. The wall filter takes a
  gate every 64 clocks and delivers its result 65 clocks after acceptance.
* **How the gain stages select bits and saturate.**
* **What the final multiplexer chooses between.** Here it is the wall filter
  output or a bypass.
* **The valid/ready handshake, the drop-on-busy rule and the clearing sweep.**
* **Two full independent channels with nothing shared.** This follows from
  the stated RAM and multiplier use, not from an explicit statement.
* **Plain ports for all settings and outputs.** There is no host interface.
  The link to the control processor is not modelled, and neither are the
  transmit waveform or the TGC control.

One disagreement in the source is resolved here: a block diagram draws the
CIC with four integrator/comb pairs. The stated widths (28 → 35 bits at
R = 128) and the plotted response (42 dB DC gain, −13 dB first sidelobe)
both mean one stage, and the RTL uses one stage.

## Verification

Each module has a self-checking testbench in `tb/`. Every expected value is
computed inside the testbench from the arithmetic described above. Each
testbench ends with `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_ddc` | all three frequencies, phase restarts, gaps in the input, 2-clock latency |
| `tb_cic_decimator` | R = 128, 37, 1, 0 (read as 1) and 200 (read as 128); full-scale inputs; a line cut short by a new `line_sync`; gate numbering; output cycle |
| `tb_gain_sat` | 35- and 38-bit instances, all shifts, saturation |
| `tb_wall_filter_bank` | 5 gates × 64 taps against a reference FIR; 65-clock latency; gates 64 clocks apart; coefficient reload; drops while busy (including a dropped last gate); clearing after reset |
| `tb_rx_channel` | one channel at full size, 75 lines against a bit-exact reference model |
| `tb_cic_response` | gate frequency response of one channel at R = 128: gain 42 dB at DC, nulls every 0.5 MHz, sidelobes as computed |
| `tb_digitds_fpga` | both channels at full size and default parameters, running concurrently with different settings |

In the two channel-level tests, every output word, gate number and arrival
cycle is checked. They also count each mechanism and fail if one never
happens: the three frequencies, several gate lengths (including R = 64,
the shortest without drops), bypass, both saturation points, a coefficient
reload, and overflow drops (which must match the model's prediction). `tb_wall_filter_bank` exposed and now guards the case of
a dropped last gate arriving while another gate is being filtered.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/digitds_pkg.sv \
          tb/tb_digitds_fpga.sv --top-module tb_digitds_fpga
./obj_dir/Vtb_digitds_fpga
```

The full-size two-channel test simulates about 1.2 million clocks and takes
about a second.

## Limits

* Settings are plain ports. A real system needs a register interface to its
  control processor.
* The wall filter coefficients are shared by all gates of a channel.
* Rounding is truncation, so a small negative bias remains in each gain
  stage.
* No timing closure or FPGA resource numbers were measured for this RTL.
