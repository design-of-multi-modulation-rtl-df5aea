# Multi-modulation baseband modulator and demodulator

A software defined radio should change its modulation without new hardware.
This design is one baseband modulator and one baseband demodulator that
share a single datapath for four linear modulations: BPSK, 4-PAM, QPSK and
16-QAM. A 2-bit mode input selects the modulation at run time. The
modulations differ in only three ways:

- how many bits make a symbol (k = 1, 2, 2 or 4);
- whether the quadrature (Q) arm is used;
- how many samples a symbol lasts.

So one mapper, one pulse-shaping filter, one matched filter, one timing
recovery and one demapper can serve all four, each switched by the mode.

The design follows a published design for a configurable baseband modem for
an FPGA SDR platform. That design is described block by block, by function.
It gives:

- the signal chain;
- the four modulations and their amplitude equations;
- Gray coding;
- RRC/RC filtering with an interpolation rate that follows the modulation;
- a Gardner timing error detector;
- SPI setup of the converters.

Everything below that level is this implementation's own: word widths,
filter roll-off and span, the timing-recovery control law and the SPI word
table. Each `rtl/` file says in its opening comment which parts are which.
See also "Departures and limits" below.

## Signal chain

```
 seed(9) ─► prbg ─► symbol_mapper ─► psf_interp (RRC) x2 ─► dac_i/dac_q   (mmbm)
                         ▲ bit/symbol ticks from the mmbm controller

 adc_i/adc_q ─► matched_filter (RRC) x2 ─► timing_recovery ─► symbol_demapper ─► rx_bit
                                                                     │
                                                 psf_interp (RC) x2 ◄┘ ─► rc_i/rc_q  (mmbd)

 setup_config ─► SPI to clock synthesizer, DAC, ADC; then releases mmbm/mmbd
```

`mmbmd_top` holds both halves side by side. The channel (DAC, the analog
path and the ADC) is outside the top, so a testbench closes the loop from
`dac_*` to `adc_*`.

## Modes and rates

Everything runs at one sample per clock. The bit rate is the same in every
mode: one bit every `SPB` = 4 clocks. A symbol of k bits therefore lasts
L = k·SPB samples, and L is the interpolation rate of the pulse-shaping
filter.

| mod_sel | modulation | k | Q arm | L (samples/symbol) | levels per axis |
|---|---|---|---|---|---|
| 0 | BPSK   | 1 | no  | 4  | ±μ |
| 1 | 4-PAM  | 2 | no  | 8  | ±μ, ±3μ |
| 2 | QPSK   | 2 | yes | 8  | ±μ |
| 3 | 16-QAM | 4 | yes | 16 | ±μ, ±3μ |

μ is `MU` = 2048. The amplitudes are μ·(2i+1−M) per axis.

Gray coding is used, so neighbouring levels differ in one bit:

- 2-level axis: 0 → −μ, 1 → +μ.
- 4-level axis: 00 → −3μ, 01 → −μ, 11 → +μ, 10 → +3μ.

The first bit of a symbol is its most significant bit. In QPSK and 16-QAM
the first half of the bits drives I and the second half drives Q. QPSK and
16-QAM are thus just a BPSK or 4-PAM axis used twice, and the mapper and the
demapper reuse the one-dimensional rules on each axis. QPSK therefore sits
on the diagonals: this is PSK with a π/4 phase offset.

## Pulse shaping and matched filtering

The filter taps are computed at elaboration time (`mmbmd_pkg::coef_l`) from
the closed-form impulse responses. Roll-off is α = 0.5 and the span is
`SPAN` = 6 symbols, giving SPAN·L+1 taps: an odd count, symmetric about the
centre.

- **RRC taps** are scaled to unit energy and quantised to Q1.15. As a
  result, the RRC transmit filter followed by the RRC matched filter has a
  gain of exactly 1 at the symbol peak. The demapper thresholds (0 and ±2μ)
  rely on this.
- **RC taps** have a unit peak in Q2.14. They are zero at every other whole
  symbol offset, so an RC-shaped waveform shows each symbol value exactly at
  its instant.

**`psf_interp`** is a polyphase interpolator. It keeps the last SPAN+1
symbols. Each clock it computes output phase p (0 … L−1):

    y[mL+p] = Σ_{j=0..SPAN} x[m−j] · h[jL+p]

That is SPAN+1 = 7 multipliers per arm, whatever the mode. Each new symbol
resets p to 0.

The same module serves two roles, chosen by `IS_RC`:

- with RRC taps, it is the modulator's pulse-shaping filter;
- with RC taps, it re-shapes the demodulator's recovered symbols into a
  clean waveform for a DAC or a scope.

**`matched_filter`** is a full-rate FIR. The response for every mode is
centred in one 97-tap window (SPAN·16+1). Shorter responses are padded with
zeros, so the group delay is 48 samples in every mode. Because the taps are
symmetric, the two samples that share a tap are added before the multiply.
This leaves 49 multipliers per arm.

## Symbol timing recovery

This is the least obvious block (`timing_recovery`). The demodulator has no
interpolator for fractional timing. Instead it picks one of the L samples of
each symbol as the symbol sample:

- a counter runs 0 … L−1;
- the timing index `n_opt` names the chosen position;
- when the counter equals `n_opt`, the current matched-filter sample is
  taken and `strobe` pulses.

At every strobe the Gardner error is formed:

    e = y[n − L/2] · (y[n] − y[n − L])

In QPSK and 16-QAM the same term for Q is added. When the strobes sit on the
symbol peaks, the mid-symbol sample of each transition is near zero, so e
averages to zero. If sampling is late, e is positive; if early, negative.

Every `WIN` = 32 symbols the summed error is compared with a threshold
proportional to the summed strobe power (power >> `TH_SHIFT`, i.e. 1/16):

| condition at the end of a window | action |
|---|---|
| error > +threshold | `n_opt` − 1 (sample earlier), `step_early` |
| error < −threshold | `n_opt` + 1 (sample later), `step_late` |
| in band, eye open | one good window; `LOCK_WIN` = 2 in a row → `locked` |
| in band, eye closed | `n_opt` + 1, `step_late` |

The eye test is needed because the Gardner error is also zero half a symbol
away from the optimum. There the strobes fall on the symbol transitions: an
unstable balance point, but one that the threshold band alone would accept.
At the right instant, the strobe power times L exceeds the power summed over
all samples of the window; at the balance point it falls below. So an
in-band window with a closed eye is treated as a step.

Things to know about this block:

- **Resolution.** Timing resolution is one sample: 1/4 symbol in BPSK,
  1/16 in 16-QAM. In a channel whose delay is a whole number of samples this
  reaches the exact peak. A fractional delay leaves up to half a sample of
  timing error.
- **Clock drift.** The loop does not track drift between transmitter and
  receiver clocks beyond one step per window.
- **Wrap-around.** A step across the symbol boundary (`n_opt` wrapping
  between 0 and L−1) can drop or repeat one strobe.
- **Lock time.** Lock takes a few windows. In the end-to-end test it took
  400 to 1500 clocks in BPSK, 4-PAM and QPSK, and about 3600 clocks in
  16-QAM.

## Demapper and bit output

`symbol_demapper` slices each strobed sample:

- 2-level axes: threshold at 0;
- 4-level axes: thresholds at 0 and ±2μ.

It then Gray-decodes the decisions into the k bits, inverse to the mapper.
It also outputs the ideal amplitudes (±μ, ±3μ), which feed the RC filters.
The k bits leave serially, first bit first, one every SPB clocks. The
recovered stream therefore has the transmitter's bit rate.

## Setup configuration

`setup_config` writes a table of serial words after reset. Each entry of the
`WORDS` parameter holds:

- a target (0 clock synthesizer, 1 DAC, 2 ADC);
- a length of 1 to 32 bits;
- the word itself.

SPI format:

- MSB first;
- the serial clock idles low and each half period lasts `DIV` clocks;
- data changes while the clock is low;
- the target's active-low enable is low for the whole word.

When the table is done, `cfg_done` rises, and only then does the top release
the modulator and demodulator.

**The default table holds placeholders:** three words of zero data, of
lengths 32, 16 and 16. Replace them with the register settings of the
actual converters and clock chip before use.

## Top level (`mmbmd_top`)

| port | dir | width | |
|---|---|---|---|
| clk, rst_n | in | 1 | sample clock, asynchronous active-low reset |
| mod_sel | in | 2 | modulation (table above) |
| seed | in | 9 | bit-generator seed; all zeros means all ones |
| dac_i, dac_q | out | 16 | shaped transmit baseband |
| adc_i, adc_q | in | 14 | receive baseband; placed in the upper 14 of 16 bits |
| rx_bit, rx_bit_valid | out | 1 | recovered bits, one per SPB clocks |
| rx_sym_bits, rx_sym_valid | out | 4, 1 | recovered symbol bits (LSB-aligned) |
| rc_i, rc_q | out | 16 | RC re-shaped recovered symbols |
| n_opt, locked, step_early, step_late | out | 4, 1, 1, 1 | timing recovery state |
| tx_bit, tx_bit_valid | out | 1 | transmitted bits |
| spi_sclk, spi_sdata, spi_cs_n[2:0], cfg_done | out | | setup interface |
| mode | out | 2 | mode in use |

**Mode switch.** A change of `mod_sel` is registered, and the modulator and
demodulator are reset for one clock. The bit generator reloads its seed, the
filters are cleared and timing recovery starts again from `n_opt` = 0.

**Latency.** A symbol enters the RRC interpolator one clock after its last
bit. Its shaped pulse peaks SPAN/2 symbols plus 2 clocks later. The matched
filter adds 49 clocks to its peak, timing recovery adds 1 and the demapper
adds 1. The first recovered bit follows 2 clocks after that.

## Bit generator

`prbg` is a 9-stage Fibonacci LFSR with polynomial x⁹ + x⁵ + 1 (period 511).
It loads `seed` while the modulator is idle and shifts once per bit request.

## Departures and limits

- **Internals are this implementation's choices.** The block-level chain,
  the four modulations and their amplitudes, Gray coding, RRC/RC filtering
  with a mode-dependent rate, a Gardner-based timing recovery and SPI setup
  follow the original design. The internals of every block, and all sizes
  (SPB, SPAN, α, widths, μ, WIN, thresholds), are choices made here.
- **Fixed bit rate.** The same bit rate in every mode (L = k·SPB) is a
  choice made here. The original only ties L to the modulation.
- **Shared mode.** Transmitter and receiver share one mode input and one
  reset. In a real link each side would have its own.
- **No carrier stage.** There is no carrier recovery, frequency offset
  correction, equaliser or noise handling beyond what the hard decisions
  tolerate. The tests use a noiseless channel with integer sample delays.
- **SPI table.** The SPI words are placeholders, as noted above.
- **Two ADC channels.** The receive side takes I and Q from two 14-bit ADC
  channels. The converter named for the original board (ADS5500) has one
  channel. For the one-dimensional modes (BPSK, 4-PAM) only `adc_i` is
  needed.
- **Cost.** The filters are written for clarity: single-cycle multiply-add
  trees, with no pipelining for a particular FPGA.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_mmbmd_top \
    rtl/mmbmd_pkg.sv tb/tb_mmbmd_top.sv
./obj_dir/Vtb_mmbmd_top
```

Replace `tb_mmbmd_top` with any testbench in `tb/`. `-Irtl` lets Verilator
find each module in `rtl/<name>.sv`. Each run takes well under a second.

| testbench | what it checks |
|---|---|
| tb_mmbmd_top | full design at its default sizes. DAC looped to ADC with 2 LSBs dropped and a per-mode delay. Runs BPSK, 4-PAM, QPSK, 16-QAM, BPSK. Checks transmitted bits against x⁹+x⁵+1, timing lock, zero bit errors over 400 bits, bit and symbol rates, and RC output at the symbol instants. Counts SPI words, mode switches, locks, and early and late steps. |
| tb_mmbm | bits, Gray-mapped symbols and every shaped sample against a testbench convolution |
| tb_mmbd | demodulates a signal shaped by the testbench in every mode, with zero bit errors |
| tb_prbg | sequence, period 511, zero seed, enable gating |
| tb_symbol_mapper, tb_symbol_demapper | constellation tables, bit order, serial timing |
| tb_psf_interp | RRC and RC outputs against direct convolution, and tap properties |
| tb_matched_filter | folded filter against unfolded convolution, and latency |
| tb_timing_recovery | RC pulse trains at several offsets: lock, index, strobes on the peaks |
| tb_setup_config | SPI words, enables and clock timing decoded from the pins |

## Changing the design

- **Shared constants.** Sizes shared by all blocks are in `rtl/mmbmd_pkg.sv`:
  `SPB`, `SPAN`, `ALPHA`, `DW`, `ADC_W`, `MU`, `CW` and the coefficient
  fraction bits.
- **Filters.** The tap tables are recomputed from `ALPHA` and `SPAN` at
  elaboration, so changing them needs no table edits.
- **Overflow.** If μ is raised, keep the filter outputs inside 16 bits; the
  outputs saturate.
- **Timing loop.** `WIN`, `TH_SHIFT` and `LOCK_WIN` are parameters of
  `timing_recovery`: they trade lock speed against jitter.
- **SPI setup.** The register words go in the `WORDS` parameter of
  `setup_config`.
