# Digital front-end for a GSM/DECT subsampling receiver

This is synthesizable SystemVerilog for the digital half of a multi-standard
software radio receiver. The analog part translates the antenna signal with
two fixed local oscillators to a second intermediate frequency IF2. A 4th-order
bandpass sigma-delta ADC then subsamples that IF in the second Nyquist zone,
with

    fs = 4 * IF2 / 3

so the wanted channel lands at 3fs/4. From there everything is digital: the
one-bit ADC stream is mixed to complex baseband, filtered down to one channel,
and decimated to one complex sample per symbol. The same hardware serves
GSM and DECT. A mode input picks the decimation factors and filter
coefficients.

The design follows the published architecture of Puvaneswari and Sidek for
this receiver: a multiplexer-based quadrature mixer, a 5th-order comb
decimator, and an inverse-sinc FIR and a generic FIR. Both FIRs run as
dual-channel polyphase filters on a single MAC engine. The filter coefficients, word widths, rounding
and control details are this implementation's own, listed below.

## Signal chain

```
 sd_bit ──► ±1 ──► iq_downconverter ──► cic_decimator (I) ──► mac_fir_decimator ──► mac_fir_decimator ──► out_i
 (fs)              3fs/4 → DC         ─► cic_decimator (Q) ─►   inverse sinc, /2      generic FIR, /2     out_q
                                           /M, 5th order
```

| Stage | GSM | DECT |
|---|---|---|
| ADC rate fs (symbol rate × OSR) | 17.333 MHz (270.833 k × 64) | 36.864 MHz (1.152 M × 32) |
| Comb decimator | N=5, M=16, D=1 | N=5, M=8, D=2 |
| Inverse sinc FIR, ÷2 | 24 taps (order 23), pass 82 kHz | 16 taps (order 15), pass 574 kHz |
| Generic FIR, ÷2 | 48 taps (order 47), 82→100 kHz | 32 taps (order 31), 574→700 kHz |
| Output rate | 270.833 kHz (1 sample/symbol) | 1.152 MHz |

Passbands are 82 % of the channel bandwidth (100 kHz for GSM and 700 kHz for DECT).

## The blocks

### `iq_downconverter`: mixing without multipliers

At 3fs/4 the sampled cosine and sine carriers are the periodic sequences
`[1 0 -1 0]` and `[0 1 0 -1]`. So mixing only passes the sample, passes its
negation or outputs zero. A 2-bit phase counter drives two multiplexers:

| phase | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| I | +x | 0 | −x | 0 |
| Q | 0 | +x | 0 | −x |

The outputs are one bit wider than the input so that negation cannot overflow.
They are registered, so the latency is one clock, and the phase restarts at 0 after reset.

Together, `I + jQ` is the input times `exp(+jπn/2)`. A carrier at 3fs/4 + Δ
aliases to −fs/4 + Δ, so it lands at +Δ: frequencies above the carrier stay
above it, and the spectrum is not mirrored.

### `cic_decimator`: comb filter

This is the standard Hogenauer structure. Five integrators run at the input
rate, then the signal is decimated by M. Five comb sections `y = x − x[−D]`
then run at the output rate, with D counted in decimated samples. The transfer
function is `[(1 − z^−MD)/(1 − z^−1)]^5`. GSM and DECT both have M·D = 16, so
the two modes share the same impulse response (five cascaded length-16
boxcars) and the same DC gain of 2^20. They differ only in where they
decimate.

Every register is `N·log2(M·D) + B_IN` = 23 bits wide for the 3-bit mixer
output. The registers wrap around in two's complement. The integrators
overflow constantly, which is expected: the comb differences cancel the wraps
exactly, as long as the final result fits. The output is the top 16 of the 23
bits (truncation), so a ±1 input at DC gives ±8192.

Output k corresponds to input index k·M + M − 1. It appears one clock after
that input. The five integrators are a combinational ripple chain inside one
clock, and there is no pipelining.

### `mac_fir_decimator`: one MAC for two channels and a decimate-by-2

This block is the hardest part to follow. Both FIR stages use it, with the
parameter `STAGE` picking the coefficient table.

* **Sample store and I/Q multiplexing.** The I and Q samples of an input are
  time-multiplexed onto one write line into a single-port circular memory,
  with the channel in the top address bit. I is written in the clock of
  `in_valid` and Q in the next clock, so inputs must be at least two clocks
  apart, which an assertion checks. The store is 64 deep per channel, more
  than the longest filter (48) plus two, so new samples can be written while
  a computation reads the old ones.
* **Polyphase decimation.** Only every second output of the full-rate filter
  is computed: after inputs 1, 3, 5, … counted from reset. The work equals
  the two-branch polyphase form.
* **MAC schedule.** A computation takes 2·T clocks for T taps: T cycles for I,
  then T for Q. Each cycle reads `x[n−k]` and `h[k]` and accumulates
  `h[k]·x[n−k]`. The result is shifted right by 15 (truncation) and
  saturated to 16 bits. `out_valid` pulses 2·T clocks after the clock edge
  that took the starting input.
* **Back-to-back operation.** A new computation may start in the same clock
  in which the previous one finishes. The highest sustained rate is therefore
  two inputs every 2·T clocks. If a start arrives earlier, the sticky `overrun`
  output is set and an assertion fires.
* Samples older than the first one written after reset read as zero. The
  memory itself is never reset.

The clock rate follows from this schedule. Per ADC sample, GSM needs 1.5 clocks
(generic FIR: 96 cycles per 64 ADC samples). DECT needs exactly 2 (16 taps at
fs/8 and 32 taps at fs/16). A 73.728 MHz clock runs DECT at 36.864 MHz with no
idle cycle.

### `dfe_pkg`: modes and coefficients

`mode_e` (`MODE_GSM`, `MODE_DECT`), `fir_stage_e`, the comb settings, the filter
lengths and the four Q1.15 coefficient tables all live here. The function
`fir_coef(stage, mode, k)` returns a coefficient (zero beyond the filter
length); `fir_taps(stage, mode)` returns the filter length.

How the tables were obtained (all symmetric, 16-bit, value = integer/32768):
both stages are constrained minimax (equiripple) linear-phase filters, found
by linear programming. Each stage minimises the peak deviation from unity of
the whole chain up to and including itself over the passband (0 to 82 % of
the channel bandwidth). So the inverse sinc flattens the comb droop, and the
generic FIR flattens what remains. Each stage is also subject to these
stopband bounds:

| Stage | Bound | GSM | DECT |
|---|---|---|---|
| Inverse sinc (filter alone) | band folding onto the channel after ÷2: `[fi/2 − BW, fi/2]` | −60 dB | −20 dB |
| | rest of the upper half band `[fi/4, fi/2 − BW]` | −50 dB | −20 dB |
| | `[1.05·fpass, fi/4]` | ≤ 0 dB | ≤ 0 dB |
| Generic FIR (whole chain) | from the channel bandwidth BW to its input Nyquist | −23 dB | −35 dB |

(fi is the stage's input rate and BW the channel bandwidth.) The resulting
chain response, as measured in simulation:

| | GSM | DECT | Target |
|---|---|---|---|
| Passband ripple (peak to peak) | 0.042 dB | 0.111 dB | 0.1 dB / 0.5 dB |
| Gain at the channel edge (100 / 700 kHz) | −23.0 dB | −34.9 dB | −20 / −13.4 dB |

## Top level: `dfe_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `mode` | in | `mode_e` | GSM or DECT; change only while `rst` is high |
| `sd_valid`, `sd_bit` | in | 1 | one ADC bit (1 = +1, 0 = −1); at most every second clock |
| `out_valid`, `out_i`, `out_q` | out | 1, 16, 16 | baseband sample pair, one per symbol |
| `busy` | out | 1 | either MAC engine is computing |
| `overrun` | out | 1 | sticky; input came faster than the MAC stages allow |

The analog front-end is outside the RTL: the antenna, the RF band-select
filter, the LNA, the two mixers with their local oscillators, the IF bandpass
and anti-alias filters, and the sigma-delta modulator. Its bit stream enters
on `sd_valid`/`sd_bit`.

## Where this implementation makes its own choices

* **Coefficients** are designed here from the published band edges, stopband
  levels and filter orders. The original tables were not available. The
  inverse sinc targets the real comb droop rather than the closed-form
  `[πf/sin πf]^N`. The generic FIR is a minimax design like the original
  Remez one, but it also compensates the residual droop. It reaches −23 dB
  rather than −20 dB at the GSM channel edge, and −35 dB rather than
  −13.4 dB at the DECT edge.
* **Word widths**: the ADC word is 1 bit, the mixer output 3 bits, the comb
  registers 23 bits, and the data between stages and at the output 16 bits,
  with a 38-bit accumulator. The comb output is truncated. The FIR outputs are
  truncated and then saturated.
* **Comb register width** uses `N·log2(M·D)`. The formula `N·log2(M)` would
  be 5 bits too narrow for DECT with D = 2.
* **DECT sample rate.** The table of standards gives DECT an oversampling ratio
  of 32, which matches the 8 × 2 × 2 decimation. Here fs is taken as
  32 × 1.152 MHz = 36.864 MHz. The subsampling relation with IF2 = 55.296 MHz
  would instead give 73.728 MHz (64×). The RTL does not depend on fs, only the
  test stimuli and the clock budget do.
* **Mode switching** is done by reset: no state is carried across a change of
  standard.
* **Control**: valid strobes on a single clock, the back-to-back MAC restart,
  the `busy` and `overrun` outputs, and the 64-deep sample store. I and Q
  enter the FIR in parallel and are serialised onto the store's single write
  port. The original feeds an interleaved I/Q line at twice the sample rate.
* Not built: the distributed-arithmetic FIR. The original work only compared it
  with the MAC engine and rejected it on logic cost.

## Verification

Every testbench is self-checking, has a watchdog, and ends with
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_iq_downconverter` | random samples with random gaps in `in_valid`; outputs against the cos/sin sequences; 1-clock latency |
| `tb_cic_decimator` | both modes. Compares the output with a reference of five length-16 moving sums in 64-bit arithmetic (no wrap). Also checks one output per M inputs and timing, and that integrator wrap-around actually occurred |
| `tb_mac_fir_decimator` (with `fir_stage_harness`) | both stages in both modes, using full-scale random I/Q at the maximum rate and with gaps. Compares against direct convolution, and checks the 2·T latency, the output count, back-to-back starts, saturation and that no overrun occurs |
| `tb_dfe_channel_response` | the comb and both FIR stages with a 12-bit input. Applies clean complex tones in both modes and measures the passband ripple (limit 0.1 dB GSM, 0.5 dB DECT), the attenuation at the channel edge (at least 20 dB and 13.4 dB) and the output rate |
| `tb_dfe_top` | end to end at default parameters. `bp_sdm_model` is a behavioural 4th-order bandpass sigma-delta modulator (2nd-order loop with z⁻¹ → −z⁻²) that produces the bit stream from a tone near 3fs/4. There are four runs: GSM with 40 kHz and 300 kHz offsets and DECT with 300 kHz and 2 MHz offsets, one ADC bit every second clock. Checks every output bit-exactly against a reference of the whole chain built from the recorded bits, the output rates (÷64 and ÷32) and the absence of overrun. The out-of-band tone must come out at least 20 dB below the in-band one; measured figures are about −52 dB (GSM) and −39 dB (DECT). The in-band tone, which sits above the carrier, must also rotate in the positive sense at the output, which confirms that taking the 3fs/4 image does not reverse the spectrum. It also requires mode switches, comb wrap-around and back-to-back MAC operation in both FIR stages |

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert rtl/dfe_pkg.sv rtl/iq_downconverter.sv \
  rtl/cic_decimator.sv rtl/mac_fir_decimator.sv rtl/dfe_top.sv \
  tb/bp_sdm_model.sv tb/tb_dfe_top.sv --top-module tb_dfe_top -o sim
./obj_dir/sim
```

Each block test compiles in the same way, from `rtl/dfe_pkg.sv`, the block's
file and its testbench (plus `tb/fir_stage_harness.sv` for the FIR test). All
of them run in a few seconds.

## How far to trust it

The datapath arithmetic is checked bit-exactly against independent models.
The passband ripple and channel-edge attenuation are checked against the
GSM/DECT figures given above. Nothing here was checked against the original
coefficient tables or against the standards' full blocking profiles and CNR
requirements. Those depend on the coefficients, which are this
implementation's own, and on the analog front-end.
Timing closure at 73.728 MHz has not been checked. The comb integrator
ripple chain (five 23-bit adders in series) and the single-cycle MAC are the
longest paths, and both could be pipelined if needed.
