# Differentially coherent DOQPSK receiver

Offset QPSK is usually received coherently, which needs a carrier recovery
loop. This receiver avoids that: it multiplies the IF signal by delayed copies
of itself (differential detection), then lets an 8-state soft-decision Viterbi
decoder undo the intersymbol interference and the I/Q cross-talk that
differential detection of OQPSK produces. The decoder does not work from a
channel model. It compares each received sample pair with 16 reference points,
the "centres of gravity". These are learnt from a known bit sequence, either on
the chip or off line. The target is a 4 Mbit/s burst (TDMA) link with an 8 MHz
IF sampled at 32 MHz.

The RTL covers the digital receiver, from the 8-bit A/D samples to the decoded
bits. The RF front end and the A/D converter are not part of it.

## Signal path

```
 if_sample (8b, 32 MHz)
   |
   +--> delay 13 --(x)--> RRC LPF --> X (9b) --+
   |                |                          +--> down by 8 --> (X,Y) at 4 MHz
   +--> delay  9 --(x)--> RRC LPF --> Y (9b) --+          |            |
   |________________|                                     |            v
                                              gravity_trainer     viterbi: BMU -> ACS -> max_p -> SMU --> outbit
                                               (16 centres) ----> (or off-line bank)
```

| block (file)            | what it does |
|-------------------------|--------------|
| `doqpsk_demod`          | The two real correlators and their lowpass filters (uses `delay_line`, `rrc_lpf`). |
| `rrc_lpf`               | A 33-tap root raised cosine FIR, rolloff 1. |
| `downsampler`           | Keeps one X/Y pair per bit. The pair to keep is chosen by `sample_phase`. |
| `gravity_trainer`       | Learns the 16 centres of gravity from known bits. |
| `viterbi`               | The decoder. It is built from `bmu`, `acs`, `max_p` and `smu`. |
| `doqpsk_rx`             | The top level. It also holds the off-line centre bank and the source switch. |
| `doqpsk_pkg`            | Trellis constants and the trellis labelling functions. |

Everything runs on the 32 MHz sample clock. The decoder side is enabled once
every 8 clocks by the downsampler's `xy_valid` strobe. This is equivalent to
the separate 4 MHz decoder clock of the original system.

## The demodulator: why two real products are enough

The IF is f0 = 8 MHz and the sampling rate is 32 MHz, so the carrier advances
by a quarter turn per sample. A real product s(n)·s(n−L) contains two parts:

- a baseband part, ½·Re{z(n) z*(n−L) e^{j2πf0L}};
- a component at 2·f0 = 16 MHz.

For L = 9 samples, e^{j2πf0L} = j. The baseband part then equals
−½·Im{z(n) z*(n−L)}, which is the complex differential product that a
baseband receiver would need a Hilbert transform and a down-converter to
obtain. The 16 MHz component falls exactly at half the sampling rate, where
the lowpass filter removes it.

The receiver uses two lags:

- Y uses L = D = 9 samples, about one bit (T = 8 samples).
- X uses L = D + T/2 = 13 samples. The carrier condition still holds
  (13 mod 4 = 1).

Each product is 16 bits wide. It is filtered by a root raised cosine with
rolloff 1, whose symbol period is one OQPSK rail symbol, 2T = 16 samples.
This is the same filter that shapes the pulses in the transmitter. Tap k is

    h(t) = 4·cos(2πt/16) / (π·(1 − 16·(t/16)²)),  t = k − 16,  h(±4) = 1,

scaled so that the centre tap is 511. The filter output is shifted right by
18 and saturated to 9 bits. That leaves a full-scale 8-bit input room without
overflow.

X and Y are not clean binary eyes. Each value depends on several neighbouring
bits. With the transmitter convention described below, one bit-rate pair
(X, Y) is determined by four consecutive data bits. The end-to-end test shows
this: 16 clusters account for more than 99.9 % of the variance of (X, Y).

## The trellis and the centres of gravity

Each statistic depends on a quadruple of bits, so the decoder uses a trellis
whose state is the last three bits, with the newest bit in the MSB:

- From state p, bit b leads to state {b, p[2:1]}.
- Each transition corresponds to one of the 16 quadruples. It is scored
  against centre number 15 − {b, p}.

With this numbering the self-loop of state 0 uses g15 and the self-loop of
state 7 uses g0. Any consistent numbering would decode equally well, but this
one is used throughout: in the trainer, in the ACS and in `doqpsk_pkg`.

The centres are simply the mean (X, Y) observed for each quadruple. Nothing
about the filters or the channel is built in. A different receive filter, a
hard limiter or a changed IF chain only moves the centres, and training
absorbs the change.

Which bits the trellis carries depends on the transmitter's differential
encoding. The tests use a[k] = a[k−1] ⊕ d[k] ⊕ (k mod 2), with even channel
bits a on I and odd channel bits a on Q. The parity term cancels the sign
change between the I-to-Q and Q-to-I products. Differential detection is also
blind to the absolute phase. As a result, (X, Y) depends on the data bits d
alone, and `outbit` is the data bit.

Statistic m depends on the data bits d[m−2] … d[m−5] when
`sample_phase` = 7. The trainer must therefore receive d[m−2] with pair m.
This delay covers the transmit filter, the demodulator and the downsampler.
`tb_doqpsk_rx` measures it instead of assuming it.

## Viterbi decoder

- **BMU**: computes (X − gx_i)² + (Y − gy_i)² for all 16 centres. The 20-bit
  distance is shifted right by 7 and saturated to the 7-bit metric. One LSB
  is therefore a distance of about 11, and saturation starts at a distance of
  about 128 (X/Y span ±256). The result is registered.
- **ACS**: keeps 8 path metrics of 10 bits. For state s the two candidates come
  from states 2·(s mod 4) and 2·(s mod 4) + 1. The smaller sum wins, and
  `sel[s]` = 1 means the odd predecessor won. There is no normalisation step.
  Metrics simply wrap modulo 1024 and are compared through the sign of their
  difference. The bound that makes this exact: every state reaches every
  other in 3 steps, so live metrics differ by at most 3·127 = 381, and
  candidates by at most 508, which is below 512. The long random test in
  `tb_acs` checks the wrapped values against unbounded ones. An assertion in
  `acs` also checks the bound on every clock in simulation.
- **max_p**: a 3-level comparison tree that gives the state with the best, that
  is the smallest, metric (`maxmem`). On a tie the lower state number wins.
- **SMU**: a register exchange of depth 20. Each state holds the last 20 bits
  of its survivor path. In each step a state copies its chosen predecessor's
  register and appends its own newest bit. The decoded bit is the oldest bit
  of the register of the best state.

Latency: each (X, Y) pair releases one decoded bit, 3 clocks later. That bit
belongs to the trellis step 19 steps before the pair. The decoder can
accept one step per clock, which is 8 times more than the link needs.

## Training and the two centre sources

`gravity_trainer` keeps the last three known bits. For each pair it updates
the centre of the current quadruple as a running mean:

    acc ← acc + s − ⌊acc/8⌋,   g = ⌊acc/8⌋

- The mean spans about 8 occurrences.
- No divider is needed.
- The centres can follow a slowly changing channel.
- After `train_en` rises, the first three pairs only fill the bit history.

`use_trained` selects which centres the decoder uses:

- 1: the trainer's centres, learnt in real time from `train_bit`.
- 0: the centres held in a register bank, which is loaded from
  `g_ext_x/g_ext_y` when `g_load` is high (off-line training).

`g_x/g_y` show the centres in use. They can be read out after on-chip
training and stored.

## Top-level interface (`doqpsk_rx`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | 32 MHz clock, asynchronous active-low reset |
| `if_valid`, `if_sample` | in | 1, 8 | A/D sample strobe and signed sample |
| `sample_phase` | in | 3 | which of the 8 samples per bit is decoded |
| `use_trained` | in | 1 | centre source, see above |
| `train_en`, `train_bit` | in | 1, 1 | training enable; known bit for the current pair |
| `g_load`, `g_ext_x`, `g_ext_y` | in | 1, 16×9, 16×9 | load of the off-line centre bank |
| `g_x`, `g_y` | out | 16×9 | centres in use |
| `train_update` | out | 1 | one pulse per trainer update |
| `x_bit`, `y_bit`, `xy_valid` | out | 9, 9, 1 | bit-rate statistics |
| `outbit`, `outbit_valid` | out | 1, 1 | decoded bit |

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `IN_W` | 8 | A/D width of the original system |
| `XY_W` | 9 | X/Y and centre width of the original system |
| `T`, `D` | 8, 9 | bit period and correlator lag of the original system |
| `M_W`, `PM_W` | 7, 10 | branch and path metric widths of the original system |
| `DEMOD_SHIFT` | 18 | this design: filter output scaling |
| `METRIC_SHIFT` | 7 | this design: distance-to-metric scaling |
| `SMU_DEPTH` | 20 | this design: survivor depth |
| `AVG_SHIFT` | 3 | this design: trainer averaging length 2^3 |
| `rrc_lpf.NTAPS`, `COEF_W` | 33, 10 | this design: filter length and coefficient precision |

The modulo argument of the ACS holds only while `PM_W` exceeds
log2(2·3·(2^M_W − 1)). Keep that in mind when changing `M_W`.

## Limits and departures

- **No symbol timing recovery, no AGC and no frequency correction.** The
  sampling phase is a static input. The signal level is assumed to fill the
  8-bit A/D range reasonably (the tests use a peak of about 115).
- **Filter details, metric scaling, survivor organisation and depth, and the
  trainer's averaging are this design's choices.** Only their function and
  widths come from the original receiver.
- Training always needs known bits on `train_bit`. The original receiver's
  real-time adaptation could also be decision-directed. That is not built:
  it would need the (X, Y) pairs delayed by the 19-bit decision latency so
  that they meet the decoded bits.
- The original system clocks the decoder at 4 MHz. Here it is a clock enable
  on the 32 MHz clock.
- `max_p` is named after the original block, which picks the "maximum"
  (most likely) state. Since the metrics are distances, it picks the
  smallest metric.
- The bit-error-rate comparison depends on an SNR definition (Eb/N0, below)
  that the original curve may not share.

## Verification

Every block has a self-checking testbench in `tb/`, and each checks against
values computed independently in the testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_rrc_lpf` | Compares outputs with a convolution using coefficients recomputed from the formula, including saturation and the 2-clock latency. |
| `tb_doqpsk_demod` | Compares outputs with a reference model of the delays, products and filter, with the 3-clock latency. |
| `tb_downsampler` | Checks every phase. |
| `tb_bmu` | Random pairs and centres. |
| `tb_acs` | 20000 steps against an unbounded reference, with forced ties. |
| `tb_max_p` | Wrapped metrics and ties. |
| `tb_smu` | Compares against a trace-back of the same decisions. |
| `tb_viterbi` | Exact decoding at low noise with the latency checked; error rate at high noise. |
| `tb_gravity_trainer` | Exact running-mean model, warm-up, hold while idle, convergence. |
| `tb_doqpsk_rx` | End to end at the default sizes (below). |
| `tb_doqpsk_ber` | Bit error rate against Eb/N0 (below). |

`tb_doqpsk_rx` runs the whole receiver at its default sizes. It contains a
DOQPSK transmitter model with ±2 LSB noise and goes through these steps:

1. Finds the bit delay with the tightest quadruple clusters.
2. Trains on chip.
3. Decodes 1460 bits without error.
4. Loads the learnt centres through the off-line port and switches the
   source.
5. Corrupts the trainer, which is no longer selected.
6. Decodes 940 more bits without error.
7. Checks the decoded rate of 1 bit per 8 clocks.

`tb_doqpsk_ber` adds band-limited Gaussian noise. Eb/N0 is defined as
8·P_signal divided by the one-sided noise density at the carrier. The receiver
is trained on 1500 bits and then decodes 20000 bits per point:

| Eb/N0 | 8 dB | 10 dB | 12 dB | 14 dB |
|-------|------|-------|-------|-------|
| BER   | 3.2e-2 | 1.0e-2 | 1.4e-3 | 1.0e-4 |

The published curve for this receiver passes about 1e-3 at 12 dB and 1e-4 near
13.6 dB. These results are within about half a dB of it, but the two SNR
definitions may not be the same.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/doqpsk_pkg.sv tb/tb_doqpsk_rx.sv --top-module tb_doqpsk_rx
./obj_dir/Vtb_doqpsk_rx
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Each also has
a watchdog that counts a failure if the run hangs. All testbenches finish in
seconds.
