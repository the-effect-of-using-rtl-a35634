# 16-QAM baseband modem with an adaptive LMS channel equalizer

A radio channel with more than one propagation path smears each transmitted
symbol into its neighbours (inter-symbol interference, ISI). This design is a
complete baseband software-defined-radio modem that fights ISI in two ways:
a rate-1/2 convolutional code, decoded by a Viterbi decoder, corrects
residual bit errors, and a five-tap complex adaptive equalizer learns the
inverse of the channel with the least-mean-squares (LMS) algorithm while a
known training sequence is sent. The SystemVerilog covers the transmitter, a
channel model and the receiver, so the whole link can be simulated end to end
on one clock.

```
 TX:  PRBS source -> conv. encoder -> 2:1 P/S -> interleaver -> diff. encoder -> 1:4 S/P -> 16-QAM mapper
                      (K=3, 7/6)                 (blocks of 4)                                (Gray, ROM)
                                                                                                  |
 CH:                                   r(k) = 0.1 x(k) + 0.9 x(k-1) + AWGN (40 dB)   <-----------+
                                                  |
 RX:  LMS equalizer (5 taps, trained) -> soft-bit demapper -> 4:1 P/S -> diff. decoder -> deinterleaver -> 1:2 S/P -> Viterbi (TB 15)
          ^
          +-- training reference: the transmitted symbols, delayed by 5 symbols
```

## Timing and rates

Everything runs on a single clock `clk` with an asynchronous active-low reset
`rst_n`. Blocks pass data with a one-cycle `valid` strobe and no back-pressure;
each block tolerates idle cycles between items.

With `run` high the source emits one information bit every second cycle. That
rate keeps every serial link busy on every cycle:

| point in the chain                  | rate                 |
|-------------------------------------|----------------------|
| information bits                    | 1 every 2 cycles     |
| coded pairs (encoder output)        | 1 every 2 cycles     |
| coded serial bits                   | 1 every cycle        |
| 16-QAM symbols, channel, equalizer  | 1 every 4 cycles     |
| receiver serial bits                | 1 every cycle        |
| decoded bits                        | 1 every 2 cycles     |

The per-block latencies are one or two cycles and do not matter to the user.
What does matter is the alignment of the data streams:

* The equalizer's output for received sample *k* approximates transmitted
  symbol *k − 5* (see the next section). The receiver therefore sees the
  transmitted stream shifted by 5 symbols: 20 coded bits, or 10 information
  bits.
* The Viterbi decoder's *n*-th output bit is the *n*-th information bit it was
  given. Its delay is 15 coded pairs.
* So the *n*-th decoded bit of `modem_top` is information bit *n − 10*, that
  is *n − 2·TRAIN_DELAY*. The first decoded bits are worthless until the
  equalizer has converged.

All framing counters (the interleaver and deinterleaver blocks and the
serial/parallel words) count from reset. They stay aligned because every
symbol carries exactly four coded bits and every pair exactly two.

## The LMS equalizer (`lms_equalizer`)

### Algorithm

A shift register holds the last five received complex samples
x(k) … x(k−4). For each sample the filter computes

    y(k)  = Σ_{n=0..4} w_n(k) · x(k−n)
    e(k)  = d(k) − y(k)                       (only while training)
    w_n(k+1) = w_n(k) + μ · e(k) · conj(x(k−n))

where d(k) is the desired symbol. With `train` low, or without a valid
desired symbol, the weights are frozen and the filter simply equalizes with
them. There is no decision-directed mode. The weights start at zero after
reset.

### Why a decision delay of 5

The channel model's dominant path (0.9) is the delayed one, so the channel
0.1 + 0.9 z⁻¹ has its zero at z = −9. The channel is not minimum-phase, and
its exact inverse is anti-causal:

    1 / (0.1 + 0.9 z⁻¹) = (z / 0.9) · Σ_m (−z/9)^m

A causal five-tap filter can only approximate it with a delay. If the
reference is the symbol sent five symbols earlier, the ideal weights are
w₄ = 1/0.9 = 1.111, w₃ = −0.1235, w₂ = 0.0137, w₁ = −0.0015, w₀ = 0.0002.
Truncation leaves a residue of about 2·10⁻⁵. The testbench finds
w₄ = 1.1108 and w₃ = −0.1244 after training. `training_ref` supplies this
delayed reference. It keeps the last 16 transmitted symbols in a ring buffer
and hands the equalizer symbol *k − TRAIN_DELAY* in the same cycle as received
sample *k*.

### Fixed-point formats

| quantity                     | format                                   |
|------------------------------|------------------------------------------|
| samples x, y, e, d           | 16-bit signed, 12 fractional bits (1.0 = 4096) |
| weights w                    | 24-bit signed, 20 fractional bits (range ±8)   |
| step size μ (`mu` input)     | 16-bit unsigned, 16 fractional bits      |
| filter accumulator           | 44 bits, exact                           |
| update term μ·e·conj(x)      | 50 bits exact, then shifted right by 20  |

Every rescaling rounds half up and every result saturates. The two step sizes
of interest are μ = 0.006 (`mu = 393`) and μ = 0.001 (`mu = 66`, really
0.00101). At μ = 0.001 a typical late-training update of about 2·10⁻⁵ is
still some 20 LSBs of the weights. This is what sets the 20 fractional bits.

### Pipeline

* **Edge 1** (`in_valid`): the sample enters the shift register
  (`lms_shift_reg`), and the desired symbol and the adapt decision are
  latched with it.
* **Edge 2**: the filter-and-update stage (`lms_filter_update`, which holds
  the weights) registers y and e and writes the new weights.

`out_valid` therefore comes two cycles after `in_valid`. A new sample can be
taken every cycle, because each update lands before the next sample's output
is formed. `w_re`/`w_im` show the weights and `adapted` marks the samples
that changed them. The whole filter and update are combinational within one
cycle: 50 real multipliers, not pipelined further.

### Behaviour

Results of simulating the full modem (channel noise at 40 dB):

| μ     | error power below 0.01 after | residual error power |
|-------|------------------------------|----------------------|
| 0.006 | ~100 symbols                 | 1.4·10⁻³             |
| 0.001 | ~450 symbols                 | 1.3·10⁻³             |

The noise floor is 1.0·10⁻³. So the larger step trains faster but leaves
slightly more misadjustment, the expected LMS trade-off. After convergence
the symbol decisions and the decoded bits are error-free.

## Coding chain

**Convolutional code** (`conv_encoder`, `viterbi_decoder`). Rate 1/2,
constraint length 3, generators 7 and 6 (octal). For input bit *u* and the
two previous bits *s1*, *s2*, the encoder outputs c0 = u⊕s1⊕s2 and then
c1 = u⊕s1. The code's free distance is 4, so any single coded-bit error in a
window is corrected.

The decoder makes hard decisions with a Hamming branch metric. It has four
states, add-compare-select with ties going to the predecessor with s2 = 0,
and metrics renormalised to the minimum. Survivors are kept by register
exchange over a traceback depth of 15 (five constraint lengths). Each step
outputs the oldest bit of the best state. Both ends start in state 0 and the
stream is never flushed.

**Block interleaver** (`interleaver`, `deinterleaver`). Bits are handled in
blocks of four:

* serial-to-parallel, then a fixed permutation, then parallel-to-serial;
* output bit *j* of a block is input bit {2,0,3,1}[*j*];
* the deinterleaver applies the inverse, {1,3,0,2}.

The permutation lives in `modem_pkg` and can be changed there. Both tables
must stay mutually inverse.

**Differential coding** (`diff_encoder`, `diff_decoder`). The encoder sends
y_i = y_{i−1} ⊕ x_i and the decoder forms x_i = y_i ⊕ y_{i−1}. Both delay
cells reset to 0. An inverted bit stream decodes correctly from its second
bit on.

**Serial/parallel converters** (`par2ser`, `ser2par`). Both take the word
size N as a parameter and use bit 0 as the first bit on the serial side.
`par2ser` sends its N bits on the N cycles after the load. An assertion flags
a word that arrives before the previous one has gone out.

## 16-QAM mapping and soft-bit demapping

Two bits choose each axis: b1 b0 the in-phase level and b3 b2 the quadrature
level. The mapper reads the level from a four-entry ROM:

| index (b1 b0 or b3 b2) | 00 | 01 | 10 | 11 |
|------------------------|----|----|----|----|
| level                  | −3 | +3 | −1 | +1 |

The sign bit is 1 for positive levels and the magnitude bit is 1 for the
inner levels. Along an axis, −3, −1, +1, +3 are coded 00, 10, 11, 01: a Gray
code.

The demapper computes the soft bits for each axis, with y the axis value:

    sb(b0) = 2(y+1) for y < −2,   y for −2 ≤ y < 2,   2(y−1) for y ≥ 2
    sb(b1) = y + 2  for y ≤ 0,    2 − y for y > 0

Soft bits are 18-bit values with 12 fractional bits, so they cannot overflow.
A positive soft bit means 1, and its sign gives the hard bit that the Viterbi
decoder uses. The soft values come out on `demap_soft` for a future
soft-decision decoder.

## Channel model (`channel_model`, `awgn_gen`)

The channel is r(k) = 0.1·x(k) + 0.9·x(k−1) + n(k). Both taps are real and
stored as Q.12 constants (410 and 3686). The noise is an approximate Gaussian:

* each axis has its own xorshift32 generator;
* the four bytes of the state are summed (central limit);
* the sum is scaled by `NOISE_GAIN`/256.

The default gain of 159 gives a noise power of 1.0·10⁻³ against the mean
16-QAM symbol energy of 10, an SNR of 40 dB. The noise is
deterministic (fixed seeds), so simulations repeat exactly. `NOISE_EN = 0`
removes it.

The channel and its noise generator are synthesizable. They serve as a test
channel, for example for an FPGA loop-back, and are not part of a real radio.
The bit source `prbs_source` is a PRBS-15 LFSR (x¹⁵ + x¹⁴ + 1) and plays the
same role.

## Top level (`modem_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `run` | in | source enable (one information bit every 2 cycles) |
| `train` | in | 1 = adapt the equalizer weights, 0 = hold them |
| `mu[15:0]` | in | LMS step size, unsigned Q.16 |
| `src_valid`, `src_bit` | out | information bits |
| `tx_valid`, `tx_sym` | out | transmitted symbol (`cplx_t`: 16-bit `re`, `im`) |
| `rx_valid`, `rx_sym` | out | channel output |
| `eq_valid`, `eq_sym`, `eq_err` | out | equalizer output and training error (0 when holding) |
| `eq_adapted`, `eq_w_re[5]`, `eq_w_im[5]` | out | update strobe, weights (Q.20) |
| `demap_valid`, `demap_bits`, `demap_soft[4]` | out | hard and soft bits |
| `dec_valid`, `dec_bit` | out | decoded information bits |

Parameters: `TRAIN_DELAY` (5) is the equalizer's decision delay and the
delay of its training reference, and `NOISE_EN` (1) switches the channel
noise on. A typical run:

1. Reset.
2. Raise `run` and `train` with `mu = 393`.
3. After a few hundred symbols, drop `train`.
4. Compare `dec_bit` with `src_bit` delayed by `2·TRAIN_DELAY` bits.

Coarse synthesis of the top gives about 1,500 flip-flop bits and roughly 56
multipliers, most of them in the equalizer. No block RAM is used.

## Where this RTL departs from, or adds to, the reference modem

The chain, the code parameters, the five-tap LMS structure, the channel taps,
the SNR and the two step sizes follow the reference design. The following
points were chosen here:

* **Implementation.** The reference builds the encoder and the Viterbi
  decoder from vendor IP cores. Here both are written out, with the same
  parameters.
* **Generator order.** The order of the generators within a pair is taken as
  7 then 6. The reference also lists them the other way round.
* **Interleaver.** The reference calls for a random permutation. This design
  uses one fixed permutation over blocks of four bits; the block length of
  four comes from the reference's deinterleaver.
* **Constellation.** The bit-to-level assignment is derived from the
  soft-bit equations.
* **Equalizer.** The weight-update rule is the standard complex LMS. The
  following are also this design's own choices:
  * the decision delay of 5;
  * training against delayed transmitted symbols;
  * holding the weights outside training;
  * zero initial weights;
  * all number formats.
* **Clocking.** One clock with valid strobes and a fixed source rate. The
  reference was a multirate model.
* **Test sources.** The noise generator and the PRBS source are test
  substitutes.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one compares the block with a model written independently in the
testbench, has a watchdog, and ends with a line
`TB_RESULT checks=N failures=M`. The main ones:

* `tb_lms_equalizer`:
  * runs a bit-true 64-bit integer model of the filter and update, and
    compares y, e and all ten weight components after every sample;
  * checks that the weights converge to the channel inverse;
  * checks that μ = 0.006 trains faster than μ = 0.001;
  * checks that the weights hold when `train` is low.
* `tb_lms_filter_update`: the same bit-true model on random tap vectors,
  desired symbols and step sizes, including a phase that drives the weights
  into saturation. `tb_lms_shift_reg` checks the delay line.
* `tb_viterbi_decoder`: 3,000 bits, with one injected error every 20 pairs
  over the last 2,000. Every error must be corrected, and the 15-pair latency
  is checked.
* `tb_channel_model`: exact taps with the noise off, and the measured noise
  mean and power with the noise on.
* `tb_modem_top`: the whole modem at its default parameters, for 800 training
  symbols and then 1,200 held symbols. It checks:
  * the symbol and decoded-bit rates;
  * that symbol decisions are error-free after convergence;
  * every decoded bit against the source;
  * the fall of the error power.

  It also counts weight updates, held symbols, the mode switch and
  pre-convergence errors; each must occur at least once.
* `tb_modem_step_size`: two complete modems side by side with μ = 0.006 and
  μ = 0.001, comparing their training times and residual errors.

To run one with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/modem_pkg.sv \
          tb/tb_modem_top.sv --top-module tb_modem_top -Mdir obj_top
./obj_top/Vtb_modem_top
```

Swap in another testbench file and top-module name to run a different test.
`modem_pkg.sv` must be read first; `-y rtl` lets Verilator find the modules
by file name. Lint warnings (unused package constants, for instance) are not
errors; add `-Wno-fatal` if your Verilator version treats them as such.
Every testbench finishes in well under a
second.
