# Motor-imagery BCI datapath: time-shared IIR filter bank, CSP, sliding variance, linear SVM

This is synthesizable SystemVerilog for a small brain–computer interface (BCI) that tells two imagined
movements apart from the EEG. It takes 59 digitised EEG channels sampled at 100 Hz. Each channel
goes through an eighth-order 8–30 Hz band-pass filter. A common spatial pattern (CSP) projection
reduces the 59 channels to two signals, and the variance of each is tracked over the last 400
samples. A linear support vector machine (SVM) compares the two variances and outputs one bit, the
command for an external device, after every EEG sample.

The architecture follows the design published as *An Efficient RTL Design for a Wearable
Brain–Computer Interface*. Its main idea is that EEG is slow. At 100 Hz × 59 channels, one
band-pass filter circuit can serve every channel in turn, provided each channel's filter state is
kept in RAM rather than in registers. The design therefore exists in three variants, differing only
in the filter bank:

| `FILTER_KIND` | filter bank | taps (multiplier pairs) | filter state | clocks per channel |
|---|---|---|---|---|
| 1 (design I) | `filter_bank_i`: 59 separate filters | 59 × 9 | 59 × 8 registers | all 59 channels in 1 clock |
| 2 (design II) | `filter_bank_ii`: one filter, state RAMs | 9 | 8 RAMs × 59 words | 1 |
| 3 (design III, **default**) | `filter_bank_iii`: one tap, one RAM | 1 | 1 RAM × 472 words | 10 (= order + 2) |

Design III is the default because it is the smallest and lowest-power variant.

## Signal chain and number formats

```
eeg_in[59] ─► input registers ─► channel mux ─► filter bank ─► CSP ─┬─► variance #1 ─┐
 (Q5.11)      (at 100 Hz)        (1 channel per                     │                 ├─► SVM ─► class_o
                                   chan_en)                         └─► variance #2 ─┘
```

In design I the multiplexer comes after the 59 filters instead of before. All blocks share one
working clock (`CLK_HZ`, default 1 MHz). They are paced by enable pulses from `bci_timer`, never by
derived clocks.

| quantity | format | remark |
|---|---|---|
| EEG samples, filter data, filter coefficients | 16 bit Q5.11 | as published |
| CSP and SVM weights | 16 bit Q2.14 | as published ("2 integer, 14 fraction bits") |
| CSP outputs, window mean | 16 bit Q5.11 | own choice |
| squares | 32 bit Q10.22 | own choice |
| running sum | 25 bit Q14.11 | own choice |
| variance | 40 bit Q18.22 (`VAR_W`) | own choice; the original only says the variance path is wider |

Every product is exact. Every rescaling is an arithmetic right shift (truncation towards −∞).
Results that return to 16 bits are saturated. The original description does not say how it
rounds or handles overflow.

## The filter banks

### The "one order" tap

All three banks are built from one cell, `one_order`:

    par_out = par_in + num·x − den·y

This is one tap of a transposed direct-form II (TDF-II) filter. With partial sums s₁…s₈:

    y   = b₀·x + s₁                        (tap 0, den = 0; its output is the filter output)
    s_k = b_k·x − a_k·y + s_{k+1}          (tap k = 1…8, s₉ = 0)

Each s_k is stored and used for the next sample. The cell computes `num·x − den·y` at full 32-bit
precision, shifts it right by 11, adds `par_in` and saturates.

### Filter I (`filter_bank_i`, `iir8_simple`)

`iir8_simple` is one complete filter. It has an input register, nine taps and eight partial
registers. On `en` the input register and all partial registers load together. The new `y` is
therefore valid (combinationally) one clock after `en` and holds until the next `en`. Filter I is
59 copies of it, all driven by the 100 Hz sample enable. It is the fastest variant and by far the
largest: 531 taps, 1062 multipliers.

### Filter II (`filter_bank_ii`)

Filter II keeps the nine taps but turns each partial register into a RAM of 59 words (`state_ram`),
addressed by the channel number. Its timing:

- `start` loads `x_in` and `ch` into the input registers.
- In the next clock the taps read that channel's eight partial sums (the RAMs have asynchronous
  read) and present `y` with `y_valid`.
- The eight new partial sums are written back at the end of that same clock.

A new channel can start every clock, so the bank runs at 59 × the sampling rate. At a 5900 Hz
working clock it is fully busy.

### Filter III (`filter_bank_iii`)

Filter III is the most involved block. A single `one_order` cell computes every tap of every
channel in sequence. The parts around it:

- **Weight ROM**: the parameter tables `B` and `A`, indexed by an order counter.
- **State RAM**: one `state_ram` of 59 × 8 = 472 words. Word `ch·8 + (k−1)` holds s_k of channel
  `ch`; `iir_addr_gen` computes these addresses.
- **Controller**: a four-state machine, `S_CLEAR → S_IDLE → S_OUT → S_ORDER`.

Processing one channel takes ORDER + 2 = 10 clocks:

| clock | order counter | tap inputs | effect |
|---|---|---|---|
| 0 (`start`) | – | – | input register ← x, channel register ← ch |
| 1 | 0 | num = b₀, den = 0, par_in = RAM[s₁] | output register ← y |
| 2 … 9 | k = 1 … 8 | num = b_k, den = a_k, par_in = RAM[s_{k+1}] (0 for k = 8) | RAM[s_k] ← par_out |
| 10 | – | – | `y_valid` high, `ready` high again |

In each clock the controller reads s_{k+1} while it writes s_k. The RAM therefore has separate
read and write addresses. (The published block diagram shows a single address input.) Writing s_k
cannot corrupt anything still needed, because s_k of the old sample is consumed in the clock
before.

After reset, banks II and III write zeros into every RAM word: 59 clocks for Filter II and 472
clocks for Filter III. They then raise `ready`. The RAM itself has no reset.

### Default coefficients

The original design gives the filter type and size: Chebyshev type I, order 8, 8–30 Hz pass band,
100 Hz sampling. It does not give the coefficient values. The defaults in `bci_pkg` are such a
filter with 0.5 dB ripple (the ripple is an own choice), quantised to Q5.11:

    b = [87, 0, −350, 0, 525, 0, −350, 0, 87] / 2048
    a = [2048, −4939, 6981, −7699, 7495, −5570, 3292, −1395, 408] / 2048

After quantisation the largest pole radius is 0.945, so the filter is stable. `tb_iir8_simple`
checks that it passes a 15 Hz tone at about unity gain and blocks DC. To use other coefficients,
override the parameters `B` and `A`. They have type `iir_coef_t`: up to 17 entries, index = order.

## CSP projection (`csp`)

CSP weights the 59 channels with two trained vectors and produces two outputs:
`out_j = Σ_c W_j[c]·x[c]`. There are two multiply-accumulate pipelines side by side, one per
output. They share the input register, a channel counter and a 2 × 59 weight ROM. The pipeline
stages are:

| stage | what loads |
|---|---|
| 0 | input register |
| 1 | product registers (`en1`); the channel counter steps |
| 2 | accumulators (`en2`); on channel 0 (`init2`) they load instead of add |
| 3 | output registers (`en3`), shifted right by 14 and saturated to Q5.11 |

Timing:

- `en` may be high every clock.
- `out_valid` comes 4 clocks after the enable of channel 58.
- `init` forces the counter back to channel 0.

The trained CSP weights are not published. The defaults (`CSP_W_DEFAULT`) are a fixed placeholder
pattern: w₁[c] = ((c mod 7) − 3)/8 and w₂[c] = ((c mod 5) − 2)·3/16. Override parameter `W`
(index `output·64 + channel`, Q2.14) with real weights.

## Sliding-window variance (`variance`, `window_fifo`)

The CSP outputs separate the two classes by their variance. The variance unit does not re-sum 400
squares for every sample. It updates the previous result using only the sample that enters the
window (n) and the one that leaves it (o):

    S'  = S + n − o                          running sum (register na)
    M'  = S' / 400                           new mean    (register m4)
    V'  = V + M² + n²/400 − o²/400 − M'²     new variance

`window_fifo` is a 400-word circular buffer. Until it holds 400 samples, the leaving sample reads
as 0, which matches an initial window of zeros.

The datapath has one squarer with an input multiplexer, one add/subtract for the sum, one for the
variance, and one divide-by-400 network. It runs this 7-step schedule, one step per clock:

| step | squarer → x2 | sum | variance | d4 / m4 |
|---|---|---|---|---|
| 1 (clock of `start`) | pa² | | | nv ← n, ov ← o, FIFO push |
| 2 | n² | na += n | var += x2 (M²) | |
| 3 | o² | na −= o | | d4 ← x2/400 (n²/400) |
| 4 | | | var += d4 | d4 ← x2/400 (o²/400) |
| 5 | | | var −= d4 | m4 ← na/400 |
| 6 | m4² | | | |
| 7 | | | var −= x2 (M'²); pa ← m4 | |

`var_valid` follows `start` by 7 clocks.

Division by 400 is the shift-add network of the original design, `x/512 + x/2048`. That is
0.00244·x instead of 0.0025·x, a factor of 400/409.6. The same approximation is used for all three
divisions. As a result, V + M² always equals the window's sum of squares times 1/409.6, so the
error does not accumulate. The output is about 0.977 × the mean square minus 0.954 × the squared
mean. For zero-mean signals that is 0.977 × the true variance (`tb_variance` checks within 5 %).
For a two-class decision that compares two variances, the common scale factor does not matter.

The original schedule rebuilds the sum from the stored mean (400 × M) through a ×400 shift-add
network. Here the running sum is kept in its own register instead, because rebuilding it from a
truncated mean through the approximate divider loses 2.3 % per update. The ×400 network is
therefore not built. Truncation still makes the recursion a slow random walk of a few LSBs of
Q18.22 per sample. Reset clears it.

## Linear SVM (`svm`)

The decision value is d = W1·v1 + W2·v2, computed with two multipliers and one adder. Its sign bit
is registered as `class_o`, and `class_valid` follows `en` by one clock. As in the original block
diagram, there is no bias term. The default weights +1 and −1 reduce the classifier to "which CSP
output has the larger variance": class 0 if the first, class 1 if the second. Trained weights
replace them through the parameters `W1` and `W2`.

## Pacing, latency and the working clock

`bci_timer` makes the enables from the working clock with a phase accumulator. The accumulator
wraps at `CLK_HZ`, so any working clock gives the exact average rate. Two enables come out:

- `sample_en`: 100 Hz, the EEG sampling rate.
- `chan_en`: 59 per sample, one per channel. The `chan_en` of channel 0 coincides with
  `sample_en`.

`eeg_input_mux` loads the 59 input registers on `sample_en`. It presents one channel per `chan_en`,
one clock later. How the 59 channel enables are placed within a sample period is set by `CH_CLKS`:

- **Back to back (default).** Right after each `sample_en`, the channels follow each other
  `CH_CLKS` clocks apart: 1 clock for designs I and II, ORDER + 2 = 10 clocks for design III. The
  timer then idles until the next sample. This gives the shortest response at a given clock.
- **Evenly spread (`CH_CLKS = 0`).** The channel enables are spread evenly at 5900 Hz. At 1 MHz
  they are 169 or 170 clocks apart, because 10⁶/5900 is not an integer. Each filter step then
  gets the most time, and the working clock can go as low as one clock per channel.

The original design states both a 5900 Hz channel enable and response times well under a
millisecond at 1 MHz. These only fit together as an average rate with back-to-back processing,
so that is the default.

The decision for a sample appears this long after `sample_en`:

    58 channel slots + 1 (mux) + filter (1, 1 or 10) + 4 (CSP) + 7 (variance) + 1 (SVM) clocks

In design I the filters finish before the multiplexer starts, which saves a clock.

| variant and pacing | latency, `sample_en` to `class_valid` (simulated) | at 1 MHz |
|---|---|---|
| design III, back to back (defaults) | 603 clocks | 0.60 ms |
| design II, back to back | 72 clocks | 0.07 ms |
| design I, back to back | 71 clocks | 0.07 ms |
| design III, spread, 1 MHz | 9853 clocks | 9.9 ms |
| design II, spread, 1 MHz | 9844 clocks | 9.8 ms |

The published response times are 0.13, 0.19 and 0.63 ms for designs I, II and III. Their latency
formulas count 3 clocks per channel in the CSP: `4N + 11` clocks for design II and
`(2 + order)·N + 3N + 11` for design III. Here the CSP keeps up with one channel per clock.

The slowest possible working clock is 5900 Hz (one clock per channel) for designs I and II. For
design III it is 59 kHz (ten clocks per channel). The timer and `bci_top` check this with
elaboration-time assertions. A faster clock does not shorten the back-to-back latency in clocks,
but it shortens it in time, at the cost of power.

## Top level (`bci_top`)

| parameter | default | meaning |
|---|---|---|
| `FILTER_KIND` | 3 | 1, 2 or 3: design I, II or III |
| `N_CH` | 59 | EEG channels (up to 64) |
| `ORDER` | 8 | filter order (up to 16) |
| `WIN` | 400 | variance window in samples |
| `CLK_HZ` | 1 000 000 | working clock |
| `FS_HZ` | 100 | EEG sampling rate |
| `CH_CLKS` | 10 (design III), 1 (I, II) | clocks between channels after a sample; 0 = evenly spread |

Ports:

- `eeg_in[N_CH]`: Q5.11 samples, taken on the clock where `sample_en` is high.
- `ready`: the timer is running.
- `sample_en`: the clock where `eeg_in` is taken.
- `csp_valid`, `csp_out[2]`: the CSP outputs.
- `var_valid`, `var_out[2]`, `window_full`: the variances, and whether 400 samples have been seen.
- `class_valid`, `class_o`: the decision.

Reset is synchronous and active low (`rst_n`) in every block.

The electrodes and analog front end are outside this design, and so is the device that receives
the command.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block against values
computed independently in `bci_ref_pkg`, a plain-integer model of the filter, CSP, variance and
SVM. Each also checks the latencies above and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it covers |
|---|---|
| `tb_one_order` | 20 000 random and corner vectors, including saturation |
| `tb_iir8_simple` | impulse, DC step (blocked), 15 Hz tone (passed), random input; output one clock after `en` |
| `tb_filter_bank_i` | all 59 channels against 59 reference filters |
| `tb_state_ram` | read/write model, read-during-write returns the old word |
| `tb_filter_bank_ii`, `tb_filter_bank_iii` | 120 samples × 59 channels in shuffled order; exact latency (1 and 10 clocks); `ready` during clearing |
| `tb_csp` | 200 sets, back-to-back and gapped enables, `init` mid-set; `out_valid` 4 clocks after the last channel |
| `tb_window_fifo`, `tb_variance` | 1500 / 1300 samples; exact match with the recursion; 7-clock latency; plausibility against the exact variance |
| `tb_svm`, `tb_eeg_input_mux` | sign decision; registered versus direct multiplexing |
| `tb_bci_timer` | one simulated second in both pacings: 100 samples, 5900 channel enables (spread) or bursts of 59 enables 10 clocks apart |
| `tb_bci_top` | whole design at its defaults, 1000 EEG samples (about 10 s of EEG, 10 M clocks); latency exactly 603 clocks |
| `tb_bci_designs` | designs I and II back to back at 1 MHz (71 / 72 clocks); design II at 5900 Hz; design III at 59 kHz (603 clocks); designs II and III evenly spread at 1 MHz. Window 100, 300 samples each |

`tb_bci_top` and `tb_bci_designs` drive a 15 Hz rhythm. For the first half of the run it is on
channels that only the first CSP output sees, then on channels that only the second sees. They
compare every CSP output, variance and decision with the reference. They also require each of
these to occur at least once:

- RAM clearing
- window filling
- window sliding
- both classes
- a change of class

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/bci_pkg.sv tb/bci_ref_pkg.sv tb/tb_bci_top.sv --top-module tb_bci_top
    ./obj_dir/Vtb_bci_top

Replace `tb_bci_top` with any testbench name. All files are plain IEEE 1800-2017 SystemVerilog.
Shared types, formats and default tables live in `rtl/bci_pkg.sv`.

## How far to trust it, and where it departs from the original

The dataflow follows the published design closely, including the register names in the variance
unit and the shift-add constants. So do the 59 × 400 sizes, the Q5.11/Q2.14 formats and the three
filter-bank architectures. The following are own choices, made where the original is silent or
self-contradictory:

- **Filter coefficients, CSP weights and SVM weights** are placeholders. Only the filter is a
  meaningful default. Classification accuracy depends entirely on trained CSP and SVM weights,
  which must be supplied.
- **Filter III** takes 10 clocks per channel, stepping at the clock rate. Its order counter drives
  the weight ROM, and the channel number is an input. Its RAM has separate read and write
  addresses.
- **Variance**:
  - a 7-step schedule instead of the described 8 steps;
  - a running-sum register in place of the ×400 rebuild;
  - the output is scaled by 400/409.6 (see above).
- **CSP** output latency is 4 clocks after the last channel. The original gives 3 clocks per
  channel.
- **Pacing**: channels are processed back to back after each sample by default, to meet the
  published response times. The evenly spread 5900 Hz enable is kept as an option.
- **Rounding** is truncation and overflow saturates. After reset the filter state RAMs are
  cleared.
- **Timing closure and power** were not evaluated here. The original reports ASIC and FPGA results
  for its own implementation, not for this RTL.
