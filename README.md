# Cognitive radar target recognition with PWE waveforms

A cognitive radar does not send the same pulse every time. It keeps a belief
about what it is looking at, and shapes its next transmission to test that
belief as well as it can. This RTL implements one such scheme for a four-way
target recognition problem:

* There are four candidate targets, each known by its complex impulse
  response `h_i` (31 samples).
* For each target there is a stored *eigenwaveform* `se_i`, the transmit
  shape that gets the most energy back from that target.
* The radar holds a probability `P_i` for each hypothesis. It transmits the
  **probability of weighted energy (PWE)** waveform
  `x = sum_i sqrt(P_i) * se_i`. The more probable a target, the more the
  waveform looks like that target's eigenwaveform.
* From each return `y` it updates the four probabilities with Bayes' rule.
  It then builds the next waveform from them.
* After four transmit/receive rounds the most probable hypothesis is the
  decision (a MAP decision).

Two designs share the same arithmetic units and stand side by side in
`crr_top`:

* **`crr_processor`** is the radar processor of an FPGA-in-the-loop test bed
  (a 125 MHz FPGA board between an RF signal generator and a spectrum
  analyzer). A push button starts a recognition. The waveform goes out on a
  transmit link, the target return comes back on a receive link, and the
  decision lights one of four LEDs. Probabilities are streamed out on a
  write-only SPI port.
* **`target_recognition`** is an all-digital Monte Carlo model. It makes its
  own target returns and Gaussian-like noise, and it measures the probability
  of correct classification (`pc`) at 15 transmit energies from -30 to +10 dB
  (1000 trials each by default).

Both units share only the clock.

## Number format

Every datapath value is **Q15.16**: a signed 32-bit word with 16 fraction
bits (`crr_pkg::q16_t`). A product keeps bits 47..16 of the 64-bit result
(`crr_pkg::qmul`), so every multiply truncates toward minus infinity. Sums of
many products, such as FIR taps or energies, therefore carry a small negative
bias of up to one LSB per product. The testbenches model that truncation
exactly where they compare bit for bit.

## Arithmetic units and their handshake

All the compute units use the same handshake:

1. The requester raises `*_en` and holds it, with the operands, for the whole
   operation.
2. The unit raises `*_complete` and holds its result until the enable falls.
3. It is then idle again one edge later.

`crr_pkg::hs_state_e` (`HS_IDLE`, `HS_BUSY`, `HS_DONE`) is the common state
set.

| unit | method | latency (edges, counting the one that sees the enable) |
|---|---|---|
| `division` | restoring shift-and-subtract on magnitudes, 48 quotient bits, sign applied last | 50; 1 for the special cases |
| `squareroot` | linear search: `k` steps 1 LSB per clock until `(k*k)>>16 >= input` | `r + 2`, where `r` is the root in LSBs (65,538 for an input of 1.0) |
| `exponential` | table of `e^(k/64)`, `k = -709..665`, input rounded to 1/64 | 1 |
| `fir_filter` | 31-word shift buffer, four real 31-tap dot products per clock | 62 |

Special values:

* **Division.** A divisor of at most 2 LSB (3.05e-5), zero included, returns
  `0x7FFFFFFF` ("infinity"). A zero dividend, or a quotient smaller than 0.001
  (66 LSB), returns 0. An overflowing quotient is clamped to the largest value
  of its sign.
* **Square root.** Inputs of zero or below give 0.
* **Exponential.** The output is clamped to `e^10.390625 = 32553.0` above and
  `e^-11.078125 = 1.54e-5` below. Both limits fit in Q15.16.

The exponential table is not a data file. Each entry is computed during
elaboration by square-and-multiply from `e^(+-1/64)`, held with 40 fraction
bits, and then rounded to Q15.16.

The square root is the slow unit, and it sets the speed of everything that
uses it. A waveform with probabilities 1/4 needs `sqrt(0.25)`, which takes
32,770 clocks. A normalized waveform adds another search of about
`65536*sqrt(E_pwe)` clocks.

## The PWE waveform generator (`xpwe`)

`xpwe` holds the four eigenwaveforms, 31 complex samples each. Their
quadrature parts for `se1`..`se3` are zero. It runs a ten-step sequence:

1. Take `ptheta[0..3]` and `sqrt(Es)`.
2. Run four square roots `sqrt(P_i)` in parallel, one `squareroot` instance
   each.
3. Form `x_pwe[n] = sum_i sqrt(P_i) se_i[n]` one sample per clock, and sum its
   energy `E_pwe`.
4. Take `sqrt(E_pwe)` on square-root unit 0 again.
5. Take `1/sqrt(E_pwe)` on a divider.
6. Output `x[n] = x_pwe[n] * (1/sqrt(E_pwe)) * sqrt(Es)`, one sample per
   clock.

`NORMALIZE = 1` (the default) gives a waveform of energy `Es`; the Monte Carlo
model uses it this way. With `NORMALIZE = 0` steps 4 and 5 are skipped, no
divider is built and `x = x_pwe`. `crr_processor` uses that setting, because
on the test bed the transmit power is set on the RF generator.

## Convolution with the target responses (`fir_filter`)

The four responses `h0`..`h3` are constant tables in `crr_tables_pkg`:

* `h0` is a measured 1.090 GHz band-pass filter, brought to baseband and
  reduced to 31 samples.
* `h1`..`h3` are synthetic responses.

`sel` picks one. The unit clears a 31-word buffer per channel. It then shifts
in `x[0]`..`x[30]` followed by zeros, writing one output sample per clock for
61 clocks:

```
y[n]   = sum x_re*h_re - sum x_im*h_im
y_j[n] = sum x_re*h_im + sum x_im*h_re
```

Each of the 124 products per clock is a full Q15.16 multiply. The whole dot
product sits in one clock, so this is the widest logic in the design. A
faster clock would need it pipelined.

## The Bayesian update (`pwe_update`)

This is the part of the design that needs the most care. For each hypothesis
`i` it does the following, with the FIR, the exponential and the divider used
in turn:

```
S_i  = x * h_i                           (fir_filter, 61 complex samples)
L_i  = 2 re(S_i^H y) - S_i^H S_i         (two 61-step accumulations)
p_i  = exp((L_i - max_j L_j) * inv_noise_var)
P_i' = p_i P_i / sum_j p_j P_j           (four divisions)
```

`L_i` is the log-likelihood of a complex Gaussian return, up to the term
`||y||^2`, which is the same for every hypothesis. Two scaling choices keep
it inside Q15.16 and inside the exponential's range:

* **Subtracting the largest `L_j`.** This makes every exponent zero or
  negative. The winning hypothesis gets `p = 1` and the others get
  `e^-(difference)`, down to the exponential's floor. Because the
  normalization divides by the sum, the shift changes nothing
  mathematically. Without it, returns of moderate energy would saturate the
  exponential.
* **`inv_noise_var`, the reciprocal of the complex noise variance.** The
  default of 1.875 is `1/(2*0.2667)`, which matches the noise sources of the
  Monte Carlo model (standard deviation about 0.52 per channel). A larger
  value makes the update more confident per round.

If every product `p_i P_i` underflows to zero, the probabilities are kept
unchanged. This can only happen when the hypothesis that fits the return best
already has probability 0.

One update takes about 1,000 clocks.

## Random sources (`random_number_generator`, `gaussian_noise`, `lfsr19`)

**Target choice.** The true target of a Monte Carlo trial comes from a 3-bit
shift register:

* next state `{s2, s2^s0, s1}`;
* `random = {n1, n2^n0}`, where `n` is the next state.

Starting from the seed `100`, the register runs the cycle
`100 -> 110 -> 111 -> 101`, so the target sequence repeats **3, 2, 0, 1**.
Each target therefore appears exactly equally often, but in a fixed order.
This is a property of the register as specified, not random sampling. Other
seeds are worse: `001` and `010` give only targets 2 and 1, and `000` and
`011` lock up.

**Noise.** Each channel (I and Q) sums ten free-running 19-bit maximal-length
LFSRs (feedback from bits 18 and 16). Each word is read as a Q15.16 number,
which makes it roughly uniform on [0, 8). The sum is scaled by
`1/(10*sqrt 2)` and its mean of 2.828 is subtracted. The result is a
zero-mean, roughly Gaussian sample with a standard deviation of about 0.52,
one new sample per clock. The seeds are fixed constants derived from
`SEED_BASE`.

## The Monte Carlo model (`target_recognition`)

The controller runs this nested loop:

```
for ks = ks_start .. N_LEVELS-1:                 sqrt(Ex) from SQRT_EX_TAB[ks]
    x0 = xpwe(P = 1/4, sqrt(Ex))                 computed once per level
    for trial = 0 .. N_TRIALS-1:
        target = random;  P = 1/4;  x = x0
        repeat N_ITER times:
            y = x * h_target + noise             second FIR, noise added one sample per clock
            P = pwe_update(x, y, P)
            x = xpwe(P, sqrt(Ex))
        decision = argmax P  (lowest index on a tie);  count an error if wrong
    pc = (N_TRIALS - errors) / N_TRIALS          divider
```

The energy levels are spaced 40/14 dB apart:
`SQRT_EX_TAB[ks] = round(65536 * 10^((-30 + ks*40/14)/20))`, from 0.032 to
3.162.

The outputs show the progress: `ks`, `kms`, the true target, the decision,
the running error count and the probabilities. `trial_done` and `level_done`
are single-clock pulses, and `mc_done` stays high at the end. A trial takes
about 530,000 clocks, almost all of it in the square roots. A full run of
15,000 trials is therefore about 8e9 clocks, or roughly 64 s at 125 MHz: fast
in hardware, far too long for RTL simulation.

## The radar processor (`crr_processor`)

### Sequence

| step | state | what happens |
|---|---|---|
| 0 | `P_IDLE` | wait for a debounced button press; sample the DIP switches; every `RETX_PERIOD` clocks resend the last waveform |
| 1 | `P_XPWE0` / `P_READ_XPWE0` | waveform for `P = 1/4` |
| 2 | `P_TX` | start a transmit burst and arm the receiver |
| 3 | `P_RX` | wait for the captured return |
| 4-10 | `P_UPDATE` / `P_READ_UPDATE` | `pwe_update`; queue a 4-word SPI frame with the new probabilities |
| 11 | `P_XPWE` / `P_READ_XPWE` | next waveform; loop to step 2 until `N_ITER` rounds are done |
| 12 | `P_CLASSIFY` | light the LED of the most probable target; queue a 5-word SPI frame; return to idle |

### Transmit and receive links (`tx_formatter`, `rx_capture`)

The equipment's own link format is proprietary, so this design uses a
simple one. Each 240-bit link word carries one IQ sample:

* In-phase in bits 15:0 and quadrature in bits 31:16.
* Each is a signed 16-bit value with 15 fraction bits: Q15.16 bits 16..1,
  saturated.
* The upper bits are zero.

A **burst** is `REF_LEN` (4) words of a reference pulse (in-phase 0.25),
followed by the 31 waveform samples, one word per clock.

The **receiver** watches the in-phase value:

1. The first word above `RX_THRESH` (0.125) marks the reference pulse, and
   `rx_hit` pulses.
2. The rest of the pulse is skipped.
3. A 240-word read window opens (`rx_read`).
4. Each word is sign-extended and shifted into Q15.16. The window is reduced
   to 61 samples: output `n` is window word `ceil(239n/60)`, so samples 0 and
   60 are the first and last words.

The equipment is expected to play the 61-sample return spread over those 240
words (word `k` holding sample `floor(60k/239)`). `tb/rf_loop_model.sv` does
exactly that.

### SPI read-out (`spi_tx`)

The SPI port is write-only: `sck`, `mosi` and `/ss`. Words are 32 bits, sent
MSB first. `sck` idles low and data is stable while it is high. One bit lasts
`SCK_DIV = 512` clocks, which is 244 kHz at 125 MHz. `/ss` is low for each
word.

Two kinds of frame are sent:

* After every update, the four probabilities.
* After the decision, the four final probabilities and then the word
  `{26'b0, decision[1:0], DIP[3:0]}`.

Frames are queued one deep, so a frame can wait while the previous one is
still being sent.

### Pins

| pin | use |
|---|---|
| `RESET` | active-high reset (`reset_n = ~RESET` inside) |
| `GPIO_SW_C` | start button: 2-flop synchronizer, then 10 ms (`DEBOUNCE_CYCLES`) of stable level |
| `GPIO_DIP_SW1..4` | reported in the status word |
| `PMOD0_0..2_LS` | SPI `sck`, `mosi`, `/ss` |
| `PMOD0_3_LS` | busy (not idle) |
| `PMOD0_4..7_LS` | test points: burst on the transmit link, reference pulse being sent, reference pulse detected, receive window open |
| `PMOD1_0..3_LS` | target LEDs, **active low**: the LED sits between +3.3 V and the pin |

## Top level (`crr_top`)

`crr_top` brings out the processor's pins: `PMOD0[7:0]` and `PMOD1[3:0]` as
vectors, plus `RX_DATA` and `TX_XPWE`. It also brings out the Monte Carlo
model's controls and results with an `mc_` prefix; `mc_reset_n` is active
low. `MC_N_TRIALS` (default 1000) is the only top-level parameter.

## How this design departs from the original

The original design's structure is kept: the units, the state sequences, the
table contents and the sizes (4 hypotheses, 31 taps, 61-sample returns, 15
levels, 1000 trials, 4 rounds, 240-word capture). These details are this
design's own choices:

* **Noise scaling of the update.** The likelihoods are scaled by
  `INV_NOISE_VAR`, and `max L` is subtracted before the exponential.
* **Separated steps.** The update steps are gathered into one module that
  both controllers share. The Monte Carlo model has its own FIR for the target
  return and its own divider for `pc`, instead of sharing one of each.
* **Link word layout.** The reference pulse length and amplitude, the
  detection threshold, and the 240-to-61 reduction rule are this design's.
* **Processor timing and pins.** The SPI framing and clock phase, the debounce
  method, the retransmit period (100 ms), and the assignment of `PMOD0_4..7`
  are this design's.
* **Arithmetic details.** The divider keeps all 16 fraction bits (the original
  speaks of three decimals). It also clamps overflow. The exponential rounds
  its input to the nearest 1/64.
* **Square-root accuracy.** The original reports an average error of about
  5 % (11.25 % at the square root of 0.001). This search lands within a few
  2^-16 steps of the true root, so it is more accurate than that.
* **Reset.** Every register has an asynchronous, active-low reset.
* **Not built.** The RF equipment, the vendor's link core and FIFO, the board
  clocking, and the set-up link to a PC are not part of this RTL.

## Simulating

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M`, has a watchdog, and uses `$urandom` only.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/crr_pkg.sv rtl/crr_tables_pkg.sv tb/tb_xpwe.sv --top-module tb_xpwe
obj_dir/Vtb_xpwe +verilator+rand+reset+2
```

The reference values come from the testbenches themselves, not from the
blocks:

| testbench | what it compares against |
|---|---|
| `tb_division`, `tb_squareroot`, `tb_exponential` | integer or real models; exact latencies |
| `tb_fir_filter` | bit-exact convolution from the real-valued tables; latency 62 |
| `tb_xpwe` | real-valued PWE waveform for both `NORMALIZE` settings; output energy; latency bounds |
| `tb_pwe_update` | real-valued Bayes update (posteriors within 0.02); underflow case |
| `tb_random_number_generator` | a model of all 21 shift registers, bit for bit; noise mean, standard deviation and I/Q correlation |
| `tb_target_recognition` | 10 trials at each of levels 12-14; decisions, error counts, `pc` |
| `tb_mc_pcc` | 20 trials at each of levels 9-14; classification rate (2 errors in 120 trials seen) |
| `tb_debounce`, `tb_spi_tx`, `tb_tx_formatter`, `tb_rx_capture` | timing and word formats |
| `tb_crr_processor` | two recognitions through `rf_loop_model`, retransmission, SPI contents, LEDs |
| `tb_crr_top` | the whole top with 3 Monte Carlo trials per level, counting every mechanism |
| `tb_crr_top_full` | the top with every default |

`tb_crr_top_full` runs the processor through two complete recognitions and
covers the first 33 or so of the 15,000 Monte Carlo trials. A complete Monte
Carlo level has been simulated only with fewer trials per level.

`rf_loop_model` stands in for the RF loop. It convolves each transmitted
burst with the chosen target's response and adds uniform noise. After a
delay it plays the return back with a reference pulse in front.

Simulation runs at roughly 1 million clocks per second for the Monte Carlo
model. The processor benches take 15-30 s each, most of it the 12.5 million
idle clocks before a retransmission.
