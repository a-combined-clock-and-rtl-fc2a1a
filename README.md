# All-digital CDR with adaptive data-dependent-jitter cancellation

A serial link over a band-limited channel moves every data edge by an
amount that depends on the symbols sent before it (inter-symbol
interference, seen in the time domain as *data-dependent jitter*, DDJ).
A clock and data recovery (CDR) loop that locks to those edges passes the
DDJ on to the recovered clock.

This CDR is built entirely from digital blocks apart from its oscillator.
It **predicts the DDJ of every edge from the recovered symbols and
subtracts the prediction from the measured phase error before the loop
filter.** The predictor is a short FIR filter whose taps adapt by sign-LMS
while the loop runs, so the channel does not need to be known. Because the
correction is applied to numbers and not to the edge itself
(feed-forward), a plain time-to-digital converter (TDC) can be the phase
detector and a plain synthesizable FIR filter can be the canceller.

Design point: 2.5 Gb/s (1 UI = 400 ps), a 10-flip-flop TDC with 0.1 UI
resolution over a 0.9 UI window, a 4-tap canceller with step size
mu = 0.00005 UI, a PI loop filter with Kp = 3.0 and Ki = 0.063, a DCO with
0.005 UI resolution, and a loop latency of three cycles.

## The loop

```
            +-------------------+                         data_out = a(n)
data_in --->| tdc_delay_line    |--tap 4--> data_retimer ------+-------------->
            | (buffers, 40 ps)  |           (falling edge)     |
            +-------------------+                              v
                 | taps[9:0]                          +-----------------+
                 v                                    | ddj_canceller   |
            +---------+   tc (signed, 0.1 UI LSB)     |  ddj_fir  -> t_est
            |  tdc    |------------------------------>|  e_c = tc - t_est
            +---------+                               |  coef_update (sign-LMS)
                 ^                                    +-----------------+
                 |                                             | e_c
                 |            +-------+   code    +-------------+
     rec_clk ----+------------|  dco  |<----------| loop_filter |<---+
                              +-------+           +-------------+
```

Each recovered-clock cycle is one UI. In every cycle:

1. **TDC** (`tdc_delay_line` + `tdc`). The data runs down a chain of
   buffers, each 0.1 UI long. Ten flip-flops sample the chain on the
   rising clock edge. Where two neighbouring samples differ, the data edge
   lay between those taps. The XOR position p (0..8) becomes
   `tc = p - 4`, which is zero when the edge sits in the middle of the
   window. An edge that arrives early has travelled further down the chain,
   so `tc` is positive; a late edge gives a negative `tc`. If no XOR is set
   there is no edge, and `tc = 0`. If more than one is set, the lowest
   position wins.
2. **Retimer** (`data_retimer`). At lock the rising clock edge sits on the
   data edges, so the data is sampled half a UI later, on the falling edge.
   The retimer samples the delay-line tap at the centre of the TDC window
   (tap 4), so that it sees the data with the same delay as the point the
   loop locks to. A second flip-flop moves the sample onto the rising edge.
   This puts symbol a(n) next to the TDC result of the edge in front of it.
3. **DDJ canceller** (`ddj_canceller` = `ddj_fir` + `coef_update`). Works
   only when a(n) differs from a(n-1), that is, when there was an edge.
   It outputs `e_c = tc - t_est` and adapts its taps. In cycles without an
   edge, `e_c = 0`.
4. **Loop filter** (`loop_filter`). `code = round(Kp*e_c + sum(Ki*e_c))`.
5. **DCO** (`dco`). Period = 400 ps - code * 2 ps.

### Timing

| rising edge | event |
|---|---|
| k | TDC flip-flops sample edge E (between a(n-1) and a(n)) |
| k + 1/2 (falling) | retimer samples a(n) |
| k+1 | `tc` of E and `a(n)` registered, side by side |
| k+2 | `e_c` registered; coefficients updated with sgn(e_c) |
| k+3 | DCO code registered; the period from this edge on uses it |

This gives three cycles from sampling to the DCO code, which is the loop
latency the gains were designed for. `data_out` is the recovered data,
delayed by a few cycles.

## Why an FIR filter can predict the jitter

Take a first-order (RC) channel with time constant tau and
alpha = exp(-T/tau). A rising edge after the symbols a(n-2), a(n-3), ...
crosses the half level at

    t_c = tau*ln 2 + tau*ln(1 - (1-alpha) * sum_m a(n-m) alpha^(m-1)),  m >= 2.

The argument of the second logarithm stays between 1-alpha and 1. Over
that range a straight line fits ln(1-x) well. The crossing time then
becomes *linear* in the past symbols:

    t_c ~ t_c0 + sum_m c(m) * a(n-m),
    c(m) = tau * (1-alpha) * ln(1-alpha)/alpha * alpha^(m-1)   (negative).

This is an FIR filter on the symbol stream. Its coefficients fall off
geometrically, so a few taps catch most of the DDJ. For example, with
alpha = 0.3 the first four coefficients are -0.207, -0.062, -0.019 and
-0.006 UI.

A falling edge behaves in the same way, but with the history inverted.
So `ddj_fir` XORs every stored symbol with the current one before it uses
it. One filter then serves both edge directions. Tap k sees
`a(n) ^ a(n-k-2)`. This bit is 1 when that old symbol had the level
opposite to the new one, which pulls the edge later, so the coefficients
come out negative, as the c(m) above do. a(n-1) is not a tap: for an edge,
it is always the opposite of a(n). Since a tap input is a single bit, the
"multiplier" is just a gate that passes w_k or zero. The estimate is
`t_est = sum_k w_k * (a(n) ^ a(n-k-2))`.

## Adaptation (sign-LMS)

On every edge each coefficient is updated:

    w_k <- w_k + mu * sgn(e_c) * (a(n) ^ a(n-k-2))

There is no multiplier. The sign and the bit pick +step, -step or nothing,
and mu is a power of two. The coefficients start at zero. They saturate at
the ends of their 16-bit range.

**Number format.** Phase errors and coefficients are counted in TDC LSBs
(0.1 UI), with 11 fraction bits. The published mu = 0.00005 UI is 0.0005
LSB. The nearest power of two is 2^-11 LSB (0.0000488 UI), so one update
step is one coefficient LSB (`MU_SHIFT = 11`). `e_c` is 20 bits, with the
same 11 fraction bits.

**Two loops, two speeds.** The adaptation runs hundreds of times slower
than the CDR loop. The clock locks first (within a few hundred UI), and
the taps then move to the channel's values over many thousands of UI.
With the default mu, the first tap of the test channel needs about 20,000
UI to reach -0.2 UI.

**What to expect from a 0.1 UI TDC.** Sign-LMS drives the *median* of the
error to zero, and the TDC code is an integer. With little random jitter,
the taps therefore settle on a fit made of whole TDC LSBs. In the test
channel the first tap settles at -2.0 LSB (the channel value is -2.07) and
the smaller taps settle at 0. They do not reach -0.6 or -0.2. Even so, the
residual jitter drops from about 0.11 UI rms to 0.03-0.05 UI rms.

## Loop filter and DCO

`H(z) = Kp + Ki / (1 - z^-1)`. Its input is in TDC LSBs and its output is
in DCO LSBs. The gains are fixed point with 12 fraction bits: Kp = 3.0 is
12288 and Ki = 0.063 is 258 (0.06299). The output is rounded half up and
saturates to a 10-bit signed code, where 0 is the centre frequency and a
positive code is faster. The integrator is 48 bits wide and saturates. At
the design point these gains give about 25 MHz of loop bandwidth and 60
degrees of phase margin with the three-cycle latency. If the TDC or DCO
resolution changes, scale both gains by Δt_TDC/Δt_DCO.

The DCO is a behavioural model. It adds 4 ps (0.01 UI) rms of Gaussian
edge jitter by default (`RJ_PS`; set it to 0 for an ideal clock). The
delay line is also a behavioural model, with a fixed ±0.25 LSB
differential nonlinearity: odd stages are 50 ps and even stages 30 ps.
Every other block is synthesizable.

## Files

| file | contents |
|---|---|
| `rtl/ddj_cdr_pkg.sv` | design-point constants, `sign_t` |
| `rtl/tdc_delay_line.sv` | behavioural buffer chain (taps every 40 ps, DNL) |
| `rtl/tdc.sv` | sampling flip-flops, XORs, decoder → `tc` |
| `rtl/data_retimer.sv` | falling-edge sampler + re-timing flip-flop |
| `rtl/ddj_fir.sv` | symbol delay line, XOR inversion, gated taps, adder |
| `rtl/coef_update.sv` | coefficient registers, sign-LMS update |
| `rtl/ddj_canceller.sv` | transition gating, `e_c = tc - t_est`, output register |
| `rtl/loop_filter.sv` | PI filter |
| `rtl/dco.sv` | behavioural DCO |
| `rtl/ddj_cdr_top.sv` | the complete loop |
| `tb/tb_<block>.sv` | self-checking test of each block |
| `tb/tb_ddj_cdr_top.sv` | end-to-end run at the default parameters |
| `tb/tb_ddj_cdr_sweep.sv` | tap-count and TDC-resolution sweep |
| `tb/tb_ddj_fig2.sv` | 16-tap canceller on an alpha 0.44 channel, against the calculated taps |
| `tb/prbs_channel.sv`, `tb/cdr_probe.sv` | PRBS transmitter with first-order channel; per-CDR measurement wrapper |

Top-level parameters (`ddj_cdr_top`): `N_FF` (TDC flip-flops, 10),
`TDC_STEP` (ps per buffer, 40.0), `N_TAPS` (4), `W_W`/`W_FRAC`
(coefficient width and fraction bits, 16/11), `MU_SHIFT` (11), `KP_Q`,
`KI_Q`, `GAIN_FRAC` (12288, 258, 12), `DCO_W` (10), and `RETIME_TAP`
((N_FF-1)/2). For another TDC resolution, keep `(N_FF-1)*TDC_STEP` at
0.9 UI. The sweep uses 20 flip-flops × 18.8 ps, 6 × 72 ps and 4 × 120 ps.

## Simulating

All files use `` `timescale 1ps/1fs``. The package must come first.
Everything else is found by module name:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ddj_cdr_top rtl/ddj_cdr_pkg.sv tb/tb_ddj_cdr_top.sv -o sim
obj_dir/sim
```

Replace the top module with any `tb_*` name to run that test. Every test
prints `TB_RESULT checks=N failures=M`. The reset is asynchronous, so the
test benches start with `rst_n` high and pull it low after 1 ps. This
gives the flip-flops a falling edge to reset on. The DCO runs only while
`rst_n` is high.

`tb_ddj_cdr_top` sends a 2^23-1 PRBS, 500 ppm faster than the DCO centre,
through an exact first-order channel model (alpha = 0.3, edge times from
the crossing-time formula above, plus 0.01 UI rms random jitter). It runs
120,000 UI in under a second. A typical run gives:

* no bit errors in the second half, with a data latency of about 4-7
  cycles;
* mean `e_c` of 0.00 LSB;
* rms `tc` of 0.11 UI, and rms `e_c` of 0.05 UI after cancellation;
* taps of -0.20 / 0 / 0 / 0 UI;
* rms recovered-clock phase against the transmitter's grid falling from
  about 0.035 UI (taps still near zero) to 0.026 UI (taps converged).

The test also counts each mechanism: transition-gated and idle cycles,
rising and falling edges, coefficient steps in both directions, and
integral-path tracking of the offset (an average code of 0.1).

`tb_ddj_cdr_sweep` runs seven CDRs on one input. At 0.1 UI it uses 1, 2,
4 and 8 taps. With 4 taps it uses 0.047, 0.18 and 0.3 UI TDCs, with the
gains scaled by the resolution. On this channel, the tap count hardly
matters: nearly all of its DDJ sits in the first tap. The residual jitter
grows with the TDC step: about 0.028, 0.034, 0.105 and 0.198 UI.

`tb_ddj_fig2` tests the canceller alone, with 16 taps, on a strong
first-order channel (alpha 0.44). It computes the exact crossing time of
every edge, quantises it with a fine 0.01 UI TDC, and adds 0.01 UI rms
random jitter. After 300,000 symbols the taps are within 0.008 UI of the
coefficients calculated from the channel (-0.395, -0.174, -0.077,
-0.034 UI, then falling by 0.44 per tap). The small differences come from
fitting a straight line to the logarithmic crossing-time curve. The DDJ
falls from 0.218 UI rms to 0.022 UI rms. This confirms the linear model
behind the canceller. It does not show that the complete loop works on
such a channel; see below.

## Limits and departures

* **Channel and lock point.** The tests use a first-order channel model,
  not a measured cable. The FIR has no constant term, and its tap bits are
  0 or 1, so the estimate is zero only for the earliest class of edges
  (all earlier symbols equal to the new one). The loop drives the mean of
  `e_c` to zero, so the mean TDC code settles at half the sum of the taps,
  not at zero: the clock lines up with the earliest edges, and the other
  edges arrive late in the TDC window. With 0.3 UI of DDJ this shift is
  about 0.1 UI, and the design works. With strong ISI (alpha 0.4, DDJ of
  about 0.6 UI peak to peak) the loop locks with no bit errors for about
  30,000 UI. But as the first tap grows toward its channel value, the lock
  point moves about 0.12 UI late. The latest edges then fall outside the
  0.9 UI TDC window and read as "no edge", and at about 32,000 UI the loop
  loses lock. Moving the retimer tap (`RETIME_TAP = 2`) puts the sample
  back at mid-eye. Bit errors then fall to a few per 8,000 UI, but lock
  is still lost, at about 45,000 UI. This build is therefore verified only
  on channels with about 0.3 UI of DDJ. A wider TDC window, or a constant
  term in the FIR, would be needed for stronger ISI. Neither is part of
  this design.
* **Coefficient accuracy.** With a 0.1 UI TDC and little random jitter,
  sign-LMS settles on coarse, whole-LSB coefficients (see above). The
  jitter is still reduced, but the taps do not track the channel finely.
* **TDC decoder.** When several XORs are set, the lowest position wins
  (a priority encoder), and no edge gives `tc = 0`. Other decoders
  (bubble-tolerant, or one that reports "no edge" to the loop filter) are
  possible.
* **Retimer input.** The retimer is fed from the centre tap of the TDC
  delay line, not from the raw input, to put its falling-edge sample in
  the middle of the eye.
* **Fixed-point choices.** All widths, mu rounded to 2^-11 LSB, the
  rounding and saturation rules, and the reset values are this design's
  own choices.
* **Not built.** The interleaved (parallel) FIR, which would let the
  filter run slower than the symbol rate, is not built. A lock detector is
  not built either: lock is judged by the tests. The DCO and the buffer
  chain are models only.
