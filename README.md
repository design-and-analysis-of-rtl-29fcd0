# Low-sampling-rate packet synchronizer for a dual OFDM/DSSS WLAN receiver

An IEEE 802.11g receiver has to accept two kinds of packets. OFDM packets
(802.11a/g) are sampled at 20 MHz. DSSS packets (802.11b) are spread at
11 Mchip/s. A conventional receiver has two ADC pairs, one per rate, or one
fast ADC followed by an interpolator. This design uses **one I/Q ADC pair
whose clock is programmable**. While it waits for a packet, the ADC runs at
only **10 MHz**: half the OFDM rate and below the DSSS chip rate. Both packet
detectors work on those low-rate samples. Once a packet type is recognised,
the synchronizer asks the sampling-clock generator (an all-digital PLL) for
the rate that packet needs. For OFDM it then finds the FFT window.

The RTL covers the digital synchronizer: both detectors, the control unit
and the OFDM symbol timing estimator. The ADC, the ADPLL/DLL and the AGC sit
outside it. The synchronizer talks to them through a sample input and a
rate-request output.

## Data flow

```
              in_valid/in_sample (ADC, 10 or 20 MHz on a 20 MHz clock)
                          |
                 sample_shift_reg (32 complex taps, shared)
          +---------------+------------------+---------------------+
          |                                  |                     |
   ofdm_autocorr                    barker_correlator     ofdm_symbol_timing
   (c(t), p(t), |c|^2>G p^2)        (d(t))                (xi, xi_max, lambda)
          |                                  |                     ^
   consec_detect_fsm (alpha)        dsss_peak_valley               |
          |                                  |                     |
          |                         consec_detect_fsm (beta)       |
          +------------> detection_ctrl <----+---- st_start -------+
                         | rate_req, SEL_10M, flush, mode (output MUX)
```

Everything runs on one 20 MHz system clock. A sample strobe `in_valid`
marks the clocks that carry a new ADC sample: every clock at 20 MHz, every
second clock at 10 MHz. All three correlators read the one 32-entry shift
register. When the requested rate changes, `flush` empties the register and
every accumulator, so that samples taken at two different rates are never
combined.

## The three detection algorithms

### OFDM: delay-and-correlate on the short training symbols

The OFDM preamble opens with ten identical 16-sample short symbols. At
10 MHz each short symbol is 8 samples long. `ofdm_autocorr` correlates the
newest window of La samples with the window L samples earlier (L = La = 8 at
10 MHz, 16 at 20 MHz), and computes the power of the earlier window:

```
c(t) = sum_{k=0}^{La-1} r(t+k) r*(t+k+L)        p(t) = sum_{k=0}^{La-1} |r(t+k)|^2
criterion:  |c(t)|^2 > Gamma * p(t)^2           (the division of |c|^2/p^2 is avoided)
```

Both sums are kept as running sums. Each new sample costs one complex
product r(n-L)·r*(n) and one power |r(n-L)|^2. The power comes from a
square look-up table (`square_lut`), not a multiplier. The products and
powers also enter two 16-deep FIFOs, Corr_FIFO and Power_FIFO. The entry La
positions back leaves the window and is subtracted. `sel_10m` (SEL_10M)
picks the 8- or 16-sample window.

On noise, a single threshold crossing is common, but a long run of crossings
is rare. A preamble, in contrast, keeps the metric high. The detector
therefore pairs a **low threshold with a high count**. `consec_detect_fsm`
declares OFDM only after alpha = 10 consecutive samples have met the
criterion. The threshold is Gamma = 0.5 (128/256).

### DSSS: peaks against valleys

The DSSS preamble is a stream of random ±1 symbols at 1 MHz, each spread by
the 11-chip Barker code `+ - + + - + + + - - -`. `barker_correlator`
computes d(t) = |sum r(t+k) b(k)|^2 over the 11 newest samples. At 10 MHz
the code and the samples do not line up, so peak heights vary from symbol to
symbol. The detector does not compare the peak against an average. Instead,
`dsss_peak_valley` checks two properties in every 10-sample window (one
symbol period):

* **Peak interval.** Each window's maximum must lie one symbol period
  (10 samples) after the previous window's maximum, within ±1 sample
  (100 ns). The comparison is cyclic, so a peak that jitters across a
  window boundary still counts.
* **Peak vs valleys.** The peak must exceed the *sum* of the d values at
  offsets 3..7 after it:
  `Lambda_DSSS = d(peak) - sum_{k=3}^{7} d(peak+k) > 0`.
  Multipath smears energy into the samples right next to the peak, so those
  samples are left out of the valley sum.

A window passes when both hold. DSSS is declared after beta = 8 passing
windows in a row.

Each window's result comes out when the *next* window closes. By then all
five valley samples after the older peak are in the block's 20-entry
d-delay line. This requires VS + ETA ≤ TS, which an elaboration assertion
enforces.

### OFDM symbol timing: a search window that sizes itself

After an OFDM declaration the rate goes to 20 MHz and `ofdm_symbol_timing`
is armed. It works in two steps:

1. **End of the short preamble.** The autocorrelation criterion stays true
   through the short symbols and collapses in the guard interval. After
   N_END = 8 consecutive failures, the search window opens. The test uses
   the normalised criterion (|c|² against Gamma·p²), not the raw
   correlation c(t), so it does not depend on the received level.
2. **Dynamic search window.** The 32 newest samples are correlated with the
   first half of the long training symbol:
   xi(t) = |sum_{k=0}^{31} r(t+k) LT*(k)|^2.
   A running maximum xi_max is kept. A counter lambda counts the samples
   since xi_max last grew: it restarts at 0 when xi beats xi_max and keeps
   counting on ties. When lambda exceeds P = 48, the maximum is taken as the
   timing. The window therefore ends P samples after the true peak instead
   of at a fixed length. The buffer for the long preamble can then be short.

The reference LT*(k) is stored as signs only, ±1 ± j per sample. The
correlator therefore needs only adders. The sign pattern comes from
LT(n) = sum_{k=-26..26} L_k e^{j2πkn/64}, n = 0..31, where L_k is the
802.11a long training sequence. The pattern is two 32-bit constants in
`sync_pkg`: a bit is set where the real or imaginary part is negative.

The output is `tau_back`, which pulses with `tau_valid`. It is the number of
samples from the newest received sample back to the last guard-interval
sample; the FFT window starts one sample later. The goal is the last guard
sample, sample 191 of the packet counted from the first short-symbol sample
at 20 MHz. Anything from 177 to 192 lies inside the cyclic prefix.

## Control and dynamic sampling (`detection_ctrl`)

| state        | rate request | SEL_10M | output MUX | leaves on                                       |
|--------------|--------------|---------|------------|-------------------------------------------------|
| DETECT       | 10 MHz       | 1       | none       | OFDM declare → OFDM_TIMING; DSSS declare → DSSS_ACQ |
| OFDM_TIMING  | 20 MHz       | 0       | OFDM       | `tau_valid` → OFDM_LOCK                         |
| OFDM_LOCK    | 20 MHz       | 0       | OFDM       | `restart`                                       |
| DSSS_ACQ     | 22 MHz       | 0       | DSSS       | `dsss_acq_done` → DSSS_LOCK                     |
| DSSS_LOCK    | 11 MHz       | 0       | DSSS       | `restart`                                       |

* Both detectors may declare in the same clock. OFDM then wins, because its
  preamble is much shorter: a missed OFDM preamble is gone, while the DSSS
  preamble would still be there. An assertion in `detection_ctrl` checks
  this rule.
* For DSSS, the timing-acquisition rate is two samples per chip (22 MHz).
  After that the rate drops to one sample per chip (11 MHz).
  `dsss_acq_done` comes from the DSSS back end, which is not part of this
  design.
* OFDM goes straight to 20 MHz. This is the rate at which the symbol timing
  estimator works, and the system clock is 20 MHz.
* The ADPLL is assumed to switch rate at once; its settling time is not
  modelled. `restart` (end of packet, or a false alarm found further down
  the receiver) returns to DETECT.
* `data_valid_ofdm` / `data_valid_dsss` with `data_out` form the output
  MUX. They forward each sample one clock later to the demodulator of the
  locked packet type.

## Files

| file | contents |
|---|---|
| `rtl/sync_pkg.sv` | sample type `cplx_t` (8-bit I/Q), `rate_t`, `pkt_t`, Barker and long-training sign constants |
| `rtl/sample_shift_reg.sv` | shared 32-tap sample register |
| `rtl/ofdm_autocorr.sv`, `rtl/square_lut.sv` | OFDM delay-and-correlate detector datapath |
| `rtl/consec_detect_fsm.sv` | consecutive-hit declaration FSM (alpha / beta) |
| `rtl/barker_correlator.sv` | 11-chip de-spreader |
| `rtl/dsss_peak_valley.sv` | DSSS peak interval and peak/valley test |
| `rtl/ofdm_symbol_timing.sv` | end-of-short-preamble detection and dynamic-window timing search |
| `rtl/detection_ctrl.sv` | control unit |
| `rtl/packet_sync_top.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/detection_stats_tb.sv` | detection and timing statistics over a fading channel |
| `tb/preamble_gen_pkg.sv` | real-valued generator of the 802.11a/g preamble and Barker chips |

Top-level parameters: `ALPHA` = 10, `BETA` = 8, `GAMMA` = 128 (Q0.8),
`N_END` = 8, `P` = 48. The 8-bit sample width is `SAMPLE_W` in `sync_pkg`.
The internal sums are wide enough that nothing is rounded or saturated:
c has 21 bits, p 20 bits, d 24 bits and xi 30 bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sync_pkg.sv tb/preamble_gen_pkg.sv tb/packet_sync_top_tb.sv \
    --top-module packet_sync_top_tb -o sim && obj_dir/sim
```

Replace the testbench name to run any other one. `packet_sync_top_tb` runs
the top at its default parameters and finishes in about a second. It plays
the ADC: it generates the received signal on a 20 MHz grid and takes every
second point while 10 MHz is requested. It runs these cases:

* 8000 grid samples of noise: no declaration allowed;
* three OFDM packets at different noise levels: each must be declared inside
  the short preamble, and its timing must fall in 177..192 (exactly 191 when
  the noise is low);
* two Barker-spread DSSS packets with a 30° carrier phase: each must be
  declared, followed by the 22 → 11 MHz sequence;
* one more OFDM packet with the DSSS FSM's declare line forced to copy the
  OFDM one, so that both detectors declare in the same clock: OFDM must
  win and no DSSS declaration may come out.

The test counts every mechanism and fails if one never happened:

* each declaration;
* each rate switch;
* flushes;
* end-of-short-preamble detection;
* timing declarations;
* restarts;
* routing to each demodulator;
* single OFDM threshold crossings rejected by the count;
* DSSS symbols rejected by the peak tests.
* simultaneous declarations.

The unit testbenches compare against direct (non-recursive) reference
computations:

* the autocorrelation sums, with the window sizes at 10 and 20 MHz;
* the Barker correlation, with the code written out as integers;
* the peak/valley windows, with the result latency;
* the long-preamble correlation, with its signs recomputed from the defining
  sum;
* a reference model of the control sequence.

Results in simulation, with the default parameters and an AWGN-like
channel:

| case | result |
|---|---|
| OFDM declared | 23–43 samples (20 MHz count) into the 160-sample short preamble |
| OFDM timing | last guard sample 191 in every case |
| DSSS declared | about 10 µs into the preamble |

`detection_stats_tb` sends each packet through a random three-path
Rayleigh channel: taps at 0, 50 and 100 ns with powers 1, e^-1 and e^-2.
It adds a 120 kHz carrier offset (50 ppm at 2.4 GHz) and Gaussian noise.
It sends 16 OFDM and 16 DSSS packets per SNR, with these results:

| SNR | OFDM lost | OFDM timing outside 177..192 | DSSS lost |
|---|---|---|---|
| 0 dB | 14/16 | 0/2 | 11/16 |
| 4 dB | 5/16 | 3/11 | 6/16 |
| 8 dB | 1/16 | 4/15 | 2/16 |
| 20 dB | 0/16 | 1/16 | 3/16 (2 taken as OFDM) |

It also runs 40 000 noise-only samples, with no false alarm. Most DSSS
losses at high SNR come from multipath. Delayed paths spread the Barker
peak at the 10 MHz detection rate. For some channel draws this defeats the
peak/valley test or lets the OFDM criterion fire first. The testbench
checks these loose bounds:

* no false alarm;
* at 20 dB, at most 10 % OFDM loss, 25 % DSSS loss and 20 % timing errors.

## Choices not fixed by the algorithm, and limits

* **Word lengths.** The 8-bit ADC words and full-precision internal sums
  are this design's choice. Narrowing them is where area would be saved.
* **Threshold.** Gamma = 0.5 with alpha = 10 is used. Statistics for a
  16-sample window at 20 MHz put the low-threshold/high-count point between
  Gamma = 0.4 (about 1 % false alarm) and 0.65 (still detects the
  preamble), both with a count of 10. An 8-sample window at 10 MHz is
  noisier: at Gamma = 0.4 a run of uniform noise raised a false alarm about
  once every 13 000 samples, so the threshold was raised to 0.5. The
  trade-off between packet loss and false alarm has not been characterised
  for the 10 MHz window.
* **Counts and windows.** beta = 8, the valley window (3..7 after the peak),
  the ±1-sample interval tolerance, N_END = 8 and P = 48 are all this
  design's choices. All are parameters. N_END and P were set with
  `detection_stats_tb`. With N_END = 4 and P = 32, about one OFDM packet
  in six at 20 dB had its timing outside 177..192. With 8 and 48, about
  one in twenty did.
* **Long-preamble reference.** The reference is quantised to signs.
  Full-precision coefficients would need 32 complex multipliers.
* **20 MHz detection.** The control unit never runs packet detection at
  20 MHz, but the autocorrelator supports the 16-sample window (`sel_10m`
  low) used after the switch.
* **Not modelled.** The ADPLL/DLL switching transient, the AGC, the DSSS
  timing acquisition that follows the 22 MHz request, and adaptive
  threshold selection are not modelled.
* **Channel.** `detection_stats_tb` uses one simple channel: three
  Rayleigh paths and a 120 kHz offset. The SPW11a and IEEE channel sets
  are not reproduced. The rates above are therefore indicative only.
  Loss here is higher than the 1 % at 5.7 dB quoted for the OFDM detector
  at 10 MHz. Part of the gap is that the SNR is averaged over the fades.
