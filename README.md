# Multi-channel tapped-delay-line TDC with Nutt interpolation

This is a time-to-digital converter (TDC) for FPGAs. It timestamps
asynchronous events on up to 16 channels with virtual bins of about 2.5 ps and
a timestamp LSB of 36.6 fs. It does this with a 416 MHz clock (T_CLK = 2.4 ns).

Each timestamp has two parts:

- **Coarse part:** a 32-bit counter shared by all channels. It counts whole
  clock periods and gives a full-scale range of 2^32 × 2.4 ns ≈ 10.3 s.
- **Fine part:** the time from the event to the next clock edge. It is
  measured by letting the event run down carry-chain delay lines. The lines are
  then sampled on that clock edge.

The delay-line taps have uneven widths, so the raw tap count is not linear in
time. Each channel linearises its own count. It does this continuously, with a
code-density calibration built from the events it measures.

The timestamp is `ts = T_COARSE − T_FINE` (Nutt interpolation). It is a 48-bit
fixed-point number in units of T_CLK / 2^16 ≈ 36.6 fs. The upper 32 bits are the
counter and the lower 16 bits are a fraction of a clock period.

## Signal path of one channel

```
 start ──► swul ──pulse──► tdl[0] ─┐ (each line gets the pulse a few ps later)
            │              tdl[1] ─┤
            │              tdl[2] ─┤  codes, 4 × 256 bits
            │              tdl[3] ─┤
            │ stop (START          ▼
            │  sampled by clk)  decoder ──n_V (11 b)──► calibrator ──T_FINE──┐
            └────────► c_tdc ──T_COARSE (held while the decoder runs)──────► − ──► ts
                          ▲
   coarse_counter ────────┘  (one counter for all channels)
```

- **`swul`: the launcher.** When `start` rises it emits a short pulse (200 ps)
  into the delay lines. The pulse has two edges, rising then falling. It also
  registers `start` on the TDC clock to make `stop`. `stop` clocks the
  flip-flops of every tap, so the lines are frozen at the first clock edge
  after the event.
- **`tdl`: the delay lines.** There are four of them. Each tap shows 1 where
  the pulse is at sampling time. Both edges of the pulse are in a line when it
  is sampled, so each line gives two edge positions. Four lines × two edges
  makes F = 8 measurements of the same interval ("super wave union"). Their sum
  is a virtual bin eight times finer than a real tap.
- **`decoder`:** turns the four sampled words into one virtual bin n_V, from
  0 to 2047.
- **`calibrator`:** maps n_V to calibrated time.
- **`c_tdc`:** captures the counter when `stop` rises.

The coarse value is delayed by the decoder latency (12 cycles) so that it meets
its own fine value.

## Decoding the delay lines

Each of the four lines is decoded by two engines. The eight results are then
added.

**Edge detection (`log2_dn`, `log2_up`, helper `log2_engine`).**
The falling (DN) edge is the highest 1 in the word:
n_DN = ⌊log2(n_TDL)⌋. The rising (UP) edge is the lowest 1. It is found with
the same engine on the bit-reversed word: n_UP = (N_R−1) − ⌊log2(swap(n_TDL))⌋.

The engine is a halving pipeline with one stage per address bit, so it has 8
stages for 256 taps. Each stage:

- asks whether the upper half of the current window holds a 1;
- appends the answer as the next index bit;
- keeps that half.

The stage also keeps N_BL − 1 bits just below the window (guard bits). So at
the end the engine delivers the index and the N_BL bits ending at it. The
bubble corrector needs those bits. An all-zero word raises no `found`.

**Bubble compression (`bec_dn`, `bec_up`).**
Flip-flops near an edge sample it at slightly different times. Their output
therefore has "bubbles", such as `…1101 0100…`. The longest run seen in the
carry chain is 4 bits (N_BL).

The corrector counts the zeros in the N_BL bits at the edge. It subtracts
that count from n_DN, or adds it to n_UP. Scattered bubbles are thus compressed
onto the clean edge. This takes one register stage.

**Sum of bins (`tree_adder`).**
The eight corrected positions are added in a pipelined binary tree:

| Level | Adders | Output width |
|---|---|---|
| 1 | 4 | 9 bits |
| 2 | 2 | 10 bits |
| 3 | 1 | 11 bits |

The result is n_V.

The decoder latency is 8 + 1 + 3 = 12 cycles, and it accepts a new word every
cycle. If any line showed no edge, the decoder raises `edge_err`. Such a
measure is passed on and flagged (`ts_err`), but it is not histogrammed.

## Calibration

Events that are uncorrelated with the clock fall uniformly within a clock
period. Each virtual bin is therefore hit in proportion to its width.

The calibrator works in two phases:

1. **Histogram.** It histograms K = 2^16 such events into the calibration table
   CT, with 2048 entries.
2. **Integration.** It integrates CT into the characteristic curve CC. CC maps
   each bin to the time of its centre, in units of T_CLK/K.

The half-bin rule CC[n] = CC[n−1] + (CT[n−1] + CT[n])/2 would lose half a count
on every odd sum. To avoid this, it is evaluated at double scale and exactly:

```
2·CC[n] = 2·CC[n−1] + CT[n−1] + CT[n],     2·CC[0] = CT[0]
```

Each doubled value is rounded ((2CC+1)>>1) only when it is written out. Rounding
errors therefore do not accumulate along the curve.

There are two CC banks. One translates live measurements. The other receives
the next curve. They swap when a new curve is complete, so the calibration
follows temperature and voltage drift without interrupting measurement.
For example, if every delay grows by 8 %, the curve in use becomes wrong by up
to about 200 ps at the far end of the line (126 ps RMS). The next curve, built entirely from
events measured with the new delays, removes the error. So after a step change
the error lasts at most two calibration rounds. At a steady 100 M events/s with
K = 2^16 that is about 1.3 ms.

### Sequence

| State | What happens | Duration |
|---|---|---|
| INIT | CT is cleared after reset | 2048 cycles |
| HIST | each valid bin increments CT[bin] | until K samples are counted |
| DRAIN | one cycle | 1 cycle |
| INTEG | CT is read in order, CC is written to the idle bank, CT is cleared behind the read | 2049 cycles |

In HIST the increment is a read-modify-write with a one-cycle read. A hit on
the same bin in consecutive cycles is forwarded from the previous write rather
than read from the array.

After INTEG the banks swap and a `cal_swap` pulse marks the swap.

A new curve is live N_V + 3 cycles after its K-th sample. Events that arrive
during INTEG are translated with the old curve but not counted.

### Before the first curve

Until the first curve exists, `calibrated` is 0. Timestamps then have no
meaningful fine part.

With a steady event stream, the first curve is ready after K events. That is
65,536 events per channel.

### Accuracy to expect

A curve built from K samples carries a statistical error. The cumulative count
up to a bin is binomial, so CC is off by about √(K·p(1−p)) units at the bin
whose cumulative fraction is p.

For K = 2^16 the worst case is about 128 units, roughly 4.7 ps, at mid-period.
The RMS over a period is about 3 ps.

This error is fixed for the lifetime of a curve. It is the same for all
events, and a new random draw comes with each curve. This is on top of the
quantisation of a virtual bin, which is about 2.5 ps mean and 16 ps for the
widest bin.

### Storage per channel

- **CT:** 2048 × 17 bits. A bin can hold all K counts.
- **CC:** 2 × 2048 × 17 bits. CC reaches K at the end of the period.

All three are plain arrays without reset, so they map to block RAM.

## Timestamps and multi-channel use

All channels share `count` from one `coarse_counter`. They also share the
clock that samples their delay lines. Timestamps from different channels are
therefore directly comparable, and differences give inter-channel intervals.

The timestamp format is:

```
ts[47:16] = value of the counter on the clock edge that sampled the event
ts[15:0]  = − T_FINE (borrowing from the upper part)
=> ts = count·2^16 − CC[n_V]    (units of T_CLK / 65536)
```

The counter wraps modulo 2^32, and so does `ts`.

Timing and event rules:

- `ts_valid` is a one-cycle strobe. It comes 13 clock edges after the edge that
  sampled the event: 1 for the STOP register and 12 for the decoder.
- The calibrator adds no further latency to the timestamp path. Its lookup
  runs in parallel with the coarse delay.
- A channel takes one event per clock.
- An event is seen only if `start` is high across at least one rising clock
  edge. A pulse narrower than T_CLK can fall between two edges and be lost.
- Two events are resolved when `start` is low across at least one clock edge
  between them.
- So a pair of pulses needs a spacing of at least 2 × T_CLK (4.8 ns).
- A 150 MHz square wave on `start` (3.33 ns per level) is therefore measured on
  every rising edge, as is a pair of 2.5 ns pulses 5 ns apart.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_R` | 256 | taps per delay line (2^w, w = 8) |
| `F_OUT` | 4 | delay lines per channel; two edges per line, F = 8 |
| `N_BL` | 4 | bubble length corrected |
| `K_LOG2` | 16 | calibration length K = 2^16; CC resolution T_CLK/K |
| `N_CC` | 32 | coarse counter width |
| `N_CH` | 16 | channels |

Derived values:

- N_V = N_R·2·F_OUT = 2048. Its width, 11 bits, is `W_VBIN` in `tdc_pkg`.
- Decoder latency is log2(N_R) + 1 + log2(2·F_OUT).

Other sizes are parameter changes:

- F_OUT = 1, 2, 8 and 10 (F = 2, 4, 16, 20) are simulated by `tb_fout_sweep`.
- F values that are not powers of two work but waste code space. For F = 20 the
  tree adder pads to 32 inputs.
- A 512-tap line (N_R = 512, N_BL = 16, N_V = 4096) is simulated by
  `tb_channel_512`. Its latency is 14 cycles.
- A single-edge line (E = 1) is not supported, because both pulse edges are
  always decoded.

## The two behavioural models

`swul` and `tdl` depend on placement and routing (carry chains, flip-flop
sampling skew), so they are written as timing models with `$realtime` and
delays. They are **not synthesizable**. On an FPGA they are replaced by
hand-placed carry-chain primitives with the same ports:

- **`swul`:** `start` in; `pulse` and `stop` out.
- **`tdl`:** `start` = pulse in; `stop` = sample clock in; `code[N_R-1:0]` out.

The `tdl` model draws each tap delay between 8 and 24 ps (mean 16 ps). It adds
one 50 ps "ultra bin" at the middle of the line. Each flip-flop samples with its
own skew of up to 40 ps, which produces realistic bubbles. The seeds differ per
line and per channel, so every line of every channel is different. The model
variable `drift` (1.0) scales all delays of a line at once, so a testbench can
emulate a temperature or supply change. Everything else (counter, capture,
decoder, calibrator, channel and top) is synthesizable RTL.

## Files

| Module | Role |
|---|---|
| `tdc_pkg` | shared parameters and derived widths |
| `tdc_top` | N_CH channels and the shared coarse counter |
| `tdc_channel` | one channel as drawn above |
| `swul`, `tdl` | behavioural launcher and delay line |
| `decoder` | LOG2 → BEC → tree adder for F_OUT lines |
| `log2_engine`, `log2_dn`, `log2_up` | edge detection |
| `bec_dn`, `bec_up` | bubble compression |
| `tree_adder` | pipelined sum of the real bins |
| `calibrator` | histogram, integration, double-banked CC lookup |
| `coarse_counter`, `c_tdc` | coarse time and its capture |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M` and has a cycle watchdog. Inputs are
random, and the expected values are computed in the testbench independently of
the RTL:

- `tb_log2_dn`, `tb_log2_up`: random thermometric words with and without
  bubbles, and all-zero words. Checks the index, the window and `found`, with
  8-cycle latency.
- `tb_bec_dn`, `tb_bec_up`: Eqs. n_DN − zeros and n_UP + zeros, including the
  line ends, with 1-cycle latency.
- `tb_tree_adder`: random sums with 3-cycle latency.
- `tb_decoder`: sets the four lines to known edge positions with bubbles.
  Checks n_V, `edge_err` and 12-cycle latency.
- `tb_calibrator`, at W_VBIN = 5 and K = 2^8: three full calibration rounds.
  Checks every CC entry against the rounded double-scale integral of the
  histogram it was sent, plus the swap timing and bank use.
- `tb_coarse_counter`, `tb_c_tdc`: counting, wrap and capture.
- `tb_swul`, `tb_tdl`: pulse width and STOP timing. Checks the sampled codes
  against the model's own tap delays, and that bubbles occur.
- `tb_tdc_channel`, at K = 2^12 and N_CC = 16: random events with known true
  times. After calibration, each timestamp must lie within the calibration
  statistics of the true time.
- `tb_tdc_top`, with 3 channels at K = 2^12 and N_CC = 10: the end-to-end test.
  It counts that each mechanism happened and fails if one never did:
  - calibration swaps on every channel;
  - bubble corrections;
  - counter wraps;
  - events arriving during integration;
  - back-to-back events 2 clocks apart;
  - the same event on all channels.
- `tb_tdc_top_full`: the top at its default parameters, 16 channels and
  K = 2^16. It sends 2^16 + 2500 events to every channel and checks the
  timestamps of the last events against true times. The measured RMS error is
  about 80 units (3 ps).
- `tb_channel_512`: the same test as `tb_tdc_channel` with 512-tap lines,
  bubble length 16 and 4096 virtual bins. It checks the 14-cycle latency and
  the accuracy.
- `tb_rate_deadtime`: calibrates one channel, then checks timestamp intervals.
  It applies a 150 MHz square wave (400 periods) and 200 pairs of pulses 5 ns
  apart. Every interval must be within 150 ps of the true one.
- `tb_fout_sweep`: one channel each with 1, 2, 4, 8 and 10 delay lines, all fed
  the same events. It checks latency and accuracy for each size and that the
  bins get finer.

  Typical results at K = 2^12, where one unit is 0.59 ps:

  | Lines | Mean virtual bin seen | RMS timestamp error |
  |---|---|---|
  | 1 | 8.3 ps | 12.2 ps |
  | 2 | 4.4 ps | 11.4 ps |
  | 4 | 2.4 ps | 10.6 ps |
  | 8 | 1.5 ps | 9.1 ps |
  | 10 | 1.4 ps | 9.1 ps |

  The gain flattens out beyond four lines.
- `tb_drift`: makes all delays of a running channel 8 % longer, at K = 2^12.
  RMS timestamp error:
  - at nominal delays: about 16 units (9 ps);
  - with the stale curve: about 216 units (126 ps);
  - once the curve built with the new delays is live: about 18 units.
- `tb_code_density`: a code-density test on one channel at default size
  (K = 2^16). After the first calibration it sends 2^17 events at uniformly
  random times and histograms the fine timestamp codes into 37.5 ps groups.
  - Typical results with calibration: max |INL| ≈ 12 ps and max |DNL| ≈ 5 ps.
  - Typical result for the raw virtual bins mapped linearly: max |INL| ≈ 49 ps.
  - The calibrated figures are set by three things: bins that straddle a group
    edge, the statistical error of the curve in use (see "Accuracy to expect"),
    and the counting noise of 2^17 events.

To run one, for example the full-size test:

```
verilator --binary --timing --assert -y rtl -y tb rtl/tdc_pkg.sv \
          tb/tb_tdc_top_full.sv --top-module tb_tdc_top_full
./obj_dir/Vtb_tdc_top_full +verilator+rand+reset+2
```

## Where this design makes its own choices

- The LOG2 pipeline structure, and so its 8-cycle latency. Only its function is
  fixed by the method.
- The guard-bit window carried through the LOG2 pipeline.
- The `edge_err` flag, and excluding flagged measures from the histogram.
- The calibrator state machine, clearing CT during integration, and not
  counting events during the 2049-cycle integration.
- The 17-bit CT and CC words.
- The capture of the counter on the rising edge of STOP, and the 48-bit
  fixed-point timestamp.
- The readout. Each channel's timestamp is simply brought out as a valid-tagged
  port. There is no FIFO or bus interface.
- The models' delay distributions, pulse width (200 ps), 4 ps offset between
  lines, and sampling skew.
