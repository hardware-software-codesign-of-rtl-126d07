# Adaptive memory-polynomial predistortion with compressed training data

A power amplifier (PA) that runs efficiently is nonlinear: it compresses large
signals and smears the spectrum into neighbouring channels. Digital
predistortion (DPD) applies an approximate inverse of the PA to the baseband
signal before the DAC, so that the cascade of predistorter and PA is close to
linear. The inverse drifts with temperature, supply and signal, so its
coefficients have to be re-estimated from the PA output again and again.

This RTL is the programmable-logic half of such a loop on a device that holds
FPGA fabric, an embedded processor and RF data converters together. The split
is:

* **in logic**: the predistorter itself (all the multiply-accumulate work, two
  samples per clock), a buffer that replays the transmit waveform, a capture
  buffer for the PA feedback, and a block that compresses the captured window
  before it crosses to the processor;
* **in software on the processor** (not part of this RTL): aligning the
  feedback with the transmitted signal, least-squares estimation of the
  coefficients in the indirect-learning arrangement, and control.

The interesting part for hardware is the compression. Least squares costs
O(k²N) for k coefficients and N samples, and the processor link is narrow, so
the feedback window is thinned before it is sent: a fixed fraction of the
samples is chosen so that the distribution of signal power is kept, and every
chosen sample travels with the M samples before it, which the memory terms of
the model need.

## The model

The predistorter evaluates the memory polynomial

    y(n) = Σ_{p=0..P} Σ_{m=0..M} d_pm · x(n−m) · |x(n−m)|^p

with complex x, y and d. The defaults are P = 4 (powers |x|⁰…|x|⁴) and
M = 3 (the current sample and three previous ones), which gives 20 complex
coefficients. P is a free choice of this design; M = 3 is inferred from the
sample counts of the compression scheme (a ratio of 0.1 of a 40,960-sample
window, about four samples sent per chosen one).

In indirect learning the same polynomial, fed with the PA output, is fitted
to the predistorter output; the fitted d_pm are then copied into the
predistorter. The software does that fit; the hardware only needs the
coefficient store described below.

## Block diagram

```
 processor                          dpd_top                                   RF
 ─────────                          ───────
 waveform  ──s_axis (32b)──► tx_playback ──2 smp/clk──► mp_predistorter ──► dac_data
 coeffs    ──coef_wr/commit─► coef_bank ───── d_pm ─────────┘
 control   ──cap_start/len──► rx_capture ◄──────────────────────────────── adc_data
                                   │ read port (1 smp/clk)
 training  ◄──m_axis (32b)── pdf_selector
 samples       tuser={chosen,index}
```

| module | file | role |
|---|---|---|
| `dpd_top` | `rtl/dpd_top.sv` | wires the blocks; ports are plain signals |
| `mp_predistorter` | `rtl/mp_predistorter.sv` | the memory polynomial, `LANES` samples per clock |
| `isqrt_pipe` | `rtl/isqrt_pipe.sv` | pipelined integer square root for \|x\| |
| `coef_bank` | `rtl/coef_bank.sv` | shadow and active coefficient sets, atomic commit |
| `tx_playback` | `rtl/tx_playback.sv` | stores a waveform from the processor and replays it forever |
| `rx_capture` | `rtl/rx_capture.sv` | records a window of feedback samples on request |
| `pdf_selector` | `rtl/pdf_selector.sv` | histogram, per-bin random choice, memory predecessors, stream out |
| `axis_if` | `rtl/axis_if.sv` | 32-bit AXI-Stream bundle with a handshake assertion |
| `dpd_pkg` | `rtl/dpd_pkg.sv` | sample and coefficient types, widths, rounding function |

## Sample formats

A sample is `iq_t` = `{q, i}`, 16 bits each, signed Q1.15. The same packing is
used for a 32-bit stream beat (I in bits 15:0). The RF-ADC gives 14 bits; they
are expected left-aligned in the 16-bit word.

| quantity | format | note |
|---|---|---|
| x, y | signed 16 bit, Q1.15 | y is rounded half up and saturated |
| \|x\|² | unsigned 32 bit | exact |
| \|x\| | unsigned 16 bit, Q1.15 | floor of the square root; \|x\| < √2 fits |
| \|x\|^p | unsigned 20 bit, Q5.15 | each power truncated to 15 fraction bits |
| x·\|x\|^p | signed 22 bit, Q7.15 | truncated |
| d_pm | signed 18 bit each part, Q3.15 | range ±4 |
| products, sum | signed 48 bit, 30 fraction bits | exact |

These formats are this design's; they are listed because the reference models
in the testbenches reproduce them bit for bit.

## mp_predistorter: two samples per clock

Each clock brings `LANES` consecutive samples; lane 0 is the oldest. Per lane
the pipeline is:

1. register the input; form I²+Q²;
2. 16 stages of `isqrt_pipe` give |x|;
3. P−1 stages each multiply in one more factor of |x|, giving |x|²…|x|^P;
4. one stage forms the basis values B_p(n) = x(n)·|x(n)|^p for p = 0…P.

The basis is computed once per sample, not once per memory tap. The memory
term for lane l and tap m needs B_p(n−m). For that sample, take t = l − m. If
t ≥ 0 it is lane t of the current clock. Otherwise it is lane t + D·LANES of
the clock D = ⌈(m − l)/LANES⌉ back. A history of ⌈M/LANES⌉ earlier clocks of
basis values holds those samples (two clocks for the defaults). The history
advances only on clocks with valid data, so gaps in the input leave the model
memory intact. Reset clears it, so samples before the first one count as zero.

Then each lane multiplies its (P+1)(M+1) basis values by their coefficients
(one register stage), adds them in two stages (over the M+1 taps of each
power, then over the powers) and rounds (one stage). Total latency is
23 + (P − 1) clocks: 26 for the defaults. One result per lane comes
out every clock. `coef` may change at any clock. Output samples that are in
the pipeline at that moment mix old and new coefficients, so change them
while the transmitter is idle if that matters.

## coef_bank

The processor writes d_pm one at a time to word address p·(M+1)+m of a shadow
bank, then pulses `commit`. In that clock the whole shadow bank (including a
write in the same clock) becomes active. The predistorter never sees a
half-written set. Reset loads the identity (d_00 = 1.0, all else 0), which
transmits the waveform unchanged: this is the "no DPD" case.

## tx_playback

This block loads over a 32-bit AXI stream, one sample per beat, and the last
beat carries `tlast`. It is always ready. The samples go into a buffer of
`DEPTH` samples (default 40,960) organised as words of `LANES` samples. With
`play_en` high and a waveform loaded, it reads one word per clock and wraps
from the last loaded word back to word 0. `wraps` counts the passes. Other
rules:

* A load stops playback until its `tlast`.
* A length that is not a multiple of `LANES` drops its tail.
* Samples beyond `DEPTH` are dropped.

In the original system the waveform sits in external DRAM. This on-chip
buffer stands in for it.

## rx_capture

A `start` pulse while idle, with `len`, records the next `len` valid feedback
samples. `len` is rounded down to whole words and clipped to `DEPTH`. When the
window is full, `done` pulses and `captured` gives its size. A read port with
one clock of latency serves the selector. Requests that come while a capture
or its transfer is running are ignored at the top level (`cap_busy`).

## pdf_selector: compressing the training window

This block thins the captured window. It works in three phases.

**Histogram.** It reads the n captured samples, one per clock, and counts them
into `NBINS` (32) bins of equal width in power: bin = (I²+Q²) >> (31 − log₂ NBINS).
The top bin also takes the single out-of-range corner.

**Quota.** In one clock it computes quota_b = round(count_b · ratio). `ratio`
is an unsigned 0.16 fraction: 6554 is 0.1. With `compress_en` low,
quota_b = count_b and the whole window is sent.

**Selection.** It reads the window again, in order. For a sample of bin b, let
rc_b be the samples of that bin still to come (this one included) and rq_b
the quota still open. The sample is chosen with probability rq_b / rc_b: it is
chosen when (lfsr · rc_b) >> 16 < rq_b, with a 16-bit Galois LFSR
(x¹⁶+x¹⁴+x¹³+x¹¹+1, seed `SEED`). This is sequential selection sampling:

* exactly quota_b samples of each bin are chosen;
* the draw is spread over the whole window, not biased to its start;
* the result is deterministic for a given seed and window.

A four-entry window (M + 1) trails the read pointer. Sample k is sent once the
choices for k … k+M are known, if any of them was chosen. So every chosen
sample arrives after its M predecessors, and a sample shared by overlapping
windows is sent once.

**Stream format.** Each beat carries one sample:

* `tdata` = {Q, I}.
* `tuser` = {chosen, index}, where index is the position in the window (16
  bits for a 40,960-sample window).
* `tlast` marks the last chosen sample, which is also the last beat.

The software builds one regression row per beat with `chosen` = 1, from that
sample and the M indices before it. All of those have been sent earlier in
the same stream.

Timing: without back-pressure a run takes 2n + M + 5 clocks from the clock
that takes `start` to the `done` pulse. In the selection phase one sample
moves per clock while `tready` is high. At a 256 MHz clock that is about
1 GB/s, well above the roughly 300 MB/s that a typical PS/PL DMA engine
moves, so the link, not this block, sets the transfer time.

With the defaults and a 40,960-sample window at ratio 0.1, 4,096 samples are
chosen. About 10,000–11,000 are sent, depending on how the memory windows
overlap: the test signals give 10,272. A window of four samples around every
chosen one gives at most 16,384.

## Interfaces of dpd_top

| port | dir | meaning |
|---|---|---|
| `s_axis_tdata/tvalid/tlast/tready` | in/out | waveform load, one sample per beat |
| `play_en` | in | transmit the stored waveform |
| `coef_wr_en/coef_wr_addr/coef_wr_data/coef_commit` | in | coefficient update |
| `dac_valid`, `dac_data[LANES]` | out | predistorted samples to the DAC |
| `adc_valid`, `adc_data[LANES]` | in | PA feedback samples |
| `cap_start`, `cap_len`, `compress_en`, `ratio` | in | start a capture, window length, compression on/off, fraction kept |
| `m_axis_tdata/tuser/tvalid/tlast/tready` | out/in | training samples to the processor |
| `tx_len`, `tx_wraps`, `coef_commits`, `cap_busy`, `cap_done`, `chosen_total`, `sent` | out | status |

All state uses one clock and an asynchronous active-low reset, `rst_n`.
`compress_en` and `ratio` are sampled when the selector starts, which is the
clock after the capture completes.

Parameters: `LANES` = 2, `P` = 4, `M` = 3, `TX_DEPTH` = 40960, `CAP_DEPTH` =
40960, `NBINS` = 32. `LANES` is meant to scale up to 8 samples per clock. The
predistorter is tested at 8 lanes. The predistorter alone needs
LANES · (P+1)(M+1) complex multipliers: 40 at the defaults.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb/tb_mp_predistorter.sv` (with `tb/mp_pd_run.sv`) | 2-lane and 8-lane builds against an integer reference of the polynomial; identity, random and saturating coefficients; gaps in the input; 26-clock latency; unbroken output for unbroken input |
| `tb/tb_coef_bank.sv` | reset set, writes invisible until commit, write in the commit clock, bad addresses, commit count |
| `tb/tb_tx_playback.sv` | order and continuity of replay, wrap count, reload, odd and overlong loads |
| `tb/tb_rx_capture.sv` | window contents against a log of the input, `done` timing, ignored start, rounding and clipping of `len`, empty window |
| `tb/tb_pdf_selector.sv` | per-bin chosen counts equal the testbench's own quotas, exact predecessor set, order, data, `tlast`, totals, back-pressure, ratio 0, run length |
| `tb/tb_dpd_top.sv` | whole design at default parameters (see below) |

`tb_dpd_top` loads a 40,960-sample waveform. It loops the DAC output back to
the ADC through an amplifier model (cubic compression with a little AM/PM,
`tb/dpd_ref_pkg.sv`) and a 7-clock delay. It then runs three sessions:

1. identity coefficients, with a full window sent uncompressed;
2. a committed coefficient set, with a compressed window under random
   back-pressure and a capture request that must be ignored;
3. a saturating set.

Every DAC sample is compared with a reference over the whole played stream.
The model memory carries across sessions. The test also checks that wrap,
commit, full and compressed transfer, stall, ignored request and saturation
each happen. It runs in about five seconds.

It does not close the adaptation loop. No least-squares fit runs, so nothing
checks that the chosen samples train a good predistorter. That part lives in
software.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_dpd_top rtl/dpd_pkg.sv tb/dpd_ref_pkg.sv tb/tb_dpd_top.sv
./obj_dir/Vtb_dpd_top
```

Other testbenches build the same way with their own top module. Add
`tb/dpd_ref_pkg.sv` only where it is imported.

## Where this departs from, or adds to, the system it implements

* The waveform buffer is on chip, not in external DRAM.
* P, the number formats, the pipeline, the latency, the number and spacing of
  the histogram bins, the quota rounding, the random-choice rule, the LFSR,
  and the {chosen, index} side channel are all choices made here.
* M = 3 is inferred, not stated.
* The compression runs in logic between capture and transfer. The same method
  could run on the processor instead. The logic version saves link bandwidth
  as well as training time.
* Published results for this compression scheme quote 15,360 to about 16k
  samples kept out of 40,960. This design fixes the ratio (0.1) and the window
  (40,960 samples); the number actually sent then follows from the signal and
  from M, and is about 10k for the test signals here.
* Timing closure at a 256 MHz fabric clock has not been checked on a device.
  Each pipeline stage holds at most one multiplier, a 16-bit square-root
  step or a five-input adder.
* Coefficients that change while samples are in flight take effect sample by
  sample as the pipeline drains; there is no synchronisation to waveform
  boundaries.
* Alignment, least-squares training, DMA, data converters and the amplifier
  are outside the RTL. The top brings out their connections as ports.
