# Bit-true BPSK receiver with run-time word-length masks

Choosing the fractional word length (FWL) of every signal in a fixed-point
DSP datapath is a search problem. Each candidate set of widths has to be
simulated, and the simulation has to be exact to the bit. Doing that in
software is slow, and it models the hardware rather than running it.

This design takes a different route. The receiver is built **once**, with
every operand at its full fractional width. Each operand of interest goes
through a *limiter*, which clears a run-time number of its fractional LSBs.
A host computer sends one byte per operand ("clear this many fraction
bits"), then a packet of samples, and reads back the processed samples. It
then compares them with a floating-point reference and tries the next mask
set. No re-synthesis is needed between trials, so a search such as
*max-1* can run against the real circuit. Max-1 starts from full width and,
in each round, takes one bit away from the operand that hurts the
signal-to-quantisation-noise ratio (SQNR) least.

The case study is a low-rate BPSK receiver, as used for IoT links. It has
three stages:

```
 serial in ─► uart_rx ─► hil_ctrl ─┬─► dm_coarse_freq ─► mm_timing_sync ─► costas_loop ─┐
                                   │   (Q8.16, 14 masks)  (Q8.16, 5 masks)  (Q8.12, 8 masks)
 serial out ◄─ uart_tx ◄───────────┴───────────────────────────────────────────────────┘
                         27 mask registers, loaded at the start of every run
```

The top module is `bpsk_rx_top`. Beside the chain it holds a second,
independent design, `costas_hil`: the Costas loop alone behind its own
serial link. This is the small configuration that fits a low-cost FPGA for
hardware-in-the-loop runs (section 6). The two share only clock and reset.

The rest of this file covers the parts in the order a sample meets them. The most room goes to the two parts that are
least obvious: the masking arithmetic, and the coarse frequency corrector,
which buffers a whole packet and rotates a correction vector recursively.

## 1. Number format and the limiter

All datapath values are signed two's-complement fixed point, Q8.F:

* 8 integer bits, including the sign;
* F fraction bits (`fxp_pkg::IWL = 8`);
* the coarse corrector and the timing recovery use F = 16, a 24-bit word;
* the Costas loop uses F = 12, a 20-bit word.

The shared constants and helpers are in `fxp_pkg`:

* `real_q` converts a real constant to fixed point;
* `atan_q` builds the CORDIC angle table at elaboration time;
* `k_q` gives the inverse CORDIC gain.

`fxp_limiter` is the central idea in hardware. It ANDs each word with a mask
that is zero in its lowest `n` bits and one elsewhere. `n` is an 8-bit count.
Counts above F saturate at F, so the limiter can never touch the integer
part. Clearing LSBs of a two's-complement word rounds towards −∞. This is
the same truncation a narrower register would perform, so a masked run is
bit-identical to a circuit built with fewer fraction bits. The only exception
is MSB-side effects, which masks do not model.

Where masks are applied follows one rule throughout:

* an operand is limited **before** it enters an operation;
* a result is limited **after** the operation produces it;
* a value kept in a register across iterations, such as a CORDIC's x/y/z,
  a loop's phase or the accumulator, is limited every time it is
  written.

Products are formed at full width and truncated back to F fraction bits with
an arithmetic shift: `(a*b) >>> F`.

### Mask map (byte order on the serial link)

| masks[] | block | operand |
|---|---|---|
| 0–7 | coarse freq | currentSample, lastSample, accumSample, fsError, input, output, xFix, yFix |
| 8–10 | coarse freq, rotate CORDIC | x, y, z |
| 11–13 | coarse freq, atan CORDIC | x, y, z |
| 14–18 | timing recovery | x, y, mu, input, mmVal |
| 19–23 | Costas loop | phase, frequency, error, input, output |
| 24–26 | Costas loop, rotate CORDIC | x, y, z |

All zeros means full precision.

## 2. CORDIC units

There are two iterative CORDICs. Each does one micro-rotation per clock and
runs one operation at a time. Both have valid/ready handshakes.

**`cordic_rotate`** rotates (x, y) by z, with z in radians and in −π..π.
Its steps:

1. The angle table `atan(2^-i)` covers only about ±99°. So for |z| > 90° the
   vector is first turned by ±90°. This is the same as two 45° (i = 0)
   micro-rotations in one direction, whose joint gain is exactly 2. With that
   gain removed, it becomes an exact swap-and-negate, and z is reduced by
   ±π/2.
2. `ITER` = 16 micro-rotations follow.
3. A multiply by the inverse gain K finishes the rotation.
4. The x, y and z registers are masked on load and after every step, and x
   and y again on output.

Latency: ITER + 2 cycles.

**`cordic_atan`** works in vectoring mode and returns atan2(y, x). Its steps:

1. The inputs are halved first, so that the growth of the micro-rotations
   cannot overflow the Q8 integer range.
2. A vector in the left half-plane is turned by ±π/2 into the right one.
3. ITER micro-rotations follow, with the same per-step masking.

Latency: ITER + 1 cycles.

Both units serve several blocks. The coarse corrector has one of each, and
the Costas loop has a rotate unit.

## 3. Coarse frequency correction (`dm_coarse_freq`)

This block removes most of the carrier offset between transmitter and
receiver using the *delay-and-multiply* (D&M) estimator. The estimate must
exist before the first output sample, so the block buffers the whole packet.
It works in four phases.

1. **Load.** Each input sample is masked (`input`) and written to a
   `MAX_SAMPLES` = 512-entry buffer. For the first `ACC_LEN` = 12 symbols ×
   4 = 48 sample pairs, the block accumulates
   `acc += cur · conj(last)`, with `cur`, `last` and `acc` each masked. The
   argument of `acc` is the average phase advance of the carrier per sample.
   This works because the preamble is an alternating bit pattern, so the
   products of neighbouring samples have a steady sign.
2. **Arctangent.** `cordic_atan` returns arg(acc).
3. **Offset.** `fsError = arg · SPS / 2π` is the offset in units of the
   symbol rate. It is masked and brought out as `fs_error`. The per-sample
   correction angle is then `−fsError · 2π / SPS`, which removes the offset
   estimated from `acc`.
4. **Correct.** A *fix vector* (xFix, yFix) starts at 1 + j0. For each
   buffered sample:
   * the block multiplies the sample by the fix vector and sends the
     product out (masked `output`);
   * `cordic_rotate` turns the fix vector one more step to give the next
     fix vector.

   So the correction exp(−jωn) is never computed directly. It is built
   recursively, which is cheap but lets quantisation error accumulate along
   the packet. Section 7 shows what that does to strongly masked runs.

Timing:

* loading takes one sample per clock;
* the arctangent takes ITER + 2 cycles;
* after that, one output appears every ITER + 4 cycles.

`clear` drops a packet that is only partly loaded. Samples beyond 512 are
accepted but not stored.

## 4. Timing recovery (`mm_timing_sync`)

This is a Mueller & Muller loop. It decimates 4 samples per symbol down to 1
by picking, without interpolation, the input sample it judges best. For each
picked sample it computes:

```
rail  = (re>0) + j(im>0)                     hard decision, 0/1 per axis
x     = (rail[n] - rail[n-2]) · conj(out[n-1])
y     = (out[n]  - out[n-2])  · conj(rail[n-1])
mmVal = Re(y - x)
mu    = mu + SPS + 0.3 · mmVal ;  step = floor(mu) ;  mu -= step
```

The next pick comes `step` input samples later. The block streams its input,
dropping `step − 1` samples between picks, so it needs no buffer. `step` is
kept at 1 or more. Only the real parts of x and y reach mmVal, so only those
are built. The loop state is cleared after the packet's last sample.
Throughput is one input per clock.

## 5. Fine frequency and phase correction (`costas_loop`)

Between the stages, the timing output is cut from Q8.16 to Q8.12 by dropping
four LSBs. The Costas loop then works on one sample at a time:

```
out   = in · exp(-j·phase)        cordic_rotate with z = -phase
err   = Re(out) · Im(out)
freq  = freq + 0.00932 · err
phase = phase + freq + 0.0132 · err, wrapped into −π..π
```

The loop drives Im(out) to zero, so the BPSK symbols lie on the real axis
with a ±180° ambiguity. An output leaves ITER + 4 cycles after its input.
`phase` and `freq` are brought out for observation.

## 6. Serial link and run protocol (`hil_ctrl`, `uart_rx`, `uart_tx`)

The serial link runs at 9600 baud, 8N1. Its clock is `CLK_HZ` (50 MHz by
default). One run goes as follows:

1. The FPGA sends five start bytes of `0xA5` and clears the chain.
2. The host sends the 27 mask bytes.
3. The host sends `N_SAMPLES` = 425 complex samples. Each real value takes
   3 bytes: the signed integer byte, then two fraction bytes with the most
   significant first. The fraction is left-aligned in 16 bits, so a Q8.12
   value leaves the low nibble of byte 3 zero. The real part comes first.
4. Every result sample of the chain goes back in the same format as soon as
   it appears. If the transmitter is busy, back-pressure stalls the chain.
5. When the chain is idle and the transmit side is empty, `runs` counts up
   and the next run starts with new start bytes.

**`costas_hil`** runs the same protocol for the Costas loop alone:

* 8 mask bytes, in the order phase, frequency, error, input, output, then
  CORDIC x, y, z;
* `N_SAMPLES` = 81 samples at one sample per symbol;
* the Q8.12 loop format on both directions of the wire.

At 9600 baud one run moves about 980 bytes, which takes about a second.
Its testbench compares the returned samples with a floating-point model of
the loop and reaches 64 dB SQNR. This confirms that the hardware run
reproduces the bit-true software model.

`uart_rx` synchronises its input with two flip-flops. It confirms the start
bit at half a bit time, samples each bit mid-bit, and drops frames with a bad
stop bit. `uart_tx` keeps `ready` low for the 10 bit times of a frame.

## 7. Where this design departs from the source description, and what was assumed

Taken from the source description:

* the three algorithms and their order, with the D&M estimator and
  recursively rotated fix vector, M&M at 4 samples/symbol and the Costas
  loop;
* the loop gains: 0.3 for M&M, 0.0132 and 0.00932 for the Costas loop;
* the accumulation length of 12 symbols × 4 = 48 sample pairs, above the
  32 samples the estimator needs at least;
* the CORDIC structure: a rotate mode with a 90° extension and an atan
  mode;
* the masked-operand lists and their order;
* the fraction widths: 16, 16 and 12;
* one mask byte per operand counting the bits to clear, and AND-masking
  aligned at the LSB;
* the 3-byte sample format and the "masks first, then samples" run.
* the Costas-only hardware-in-the-loop setup, with 81 samples and 8 masks
  per run.

One point in the source is inconsistent. The Costas loop is described with
12 fraction bits, yet its search result clears 13 bits of the frequency.
This design keeps 12 bits, and a count of 13 clears the whole fraction.

Own choices:

* **One chain.** The source built and measured each stage as a separate
  FPGA design, each with its own serial link. Here the three stages share
  one link and one mask set. A single stage can still be studied by leaving
  the other blocks' masks at 0.
* **Packet length.** 425 samples is 96 symbols × 4 + 41 filter-tail
  samples. It assumes 16 preamble bits, 10 data bytes and a 42-tap
  shaping filter.
* **Buffer size.** 512 is a power of two that holds one packet.
* **Sizes and values not given by the source:** the clock frequency, the
  start-byte value, the end-of-run rule, all handshakes and reset values,
  and the CORDIC iteration count (16).
* **CORDIC structure:** iterative, one step per cycle, with a final gain
  multiply.
* **Exact 90° pre-rotation** in place of a literal 45° loop.
* **Input halving and half-plane folding** in the atan unit.
* **Phase wrap** into −π..π in the Costas loop.
* **Streaming timing recovery.** It skips samples instead of indexing a
  stored array, and forces step ≥ 1.
* **Truncation everywhere**, with no rounding.
* **Mask counts above the width saturate** at the width.
* **No fixed "optimal" builds.** The source also built a non-limited and
  a fixed "optimal" version of each block. Only the limited, run-time-masked
  version is built here.

Quantitative results on the test signal (peak amplitude 0.8, offset 0.03
rad/sample, 1.5-sample delay):

* With all masks at 0, the decisions recover every transmitted data bit.
* The timing-recovery mask sets that came out of the max-1 search,
  [15,14,12,12,14] and the uniform [12,12,12,12,12], keep every decision.
  They give SQNRs of 22.7 and 20.1 dB against the unmasked run. The source
  reports about 19 dB.
* The coarse-frequency and Costas mask sets from the same search do **not**
  keep the decisions at this amplitude. They clear all but 3–4 fraction
  bits of the unit-magnitude fix vector and of the Costas input. Those sets
  depend on the signal scale they were found for, which is not known here.
  The Costas value 13 is also wider than the loop's 12 fraction bits, so it
  clears the whole fraction.

## 8. Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fxp_limiter` | every mask count on random words |
| `tb_cordic_rotate`, `tb_cordic_atan` | against floating point over the full angle range, latency, masked LSBs |
| `tb_dm_coarse_freq` | estimate, corrected output and output spacing, against a model; back-pressure |
| `tb_mm_timing_sync` | bit-exact against an integer model, with and without masks, including short and long steps |
| `tb_costas_loop` | against a model; latency, lock, phase wrap, masked packet |
| `tb_uart` | loopback, frame length, bad stop bit |
| `tb_hil_ctrl` | protocol with a stub chain, two runs |
| `tb_costas_hil` | stand-alone Costas loop over its serial link: SQNR ≥ 50 dB against a model, repeatability, masked runs |
| `tb_bpsk_rx_top` | whole top at 16 clocks/bit: three receiver runs (see below), and at the same time one run on the Costas-only link |
| `tb_bpsk_rx_top_full` | one run on each link with every parameter at its default (50 MHz clock), about 2 min |
| `tb_bpsk_rx_top_optimal` | the max-1 mask sets, reporting SQNR per set |

`tb_bpsk_rx_top` covers the following:

* it checks the coarse estimate;
* it checks about one result per symbol;
* it checks that the decisions match the data, allowing for the sign
  ambiguity and a small lag;
* it checks the result amplitude;
* it checks that masking the offset estimate changes the results;
* it counts timing steps shorter and longer than 4 and transmitter stalls,
  and requires each to occur.

To build and run one testbench with plain Verilator (5.x), from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/fxp_pkg.sv \
    $(ls rtl/*.sv | grep -v fxp_pkg) tb/tb_bpsk_rx_top.sv \
    --top-module tb_bpsk_rx_top -Mdir obj_top
./obj_top/Vtb_bpsk_rx_top
```

For a block testbench, replace the testbench file and the top module name.
The package must come first. Verilator is a two-state simulator, and the
testbenches reset everything they read.

To change the design:

* `bpsk_rx_top` exposes `CLK_HZ`, `BAUD`, `N_SAMPLES`, `MAX_SAMPLES`,
  `SPS`, `ITER` and the three fraction widths;
* the blocks take the same parameters individually;
* changing a fraction width changes the word width (8 + F) and the mask
  ranges.

## 9. Limits

* Only one packet at a time is processed, and a packet is at most 512
  samples.
* The design does not detect a packet (preamble or sync word). The host
  frames each run.
* Overflow of the 8 integer bits is not detected, because masks act only on
  fraction bits.
* A generic yosys synthesis of the top, with no FPGA mapping, gives about
  1.6 k cells and 1.7 k flip-flop bits plus 26 kbit of memory, most of it
  the packet buffer. The Costas-only design on its own is about 0.4 k cells
  and 0.5 k flip-flop bits.
  These numbers cannot be compared with FPGA slice counts.
