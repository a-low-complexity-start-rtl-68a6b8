# WT2D: a start–stop ring-oscillator TRNG with phase detectors

This is a true random number generator for FPGAs that gets its randomness from
the timing jitter of **two ring oscillators**. Classic oscillator-sampling
generators XOR many oscillators together; the Wold–Tan style needs several
of them to look random, and earlier schemes need far more. This design adds two
**phase detectors** between the oscillators instead. Each detector is driven
by the edges of *both* rings, so its output carries the jitter of both. The two
detector outputs are sampled by a crystal clock `f_L`, XORed and registered,
giving one raw bit per `f_L` cycle (10 Mbit/s at 10 MHz, the main setting).

The generator runs **only on demand**. An enable, EN, starts both oscillators
for exactly the number of `f_L` cycles that a request asks for and stops them
afterwards. While nothing is requested, no oscillator toggles and no bit is
produced. Raw bits are collected in an output buffer for a host, which whitens
them with SHA-1 in software.

```
            EN ──┬──────────────┐
                 ▼              ▼
              ┌─────┐        ┌─────┐
              │ RO1 │        │ RO2 │      gated ring oscillators (behavioural model)
              └──┬──┘        └──┬──┘
          ro1 ───┼───────┐ ┌────┼─── ro2
                 │       ╳      │
           START ▼  STOP ▼ ▼ START ▼ STOP
              ┌─────────┐  ┌─────────┐
              │   PD1   │  │   PD2   │    start-stop phase detectors
              └────┬────┘  └────┬────┘
          f_L ──► DFF          DFF ◄── f_L
                   └──── XOR ───┘
                          │
                 f_L ──► DFF ── raw_bit ──► output buffer ──► host (SHA-1)
```

PD1 is started by RO1 and stopped by RO2. PD2 is started by RO2 and stopped by
RO1.

## Files

| file | module | role |
|---|---|---|
| `rtl/trng_pkg.sv` | package | shared constants: pipeline latency (2), default widths and depth |
| `rtl/ring_osc.sv` | `ring_osc` | **behavioural model** of one gated ring oscillator with jitter |
| `rtl/phase_detector.sv` | `phase_detector` | start-stop phase detector (two-flip-flop phase-frequency detector) |
| `rtl/sample_combine.sv` | `sample_combine` | two `f_L` sampling flip-flops, XOR, output flip-flop |
| `rtl/start_stop_ctrl.sv` | `start_stop_ctrl` | bits-on-demand control: EN for N cycles, bit-valid marker |
| `rtl/output_buffer.sv` | `output_buffer` | packs valid bits into bytes, 16-word FIFO, overflow flag |
| `rtl/wt2d_trng_top.sv` | `wt2d_trng_top` | the complete generator |

## The phase detectors

The detectors are the least obvious part of the design.

A detector has a START input and a STOP input, both edge-sensitive. Each STOP
edge is paired with one START edge:

- if START comes first, the output rises on the START edge and falls on the
  following STOP edge. The output pulse is as wide as the phase lead of the
  START oscillator.
- if STOP comes first, the detector is armed, the next START edge only disarms
  it, and the output stays low.

The circuit is the usual phase-frequency detector. One flip-flop is set by
START and one by STOP, and both are cleared asynchronously as soon as both are
set. The output is the START flip-flop. The feedback from the two flip-flops
into their own asynchronous clears is deliberate.

**Why not a simple set/reset flip-flop?** A flip-flop that is set by START and
cleared by STOP is the obvious reading of "START/STOP", but it fails when two
detectors are cross-connected. PD1's output is then "the last edge came from
RO1" and PD2's output is "the last edge came from RO2". The two are exact
complements, so their XOR is constantly 1 and the generator is useless. With
the phase-frequency form, at most one of the two detectors is high at a time.
The XOR is then high while one oscillator's edge is waiting for the other's,
and as the two rings drift and jitter against each other, that window sweeps
through the whole period. This detector circuit is this design's own choice;
the source only gives the START/STOP inputs and the cross wiring.

## Timing of a request

All control logic runs on `clk_fl`, the sampling clock.

```
edge        k        k+1      k+2   ...   k+N-1    k+N      k+N+1    k+N+2
req accept  X
en          1 ............................ 1        0                  (N cycles)
raw_valid                     1 ......................... 1        0  (N cycles)
```

(Each value holds from just after the edge it is listed under.)

- `req_valid && req_ready` at edge `k` accepts a request for `req_bits = N`.
- EN is high after edges `k .. k+N-1`. It is exactly N cycles long, and the
  oscillators run only during it.
- The sampling flip-flops catch the detector levels at edges `k+1 .. k+N`.
  The raw bits, marked by `raw_valid`, appear after edges `k+2 .. k+N+1`: one
  per cycle, with no gaps. The first bit comes two cycles after acceptance.
- `req_ready` is `~en`. A new request can be taken as soon as EN has dropped,
  so EN is always low for at least one cycle between requests. Each request
  is therefore a fresh restart of the oscillators.
- `req_bits = 0` is accepted and produces nothing.
- `busy` stays high until the last bit has left the pipeline.

## Output buffer

The buffer takes valid bits, first bit in the most significant position, and
packs them into 8-bit words. The words go into a 16-word FIFO. A request whose
bit count is not a multiple of 8 leaves its last bits in the packing register,
and the next request completes that word.

The read port is show-ahead: `rd_data` is valid while `rd_valid` is high, and
`rd_en` removes the word. If a word completes while the FIFO is full, that
word is dropped and `buf_overflow` is set; the flag stays set until reset. The
host link (USB in the source's test setup) is not part of this RTL; the read
port is brought out instead.

## The ring oscillator model

A ring oscillator is a combinational loop, so it cannot be RTL for a
cycle-based simulator. `ring_osc` is a behavioural model with delays and is
not for synthesis; yosys infers a latch from it. On an FPGA, replace it with
the real loop: one enable gate with EN on one input, followed by two inverting
stages fed back to the gate. Keep the tap at the gate output, and keep the
loop from being optimised away (placement and keep constraints, as your
tools require).

In the model:

- the output is `~(en & fb)`. The feedback node `fb` follows the output after
  one loop trip, so a stopped ring rests at 1.
- each trip lasts `HALF_PERIOD_PS` plus a random, zero-mean offset bounded
  by ±`JITTER_PS` (σ ≈ 17 ps for the default of 60). The phase error
  therefore accumulates from edge to edge, as in a free-running ring.
- each instance has its own `SEED`.
- the defaults are RO1 = 3.00 ns per trip and RO2 = 3.17 ns per trip (about
  167 MHz and 158 MHz). The source gives no oscillator frequencies or jitter
  size, so these values are assumptions.

The statistical quality that the simulation shows comes from this model, not
from silicon. The RTL fixes the structure; the entropy of a real build must be
measured on the device.

## Top-level interface (`wt2d_trng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_fl` | in | 1 | crystal sampling clock f_L |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `req_valid`, `req_ready`, `req_bits` | in/out/in | 1/1/`COUNT_W` | bits-on-demand request |
| `busy` | out | 1 | request in progress |
| `en` | out | 1 | oscillator enable (observation) |
| `raw_bit`, `raw_valid` | out | 1/1 | raw bit stream before the buffer |
| `rd_en`, `rd_valid`, `rd_data` | in/out/out | 1/1/`WORD_W` | buffer read port |
| `buf_full`, `buf_overflow`, `buf_level` | out | 1/1/`$clog2(BUF_DEPTH+1)` | buffer status |

Parameters: `COUNT_W` (16), `WORD_W` (8) and `BUF_DEPTH` (16) are this
design's choices. `RO1_HALF_PERIOD_PS`, `RO2_HALF_PERIOD_PS`, `RO_JITTER_PS`,
`RO1_SEED` and `RO2_SEED` only affect the oscillator models.

## What follows the source and what does not

Follows the source:

- two oscillators gated by EN, which stop when EN = 0.
- two phase detectors wired crosswise.
- `f_L` sampling of both detector outputs, then XOR, then an output flip-flop.
- one bit per `f_L` cycle.
- the number of bits set by counting `f_L` cycles while enabled.
- a buffer towards a host.

This design's own choices:

- the detector circuit (see above).
- the enable gate's polarity and the level at which a stopped ring rests.
- asynchronous resets everywhere.
- the request handshake, the 16-bit count and the minimum one-cycle EN gap.
- the buffer organisation.
- the oscillator delays and jitter.

Not included:

- **SHA-1 post-processing.** The source runs it in software on the host.
  Without it the raw stream is not expected to pass statistical test suites.
- **The crystal oscillator.** Supply it as `clk_fl`.
- **The USB link and host.**
- **Health tests and frequency-injection countermeasures.** The source
  mentions these only as future work.

The resource figure quoted for this generator (11 LUTs, 13 flip-flops) is not
reproduced exactly. The entropy path here has 7 flip-flops: 4 in the
detectors, 2 for sampling and 1 at the output. The request counter and the
buffer come on top.

## Scaling and sampling frequency

- One instance gives `f_L` bits per second. The source's upper limit for good
  randomness is `f_L` = 10 MHz.
- More throughput comes from more instances: 32 instances give 320 Mbit/s at
  10 MHz. Give each instance its own placement; in simulation, give each
  model its own seeds.
- Lower sampling frequencies give each sample more accumulated jitter.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. Build and run any of them with plain
Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module wt2d_trng_top_tb -y rtl -y tb +libext+.sv -Irtl \
  rtl/trng_pkg.sv tb/wt2d_trng_top_tb.sv
./obj_dir/Vwt2d_trng_top_tb +verilator+rand+reset+2
```

`--timing` is required because of the oscillator models and the testbench
clocks.

| testbench | what it checks |
|---|---|
| `ring_osc_tb` | stopped output rests at 1 with no toggles; mean period within 2 %; jitter present and bounded; restart |
| `phase_detector_tb` | 400 random single edges against a reference pairing model; asynchronous reset; 30 % duty for a 3 ns lead in a 10 ns period; output stays low when STOP leads |
| `sample_combine_tb` | every raw bit equals the XOR of the two inputs sampled one cycle earlier; reset value |
| `start_stop_ctrl_tb` | 60 random requests (including zero): EN high exactly N cycles, valid run of exactly N bits with the latency above, `req_ready == ~en` |
| `output_buffer_tb` | random bits, valids and reads against a packing and FIFO model; fill until overflow; drain |
| `wt2d_trng_top_tb` | end to end at default parameters (described below) |
| `wt2d_trng_fl_sweep_tb` | `f_L` = 25, 15, 10, 5 and 1 MHz, 1024 bits each (described below) |
| `wt2d_trng_array_tb` | 32 instances with distinct seeds and delays: 8192 bits in 256 cycles of 100 ns (320 Mbit/s), all 32 streams pairwise different |

`wt2d_trng_top_tb` runs at 10 MHz with no parameter overrides. It checks:

- each raw bit against the two detector levels one cycle earlier.
- bit counts and one bit per cycle for every request.
- that EN lasts exactly N cycles, and that the oscillators are silent at 1
  while stopped.
- that buffer contents match the raw stream, including words that span two
  requests.
- overflow while the reader is stalled.
- a 35–65 % share of ones.
- that 20 restarts do not all give the same 64-bit sequence.

It also counts restarts, zero-length requests, back-to-back requests,
spanning words, buffer-full cycles and dropped words, and fails if any of
them never happens.

`wt2d_trng_fl_sweep_tb` checks the rate at each frequency and the bias. It
also prints a 4-bit-block entropy estimate, which for the models falls at
25 MHz (about 0.74 bit/bit, against about 0.95–0.97 at 10 MHz and below).
That matches the source's finding that high sampling rates hurt, but it is a
property of the model only.

Each of these testbenches runs in seconds.
