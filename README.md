# Crest factor reduction accelerator (DUC + CFR, free-running FPGA model)

Multicarrier base-station signals have a high peak-to-average power ratio.
Before such a signal reaches the digital pre-distortion and the power
amplifier, a **crest factor reduction (CFR)** stage detects the samples whose
magnitude exceeds an allowed level and cancels the excess. It does this in a
way that keeps the added in-band error (EVM) and the energy spilled into
neighbouring channels (ACPR) within limits. Tuning a CFR means running the
same signal through it thousands of times with different settings, and
floating-point software models are slow and differ from the fixed-point
hardware.

This RTL is the hardware half of such a tuning setup. It is a **fixed-point
model of the transmit chain segment "digital up-conversion (DUC) followed by
CFR"**, meant to be loaded into an FPGA once and then driven by host software:

- The host converts its floating-point test signal to fixed point.
- It streams the samples into a shared input FIFO and sets parameters in
  shared registers.
- It sets START and collects the processed samples from a shared output FIFO.

The hardware runs **free**: it works through the FIFOs at its own clock rate
and never waits for the host in lock-step. It only pauses when the input FIFO
is empty or the output FIFO is full.

The design follows the structure and the sizes published for such an
accelerator (Nikodem and Kępa, *Hardware Accelerated Simulation of Crest Factor
Reduction Block for Mobile Telecommunications*). That publication does not
give the insides of the signal processing blocks, so the arithmetic in each
block is this design's own. "Where this design departs or fills in" below
lists what is taken from the publication and what was chosen here.

## Structure

```
             shared registers (START, MODEL, THRESHOLD, WEIGHT, FREQ[], TAP[], status)
                   |
host ──> input FIFO ──> fr_input_port ──┬──> duc ──┬──> cfr ─────────────────┬──> output FIFO ──> host
        (8192 words)    (re = rfd & ~nd) │          │   peak_detector          │   (8192 words)
                                         │          │   -> clipper             │
                                         │          │   -> inband_proc         │
                                         │          │   -> outband_proc        │
                                         └──────────┴──────────────────────────┘
                                          MODEL: 0 DUC+CFR  1 DUC  2 CFR  3 loopback
```

| File | Role |
|---|---|
| `rtl/cfr_pkg.sv` | sample and configuration types, CORDIC tables, default pulse |
| `rtl/cfr_accel_top.sv` | top: registers, FIFOs, model selection, status counters |
| `rtl/shared_fifo.sv` | 8192 x 32 FIFO, one-clock read latency with a `nd` (new data) strobe |
| `rtl/shared_regs.sv` | host register file, produces the `cfg_t` struct |
| `rtl/fr_input_port.sv` | free-running read control of the input FIFO |
| `rtl/duc.sv` | multicarrier up-converter: interpolation, NCO rotation, carrier sum |
| `rtl/cfr.sv` | the four CFR stages in a row |
| `rtl/peak_detector.sv`, `rtl/clipper.sv`, `rtl/inband_proc.sv`, `rtl/outband_proc.sv` | CFR stages |
| `rtl/cordic_vec.sv`, `rtl/cordic_rot.sv` | pipelined CORDICs (magnitude/angle, rotation) |

The four selectable models correspond to the hardware models of the original
work:

- **DUC+CFR**, the main model and the reset value.
- **DUC only** and **CFR only**, used to time and check each block on its own.
- **Loopback**, which copies words from the input FIFO to the output FIFO. It
  is used to measure the throughput of the host link.

## Number formats

- Samples are complex, with I and Q each a signed 16-bit fraction (Q1.15).
- A FIFO word is `{I[31:16], Q[15:0]}`. All float-to-fixed conversion is the
  host's job.
- Angles are binary angles: 16 bits per full turn outside the CORDICs and 20
  bits inside them.
- The threshold and the weight are unsigned Q1.15; 0x8000 stands for 1.0.
- Cancellation-pulse taps are signed Q2.14; 0x4000 stands for 1.0.

## How the CFR works

The CFR is a chain of four valid/ready pipelines. Each sample travels down the
chain together with what the earlier stages worked out about it.

**1. Peak detection (`peak_detector`).** A 16-stage vectoring CORDIC computes
the magnitude `|x|` and the angle `φ` of each sample. The CORDIC magnitude
carries the gain K ≈ 1.6468, so the threshold is scaled by K once (a constant
multiply). The magnitude itself is left unscaled. A sample is a peak when
it is above the threshold and is a local maximum of the envelope:

    K·|x[n]| > K·T    and    |x[n]| ≥ |x[n−1]|    and    |x[n]| > |x[n+1]|

To see `|x[n+1]|`, the stage holds each sample back by one. Its output stream is
therefore one sample late, and its first output after reset or a clear is a
zero sample. Only the top of each excursion above T gets a pulse. If every
sample above T got one, the overlapping pulses of one wide peak would add up
and cancel far more than the excess.

**2. Clipping (`clipper`).** For a peak, a rotation CORDIC places the vector
`(T/K, 0)` at angle `φ`. The gain K brings it back to the exact threshold
magnitude `T·e^{jφ}`. The stage outputs the **clipping error**:

    e = T·e^{jφ} − x    for a peak,        e = 0 otherwise.

Carrying the error rather than the clipped signal lets the following stages
decide how much of it to apply and how to shape it.

**3. In-band processing (`inband_proc`).** Applying the full error would bring
every peak exactly to T, but it adds the most in-band distortion. The error is
scaled by a programmable weight:

    e_w = (e · WEIGHT) >>> 15

With WEIGHT = 1.0 a lone peak is cancelled completely. A smaller weight
reduces the added error vector magnitude, at the cost of peak reduction.

**4. Out-of-band processing (`outband_proc`).** A hard clip is a short,
wideband event; adding it straight to the signal would spread energy into
the adjacent channels. The weighted error is therefore passed through a 15-tap
FIR, the **cancellation pulse**, and then added to the sample that sits at the
centre of the pulse:

    y[n] = sat16( x[n−7] + (Σ_{k=0..14} TAP[k] · e_w[n−k]) >>> 14 )

The default pulse is a raised-cosine window,
`TAP[k] = round(sin²(π(k+1)/16) · 2^14)`, with centre tap 1.0. With it, an
isolated peak lands exactly on the threshold and its neighbours receive the
tapering tails. The tails limit the spectral regrowth to roughly the pulse
bandwidth. The host can load any other pulse, for example a low-pass matched
to the carrier bandwidth, through the TAP registers.

Consequences a user needs to know:

- **One output per input, delayed by 8 samples.** The delay is 1 sample in
  the peak detector and 7 in the filter. After reset or a new START, the first
  8 outputs carry no input sample of their own. The last 8 input samples stay
  in the chain until more samples arrive, so append 8 padding samples to flush
  a signal completely.
- Samples next to a peak are not re-checked after the peak's pulse is added.
  Separate local maxima within 7 samples of each other each get their own
  pulse, and the tails overlap. As a result a sample can end a little above
  or below T. Lowering WEIGHT is the intended knob for that.
- The result saturates to 16 bits.

## How the DUC works

The input stream carries the carriers' baseband samples interleaved: one
word per carrier per baseband instant (`NUM_CARRIERS` words, at most 2). For
each carrier the DUC does the following:

1. It **interpolates by 8** (`LOG2_INTERP = 3`) linearly between consecutive
   baseband samples: `u = b[n−1] + ((b[n] − b[n−1])·m) >>> 3` for
   m = 0..7. The first frame ramps up from zero.
2. It **shifts the carrier to its frequency**. A 32-bit phase accumulator
   steps by `FREQ[c]` every output sample. Its top 16 bits drive a rotation
   CORDIC, and the sample is pre-scaled by 1/K so that the rotation has unit
   gain. The frequency as a fraction of the output rate is `FREQ/2^32`; the
   reset values are −1/16 and +1/16.
3. It **sums the carriers** with saturation. The host scales the carriers so
   that their sum fits.

Every two-carrier frame in gives 8 samples out. Once primed, the DUC produces
one sample per clock.

## Flow control and timing

Every block is a valid/ready pipeline that stalls as a whole:
`in_ready = out_ready | ~out_valid`. When the output FIFO is full, everything
upstream freezes and no sample is lost.

The input FIFO is read by `fr_input_port` with the rule of the original
free-running test model:

    re = rfd & ~nd          en = START

In words, a new word is requested only when there is room for it and no
earlier read is still arriving. As a result, at most one read is in flight
and the port delivers **at most one word every two clocks**. An assertion
checks that an arriving word always finds room.

| Path | Latency (clocks, no stalls) | Throughput |
|---|---|---|
| `peak_detector` | 18, plus 1 sample of stream delay | 1 sample/clock |
| `clipper` | 17 | 1 sample/clock |
| `inband_proc`, `outband_proc` | 1 each, plus 7 samples of stream delay in the filter | 1 sample/clock |
| `cfr` | 37 (18 + 17 + 2), plus 8 samples | 1 sample/clock |
| `duc` | 17 after a frame is taken | 1 output/clock when fed 2 words per 8 clocks |
| input port | 2 from FIFO read to stream | 1 word / 2 clocks |

In the CFR-only and loopback models, the input port therefore limits the
design to half a sample per clock. The DUC models need only 2 words per 8
clocks, so their output runs at one sample per clock.

## Host interface and register map

The top exposes the host side of the shared memories as plain ports:

- a register port: `reg_we`, `reg_addr`, `reg_wdata`, `reg_rdata`, with
  combinational read;
- the input FIFO write side: `in_we`, `in_data`, `in_rfd`, `in_count`;
- the output FIFO read side: `out_re`, then `out_data` with `out_nd` one clock
  later, plus `out_empty` and `out_count`.

A JTAG or Ethernet bridge would drive these ports; no bridge is included.
Everything runs on one clock.

| Addr | Register | Meaning |
|---|---|---|
| 0x00 | START | bit 0: run. While 0, nothing is read from the input FIFO and the DUC and the CFR filter are held cleared |
| 0x01 | MODEL | 0 DUC+CFR, 1 DUC, 2 CFR, 3 loopback. Change only while START = 0 and the pipeline is empty |
| 0x02 | NUM_CARRIERS | 1 or 2 |
| 0x03 | THRESHOLD | clipping magnitude, Q1.15 (reset 0.5) |
| 0x04 | WEIGHT | in-band error weight, Q1.15 (reset 1.0) |
| 0x05 | PEAKS | read only: peaks clipped since START rose |
| 0x06 | OUT_SAMPLES | read only: words written to the output FIFO since START rose |
| 0x08+c | FREQ[c] | NCO step of carrier c |
| 0x10+k | TAP[k] | cancellation pulse tap k, Q2.14 |

A run goes as follows:

1. Write START = 0 and set MODEL and the parameters.
2. Optionally pre-load input words.
3. Write START = 1, keep writing input while `in_rfd` is high, and read output
   while `out_empty` is low.
4. Stop when OUT_SAMPLES reaches the expected count, which is 8 per frame for
   the DUC models and 1 per word otherwise.

The registers keep their values between runs, so a loaded model can be run
again and again with new settings.

## Where this design departs or fills in

The following are taken from the publication:

- the chain DUC → CFR, with the CFR made of peak detection, clipping, in-band
  processing and out-of-band processing in that order;
- the free-running operation through shared FIFOs and shared registers;
- the 8192-sample FIFO depth;
- the Start register gating the input FIFO;
- the `re = rfd AND NOT nd` read rule and the FIFO port names (`re`, `en`,
  `nd`, `rfd`);
- fixed-point conversion on the host;
- two carriers as the reference scenario;
- the kinds of settings: clipping threshold, allowable EVM, number of
  carriers.

The following are this design's own:

- All word lengths and number formats.
- The CORDIC-based peak detection, the local-maximum rule and polar clipping.
- The interpretation of "allowable EVM" as an error weight.
- The FIR cancellation pulse and its default taps.
- The linear interpolator, interpolation factor 8 and the NCO of the DUC. The
  interpolation factor is not published.
- Carrier interleaving in one FIFO.
- The holding register in the input port. It makes the Start/and/not rule
  usable for every model, not only for the loopback.
- The register map, reset values and status counters.
- One top with a MODEL register. The original work used separate FPGA
  configurations for the DUC, CFR, DUC+CFR and test models.
- A single clock domain.

Not included:

- the host software;
- the JTAG/Ethernet bridge;
- the single-step (lock-step) co-simulation mode, which the original work only
  used for comparison;
- the DPD and the power amplifier that follow the CFR in a radio.

Resource check against the FPGA used originally (128 DSP48E slices): the RTL
has 42 multipliers, each at most 18×25 bits, so it fits within that budget.

## Accuracy

The testbenches compare the RTL with floating-point models of the same
equations (exact polar clipping and exact rotation). The agreement they
require is as follows:

- peak angle: within 4 binary-angle units, plus quantisation for very small
  vectors;
- clipped value: within 3 LSB;
- DUC output: within 6 LSB;
- CFR output: within 32 LSB;
- DUC+CFR output: within 40 LSB, about 1.2·10⁻³ of full scale. The largest
  deviations come from the cancellation filter, which sums the CORDIC error
  of up to 15 neighbouring peaks.

The peak counts match the reference within 3 samples. The differences are
samples within a few LSB of the threshold. Where two neighbouring magnitudes
are within 4 LSB of each other, the fixed-point magnitude may pick the other
one as the local maximum. The outputs that such a tie can reach are not
held to the bounds. This affects about 0.4% of the outputs in the two-carrier
workload.

In practice the deviation is much smaller than these bounds. In the
two-carrier DUC+CFR workload the output differs from the floating-point
reference by about 2·10⁻⁵ of full scale rms and by 8.6·10⁻⁵ at most, which is
about 3 LSB. This holds for all outputs, including those near ties, so every
output lies within 10⁻³ of full scale. The original fixed-point hardware model was reported at
89.5% within 10⁻³ and 99.6% within 10⁻² of its floating-point reference.

## Two-carrier results

`tb_workload_two_carrier` runs two band-limited carriers through the DUC+CFR
model. Each carrier is random QPSK smoothed by a 7-tap Hann window. The
carriers sit at ±1/16 of the output rate (the reset FREQ values), and 4096
frames give 32768 output samples. The threshold is 1.585·rms, which is a 4 dB target.
Measured on the output:

| Setting | PAPR | EVM |
|---|---|---|
| no CFR (DUC only) | 8.68 dB | — |
| WEIGHT = 1.0 | 4.85 dB | 12.2% |
| WEIGHT = 0.5 | 6.91 dB | 6.1% |

PAPR is the peak power over the mean power. EVM is the rms difference
between the CFR output and the DUC-only output, relative to the DUC-only rms.
The testbench checks that the PAPR drops, that half the weight trades peak
reduction for a lower EVM, and that the EVM stays below 15%.
For scale, the original work reports an EVM of 5.66% for its DUC+CFR model
on its own two-carrier test signal and settings. That signal is not
available, so the numbers above are not a reproduction of it.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The shared floating-point reference models
are in `tb/tb_ref_pkg.sv`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cfr \
  -y rtl -y tb +libext+.sv -Irtl rtl/cfr_pkg.sv tb/tb_ref_pkg.sv tb/tb_cfr.sv
./obj_dir/Vtb_cfr
```

| Testbench | What it exercises |
|---|---|
| `tb_shared_fifo` | random traffic against a queue model: order, `nd` latency, `en`, full/drop |
| `tb_shared_regs` | reset values, every register, read-only and unused addresses |
| `tb_fr_input_port` | order under back-pressure, no read while START = 0, 1 word / 2 clocks |
| `tb_peak_detector` | against atan2/sqrt references, local-maximum rule, one-sample delay, 18-clock latency, back-pressure |
| `tb_clipper` | against atan2/sqrt references, 17-clock latency, back-pressure |
| `tb_inband_proc`, `tb_outband_proc` | bit-exact against the formulas above, saturation |
| `tb_cfr` | isolated peaks land on T, 37-clock latency, 1 sample/clock; then overlapping peaks with weight 0.5 after a clear |
| `tb_duc` | 2 carriers at ±1/16, 1 carrier and 2 random carriers, 8 outputs per frame |
| `tb_cfr_accel_top` | all four models end to end with 64-word FIFOs: START gating, both FIFOs filling, status registers |
| `tb_cfr_accel_top_full` | the same at the default sizes. DUC+CFR fills the 8192-word input FIFO with 4096 two-carrier frames and produces 32768 output samples |
| `tb_workload_two_carrier` | two QPSK carriers through DUC+CFR at two weights, against the reference, with PAPR and EVM |

The full-size testbench takes a few seconds of simulation time. The
interpolation factor (`LOG2_INTERP`) and the FIFO depth (`FIFO_DEPTH`) are
parameters of the top. The sample width, the number of CORDIC stages, the
maximum number of carriers and the filter length are constants in
`cfr_pkg`.
