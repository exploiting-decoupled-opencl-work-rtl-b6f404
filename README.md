# Decoupled gamma random-number work-items

Rejection-based random-number generators have a data-dependent branch at
their core. Each candidate is accepted or thrown away depending on the random
numbers themselves. On SIMD-style machines (GPU warps, vector units), the
threads of a group that took the "reject" side sit idle while the others
finish. This design gives every thread, here called a *work-item*, its own
hardware pipeline. A work-item starts one loop iteration every clock cycle no
matter which way its branches go, so a rejection costs that work-item one
cycle and costs the other work-items nothing.

The application is a generator of gamma-distributed random numbers for
credit-risk Monte Carlo (CreditRisk+ sector variables, Gamma(1/v, v) with
mean 1 and variance v). Each gamma value is built from three uniform
streams:

```
 MT0 (uniform) ──► Marsaglia-Bray polar method ──► normal x ─┐   (rejects ~21%)
                   (or inverse CDF, USE_ICDF=1)              │
 MT1 (uniform) ─────────────────────────────────────────────►├─► Marsaglia-Tsang
                                                             │   rejection test (rejects a few %)
 MT2 (uniform) ──────────────────────────────────────────────┴─► correction for shape ≤ 1
                                                                 and scaling by v
```

The RTL follows the architecture of Varela, Wehn, Liang and Tang, *Exploiting
Decoupled OpenCL Work-Items with Data Dependencies on FPGAs: A Case Study*.
That work was written in high-level synthesis. This is a register-transfer
re-implementation of it. Where the two differ, it is said below and in each
file's header.

## Structure

```
decoupled_work_items  (top, N_WI = 6)
 ├─ work_item [0..N_WI-1]
 │   ├─ gamma_rng         main loop, II = 1
 │   │   ├─ mersenne_twister × 4  (MT0a, MT0b, MT1, MT2; MT0b absent with ICDF)
 │   │   ├─ marsaglia_bray  or  icdf
 │   │   ├─ gamma_reject
 │   │   └─ gamma_correct
 │   ├─ stream_fifo       2048 single-precision values
 │   └─ transfer          16 values per 512-bit word, bursts of 1024 values
 └─ mem_arbiter           one shared 512-bit write channel, one burst at a time
gamma_pkg                 fixed-point type, memory-beat and event structs, math functions
```

The work-items share nothing but the write channel. All of them start
together, so their first bursts collide and are serialised by the arbiter.
After that, each work-item's transfers drift into a slot of their own, and
transfers overlap computation.

## The main loop at one iteration per cycle

This is the subtle part of the design (`gamma_rng.sv`). The sequential
algorithm per sector is:

```
counter = 0
for (k = 0; k < limit_max && counter < limit_main; ++k) {
    x, ok_n  = normal(MT0)                       // MT0 always consumed
    u1       = MT1, consumed only if ok_n
    g, ok_g  = marsaglia_tsang(x, u1)
    u2       = MT2, consumed only if ok_n && ok_g
    if (ok_n && ok_g && counter < limit_main) { write(correct(g, u2)); ++counter; }
}
```

Two things stop this from running at one iteration per cycle.

**The generators' consumption depends on later results.** A uniform value that
was not used must not be thrown away, because that would distort the uniform
sequence. So whether MT1 advances depends on the normal transformation, and
whether MT2 advances depends on the Marsaglia-Tsang test, which is several
pipeline stages later. This is handled with generators that always present
a value but only write back their state and advance their index when an
`update` input is high (`mersenne_twister.sv`). Each generator is *read at the
pipeline stage where its flag becomes known*:

| stream | read at | advances when |
|---|---|---|
| MT0a, MT0b | issue (stage 0) | every issued iteration |
| MT1 | stage 1, the cycle after issue | the polar method accepted its pair (`ok1`, available after the first stage) |
| MT2 | stage 5, at the output of `gamma_reject` | the candidate was accepted |

Iterations pass every stage in order, one per cycle. Each generator therefore
sees exactly the sequence of decisions that the sequential program makes, and
produces exactly the same numbers. `tb_gamma_rng` checks this value for value
against a sequential software model.

**The exit test depends on the counter.** The counter is incremented at the end
of the pipeline, 7 cycles after issue. So the loop condition reads
`prev_counter[BREAK_ID]`, a copy of the counter delayed by `BREAK_ID+1` cycles
(default 0, one cycle of delay). The issue logic never waits. It keeps issuing
until the delayed count reaches the target. About 8 iterations per sector are
issued past the target. They complete normally, and they consume random
numbers as a sequential program running those extra iterations would. Their
results are dropped by the `counter < limit_main` guard at the output. Each
sector writes exactly `limit_main` values (unless `limit_max` is hit first).

Pipeline timing from issue: normal generator 3 cycles, `gamma_reject` 2,
`gamma_correct` 2, then the stream write. Between sectors the pipeline drains
(8 cycles) and the shape constants are recomputed (1 cycle). Seeding the four
generators takes 624 cycles at each start.

**Back-pressure.** A value that cannot be written because the stream is full
freezes the entire pipeline, including all generator updates, until the write
goes through. This is the blocking write of a stream. No value and no random
number is lost.

Measured with sector variance v = 1.39: 30.5% of the issued iterations
produce no output, i.e. the combined rejection rate r = issued/written − 1.
The original work reports 30.3%. The run time of a work-item is then
values × (1 + r) cycles plus the seeding and sector overheads. The top-level
testbench checks this bound.

## Arithmetic

The whole pipeline uses signed fixed point Q7.24: 32 bits with 24
fractional bits, range ±128, with 64-bit intermediates. The original design
uses single-precision floating point. Results are converted to IEEE-754
single (truncated) when they enter the stream, so memory holds floats.

`gamma_pkg` supplies the functions as combinational SystemVerilog functions:

- `fx_ln`: normalises the argument by its leading one, then evaluates
  ln m = 2·atanh((m−1)/(m+1)) as an odd series up to t⁹. One 64-bit
  division.
- `fx_sqrt`: a digit-by-digit square root, unrolled over 32 steps.
- `fx_exp`: computes 2^(y·log₂e). The integer part becomes a shift and the
  fraction uses a Taylor series to the 7th power.
- `u32_to_unit`: maps a 32-bit word to a uniform in (0,1), the top 23 bits
  with the LSB forced to 1.
- `u32_to_sym`: maps a 32-bit word to a uniform in [−1,1).

Per stage, the algorithms are:

- **Polar method** (`marsaglia_bray`): s = u² + v², accepted if 0 < s < 1.
  The result is n = (u/√s)·√(−2 ln s), rearranged so that no intermediate
  overflows.
- **Inverse CDF** (`icdf`, option): with p = min(u, 1−u) and t = √(−2 ln p),
  x = t − (c₀+c₁t+c₂t²)/(1+d₁t+d₂t²+d₃t³), with the sign set by u < ½. This
  is a rational approximation of the normal quantile with error below
  4.5·10⁻⁴. It never rejects.
- **Marsaglia-Tsang** (`gamma_reject`): d = a − ⅓ and c = 1/(3√d). A
  candidate v = (1+cx)³ is rejected if v ≤ 0 and accepted if
  u < 1 − 0.0331x⁴ or ln u < x²/2 + d(1 − v + ln v). The output is g = d·v.
- **Correction** (`gamma_correct`): for a ≤ 1, the generator draws from
  Gamma(a+1) and outputs g·u₂^(1/a) = g·exp(ln u₂ / a). Every value is then
  multiplied by the scale β.

`gamma_rng` computes d, c and 1/α in hardware at the start of each sector,
using α+1 when α ≤ 1.

Range limits that follow from the format:

- α and β must be below 128.
- d·v and outputs saturate at 128.
- u^(1/α) underflows for very small α.

Sector variances from about 0.1 to 10 are safe. v = 100 (α = 0.01) is not.

## Memory side

`transfer` reads the stream one value per cycle. It places value j of each
group of 16 in bits [32j+31:32j] of a 512-bit word and stores the words in a
64-word burst buffer. After 1024 values it requests the channel and, once
granted, sends 64 beats `{addr, data, last}` with valid/ready. The stream is
not read during the request and the burst. The generator keeps filling the
2048-entry stream meanwhile.

All work-items write into one shared buffer. Addresses count 512-bit words.
Work-item `i` owns words
`base_addr + i·B … base_addr + (i+1)·B − 1`, with
`B = limit_sec · limit_rep · 64`, and fills them in order.

`mem_arbiter` grants the channel round-robin for one whole burst. The grant
is held until the `last` beat is accepted, and one idle cycle follows each
burst.

## Top-level interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | one-cycle pulse; kernel arguments must be stable from here to `done` |
| `seed` | in | work-item `i` seeds its generators from `seed + i` |
| `alpha`, `beta` | in | gamma shape 1/v and scale v, Q7.24 |
| `limit_sec` | in | sectors per work-item |
| `limit_rep` | in | bursts per sector; values per sector = `limit_rep · SXTRANSF` |
| `limit_max` | in | iteration cap per sector (see limits below) |
| `base_addr` | in | first word of the output buffer |
| `mem_valid`, `mem_ready`, `mem_beat` | out/in/out | write channel; `mem_beat` = {addr[31:0], data[511:0], last} |
| `busy`, `done` | out | working; one-cycle completion pulse after the last burst of the last work-item |
| `ev[N_WI]` | out | per-cycle events of each work-item: issue, normal/gamma rejection, correction, dropped value, write, stall, sector end, limit_max exit |

| parameter | default | |
|---|---|---|
| `N_WI` | 6 | work-items (6 fit the original FPGA with the polar method, 8 with ICDF) |
| `USE_ICDF` | 0 | 0: polar method (default configuration); 1: inverse CDF |
| `SXTRANSF` | 1024 | values per burst, a multiple of 16 (this design's choice; the original work measured several burst lengths) |
| `FIFO_DEPTH` | 2048 | stream depth |
| `BREAK_ID` | 0 | extra delay of the exit counter |
| `MT_N`, `MT_M` | 624, 397 | MT19937 |

## How far to trust it

- The Mersenne-Twister reproduces the published MT19937 output for seed
  5489. Under random update patterns it matches a software model.
- Every gamma value written by `gamma_rng` matches a sequential software
  model of the loop to 10⁻³ relative. This holds for both normal
  generators, with and without back-pressure, and over several sectors.
- The end-to-end test runs the top at full default size, the same build
  that would be synthesised. For every kernel run it checks that:
  - every word of the buffer is written exactly once;
  - each work-item's region holds exactly its own stream;
  - the sample mean is within 5% of 1 and the variance within 15% of v;
  - the run time follows the one-iteration-per-cycle model.

  It also counts polar rejections, gamma rejections, corrections, dropped
  in-flight values, full-stream stalls, waits for the channel, and
  transfers overlapping computation. Each of these must occur.
- The second evaluated build, with 8 work-items and the inverse CDF, passes
  the same end-to-end test. No normal-stage rejection occurs, and the
  combined rejection rate is 2.4%.
- The output distribution matches the exact gamma CDF for sector variances
  from 0.1 to 10, for both normal generators. This includes v = 0.20 and
  v = 1.25, the two variances the original shows as histograms. With
  40,000 values per variance, the largest CDF deviation is 0.008. Mean and
  variance stay within 4 standard errors.
- A transfers-only sweep reproduces the original's memory measurement:
  - bursts of 128 to 4096 values, 1 to 8 work-items;
  - dummy data;
  - a memory accepting a beat in 28% of cycles, the original's measured
    3.58 GB/s at 200 MHz.

  Every word lands once at its address. One work-item needs 1.22 times its
  read time, because it stops reading during its own bursts. The original
  measured about 1.24 times, 3.9 s against 3.15 s. From six work-items on,
  the memory rate sets the run time, as in the original. The memory model
  has no per-burst DRAM latency, so short bursts are barely slower here,
  unlike on the real board.
- Every block-level testbench is shown to fail on a deliberately broken copy
  of its block.
- The RTL has not been run on an FPGA, and no timing closure was attempted.
  The math functions sit in single pipeline stages. They are deep
  combinational logic (ln has a 64-bit divider), and a real 200 MHz
  implementation would need them split over more stages. Adding stages
  changes only the latencies listed above. The read-at-flag-stage rule
  keeps the random streams correct, because each generator is still read at
  the stage where its flag first exists.

## Departures from the original design

- **Fixed point instead of single-precision float** inside the pipeline, with
  the range limits given above.
- **Normal generator inputs**: the polar method takes its two uniforms from
  two generators, MT0a and MT0b. This split is one of the options the
  original work allows.
- **Generator output**: the generator tempers the freshly twisted state
  word, as the reference MT19937 does.
  - The original's adapted generator tempers the state word before the
    twist. Its output is the seeded state first, then the reference
    sequence, i.e. the same sequence delayed by 624 words.
  - The original also wraps its index back to 0 at the last position even
    when no update happens. Here the index moves only on an update, so no
    word is skipped.
  - The test compares both against the published MT19937 values.
- **Inverse CDF**: the original uses a bit-level ICDF from other work, which
  also rejects some inputs (combined rejection 7.4% there). The rational
  approximation used here never rejects (combined rejection about 2.6%).
- **Generator variant not built**: the 521-exponent generator variant
  (17-word state) is not available. Its recurrence constants are not
  published with the design.
- **Per-sector shape**: one α/β pair is used for all sectors, as in the
  evaluation with one representative variance. The constants are
  nevertheless recomputed at every sector start.
- **Burst length, seeds and handshakes** are this design's own choices.
  This covers the burst length, the seeding scheme, the memory-beat
  handshake, the round-robin arbitration and the kernel-argument ports.
  The host, the PCIe shell, the memory controller and the DRAM are not
  part of the RTL.
- **limit_max must not be hit**: if `limit_max` ends a sector before
  `limit_main` values exist, the transfer engine waits forever for the
  rest. The original transfer loop has the same property. The generator
  alone handles the early exit, and `tb_gamma_rng` tests it.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Everything is compiled from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/gamma_pkg.sv tb/tb_decoupled_work_items.sv --top tb_decoupled_work_items
./obj_dir/Vtb_decoupled_work_items
```

The testbenches are:

| testbench | block |
|---|---|
| `tb_mersenne_twister` | generator, known values + gated model |
| `tb_marsaglia_bray`, `tb_icdf` | normal generators against real arithmetic |
| `tb_gamma_reject`, `tb_gamma_correct` | Marsaglia-Tsang stages |
| `tb_gamma_rng`, `tb_gamma_rng_icdf` | one generator against a sequential model (uses `tb_mt_pkg`) |
| `tb_stream_fifo`, `tb_transfer`, `tb_mem_arbiter`, `tb_work_item` | data path to memory |
| `tb_decoupled_work_items` | whole kernel at default parameters, three kernel runs, a few seconds |
| `tb_decoupled_work_items_icdf` | whole kernel with 8 work-items and the inverse CDF |
| `tb_gamma_distribution` | output distribution against the gamma CDF, v = 0.1 … 10, both normal generators |
| `tb_transfers_only` | burst-length × work-item sweep of the memory side with dummy data (about 12 s) |

Add `tb/tb_mt_pkg.sv` to the command line for the two `tb_gamma_rng`
benches.
