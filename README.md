# Wideband FFT with radix-2^k units, CORDIC twiddles and external transposes

A radio-telescope spectrometer needs Fourier transforms of around 2^20 to 2^30
points so that a wide band is still resolved finely. A conventional pipelined
FFT keeps two things on chip whose size grows as N log N: a table of twiddle
factors, and a transpose (reordering) memory after every pair of stages. At
2^30 points neither fits an FPGA.

This design removes both:

* **No twiddle table.** Every radix-2 stage computes its own twiddle factors
  with a pipelined CORDIC (shift-and-add rotations), so no memory holds them.
* **Few transposes, off chip.** The log2 N stages are grouped into `Q` units
  of `K` stages each (a *radix-2^k unit*). Inside a unit, stages are joined by
  small delay commutators. Only between units is a full-frame transpose
  needed. That makes `Q-1` transposes, each large enough to live in an
  external DRAM channel.

The default build is a 2^30-point transform: three units of ten stages and two
transposes. It takes two complex points per clock, so at 333 MHz one transform
streams through in 2^30 / (2 x 333 MHz) = 1.6 s.

## Number format and scaling

All samples are 18-bit real plus 18-bit imaginary two's complement
(`fft_pkg::cplx_t`). Twiddle factors use the same format read as Q1.17, with
+1.0 saturated to 2^17-1.

Each butterfly computes `(u + W v)/2` and `(u - W v)/2`. The sum is formed at
full precision, then rounded half up and saturated to 18 bits. Halving at each
of the log2 N stages means the output is **X(m)/N**, the DFT divided by N, so
nothing can overflow except by the sqrt(2) growth of a complex rotation. The
`sat` output pulses when saturation happens. Input that stays below about half
scale never saturates.

## Data order

The decimation-in-time FFT here is computed "in place".

* **Input:** bit-reversed order. Pair `t` of a frame carries
  `x(bitrev(2t))` on `in0` and `x(bitrev(2t+1))` on `in1`. Frames of N/2 pairs
  follow each other with no gap.
  The reference system feeds 8-bit ADC samples; the source widens them to the
  18-bit word (placing them in the upper bits uses the range best).
* **Output:** not in natural order. Every output point comes with its
  frequency index on `out_idx0`/`out_idx1`, and whoever receives the stream
  sorts it. The power `|X(m)/N|^2` of each point is also given
  (`out_pow0/1`).

## How the stream is reordered

Reordering is the hard part of the design. Each radix-2 stage `i` joins
points whose in-place indices differ in bit `i-1`.

**Inside a unit: timing adjusters.** The stream carries two points per clock.
Unit-local stage `L` needs the two points of a pair at distance 2^(L-1) to
arrive together. The previous stage delivers pairs at distance D = 2^(L-2).
`timing_adjuster` regroups them:

* lane 1 is delayed by D clocks;
* a switch swaps the lanes during the second half of every group of 2D pairs;
* lane 0 is then delayed by D clocks.

This costs 2D words per stage and adds D+1 clocks of latency. Pairs come out
in block order: pair `t` holds stream positions `pair_pos(t, L)` and
`pair_pos(t, L) + 2^(L-1)`, where
`pair_pos(t, L) = ((t >> (L-1)) << L) | (t mod 2^(L-1))`.

**Between units: transposes.** A unit can only join points whose indices
differ in its own K bits. `transpose_ctrl` works as follows:

* It writes each point of a frame to external memory at its stream position.
* It reads the frame back so that output position `o` comes from address
  `rotl(o, K)`, the stream index rotated left by K bits. That is a
  K x (log2 N - K) matrix transpose. The next unit's K index bits become the
  lowest bits, so its first stage again sees adjacent pairs.
* Memory is used ping-pong: two banks of N points, selected by the top
  address bit. One frame is written while the previous one is read, so a
  gap-free input gives a gap-free output one frame later.

**Twiddles.** For a unit at position `UNIT`, a stream position `P` is in-place
index `n = rotl(P, UNIT*K)`. Global stage `i` (1 ... log2 N) needs
`W_(2^i)^(n mod 2^(i-1))`. As a fraction of the full circle this is
`phase = (n mod 2^(i-1)) * 2^(log2N - i) / 2^log2N`.

The CORDIC receives `phase` from a pair counter through the same index
arithmetic. The data waits in a delay line for the CORDIC latency.

## Pipelined CORDIC (`cordic`)

* The two top phase bits select a quadrant. The remaining bits give an angle
  in [0, pi/2), which enters `ITER` rotation stages.
* Each stage rotates `(x, y)` by +/- atan(2^-i) using shifts and adds. The
  rotation constants `atan(2^-i) / (2 pi) * 2^ZF` are computed at elaboration.
* Two constant multipliers remove the CORDIC gain. The quadrant is then folded
  back in, and the result is rounded and saturated.

The output is `cos(theta) - j sin(theta)`. Latency is `ITER + 3` clocks.

`ITER` defaults to log2 N (30). For 18-bit accuracy `ITER` must be at least
about 20. The reduced-size tests set it to 20 and reach a maximum error of
1 LSB.

## Modules

| module | role | latency |
|---|---|---|
| `r2k_fft_top` | Q units + Q-1 transpose controllers + power output | about Q-1 frames + pipeline |
| `r2k_unit` | K cascaded `fft_stage`s | sum of stages |
| `fft_stage` | timing adjuster, twiddle phase, CORDIC, data delay, butterfly | 2^(L-2)+1 (L>=2) + ITER+3 + 3 |
| `timing_adjuster` | delay commutator | D+1 |
| `cordic` | twiddle generator | ITER+3 |
| `butterfly` | shared-multiplier radix-2 butterfly | 3 |
| `cplx_mult` | 4-multiplier complex product, full precision | 2 |
| `cplx_addsub` | sum/difference, halve, round, saturate | 1 |
| `transpose_ctrl` | addresses and bank control for one external transpose memory | frame + RDLAT + 2 |
| `magnitude_unit` | re^2 + im^2 for two lanes | 2 |
| `delay_line` | circular-buffer delay | D |
| `fft_pkg` | `cplx_t`, `rotl`, `pair_pos` | |

Top parameters: `LOG2N` (30), `K` (10), `Q` (3), `ITER` (`LOG2N`) and
`MEM_RDLAT` (4, the external memory's read latency). `LOG2N` must equal
`Q*K`, with Q >= 2 and K >= 2.

## External memory interface

Each transpose has its own channel, arrays indexed by transpose number in the
top:

* Two write ports and two read ports per clock: `mem_we`,
  `mem_waddr0/1`, `mem_wdata0/1`, `mem_re`, `mem_raddr0/1`, `mem_rdata0/1`.
* Addresses are `LOG2N+1` bits, whose MSB is the bank.
* Read data must come back exactly `MEM_RDLAT` clocks after `mem_re`.

A real DDR2 channel sits behind a controller that turns this into bursts.
That controller, the DRAM, the ADC front end (which also puts the input in
bit-reversed order), the PCI Express link to the host and the clock PLL are
not part of this RTL. `tb/ddr2_mem_model.sv` is a plain array with fixed
latency for simulation only.

At the default size each transpose needs 2 x 2^30 points x 36 bits (9 GiB) in
its ping-pong banks.

## Where this design departs from, or adds to, the reference design

* **Scaling:** a halving at every radix-2 stage. The reference applies its
  scaling schedule per radix-2^k unit, sized to the data width; a fixed
  halving per stage is the simplest schedule that cannot grow the word.
* **Number of units:** three units for 2^30 (so K = 10), with two external
  memories. One statement of the reference gives k = ceil(log2 N / 2), which
  would mean two units. The three-unit reading agrees with its two memory
  channels.
* **Timing adjuster:** a two-lane delay commutator. Its register count
  (2 x 2^(L-2) words per stage) differs from the reference's count for its
  adjuster.
* **Transpose buffering:** the ping-pong banks are this design's choice. The
  reference only states that reads and writes run continuously.
* **CORDIC:** it starts from x = 1 and removes the gain with two multipliers
  at the end. The reference's start value and its quadrant handling are not
  followed literally.
* **Flow control:** none. A valid flag travels with the data, and frames
  must be gap-free. The reference states only the rate, two points per clock.
* **Power output:** the magnitude unit at the output is an addition. The
  reference mentions power computation only as the step after the FFT in a
  spectrometer.
* **Reset:** synchronous and active high. It clears all state, including the
  delay lines.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

* `tb_cplx_mult`, `tb_cplx_addsub`, `tb_butterfly`, `tb_magnitude_unit`
  compare against exact integer arithmetic, including saturation, and check
  latency.
* `tb_cordic` compares against real-valued cos/sin (all quadrants, +/-3 LSB
  allowed; the observed maximum is 1 LSB), with one instance at 16-bit phase
  and 20 stages and one at the default 30-bit phase and 30 stages.
* `tb_timing_adjuster` and `tb_transpose_ctrl` stream tagged points through
  three frames and check every position, the latency and the use of both
  banks.
* `tb_r2k_unit` runs a single unit as a complete 64-point FFT against a
  floating-point DFT.
* `tb_r2k_fft_top` runs the whole chain at 2^9 points: three units of three
  stages and two transposes with memory models. It checks:
  * every output against the DFT/N;
  * every index appearing once per frame;
  * a gap-free output stream;
  * the power output.

  It also forces saturation with a constructed frame and counts saturations,
  bank switches and transposed frames.
* `tb_fft_zeeman_workload` runs the chain at 2^20 points with two units of
  ten stages, the unit size of the default build, and one transpose. It uses
  single-tone and two-tone frames and checks every bin against the closed-form
  spectrum.
* `tb_fft_tone_workload` runs the chain at 2^21 points (three units of seven
  stages, default `ITER`) with single-tone and two-tone frames.

The largest size simulated is 2^21 points (2^20 clocks per frame). A
2^30-point run would need 2^31 words of memory model per transpose and over
10^9 clocks, so the default configuration is compiled and linted but not
simulated.

To run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_r2k_fft_top rtl/fft_pkg.sv tb/tb_r2k_fft_top.sv
./obj_dir/Vtb_r2k_fft_top
```
