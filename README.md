# Adaptive multi-beam receiver for a DVB-S phased array

A flat antenna array can receive satellite TV from a moving vehicle. To do that it combines the
signals of its antennas with per-antenna complex weights (a *steering vector*), which forms a
*beam* towards each satellite. As the vehicle turns, the beams must follow the satellites. This
RTL does that with no reference signal. It uses a *constant-modulus algorithm* (CMA): a QPSK
signal that is received cleanly has a fixed amplitude and phases at odd multiples of 45°, so any
deviation from that shape is an error that the weights can be steered against.

The design is one processing tile for an array of 64 antennas and 3 beams. For each *snapshot*
(one complex sample from every antenna) it:

1. equalizes each antenna with a 5-tap complex FIR filter, which corrects front-end mismatch;
2. forms 3 beams as weighted sums over the 64 antennas;
3. passes each beam through a 9-tap matched filter (one filter for I, one for Q);
4. makes a hard QPSK decision for each beam;
5. on every 250th snapshot, runs one CMA gradient step on each beam's steering vector.

The arithmetic kernels are built the way a coarse-grained reconfigurable DSP tile would execute
them:
- one complex multiply-accumulate per cycle;
- lookup tables for the sine and for the reciprocal;
- a CORDIC built from three copies of the tile's 3-level ALU (`montium_alu`).

## Numbers

- **Samples and weights** are 16-bit 1.15 fixed point, with range [−1, 1). A complex value is
  `cplx_t` (`bf_pkg`), a packed struct `{re, im}`.
- **Products** are kept at full width inside the accumulators (34 bits per product, 40-bit sums).
- **Rounding** is done once per result: round half up, then saturate to 1.15 (`rnd_sat`).
- **Angles** are 16-bit binary angles. The full circle is 2^16, so −π is −32768. An angle
  therefore wraps for free, and 4·angle is a 2-bit left shift.

## The steering update (`cma_update`)

### Cost and update rule

The cost minimised for each beam output y is

    J = E[(|y|² − 1)²] + E[sin²(2·∠y)]

The first term pulls |y| towards 1. The second pulls the phase onto the QPSK points.

The beam output is y = Σ_k conj(φ_k)·x_k. Differentiating J with respect to conj(φ) gives the
step

    φ ← φ − μ · ( 2(|y|⁴ − |y|²) − j·sin(4∠y) ) / y · x

with μ = 0.005.

The conjugate in the beamformer matters. Written as y = Σ φ_k·x_k, this same step would climb the
cost instead of descending it. `beamformer` and the testbenches therefore use conj(φ)
consistently.

### Scalar part

The scalar factor c = μ·N/y is computed once per update, where N = 2(|y|⁴ − |y|²) − j·sin(4∠y).
The steps are:

| Step | Work |
|---|---|
| `S_MAG` | \|y\|² = re² + im² |
| `S_MAG2` | \|y\|⁴ and the real part of N. Starts the CORDIC on y and the μ/\|y\|² table lookup on \|y\|². |
| `S_CORD` | Waits for ∠y (ITER + 3 = 17 cycles). Looks up sin(4∠y) in the sine table. |
| `S_DIVGO`/`S_DIV` | Complex division: c = ((ac+bd) + j(bc−ad))·e, where N = a+jb, y = c+jd and e = μ/\|y\|². |

Dividing by y needs 1/|y|², and that value is above 1 and has no 1.15 code. So μ is folded into
the table: it holds μ/|y|², not 1/|y|².

### Vector part

`S_UPD` streams the 64 antennas. Each cycle it reads x_k and φ_k and writes φ_k − c·x_k two
cycles later. One beam's update takes N_ANT + 26 cycles, i.e. 90 at 64 antennas.

### Limit: |y| ≥ 1

|y|² and |y|⁴ are held in 1.15. For |y| ≥ 1 they saturate at just below 1, so the modulus term
2(|y|⁴ − |y|²) becomes about 0 instead of positive. The reciprocal table also returns its last
entry.

In practice the update stops pulling |y| down once a beam is too strong. Set the input level, the
equalizer gains and the initial weights so that beam outputs stay below 1. The testbenches only
compare against the floating-point update for |y| < 0.98.

## CORDIC on three tile ALUs (`cordic_vectoring`, `montium_alu`)

### The ALU

`montium_alu` is a combinational three-level ALU:

- **Level 1:** four function units. FU1 takes A,B. FU2 takes C,D. FU3 and FU4 take the results of
  FU1 and FU2 and produce Z1A and Z1B. Each unit sets overflow, negative and zero flags. A small
  decoder picks one flag, optionally inverted, as the status bit SB.
- **Level 2:** a multiplier, then an adder. SB can choose the adder's right operand at run time
  (from B, D, Z1A or Z1B).
- **Level 3:** a butterfly and two output multiplexers.

The control word `alu_ctrl_t` (in `montium_pkg`) is this design's own encoding. It is not the
instruction format of any real processor.

### One iteration per cycle

Each cycle, the CORDIC runs one iteration on three ALUs, one per equation:

    ALU1  x' = x − d·(y >>> i)      FU1: y >>> i   FU3: −(y >>> i)
    ALU2  y' = y + d·(x >>> i)      FU1: x >>> i   FU3: −(x >>> i)
    ALU3  z' = z − d·atan(2^-i)     FU1: atan(2^-i) from a 16-entry ROM

Here d = +1 when y < 0. SB is the *inverted* negative flag of y, so SB = 1 when y ≥ 0. It makes
the adder take the negated term (Z1A) when y ≥ 0 and the plain term when y < 0. This sign
convention is what makes the iterations converge.

### Extra cycles and normalisation

Vectoring converges only for |∠| < π/2. An extra first iteration therefore rotates vectors with
x < 0 by ∓π/2, using the same ALU wiring with a zero shift. 14 iterations follow. The latency is
1 (load) + 1 (pre-rotation) + 14 + 1 (output) = 17 cycles.

Before iterating, the input is shifted left as far as 16 bits allow, then scaled by 1/4. The 1/4
leaves room for the CORDIC gain of 1.65. This keeps small vectors precise: the angle does not
depend on the scale, and the magnitude is scaled back at the end. The testbench holds the angle
to 8 + 30000/r units of 2^-16 turn, where r is the magnitude in 1.15 integer units. That is about
9 units for a full-scale vector and about 100 units for |y| = 0.01.

## Lookup tables

Both tables are computed at elaboration with `$sin` and real arithmetic. No data files are read.

| Table | Entries | Address | Contents |
|---|---|---|---|
| `sine_lut` | 1024 × 16 bit | upper 10 bits of the angle | sin(2πk/1024) rounded to 1.15, capped at 32767 |
| `inv_lut` | 512 × 16 bit | upper 9 bits of \|y\|² | μ·512/k, saturated for k = 0..2 (where the value is ≥ 1) |
| atan ROM in `cordic_vectoring` | 16 × 16 bit | iteration i | atan(2^-i) as a binary angle |

Each table lookup takes two cycles: an address register, then an output register. `inv_lut` has
a `sat` output that marks the saturated entries.

## Schedule and cycle counts (`adaptive_beamformer`)

The top runs its stages one after another on one set of memories, much as a single tile would
sequence its kernels:

| Phase | Cycles (defaults) | Rule |
|---|---|---|
| `T_IN`: accept and equalize 64 samples | 320 | N_ANT · F_EQ |
| `T_BF`: 3 beams | 192 | N_ANT · N_BEAM |
| `T_MF`: matched filter, 3 beams | 54 | 2 · F_MF · N_BEAM |
| hand-over between phases | 5 | |
| **snapshot** | **571** | |
| `T_CMA`: every 250th snapshot, 3 beams | 273 | N_BEAM · (N_ANT + 27) |

The published cycle budget for this kernel set is about 570 cycles per snapshot, plus 288 for a
steering update. This design uses 571 and 273. At a 100 MHz clock, one instance processes
175 k snapshots/s. A real-time receiver at 50 Msamples/s per antenna must split the work over a
few hundred such tiles, and this RTL does not provide that split. The same RTL scales with its
parameters (larger arrays: `N_ANT`; more beams: `N_BEAM`). The cycle count follows the rules in
the table. The steering update itself is `N_ANT + 26` cycles per beam; the extra cycle per beam is
the hand-over to the next beam's update.

The same RTL has been simulated at the array sizes of other phased-array applications:

| Application | Antennas | Beams | Cycles per snapshot | With a steering update |
|---|---|---|---|---|
| satellite TV (DVB-S), large array | 256 | 3 | 2107 | 2956 |
| radar | 4096 | 20 | 102765 | 185225 |
| radio astronomy | 8672 | 24 | 251925 | 460701 |
| wireless base station | 64 | 32 | 2949 | 5861 |

### Memories

Snapshot data and steering vectors are kept in four `montium_mem` instances, with real and
imaginary parts stored separately:

- snapshot: `N_ANT` words;
- weights: `N_ANT · N_BEAM` words, at address beam·N_ANT + antenna.

`beamformer` walks them with two `montium_agu` address generators: linear for the weights, modulo
N_ANT for the snapshot.

### Interface

- Raw samples enter on `in_valid`/`in_ready`, antenna 0 first, 64 per snapshot.
- Equalizer taps, matched-filter taps and steering weights are written through `eq_cfg_*`,
  `mf_cfg_*` and `w_cfg_*`. Use these while `in_ready` is high. Initial steering vectors must come
  from outside, for example from a direction-of-arrival search.
- After reset, both filters pass samples through unchanged. The weights memory is not reset and
  must be loaded.
- Outputs:
  - beam outputs: `bf_valid`, `bf_beam`, `bf_y`;
  - filtered beams: `mf_*`;
  - QPSK bits: `sym_*`, as {I<0, Q<0};
  - pulses `snap_done` and `cma_done`.

## Files

| File | Contents |
|---|---|
| `rtl/bf_pkg.sv` | Number types and rounding/saturation helpers |
| `rtl/montium_pkg.sv` | ALU control word, operations and multiplexer selections |
| `rtl/montium_alu.sv`, `rtl/montium_agu.sv`, `rtl/montium_mem.sv` | Tile building blocks: ALU, address generator, 1R1W memory |
| `rtl/cordic_vectoring.sv`, `rtl/sine_lut.sv`, `rtl/inv_lut.sv`, `rtl/complex_div.sv` | Scalar kernels of the steering update |
| `rtl/cma_update.sv` | One beam's steering update |
| `rtl/equalizer_fir.sv`, `rtl/beamformer.sv`, `rtl/matched_filter.sv`, `rtl/qpsk_demapper.sv` | Signal chain |
| `rtl/adaptive_beamformer.sv` | Top |
| `tb/tb_<module>.sv` | Self-checking testbench for each module |

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

`tb_adaptive_beamformer` runs the top at its default size, 64 antennas and 3 beams, for 502
snapshots, which includes two steering updates. It checks:
- every beam and matched-filter output, bit for bit, against a model in the testbench;
- each steering update against the floating-point update rule;
- the 571-cycle snapshot timing;
- that back-pressure, updates, CORDIC pre-rotations and saturated reciprocal lookups all occur.

`tb_array_sizes` (with its helper `tb/wl_run.sv`) runs the four larger configurations above
side by side. Each runs for three snapshots, with the update period cut to 2 so that a steering
update happens. It checks outputs bit for bit and the cycle counts.

## Simulating

Verilator 5, for example:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/bf_pkg.sv rtl/montium_pkg.sv tb/tb_adaptive_beamformer.sv \
        --top-module tb_adaptive_beamformer
    ./obj_dir/Vtb_adaptive_beamformer +verilator+rand+reset+2

Replace the testbench name to run any other testbench. The `+verilator+rand+reset+2` option
randomises all state that is not reset. The testbenches are written to pass with it, because
every register that is read is either reset or written first.

The full-size top testbench and `tb_array_sizes` each run for a few seconds. The block testbenches run in well under a
second, except `tb_montium_alu` and `tb_complex_div`, which run a few thousand random vectors
each.

## Departures and limits

- **Tile processor.** The tile processor is not built: no sequencer, no instruction decoders, no
  crossbar, no register files and no network interface. Its kernels are realised as fixed state
  machines that use the tile's ALU, memories and address generators as components. Only the
  CORDIC runs on `montium_alu` instances. The other kernels use plain multipliers with the same
  per-cycle throughput (one complex MAC, or one real MAC for the matched filter).
- **ALU details.** The ALU's function-unit operations and its control-word encoding are this
  design's own.
- **Beamformer cycles.** The beamforming phase takes 3 × 64 = 192 cycles. A figure of 196
  appears elsewhere for the same phase; 192 is what one MAC per antenna per beam gives.
- **Update rate.** The update rate is 1/250 per snapshot (`UPDATE_PERIOD = 250`). One sentence of
  the published analysis gives it as 0.0004.
- **|y| ≥ 1.** The steering update's modulus term saturates for |y| ≥ 1 (see above).
- **Coefficients.** The matched filter's pulse shape and the equalizer coefficients are not
  built in. They are loaded through the configuration ports. I and Q share one matched-filter
  coefficient set.
- **Table sizes.** The sine table is 2 KiB and the reciprocal table is 1 KiB (512 × 16 bit). A
  2 KiB size was quoted for both; the 512-entry count is kept.
- **Outside the tile.** RF front ends, AD converters and the initial direction-of-arrival search
  are outside this RTL.
