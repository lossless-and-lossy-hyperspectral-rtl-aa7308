# CCSDS 123.0-B-2 hyperspectral compressor: prediction and hybrid coding in SystemVerilog

Imaging spectrometers on satellites produce cubes of samples: `Nx` columns by
`Ny` rows by `Nz` spectral bands. Neighbouring samples are strongly
correlated, both within a band and from one band to the next. CCSDS 123.0-B-2
compresses such cubes in two stages:

- **Prediction.** An adaptive linear predictor guesses each sample from
  neighbours that are already coded, in the same band and in up to `P`
  previous bands. Its weights learn as the image streams through.
- **Entropy coding.** The prediction residual, optionally quantized so that
  the reconstruction error stays within a set bound (near-lossless mode), is
  mapped to an unsigned index. A hybrid entropy coder then turns the index
  into bits.

This RTL implements the compressor in the configuration of a space-qualified
IP core built around those two stages:

- band-interleaved-by-line (BIL) processing, with an optional BIP-to-BIL
  reordering front end;
- a predictor that can run lossless or near-lossless;
- the hybrid entropy coder;
- an AHB-Lite configuration interface;
- image sizes up to 680 x 512 x 256 (an AVIRIS-class sensor), 16-bit samples,
  up to 3 prediction bands, and 32-bit output words.

```
             +-------------+   +---------------------------+   +-------------------------+   +--------+
 samples --->| sample      |-->| predictor                 |-->| hybrid_encoder          |-->| bit    |--> 32-bit
 (BIL/BIP)   | reorder     |   |  neighbour / local-diff / |   |  statistics -> decision |   | packer |    words
             | (BIP only)  |   |  weight memories, core,   |   |  -> arbiter -> HiEC     |   +--------+
             +-------------+   |  quantizer, mapper, ctrl  |   |            \-> LoEC port|
                               +---------------------------+   |  order FIFO, combiner,  |
     AHB-Lite --> config_if (registers, checks, start)         |  flush FSM              |
                                                               +-------------------------+
```

The top module is `ccsds123_core`. The low-entropy coder (LoEC) of the hybrid
scheme and the compression header are not part of this RTL. The LoEC is
reached through ports (see "The low-entropy coder port"). The output stream is
the coded image body.

## The prediction loop

For the sample at column `x`, row `y` and band `z`, the predictor reads four
kinds of neighbour:

- **N, NE and NW** (the row above) and **W** (the sample to the left), all
  from the current band.
- **The same position in the previous band.** Only some local sum modes use
  it.
- **The central local differences of the previous `P` bands** at this column.

Every neighbour value is a *sample representative*: the value a decoder will
reconstruct. In lossless mode that is the sample itself. In near-lossless mode
it depends on the quantized residual of that sample.

The datapath follows this chain (modules in brackets):

1. **Local sum** σ (`local_sums`). There are four modes:
   - wide neighbour-oriented: W + NW + N + NE;
   - narrow neighbour-oriented: NW + 2N + NE;
   - wide column-oriented: 4N;
   - narrow column-oriented: 4N.

   At image edges the missing neighbours are replaced. On the first row the
   wide modes use 4W. The narrow modes use four times the previous band's
   sample one column to the left, or the mid-range value in band 0.
2. **Local differences** (`local_diffs`):
   - directional: 4N−σ, 4W−σ, 4NW−σ;
   - central: 4·s″−σ, written back for the next bands.
3. **Predictor core** (`predictor_core`):
   - The dot product of the weight vector with the local difference vector
     gives the high-resolution prediction. It is wrapped to the register size
     `R`.
   - From it come the double-resolution prediction `s̃` and the predicted
     sample `ŝ`.
   - In reduced mode only the spectral differences are used. In full mode the
     three directional ones are added.
4. **Quantizer** (`quantizer`): `q = sgn(Δ)·⌊(|Δ|+m)/(2m+1)⌋`.
   - `m` is the absolute limit, the relative limit `⌊r·ŝ/2^D⌋`, or the smaller
     of the two.
   - The division is iterative, `STEP` quotient bits per cycle, so the
     quantizer needs no multiplier-sized table.
   - When `m = 0`, or at `t = 0`, it is bypassed in one cycle.
5. **Sample representative** (`sample_representative`):
   - It takes the clipped bin centre `s′`.
   - It moves `s′` towards the prediction with the damping `φ` and offset `ψ`
     at resolution `Θ`, giving `s″`.
   - It also forms the double-resolution error `e = 2s′ − s̃` used by the
     weight update.
6. **Weight update** (`predictor_core`): each weight moves by
   `½(sgn(e)·2^−ρ·U + 1)` and is clipped. The exponent `ρ(t)` (`rho_update`)
   grows from `vmin` to `vmax` every `2^tinc` samples.
7. **Mapper** (`mapper`): folds `q` into the unsigned index δ using
   `θ = min(ŝ, 2^D−1−ŝ)` scaled by `2m+1`. This takes two more iterative
   divisions.

The hard part is the feedback: `s″` of the sample just finished is needed in
three places:

- the W neighbour of the next sample in the same band;
- the neighbour memory for the next row;
- the central difference store for the next bands.

The updated weights are needed by the next sample of the band. This design
therefore runs the **serial baseline schedule**: one sample is taken through
the whole chain before the next one starts. This is the only schedule that is
correct for every combination of options (full or reduced prediction, any
local sum mode, representatives on or off).

### Storage

| memory | contents | size at the defaults |
|---|---|---|
| `neighbour_storage` | `s″` of the last row, per band and column, address `z·NX + x` | 680·256 × 16 bit |
| `local_diffs_storage` | central differences of bands z−1..z−3, per column, shifted on write | 680 × 3 × 19 bit |
| `weights_storage` | weight vector per band, reset to the default weights at a band's first sample | 256 × 6 × 16 bit |

The neighbour memory is by far the largest. The whole core needs about
2.86 Mbit of memory.

### Serial schedule (`predictor_ctrl`)

| step | action |
|---|---|
| IN | accept the raw sample; read N from the neighbour memory |
| F1 | read NE |
| F2 | read band z−1 one column to the left (the first-row term of the narrow modes); read the weights and local-difference vector |
| F3 | register the reads |
| LS | local sum and differences |
| PRED | predictor core |
| Q / QW | quantize; wait for the divider when `m > 0` |
| MAP / MW | map; wait for the divider when `m > 0` |
| OUT | hand δ to the coder; write back `s″`, the weights, the central difference, and the NW/W registers |

The NW and W neighbours come from registers carried along a row.

Throughput:
- Lossless: 11 cycles per sample (checked by `tb_predictor`).
- Near-lossless: 11 cycles plus about 2·(⌈18/STEP⌉+2).

The schedule waits in OUT while the coder is not ready.

Traversal order is BIL: for each row, all bands, each left to right.
`t = y·Nx + x` is the time index of the standard.

## The hybrid entropy coder

`hybrid_encoder` keeps for every band a counter Γ and an accumulator Σ̃
(`acss`):

- They start at `2^γ0` and at the value in the ACCINIT register.
- Each sample adds 4δ to Σ̃ (the accumulator keeps two fraction bits) and 1 to Γ.
- When Γ has reached `2^γ*−1`, the update halves both instead, rounding the
  accumulator up. The accumulator bit that falls out is emitted into the
  stream as a *rescaling bit*.

The current band's statistics sit in registers. The other bands' statistics
sit in a memory, written through. In BIL order the band changes at the end of
every row segment, which costs two cycles.

For each sample, `entropy_decision` compares `Σ̃·2^14` with `T0·Γ`:

- **High-entropy** (at or above the threshold): `hiec` codes δ with a reversed
  length-limited Golomb power-of-two code.
  - The parameter `k` is the largest value up to `max(D−2, 2)` with
    `Γ·2^(k+2) ≤ Σ̃ + ⌊49Γ/32⌋`.
  - The codeword is the `k` low bits of δ, then a 1, then `u = δ>>k` zeros.
  - If `u ≥ Umax`, it is the D-bit value followed by `Umax` zeros.
  - A band's first sample is sent as D raw bits.
- **Low-entropy**: the sample goes to the LoEC with a code index 0..15. The
  index is chosen by the 16 thresholds T0..T15 of the standard.

Codewords must leave in sample order, but the two coders can answer at
different times:

- `hyb_arbiter` sends each sample to its coder.
- At the same time it pushes an order tag into a FIFO. The tag holds the kind,
  the rescaling bit, and a last flag.
- `code_combiner` pops tags and takes the next codeword from the matching side.
  A zero-length LoEC answer is allowed: variable-to-variable codes often emit
  nothing for a sample.
- It puts the pending rescaling bit in front of the codeword.

All stages are valid/ready elastic stages, so back-pressure from the output
passes upstream without a central controller.

After the last sample, `flush_fsm` writes the image tail:

1. It asks the LoEC to flush its partial codewords.
2. It writes every band's final accumulator in `2 + D + γ*` bits.
3. It writes a single 1 bit.

`bit_packer` then pads the last 32-bit word with zeros and flags it
`out_last`. Words are filled MSB first: the first bit of the stream is bit 31
of the first word.

## The low-entropy coder port

The LoEC needs the 16 variable-to-variable code tables of CCSDS 123.0-B-2.
They are not part of this RTL. An implementation must follow this contract:

- **Requests:** `lo_valid`/`lo_ready` with `lo_delta`, `lo_z` and `lo_code`,
  one per low-entropy sample, in order.
- **Answers:** `lo_cw_valid`/`lo_cw_ready` with `lo_cw` (right-aligned, first
  bit at `lo_len−1`) and `lo_len` (0 allowed). There is exactly one answer per
  request, in request order.
- **Flush:** after `lo_flush_req` rises, any number of `lo_fl_valid` codewords,
  then `lo_flush_done` held high.

The testbenches use `tb/loec_model.sv`. It answers each request with a 4-bit
codeword equal to the code index and flushes with the single codeword `101`,
with random delays and back-pressure. This checks the ordering and handshake
logic, not real compression ratios. Without a LoEC attached, tie `lo_ready`,
`lo_cw_valid` and `lo_fl_valid` low and `lo_flush_done` high. The core then
only makes progress while every sample is high-entropy.

## Configuration registers (`config_if`, AHB-Lite slave)

The slave takes word accesses, inserts no wait states and always answers OKAY.
Write the registers, then write 1 to CTRL[0]. The unit checks the set against
the instance's limits:

- If the set is valid, it is copied into the active configuration and a run
  starts.
- If not, CTRL reads back with the error bit set and nothing starts.

| offset | name | fields |
|---|---|---|
| 0x00 | CTRL | W: [0] start. R: [0] busy, [1] done, [2] error |
| 0x04 / 0x08 / 0x0C | NX / NY / NZ | image size, 2..680 / 1..512 / 1..256 |
| 0x10 | PRED | [1:0] P (0..3), [2] full prediction mode, [5:4] local sum mode (0 wide-neighbour, 1 narrow-neighbour, 2 wide-column, 3 narrow-column) |
| 0x14 | WEIGHT | [4:0] Ω (4..13), [13:8] R (32..48, at least D+Ω+2) |
| 0x18 | RHO | [4:0] vmin, [12:8] vmax (signed, −6..9), [19:16] tinc (4..11) |
| 0x1C | QUANT | [1:0] fidelity (0 lossless, 1 absolute, 2 relative, 3 both), [15:8] absolute limit, [23:16] relative limit |
| 0x20 | SREP | [2:0] Θ (0..2), [7:4] φ, [11:8] ψ (below 2^Θ) |
| 0x24 | HYB | [3:0] γ0 (1), [7:4] γ* (4), [13:8] Umax (8..16) |
| 0x28 | ACCINIT | initial accumulator value |

All parameters are band-independent. Stream the image on `in_valid`/`in_ready`
(BIL order, or BIP when `INPUT_BIP = 1`). Collect `out_word` until
`out_last`.

## Parameters and sizes

The maxima live in `rtl/ccsds_pkg.sv`:

| constant | value |
|---|---|
| `NX_MAX` × `NY_MAX` × `NZ_MAX` | 680 × 512 × 256 |
| `D` | 16 |
| `P_MAX` | 3 |
| `OMEGA_MAX` | 13 |
| `R_MAX` | 48 |
| `ERR_BITS` | 8 |
| `THETA_MAX` | 2 |
| `GAMMA0_MAX` | 1 |
| `GSTAR_MAX` | 4 |
| `UMAX_MAX` | 16 |
| `OUT_W` | 32 |

`ccsds123_core` has these parameters:

- `INPUT_BIP` (0): the input order, fixed at build time.
- `NX`, `NZ`: memory dimensions, which can be lowered for a smaller image.
- `STEP` (2): divider bits per cycle.

The predictor core computes in 64-bit signed arithmetic, which covers `R = 48`.

## Where this RTL stops short

The original architecture has several options and parts this RTL does not
have:

- **Pipelined predictor schedules.** The original offers pipelined "lossless",
  "main" and "high-performance" schedules. The high-performance one uses a
  separate predictor core and reaches one sample per clock. Only the serial
  baseline schedule is built: about 11 cycles per sample in lossless mode.
- **Lossless-only predictor.** The original also has a lightweight predictor
  without the near-lossless logic. Here the near-lossless logic is always
  present. Lossless operation is a run-time setting (fidelity 0).
- **Other processing orders and memory.** BSQ processing, external memory for
  the predictor state, and the AHB master that reaches it are not built.
- **Other coders and interfaces.** The sample-adaptive and block-adaptive
  coders, the AXI4-Lite configuration interface and band-dependent parameters
  are not built.
- **Bypass options.** The original allows either the predictor or the coder to
  be switched off so the other can be used alone. Here both are always
  present.
- **Compression header.** It is not generated, so the output is not a complete
  CCSDS 123 file.
- **Low-entropy coder.** It is external, as described above.
- **Statistics unit for BIL.** The original uses a FIFO, an elastic buffer and
  dedicated control logic. Here it is a cached-register and memory scheme that
  does the same job with a two-cycle band switch.
- **Second arbiter.** The arbiter that merges the two coder outputs is folded
  into `code_combiner`.

The following details are choices of this design:

- the register map and reset values;
- the handshake;
- the memory arrangement;
- the padding of the last word.

All arithmetic follows the CCSDS 123.0-B-2 equations.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.
The shared testbench files are:

- `tb/ccsds_ref_pkg.sv`: a behavioural model of the standard's prediction and
  of hybrid coding with the stand-in LoEC.
- `tb/img_gen_pkg.sv`: a synthetic image generator (smooth spectra with noise
  and spikes).

The two system testbenches are:

- `tb_ccsds123_core`: all default parameters, BIL input. It runs three
  configurations over AHB-Lite (lossless full prediction; absolute-limit
  near-lossless; relative-limit near-lossless with reduced prediction and
  narrow local sums) plus one rejected configuration. Every output word is
  compared bit for bit with the reference. It counts high- and low-entropy
  samples, rescaling bits, escape codewords, quantized samples, output and
  LoEC back-pressure, band switches, image tails and configuration errors. It
  fails if any of them never occurs.
- `tb_ccsds123_bip`: the same flow with `INPUT_BIP = 1`.
- `tb_ccsds123_workload`: full-width, full-depth slices of a 680 × 512 × 256
  image at the largest settings of the default build. One run is lossless on
  16 rows (2.8 M samples), long enough for ρ(t) to climb from −3 to 1 at
  `tinc = 11`. The other is near-lossless on 2 rows with both 8-bit limits,
  Θ = 2 and R = 40. Both are checked bit for bit; together they take about a
  minute of simulation.

The largest image simulated end to end is 680 × 16 × 256. A whole
680 × 512 × 256 cube needs about a billion cycles.

Simulate any testbench with plain Verilator (5.x), for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ccsds123_core \
    -Irtl -Itb rtl/ccsds_pkg.sv tb/ccsds_ref_pkg.sv tb/img_gen_pkg.sv \
    rtl/*.sv tb/loec_model.sv tb/tb_ccsds123_core.sv -o sim
./obj_dir/sim
```

Files are read in package-first order. Each module, package and testbench has
its own file, named after it.
