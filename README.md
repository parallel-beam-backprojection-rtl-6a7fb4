# Parallel-beam backprojection engine

This is a pipelined hardware engine for the backprojection step of filtered
backprojection (FBP) in parallel-beam CT. It takes a sinogram whose
projections are already filtered and quantized. From it the engine builds the
image

    mu(x, y) = sum over projections k of  P_k( x cos(theta_k) + y sin(theta_k) )

Here `P_k` is linearly interpolated between detector samples.

The design follows a published FPGA architecture for medical imaging. Pixels
are visited in raster order, one pixel per clock. Several projections are
backprojected into the same pixel at once: this is projection parallelism, one
projection per "lane". The partial image lives in two external SRAMs that take
turns as source and destination.

In the default configuration the engine reconstructs a 512 x 512 image from
1024 projections of 1024 samples each. It uses 16 lanes, so the projections
form 64 *projection sets*. A full image takes 16,779,908 clocks, which is
0.26 s at 65 MHz.

## Arithmetic: the spatial address walk

The engine does not compute `x cos + y sin` for each pixel. Instead it walks
along the detector axis with increments stored in three tables per projection.
Each lane holds one entry per set.

| table | meaning | format |
|-------|---------|--------|
| LUT1 | detector coordinate of the point one row above and one column left of pixel (0,0) | 10.5 unsigned (15 bits) |
| LUT2 | change of coordinate per row down, `D sin(theta)`, which is never negative | 1.15 unsigned (16 bits) |
| LUT3 | change per column right, `D cos(theta)` | 2.15 two's complement (17 bits) |

`D` is the pixel pitch measured in detector spacings.

The 25-bit spatial address has a 10-bit integer part and a 15-bit fraction. It
is formed in two stages:

- **Stage 1 (`sag_col`)** computes the address of column 0 of the current row.
  On the first row it uses `LUT1 * 2^10 - LUT2`; on later rows it uses the
  previous row's value minus `LUT2`. This register changes once per row.
- **Stage 2 (`sag_row`)** takes that value at column 0. It then adds LUT3 for
  every pixel: the address of pixel `(r, c)` is `LUT1*2^10 - (r+1)*LUT2 + (c+1)*LUT3`.

The integer part `i` selects samples `P[i]` and `P[i+1]`. The top five
fraction bits are rounded to nearest into a 4-bit interpolation factor `IF`
(`if_round`). A fraction of 31/32 or more would round up to 16/16, so it
saturates at 15/16.

The interpolated contribution is

    (P[i+1] - P[i]) * IF + 16 * P[i]

It uses 9-bit samples and a 15-bit signed result. The pixel values therefore
come out scaled by 16. Forming the difference first keeps any constant offset
of the sample quantization out of the multiplier.

## The seven-stage pipeline

| stage | work | module |
|-------|------|--------|
| 1 | column address, once per row | `sag_col` |
| 2 | pixel address, +LUT3 per pixel | `sag_row` |
| 3 | round the factor; form the even and odd RAM word addresses | `if_round`, `addr_demux` |
| 4 | read the projection buffer; select the set; put `P[i+1]` and `P[i]` in order | `proj_buffer`, `sample_swap` |
| 5 | subtract and multiply (registered) | `lin_interp` |
| 6 | add `16*P[i]`; first levels of the lane adder tree | `lin_interp`, `acc_tree` |
| 7 | remaining tree levels; add the pixel's earlier sum; write it to the destination SRAM | `acc_tree` |

For up to 4 lanes the whole tree and the accumulation adder fit in stage 6,
and stage 7 only holds the register. With 8 or 16 lanes, stage 6 keeps two
tree levels and the rest moves to stage 7.

Every register advances only while `en` is high, so the controller can freeze
the whole pipeline.

### Why the even/odd buffers and the swap

Each pixel needs two neighbouring samples in the same clock. Each projection is
therefore stored as two half-size RAMs: even-indexed samples in one and
odd-indexed samples in the other. For integer address `i` the two words read
are:

- even RAM at `(i+1) >> 1`
- odd RAM at `i >> 1`

These two words are `P[i]` and `P[i+1]` in one order or the other. If `i` is
odd, the even RAM holds `P[i+1]`. The swap stage puts them back in order.

Each lane has two such pairs, 2 x (512 + 512) x 9 bits in all:

- The foreground pair (`fg`) is read by the pipeline.
- The background pair is filled with the next set's projection.

The controller flips `fg` between sets.

## Loading the sinogram (prefetch)

`sino_prefetch` copies the NPAR projections of the next set from the external
input SRAM banks into the background buffers. This runs while the current set
is being processed.

Each bank word holds `PPW` sample pairs. A pair is `{odd, even}` and takes 18
bits. With the defaults (2 banks, 2 pairs per 36-bit word) 4 pairs arrive per
clock. Loading 16 projections of 512 pairs therefore takes 2048 clocks, far
less than the 262,144 clocks a set needs.

The host must store set `s` at word addresses `s*LOADCYC + k` of every bank,
with `LOADCYC = NPAR*(NDET/2)/(NBANK*PPW)`. The data of load cycle `k` is laid
out as follows:

- Lane group `g = k / (NDET/2)`, pair index `j = k mod (NDET/2)`.
- Bank `b`, pair `m` goes to lane `g*NBANK*PPW + b*PPW + m`.

Only set 0 is loaded with the pipeline idle.

## Accumulation SRAMs, the read flow and the stall

Two external banks hold the running image. In set `s` the engine reads the old
sum of each pixel from bank `s mod 2` and writes the new sum to the other bank,
at the same address `r*IMG + c`. In set 0 the old sum is taken as zero, so
neither bank needs clearing. When `done` pulses, the image is in bank
`result_bank`.

The SRAM returns read data `MEM_RD_LAT` clocks after the request.
`accum_reader` does not tie the reads to the pixels. After each set's restart,
it reads addresses 0, 1, 2, ... on its own, on credits:

- A delay line of valid bits tags the returning words.
- A FIFO of `MEM_RD_LAT + 4` words holds them.
- At most that many words are ever read and not yet used.

With these credits the FIFO can never overflow. The reads also stay ahead of a
one-pixel-per-clock pipeline.

The pipeline stalls (`en` low, `stall` high) only when the accumulation stage
holds a pixel and the FIFO is empty. That happens at the start of a set, while
the first reads are still in flight. It is the stall the architecture expects
"every time processing of a new projection starts". With the default latency
of 2 the FIFO is already full when the first pixel arrives, so no stall occurs
at all.

## Control (`bp_ctrl`)

The controller steps through the following states:

1. **IDLE**: on `start`, prefetch set 0.
2. **LOAD0**: wait for the load, swap buffers, start the prefetch of set 1.
3. **SETUP**: one clock, so the LUTs show the set's entries.
4. **RUN**: issue `IMG*IMG` pixels in raster order.
5. **DRAIN**: wait until the pipeline is empty. After the last set, pulse
   `done`.
6. **SWAP**: wait for the next prefetch if it is still running (`pf_wait`).
   Then flip the buffers and bank roles, restart the read flow, start the
   following prefetch, and go back to SETUP.

The pipeline is drained between sets, so buffers, LUT index and bank roles
never change under a pixel in flight. This costs about ten clocks per set.

## Parameters of `bp_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `IMG` | 512 | image side (power of two) |
| `NDET` | 1024 | samples per projection (power of two, 10-bit integer address at 1024) |
| `NPROJ` | 1024 | projections |
| `NPAR` | 16 | lanes (projections per set), must divide `NPROJ` |
| `NBANK` | 2 | input SRAM banks |
| `PPW` | 2 | sample pairs per input word |
| `MEM_RD_LAT` | 2 | read latency of all external SRAMs, in clocks |
| `SIN_AW` | 20 | input SRAM address width |

Other configurations:

- `NPAR=1, NBANK=1, PPW=1` gives the non-parallel engine, with a 512-clock load.
- `NPAR=8` gives the 8-way engine.

Word widths are in `bp_pkg`: 9-bit samples, a 4-bit factor, a 15-bit address
fraction, 15-bit lane contributions and a 25-bit accumulator.

### Host interface

Before `start`, the host does two things:

- It writes every lane's LUT entries: `lut_we`, `lut_lane`, `lut_idx` = set,
  `lut_sel` = table, and `lut_wdata` right-aligned. Entry `s` of lane `l`
  belongs to projection `s*NPAR + l`.
- It fills the input SRAMs in the layout above.

`start` is a one-clock pulse. `busy` stays high until `done` pulses. `stall`
and `pf_wait` are status outputs.

## Files

- `rtl/bp_pkg.sv`: widths, LUT select type, tree-split helpers.
- `rtl/sag_col.sv`, `rtl/sag_row.sv`, `rtl/if_round.sv`, `rtl/addr_demux.sv`,
  `rtl/sample_swap.sv`, `rtl/lin_interp.sv`: the per-lane datapath stages.
- `rtl/sdp_ram.sv`, `rtl/proj_buffer.sv`: on-chip RAMs and the double buffer.
- `rtl/bp_lane.sv`: one lane, with its LUTs and stages 1-6.
- `rtl/acc_tree.sv`: the adder tree and the accumulation adder.
- `rtl/sino_prefetch.sv`, `rtl/accum_reader.sv`, `rtl/bp_ctrl.sv`: data
  movement and control.
- `rtl/bp_top.sv`: the engine.
- `tb/`: one self-checking testbench per module (`tb_<module>.sv`) plus the
  following:
  - `tb_bp_top.sv` runs four reduced configurations end to end. They cover 1,
    4, 8 and 16 lanes, 1 or 2 banks, and latencies 1 to 8. It counts every
    mechanism: stall, prefetch wait, overlapped prefetch, both bank roles,
    factor saturation, both swap directions.
  - `tb_bp_full.sv` runs one complete 512 x 512 reconstruction with the
    default parameters. It takes about 20 s in Verilator.
  - `tb_bp_cases.sv` runs the full-size image with the 8-way engine, using all
    1024 projections. Side by side it runs the non-parallel engine on 64
    projections, since every set costs the same number of clocks. It checks
    pixels and the reconstruction times: 0.516 s at 65 MHz and 3.58 s at
    75 MHz.
  - `bp_env.sv` is the host and memory environment. `zbt_sram_model.sv` and
    `sino_sram_model.sv` are behavioural SRAMs. `tb_bp_pkg.sv` holds the test
    data and the closed-form reference.

Test data comes from an integer hash, so no data files are needed. The
reference computes each pixel from the closed-form address, not from the
hardware's incremental walk. Every testbench ends with a line
`TB_RESULT checks=N failures=M`.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bp_pkg.sv tb/tb_bp_pkg.sv tb/tb_bp_top.sv --top-module tb_bp_top
./obj_dir/Vtb_bp_top
```

Use the same command with `tb_bp_full` or any `tb_<module>`. Verilator prints
width warnings from the testbench reference code. They do not affect the
results.

## How far to trust it, and where it departs from the source architecture

Verified in simulation:

- Every pixel of the reduced configurations.
- 2000 random pixels plus the corners of the full-size run, bit-exact against
  the reference.
- Cycle counts (pixel rate and total time) are checked as well.

No FPGA timing closure has been attempted. The architecture was reported at
65 MHz for 16 lanes.

Choices this design makes where the architecture is silent or differs:

- **Read flow.** The architecture only mentions two registers that detect
  valid data from the source SRAM. Here the accumulation reads run ahead on
  credits into a small FIFO (see above).
- **Drain between sets.** The pipeline empties between sets, costing about 10
  clocks per 262,144. Total time is therefore 0.258 s rather than exactly
  64 x 512 x 512 clocks.
- **First set.** The first set uses a zero old sum, rather than a cleared
  SRAM.
- **Interfaces.** The handshakes (start/busy/done, the LUT write port,
  asynchronous active-low reset) and the input SRAM word layout are this
  design's own.
- **Input SRAM model.** The SRAMs are modelled with a fixed read latency. The
  board's real SRAM controllers, the PCI host link and the host-side filtering
  and LUT computation are not part of the RTL.
- **Rounding.** The interpolation factor is rounded with saturation at 15/16.
  How the architecture handles a fraction that rounds up to 1 is not stated.
- **LUT reads.** The per-lane LUTs are synchronous RAMs read at the set index.
  A SETUP clock per set lets their output settle. In the reference datapath,
  a projection counter addresses the tables directly.
- **Buffer writes.** Both RAMs of a lane's background buffer are written
  together from one word index. The reference datapath draws separate even
  and odd write counters.
- **Adder placement for more than 4 lanes.** Stage 6 keeps two tree levels.
  The remaining levels and the accumulation adder go to stage 7. The source
  only says that the last levels move to stage 7.
- **Addressing convention.** Sample `k` lives in the even RAM at `k/2` or in
  the odd RAM at `(k-1)/2`. The RAM addresses are derived from that rule, and
  samples are numbered from 0.
