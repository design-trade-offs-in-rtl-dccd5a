# Configurable K-Means clustering accelerator

This is synthesizable SystemVerilog for an accelerator that runs one iteration of
Lloyd's K-Means algorithm over a stream of points. It follows the architecture of
the paper *Design Trade-offs in Configurable FPGA Architectures for K-Means
Clustering*. Each iteration has four steps:

1. compute the distance from every point to every centroid;
2. assign the point to the nearest centroid;
3. add the point to that centroid's running sum and count;
4. when all points are in, divide each sum by its count to get the new centroid.

The data set is never stored on chip. Points stream in through FIFOs, so their
number is limited only by a 32-bit counter. Only the centroids and the per-centroid
sums live in on-chip memory.

Six parameters shape the hardware:

| parameter    | default | meaning |
|--------------|---------|---------|
| `N_D`        | 8       | dimensions per point |
| `N_C`        | 16      | number of centroids (clusters) |
| `W`          | 16      | bits per coordinate (unsigned) |
| `P_D`        | 2       | dimension parallelism: coordinates handled per cycle per distance unit |
| `P_C`        | 2       | centroid parallelism: distances computed at once |
| `FIFO_DEPTH` | 32      | words per input FIFO |

`N_D` must be a multiple of `P_D`, and `N_C` a multiple of `P_C`. Below,
`K = N_D/P_D` is the number of chunks per point and `G = N_C/P_C` is the number of
centroid groups.

`N_D = 8`, `N_C = 16` and the FIFO depth of 32 are the values the paper
synthesised. The paper evaluated `W` = 8, 16 and 32, and `P_D`, `P_C` = 1, 2 and 4.
It names none of these as the main configuration, so the defaults here take the
middle values.

## Data path

```
 host ──► P_D input FIFOs ──► point buffer ──► P_C distance units ──► array comparator
                                   │         (P_D dif&square + acc)        │ index
         centroid memory ◄─────────┼───────── block read ─────────────────┘
  (P_C*P_D banks of W bits)        │                                        ▼
           ▲                       └──── point ──────────────► point accumulation
           │ masked block write                                (sums, counters)
     shift register ◄── P_D non-restoring dividers ◄── sums / counts ──┘
```

The distance is the squared Euclidean distance, the sum of `(c_i - p_i)^2`. It is
kept at `2*W + N_D` bits. Every multiplier is written as `*`, so synthesis infers
DSP blocks.

## How the two kinds of parallelism shape the memories

Most of the design follows from one idea. Every memory word holds exactly what the
datapath consumes or produces in one cycle.

**Centroid memory.** This memory has `P_C*P_D` banks, each `W` bits wide and
`G*K` words deep. Bank `(c, d)` at word `g*K + k` holds dimension `k*P_D + d` of
centroid `g*P_C + c`. One read at word `g*K + k` therefore gives distance unit `c`
chunk `k` of centroid `g*P_C + c`. The `P_C` distance units all work on the same
point chunk, which the point buffer supplies. Sweeping the addresses
`0 … G*K-1` in order computes every distance for one point:

- each group of `K` consecutive words completes `P_C` distances;
- the comparator folds each group into its running minimum.

The host does not see the banks. It addresses one coordinate by centroid index and
dimension (`cent_idx`, `cent_dim`), and the memory maps that pair to a bank and a
word. This is the paper's "independent" access. The datapath's wide access is the
"block" access.

**Point accumulation memory.** This memory is `N_C*K` words deep and
`P_D * 2*W` bits wide. Word `j*K + k` holds the sums of dimensions
`k*P_D … k*P_D+P_D-1` for centroid `j`. Adding a point is a read-modify-write of
`K` words through `P_D` adders, pipelined one word per cycle. Alongside the memory
are `N_C` counters.

**Division and the shift register.** The `P_D` dividers produce one chunk of one
centroid per round. A centroid memory word needs the same chunk of `P_C`
consecutive centroids. The division stage therefore runs, for each group `g` and
chunk `k`, `P_C` rounds: one for each centroid `g*P_C + c`. Each round shifts its
`P_D` quotients into the shift register. After the last round, the full word is
written to word `g*K + k`.

A centroid with no points keeps its old value. The lanes of that centroid are left
out of the write mask, and the `empty_cluster` flag pulses.

## Operation and timing

An iteration is a sequence of host steps and hardware phases:

1. **Load centroids.** While idle, the host writes the centroids with `cent_wr`.
2. **Start.** The host pulses `start` with `num_points`.
3. **Clear** (`N_C*K` cycles). The hardware zeroes the sums and counters.
4. **Run.** The host writes coordinate `i` of each point into FIFO `i % P_D`, in
   increasing `i`. `fifo_full` holds off a write; the host keeps `fifo_wr` high
   until the write is taken. The FIFOs are show-ahead FIFOs. All `P_D` FIFOs are
   popped together, one chunk per cycle. An empty FIFO stalls the fetch, and
   `fifo_stall` is high in that cycle.
5. **Divide** (about `N_C*K*(2*W+3)` cycles). New centroids are computed and written.
6. **Done.** `done` pulses, and the host reads the new centroids with `cent_rd`.
   Data arrives on `cent_rdata` one cycle later.

The point buffer has two registers. The next point loads while the current point
is being processed.

Pipeline for one point:

| cycle                 | stage |
|-----------------------|-------|
| `t .. t+G*K-1`        | issue: centroid word `t'`, point chunk `t' mod K` |
| `+1`                  | memory data and point chunk registered |
| `+2`                  | squares registered (`dif_square`) |
| `+3`                  | distance accumulated; comparator fed at the last chunk of each group |
| `+4`                  | comparator result; point handed to the accumulation unit, next point taken |

With the FIFOs kept full, one point occupies the distance units for **`G*K + 4`
cycles**. `assign_valid` and `assign_idx` report each assignment.

The accumulation unit needs `K + 1` cycles per point: `K` word reads, with each
addition written back one cycle later. That always finishes before the next
hand-off.

Run with the paper's performance workload:

- 16384 points, 4 dimensions, 8 centroids, 16-bit data;
- the host writes one coordinate per cycle.

| `P_D` | `P_C` | assignment cycles |
|-------|-------|-------------------|
| 1     | 1     | 589,836 |
| 2     | 1     | 327,687 |
| 4     | 1     | 196,613 |
| 1     | 2     | 327,691 |
| 1     | 4     | 196,619 |

Multiplying the published processing times by the published clock frequencies gives
roughly 600k, 340k, 210k, 320k and 180k cycles. The schedule here is therefore
close to the original design, but not cycle-identical.

## Modules (`rtl/`)

| file | role |
|------|------|
| `kmeans_pkg.sv` | iteration phase enum, address-width helper |
| `kmeans_top.sv` | top level: wiring and iteration sequencer (idle, clear, run, divide) |
| `kmeans_fifo.sv` | input FIFO, one per dimension lane |
| `point_buffer.sv` | two-register point buffer, chunk read port |
| `dist_ctrl.sv` | local control of the distance computation: FIFO pops, centroid addresses, pipeline controls, hand-off |
| `dif_square.sv` | `(c-p)^2`, registered |
| `distance_unit.sv` | `P_D` `dif_square` units plus accumulator |
| `array_comparator.sv` | linear compare-select chain over the running minimum and `P_C` distances |
| `point_accum.sv` | sums memory, `P_D` adders, `N_C` counters, clear pass, read port for division |
| `nr_divider.sv` | radix-2 non-restoring divider, `N+1` cycles |
| `division_unit.sv` | division rounds, dividers, masked centroid write |
| `centroid_shift_reg.sv` | packs `P_C` rounds of quotients into one centroid memory word |
| `centroid_mem.sv` | banked centroid memory, block and independent ports |

## Choices this design makes

The paper gives the block structure, the memory sizes, the number of adders,
dividers and FIFOs, the divider algorithm and the comparator style. It does not give
the following, which were chosen here:

- The iteration sequencing and the host ports. The paper puts a standard bus such as
  AXI in front of the FIFOs and the centroid memory. That bus is not included; its
  signals are plain ports.
- The two-deep point buffer, and the exact pipeline with its `G*K + 4` cycle period.
- Comparator ties go to the lower centroid index.
- Empty clusters keep their centroid.
- Counters are `2*W` bits wide. Quotients are cut to `W` bits, which loses nothing
  because a mean never exceeds the largest coordinate.
- Sums and counters are cleared by a pass at the start of each iteration.
- The round order of the division stage.
- The host addresses the centroid memory by (centroid, dimension).
- Reset is synchronous and active-low.

## Limits

- **Sum overflow.** Sums are `2*W` bits, as in the paper. A cluster whose coordinate
  sum exceeds `2^(2W) - 1` wraps, for example more than 65,537 full-scale points at
  `W = 16`. Nothing detects this.
- **One distance measure.** Only the squared Euclidean distance is built. The paper
  discusses the Manhattan distance only as the choice of earlier designs.
- **Single-cycle critical path.** The comparator chain and the multipliers are not
  pipelined beyond what the table above shows. Large `P_C` or `W = 32` lengthen the
  critical path, as the paper also observes.

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/kmeans_pkg.sv tb/tb_kmeans_top.sv \
          --top-module tb_kmeans_top -o sim
./obj_dir/sim
```

- `tb_kmeans_top` uses the default parameters. It runs three iterations of 200
  points against a reference model written in the testbench, and checks every
  assignment and every new centroid. The host drives the inputs in two ways:
  - random gaps, which make the fetch stall;
  - bursts, which fill the FIFOs.

  The testbench counts FIFO stalls, full FIFOs, empty clusters, comparator ties,
  minima outside the first group and back-to-back points. It fails if any of these
  never happens.
- `tb_kmeans_fig3` runs the 16384-point workload above on five parallelism
  configurations side by side. It checks the centroids and the cycle counts.
- `tb_kmeans_configs` runs small iterations at other widths and parallelism degrees:
  `W` = 8 and 32, `P_C = N_C` (fully parallel comparator), `P_D = N_D` (one chunk
  per point), and a build whose sizes are not powers of two (`N_D = 6`, `N_C = 12`,
  `P_D = P_C = 3`).
- One testbench per module (`tb_<module>.sv`) checks that module on its own,
  including its latency.

To change the configuration, override the top's parameters. The constraints on
`N_D`, `P_D`, `N_C` and `P_C` above must hold.
