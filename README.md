# CANOPY: a systolic DNN accelerator whose MAC rows run at different speeds

Carbon-nanotube transistors (CNFETs) promise much better energy-delay than
silicon, but the number of nanotubes in each transistor varies, and with it
the delay of every circuit. Designing for the slowest circuit throws most of
that advantage away. The variation is strongly correlated along the nanotube
growth direction, though. If every row of 256 MACs is laid out along one
nanotube stripe, all MACs of a row share one delay. After fabrication, each
row's delay can be measured and rounded to one of four classes:

| class | MAC rate | array cycles per MAC |
|-------|----------|----------------------|
| 8f    | full     | 1                    |
| 4f    | 1/2      | 2                    |
| 2f    | 1/4      | 4                    |
| f     | 1/8      | 8                    |

A conventional systolic array cannot use rows of different speeds, because
its rows pass operands to each other in lock step. This RTL uses the
alternative dataflow:

- **Rows never exchange operands.** Each row works on its own input stream,
  either a different image of a batch or a different output pixel. Each MAC
  keeps its output in place (output stationary).
- **Weights are shared.** The weights of a column stream down through every
  row. A slow row takes only every d-th weight of a pass. In later passes it
  is switched off for a few more elements at the start, so that after d
  passes it has used every weight exactly once.
- **Tiles are joined through weight selectors.** Four tiles can form one
  512x512 array for batches. For a single input they can form a 1024x256 or a
  256x1024 array, using only the full-speed rows.

The whole array is clocked at the 8f rate. A slow row is modelled as a
multicycle path: its operands are spaced d cycles apart, and its registers
move data in one cycle.

## Organisation

```
canopy_top
├── canopy_controller          job and round sequencing, configuration tables
│   └── canopy_row_sched  x4   per-tile delay table, row on/off tags, lane addresses
├── canopy_input_buffer        8 MB, 1024 byte lanes (one per MAC row)
├── canopy_weight_buffer       8 MB, 1024 byte lanes (one per MAC column), skewed stream
├── canopy_tile           x4   ROWS x COLS MACs
│   ├── canopy_weight_mux      two-input selector per column (buffer / neighbour tile)
│   ├── canopy_local_buffer    6 KB input staging FIFO (24 words x 256 bytes)
│   └── canopy_mac_row  xROWS  1 x COLS MACs: IFP, weight, product, partial-sum registers
└── canopy_output_buffer       8 MB, 8192 entries of 256 x 32-bit sums
canopy_pkg                     widths, delay-class and configuration enums, op_t, job_t
```

Defaults: `ROWS = COLS = 256`, 4 tiles (262,144 MACs), 8-bit signed operands,
a 16-bit product register and a 32-bit partial sum.

Each MAC has four registers. The one-byte IFP register also carries two tag
bits: `on` (the row's on/off control for this operand) and `first` (start a
new sum). The others are a one-byte weight register, a two-byte product
register and a four-byte partial-sum register. Every cycle:

- the IFP register takes its left neighbour's IFP register, or the row input
  in column 0;
- the weight register takes the weight from above;
- if the IFP register is `on`, the product register gets IFP x weight;
- one cycle later, the product is added into the partial sum, or replaces it
  when `first` is set.

The on/off tag travels along the row with its operand, so every column
applies the same decision to the same element. `canopy_mac_row` holds these
registers as arrays indexed by column. It does not instantiate one module per
MAC, because with one module per MAC the lint tools slow down by a factor of
about 50 and need about 16 GB at full size.

## A round, and how slow rows stay correct

A job runs a number of **rounds**. Each round has two phases.

**Stream phase.** A step counter `step` runs from 0. Every tile `t` has a
skew `s_t`: the step at which its first row meets element 0.

- Column `c` of tile `t` receives kernel element `k = step - s_t - c` from
  the weight buffer, at address `w_base + k`. Outside `0..K-1` it receives
  zero.
- Row `r` is offered element `k = step - s_t - r` of its input lane.

So MAC (r, c) holds input element k and weight element k in the same cycle.
This is the usual systolic skew. The same kernel is streamed again in every
round, because the weights are reused across the inputs held by the rows.

The row schedule decides which offered elements a row takes. For a row of
class d (1, 2, 4 or 8 cycles per MAC) in round j:

```
on    = 0 <= k < K  and  (k mod d) == (j mod d)
first = on and (j mod d) == 0 and k == 0
done  = (j mod d) == d - 1          (the row's output is complete this round)
```

Example: a 4f row (d = 2) with K = 6.

| round | elements taken | what happens                                       |
|-------|----------------|----------------------------------------------------|
| 0     | 0, 2, 4        | new sum starts at element 0                        |
| 1     | 1, 3, 5        | held off for the first element; output complete    |
| 2     | 0, 2, 4        | next window                                        |

An f row (d = 8) is held off for 0..7 elements in rounds 0..7. Each round it
takes every eighth element, and it finishes one output every eight rounds. An
8f row finishes one output every round. The elements a row skips stay in its
input lane and are read in a later round. Each row's lane base address
advances by K whenever it finishes an output, so a row reads its windows one
after another.

The tags are generated at the left edge, so slow rows never take two
operands in consecutive cycles; an assertion in `canopy_row_sched` checks
this. A d-cycle MAC therefore always has d cycles to finish.

**Read-out phase.** When the last element has settled in the far corner, the
controller visits every row of every tile, one per cycle, in tile-major
order. It copies the sums of the rows that finished an output this round to
consecutive entries of the output buffer.

Round length, in cycles:

```
stream  = s_max + ROWS + COLS + K + 3      s_max = 256 (batch), 768 (tall), 0 (wide)
readout = 4 * ROWS
job     = rounds * (stream + readout) + 1  ('done' is high in the last cycle)
```

At the default sizes, a batch round with K = 288 takes 1,059 + 1,024 cycles.
Rounds do not overlap. This keeps the read-out simple but leaves the array
idle for about half the time when K is small.

Pipeline latency from a controller step to MAC column c:

- Input path: input-buffer read (1 cycle), then the local buffer (1 cycle),
  then the IFP register.
- Weight path: weight-buffer read (1 cycle), then a register in the weight
  selector, then the weight register.

Both operands therefore reach MAC (r, c) at step `s_t + r + c + k + 3`. The
product follows one cycle later and the sum one cycle after that.

## Tile configurations

Tiles are numbered 1 2 / 3 4, or index 0..3 in the RTL. Each tile's column
selector takes either the weight buffer or a fixed neighbour's bottom row:
3 takes from 1, 4 from 2, 2 from 3 and 1 from 4, which forms a ring.

| `job.mode`  | logical array | selectors (tiles 1,2,3,4)    | skews (1,2,3,4)  | rows that work     |
|-------------|---------------|------------------------------|------------------|--------------------|
| `CFG_BATCH` | 512 x 512     | buf, buf, tile 1, tile 2     | 0, 0, 256, 256   | all, each at its own class |
| `CFG_TALL`  | 1024 x 256    | buf, tile 3, tile 1, tile 2  | 0, 512, 256, 768 | 8f rows only       |
| `CFG_WIDE`  | 256 x 1024    | all from the buffer          | 0, 0, 0, 0       | 8f rows only       |

The tall configuration suits single inputs of CONV-dominated networks. The
wide one suits FC-dominated networks, where there are few windows and many
kernels. In the single-input configurations, rows that are not 8f get no `on`
tags. They still pass weights down through their weight registers, so a chain
crosses them unchanged. Every row, in any tile, reads its inputs from its own
lane through its own tile's local buffer, so rows of different tiles never
need to share an input skew.

The chain orders are this design's choice. Only the groupings and array sizes
are given.

## Host view

- **Delay table:** `spd_we`, `spd_tile`, `spd_row`, `spd_val` (`speed_e`:
  0 = 8f .. 3 = f). Write these once, after the chip's rows have been
  characterised.
- **Input lanes:** lane `tile*ROWS + row`, 8,192 bytes each. Store the unrolled
  (im2col) windows the row will compute, one after another, K bytes each. In
  batch mode a row of class d consumes `rounds / d` windows.
- **Weight lanes:** lane `tile*COLS + column`. Store the column's unrolled
  kernel at `w_base .. w_base+K-1`. Load the lanes of the tiles that read the
  buffer in the chosen configuration. In `CFG_BATCH`, tile 3 uses tile 1's
  kernels and tile 4 uses tile 2's.
- **Job:** `job_t {mode, k_len, n_rounds, w_base}`, sampled on `start` while
  `busy` is low. `done` pulses at the end. `out_count` is the number of
  output entries written.
- **Results:** entry n of the output buffer holds the 256 32-bit sums of the
  n-th finished row. The order is round, then tile, then row. `ob_rd_data`
  follows `ob_rd_addr` by one cycle. In batch mode, use a round count that is
  a multiple of 8 so that f rows finish; unfinished sums are not written.

There is no activation, pooling or requantisation: outputs are raw 32-bit
sums.

## Verification

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`.

| testbench                 | what it establishes |
|---------------------------|---------------------|
| `tb_canopy_mac`           | one MAC: weight forwarding, tagged accumulation, `first`, 2-cycle product-to-sum timing |
| `tb_canopy_mac_row`       | two strided passes (4f pattern) give the full dot product; last-column latency COLS+2 |
| `tb_canopy_weight_mux`    | buffer path registered once, neighbour path direct |
| `tb_canopy_local_buffer`  | FIFO order, `full`/`empty` against a queue model |
| `tb_canopy_input_buffer`  | independent per-lane reads, zero when not enabled |
| `tb_canopy_weight_buffer` | skewed stream per tile and column, base address, bounds |
| `tb_canopy_output_buffer` | row writes and reads |
| `tb_canopy_row_sched`     | stride/phase rule, every element taken once per group, `first`, `done`, addresses, single-input masking |
| `tb_canopy_tile`          | 8 batch rounds with one row per class, against dot products; chained weights |
| `tb_canopy_controller`    | selects, skews, stream and read-out lengths, write order and addresses per configuration |
| `tb_canopy_top`           | reduced 4 x (4 x 3) instance: batch, tall and wide jobs against a reference, with job cycle counts; counts every mechanism (completions per class, held-off rounds, chained-weight cycles, idle slow rows, each configuration) |
| `tb_canopy_conv_layer`    | the example layer of the CANOPY description (256 maps of 5 x 5 x 32, 64 kernels of 3 x 3 x 32) on four 64 x 64 tiles in batch mode, one map per row, random delay classes, 72 rounds; all 256 x 9 x 64 outputs against a direct convolution |
| `tb_canopy_top_full`      | default sizes: an 8-round batch job with K = 3 and random delay classes; every output (5,000+ rows x 256 columns) and the cycle count checked |

To run one with plain Verilator (the package first):

```
verilator --binary --timing --assert -Irtl rtl/canopy_pkg.sv tb/tb_canopy_top.sv \
          --top-module tb_canopy_top -Mdir obj_top
obj_top/Vtb_canopy_top
```

The small testbenches build and run in seconds; the conv-layer one takes
about 4 minutes to build and 40 seconds to run. The full-size one takes about
4 minutes to build (with `-j 4`) and about 2 minutes to run. It preloads the
buffers through hierarchical references rather than the byte-wide host ports.

## How far to trust it, and where it departs

The following parts come from the CANOPY description:

- four tiles of 256 x 256 MACs;
- the four MAC registers and their sizes;
- one on/off control per row;
- four delay classes, 8f to f, with the array clocked at 8f;
- rows that take every d-th operand and are held off at the start of later
  rounds to realign;
- a two-input weight selector per column (weight buffer or neighbouring
  tile);
- a 6 KB local buffer per tile feeding its rows directly;
- 8 MB input and weight buffers;
- the three tile configurations and their array sizes.

The following are this design's own choices:

- **Third 8 MB buffer:** taken to be the output buffer.
- **Operand format:** signed operands.
- **Tags:** the on/off bit travels with the operand, and a `first` bit
  restarts the sum.
- **Phase rule in later rounds:** the round-by-round hold-off rule for rows
  slower than 4f is extrapolated from the first two rounds described.
- **Buffer organisation:** byte lanes for the buffers, with address
  generation in the weight buffer and the row schedules.
- **Local buffer:** organised as a FIFO.
- **Weight selector:** one select for all columns of a tile, and an alignment
  register on the buffer path.
- **Chain order:** the tile chain orders of the configurations.
- **Read-out:** rows are read one per cycle into the output buffer, and
  rounds do not overlap. The overlap and read-out cost are not optimised, so
  cycle counts here are not a performance model of the original.
- **Host interface:** the job descriptor and host ports.

The following are not implemented:

- the off-chip DRAM interface;
- activation (nonlinear) units;
- separate f/2f/4f/8f clocks. Slow rows are multicycle paths under the 8f
  clock.
- the CNFET process itself and the post-fabrication delay test. Their result
  enters as the delay table.

Layers larger than the buffers (more than 256 output channels per tile, K
above 8,192, more windows than a lane holds) must be split into several jobs
by the host. Results of a split reduction must be added by the host.
