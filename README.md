# A SIMD image processor with a multi-access memory

Low-level image operations — erosion, dilation, edge detection, thresholding —
apply the same few instructions to every pixel. Each pixel needs a small
neighbourhood, sometimes a row or column segment, sometimes every k-th pixel.
This design runs such operations on **P·Q processing elements (PEs) in lock
step**. The PEs are fed by a **multi-access memory**: it spreads the image over
NMOD memory modules so that any P·Q pixels of one of three shapes can be read
or written in a single access, with no bank conflicts:

| shape | elements k = 0 .. PQ-1 | typical use |
|---|---|---|
| row `1 x PQ` | (i, j + k·r) | horizontal filters, thresholding |
| column `PQ x 1` | (i + k·r, j) | vertical filters |
| block `P x Q` | (i + (k/Q)·r, j + (k mod Q)·r) | neighbourhood (window) operators |

Here `(i, j)` (row, column) may be any position in the array. The interval
`r` is any constant from 1 to 15 that is not a multiple of NMOD. Element k
always belongs to PE k.

A DMA controller (the sequencer) fetches **instruction pairs** from a local
memory. Each pair holds one memory-reference instruction and one ALU
instruction, and both run in the same slot. It repeats a program at every
block position of an image region. An external processor loads programs and
image data and starts each run. The default build has 2 x 4 = 8 PEs, 11
memory modules and a 576 x 352 array of 8-bit pixels: one CIF source frame and
one CIF result frame.

## How pixels are spread over the modules

Pixel `I(i,j)` lives in

* module `mu(i,j) = (i·Q + j) mod NMOD`, at
* word `alpha(i,j) = (i / P)·S + j / Q`, with `S = ceil(COLS / Q)` (88 by default).

NMOD is a prime larger than P·Q (11 for 8 PEs). Element k of an access lies in
module `(mu(i,j) + d_k·r) mod NMOD`. The distance d_k is `k` for rows and
blocks and `k·Q` for columns. All d_k are distinct and smaller than NMOD, and
r and Q have inverses mod NMOD, so the P·Q elements always land in P·Q
different modules. The address function gives every aligned P x Q tile a word
of its own. The tile's P·Q pixels occupy P·Q consecutive values of i·Q + j, so
they sit in distinct modules at the same word. With P=2, Q=4, NMOD=11 the top
left corner of the array maps like this (module / word):

```
        j=0    1    2    3    4    5    6    7
i=0    0/0  1/0  2/0  3/0  4/1  5/1  6/1  7/1
i=1    4/0  5/0  6/0  7/0  8/1  9/1 10/1  0/1
i=2    8/88 9/88 10/88 0/88 1/89 2/89 3/89 4/89
i=3    1/88 2/88 3/88 4/88 5/89 6/89 7/89 8/89
```

Three of the eleven modules are idle in every access. That is the price of a
prime module count, which makes every interval conflict-free.

## The memory pipeline (`mams`)

The controller is three modules side by side, each three stages deep. They
match the three columns of the original block diagram:

* **Module selection** (`mams_select`). Stage 1 computes `mu(i,j)` and reads a
  ROM, indexed by (shape, r), that holds the set of modules used, relative to
  `mu`. Stage 2 rotates that mask by `mu`. Stage 3 decodes it into one enable
  and one write enable per module.
* **Address calculation and routing** (`mams_addr`). Stage 1 computes the base
  word `alpha(i,j)` and reads a ROM indexed by (shape, i mod P, j mod Q, r).
  The ROM holds `alpha(element) - alpha(i,j)` for every element, stored in
  *relative module order*: entry u belongs to the element in module
  `(mu + u) mod NMOD`. Because the differences are pre-arranged, stage 2 only
  needs NMOD adders. Stage 3 rotates the NMOD addresses by `mu`, and entry x
  goes to module x. The difference depends on (i, j) only through i mod P and
  j mod Q. For a row access, for example, it is `((j mod Q) + k·r) / Q`.
* **Data routing** (`mams_route`). On a write, the WRITE router places PE k's
  datum at relative position `(d_k·r) mod NMOD`. Two registers follow, then a
  barrel shifter rotates by `mu`. A read runs the same path backwards. The
  shifter rotates the module outputs back by `mu` and a register follows. The
  READ router then returns relative position `(d_k·r) mod NMOD` to PE k.

Every ROM and routing table is computed at elaboration from the formulas
above. No data files are involved.

Timing for a request presented in cycle c:

| cycle | what happens |
|---|---|
| c | ROM look-ups, `mu`, base address, WRITE routing |
| c+1 | NMOD adders, mask rotation |
| c+2 | rotation into module order; modules sample enable/address/data at the end (a write is done) |
| c+3 | registered module outputs rotated back, registered |
| c+4 | READ router output on `rd_data`, `rd_valid` high |

A request can enter every cycle. A read issued right after a write to the same
pixels returns the new data. Assertions flag these errors: an interval that is
a multiple of NMOD, an undefined shape, and an access that leaves the array.

## Instruction pairs and slot timing

A 32-bit instruction word (`pps_pkg::instr_t`):

| field | bits | meaning |
|---|---|---|
| mop | 2 | `NOP`, `READ`, `WRITE` |
| acc | 2 | 0 row, 1 block, 2 column |
| intv | 4 | interval r |
| dy, dx | 4+4 signed | element offset from the current block base |
| gop | 4 | ALU instruction |
| imm | 12 | immediate |

ALU instructions act on the accumulator AC, the scratch register R1 and the
read register RD:

* `VALTRAN`: AC ← imm
* `COND1`: AC ← min(AC, RD)
* `COND2`: AC ← max(AC, RD)
* `ADD`, `SUB`: AC ± RD
* `ABS`: AC ← |AC|
* `MOVR`: R1 ← AC
* `ADDR`: AC ← AC + R1
* `THRES`: AC ← (AC ≥ imm) ? 255 : 0

A WRITE stores AC clipped to 0..255.

Each pair takes one slot:

```
cycle 0   fetch the pair from the DMA controller's register pool
cycle 1   broadcast the ALU instruction (executes at the end of the cycle);
          latch AC for a WRITE; register the element address (base + dy,dx)
cycle 2   memory request
cycle 6   read data reach RD in every PE (READ only)
slot end  8 cycles for READ, 6 for WRITE, 2 for an ALU-only pair
```

The slot lengths 8, 6 and 2 are the clock counts of the original design at
33 MHz. The pipeline here needs 7 and 5 cycles, and the slots pad to 8 and 6.
Within a pair, the ALU instruction sees RD from the *previous* READ, and a
WRITE stores AC from *before* the pair's ALU instruction. A neighbourhood
operator is therefore software-pipelined. This is 3x3 erosion of a 2 x 4
block, with the result written to the window centre:

```
READ  block (0,0)   VALTRAN 256
READ  block (0,1)   COND1          <- consumes (0,0)
...                                   (nine reads in all)
READ  block (2,2)   COND1
NOP                 COND1          <- consumes (2,2)
WRITE block (1,1)   NOP
```

That is 9·8 + 2 + 6 = 80 cycles per block: 2.4 µs at 30 ns, and 3168 blocks
for a QCIF frame, 7.60 ms. A 5x5 window takes 25·8 + 2 + 6 = 208 cycles.
Dilation uses `VALTRAN 0` and `COND2`.

## DMA controller and the external processor

`dma_ctrl` holds a register set (`pps_pkg::dma_cfg_t`):

* `prog_base` and `prog_len`: where the program is and how many pairs it has.
* A raster of block base positions: `row0..row1` in steps of `step_i`, and
  `col0..col1` in steps of `step_j` (columns run fastest).
* A write offset `(wr_di, wr_dj)` added to every WRITE, so that results go to
  a separate frame and never overwrite pixels that are still to be read.

After `start`, the controller first copies the program from local memory
into its register pool. The pool holds up to `POOL` = 32 pairs, and the copy
takes one cycle per pair plus one. From then on it issues from the pool: slot
cycle 0 reads the pool, not the local memory. The program restarts at the
next position with no gap cycles. A run of N positions therefore takes
exactly `prog_len + 1 + N × (sum of slot lengths)` cycles. `busy` is high for
the whole run, and `done` pulses at its end.

The processor itself is not part of this RTL. `pps_top` brings out its three
connections:

* a read/write port of the local memory;
* the DMA register set with `pu_start`;
* a direct port into the multi-access memory, used to move image data in and
  out. It has the same shapes and timing as `mams`. While `busy` is high,
  `pu_req_ready` is low and requests are ignored, because the DMA controller
  owns the memory during a run.

## Measured against the original figures

| workload | here | original estimate |
|---|---|---|
| 3x3 erosion/dilation, QCIF | 80 cycles/block × 3168 × 30 ns = 7.6032 ms | 7.6032 ms |
| 5x5, QCIF | 208 × 3168 × 30 ns = 19.768 ms | 19.768 ms |
| 3x3, CIF | 80 × 12672 × 30 ns = 30.413 ms | 30.413 ms |
| 5x5, CIF | 208 × 12672 × 30 ns = 79.073 ms | 79.073 ms |
| edge detection | Sobel program of 122 cycles/block (ours) | about 184 cycles/block; program not published |
| face features, 48x48 region | 3x3 mesh sums: 80 cycles × 32 positions; 6x6: 40 × 8; comparison with a stored map: 26 × 32 (8 PEs) | run on 144 PEs; only a speed-up of 61.9 is given |

The testbenches process only interior block positions, whose window lies
inside the frame. They check the cycle count per position exactly.

## What is the original design and what is not

Taken from the original:

* the system structure: a processor, local memory, DMA controller, SIMD PEs
  and a multi-access memory;
* the three access shapes with interval;
* the module and address assignment functions, and the pre-arranged address
  differences with NMOD adders and rotation;
* the WRITE/READ routing rule;
* the three-stage controller;
* instruction pairs executed together;
* the VALTRAN/COND1/COND2 erosion and dilation programs;
* the DMA controller's register pool;
* the 8/6/2 slot lengths.

Choices made here, where the original is silent:

* **Sizes.** There are 8 PEs because the published timing of 2.4 µs per
  3x3 block and 7.6 ms per QCIF frame implies 8 pixels per program run. The
  split into P=2, Q=4 is a choice. NMOD=11 is the smallest prime above 8.
  The 576 x 352 array, 8-bit pixels, 16-bit AC and intervals up to 15 are
  choices.
* **ROM organisation.** The ROM contents, their indexing, and the exact stage
  boundaries and read latency are choices.
* **Instruction set.** The encoding, the register set, and the six ALU
  instructions beyond the named ones (ADD, SUB, ABS, MOVR, ADDR, THRES) are
  choices. The original has 16 general instructions including I/O
  instructions, but names only a few. The I/O instructions are not modelled.
* **Sequencer.** The pool size, the raster loop, the write offset, the
  processor's direct memory port and its lock-out while busy are choices.
* **Out-of-range accesses.** The behaviour outside the array is undefined.
  It is excluded by assertion, and module writes beyond the capacity are
  dropped.

Not built:

* the embedded processor and the host/PCI side;
* the two-ALU PE and 1024 x 764 frame buffer of the Phong-shading variant;
* the three application experiments as such. Their sizes are covered
  instead. The memory system is simulated on its own with 144 PEs (P=Q=12,
  149 modules), 16 PEs (P=Q=4, 17 modules) and 4 PEs (P=Q=2, 5 modules), at
  reduced array sizes. The whole system runs a 3x3 morphological opening with
  16 and with 4 PEs. Of the face-recognition experiment, the mesh features
  f2 and f3 and the comparison with a stored feature run on 8 PEs. The
  shading arithmetic (multiply, divide, square root) is not built.

## Files

`rtl/`:

| file | contents |
|---|---|
| `pps_pkg.sv` | default sizes, enums, instruction and register-set structs, access-pattern functions |
| `pps_top.sv` | the system |
| `mams.sv` | multi-access memory (controller + modules) |
| `mams_select.sv`, `mams_addr.sv`, `mams_route.sv` | the three controller modules |
| `mams_mem.sv` | one memory module (synchronous RAM) |
| `pe.sv` | processing element |
| `dma_ctrl.sv` | sequencer |
| `local_mem.sv` | dual-port program memory |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_pps_top.sv`: QCIF, at the default size, end to end. It runs 3x3
  erosion, 3x3 dilation, 5x5 erosion, Sobel and row-wise binarisation. It
  also runs column and row reads with intervals 2, 3 and 12, and a refused
  processor request. It counts each of these mechanisms.
* `tb_pps_cif.sv`: CIF 3x3/5x5 erosion and dilation.
* `tb_facial_features.sv`: 3x3 and 6x6 mesh sums of a 48x48 binary region,
  and their comparison with a stored map. It uses row accesses with
  intervals 3 and 6 through the whole system.
* `tb_pps_scaled.sv`: the whole system with 4 PEs (P=Q=2, 5 modules) and
  with 16 PEs (P=Q=4, 17 modules), running a 3x3 opening with block access.
* `tb_mams_scaled.sv`: the memory system under random access streams with
  16 PEs (17 modules), 4 PEs (5), 12 PEs as 3x4 (13), and 144 PEs (149).

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/pps_pkg.sv tb/tb_pps_top.sv \
          --top-module tb_pps_top -o tb_pps_top
./obj_dir/tb_pps_top
```

Use the same command for any other testbench. Each one finishes in seconds to
tens of seconds. Verilator finds the modules through `-Irtl`, so the package
is the only file that must be named.

To change the size, override the parameters of `pps_top`: `P`, `Q`, `NMOD`,
`ROWS`, `COLS`, `DW`, `RW`, `LM_DEPTH` and `POOL`, plus the slot lengths
`T_READ`, `T_WRITE` and `T_GEN`. Keep NMOD a prime above P·Q. P and Q need not be powers of two.
The slots must be at least 7, 5 and 2 cycles long. The module capacity follows
as `ceil(COLS/Q) · ceil(ROWS/P)` words.
