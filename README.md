# InD-parity scrubber for SRAM FPGA configuration frames

A radiation strike on an SRAM FPGA can flip several neighbouring configuration bits at
once (a multiple-bit upset, MBU). Those bits define the mapped circuit, so the damage
stays until the frame is rewritten. This core is a soft scrubber that sits next to the
user design. It walks through the configuration frames again and again and repairs any
frame that has been hit. It needs no change to the FPGA itself.

It splits the job into two cheap halves:

* **Detection only.** Each frame gets a few *interleaved* parity bits (InD parity). They
  say *whether* a frame is damaged, not *where*. Bits far enough apart share a parity bit,
  because one upset cannot reach both. That keeps the code to 12 bits per frame.
* **Erasure recovery.** Frames are grouped into clusters. Each cluster has one redundant
  block: the XOR of all its frames. A damaged frame is treated as *erased*, and it is
  rebuilt as the XOR of the redundant block and the other frames of the cluster. The
  exact bits that flipped never have to be located.

Defaults match a Virtex-6 XC6VLX240T. It has 28,464 configuration frames, and each frame
holds 81 words of 32 bits.

## The frame as a grid, and what InD parity computes

The frame is seen as a grid of 81 rows by 32 columns. Row `r` is frame word `r`. Column
`c` is bit `c` of that word. Cell `(r, c)` adds to three parity bits, and each parity bit
is the XOR of every cell in its group:

| dimension  | parity bits | group of cell (r, c) | bit in `parity[]`            |
|------------|-------------|----------------------|------------------------------|
| vertical   | V = 4       | `c mod V`            | `c mod V`                    |
| horizontal | H = 3       | `r mod H`            | `V + (r mod H)`              |
| diagonal   | D = 5       | `(r + c) mod D`      | `V + H + ((r + c) mod D)`    |

With only the first two rows of this table the code is I2D parity; all three make I3D
parity. Plain 2-D parity, with one bit per row and one per column, would need 81 + 32
bits. Interleaving with distances 4 and 3 needs only 7.

Plain and interleaved 2-D parity both miss any upset that flips an even number of cells
in every row group and in every column group. A 2×2 square is the simplest such case.
The diagonal groups catch it. For example, the cells (1,2), (1,3), (2,2) and (2,3) fall
in diagonal groups 3, 4, 4 and 0. Groups 3 and 0 each get one flip, so the upset is
seen. A second case is two cells 3 rows and 4 columns apart: both I2D sums cancel, but
the two cells lie on different diagonals. `tb/ind_parity_gen_tb.sv` checks both cases,
plus patterns that both codes catch and every single-bit upset.

Parity is linear. An upset pattern therefore goes unnoticed exactly when the parity of
the pattern alone is zero. The testbench relies on this fact.

How much the third dimension buys depends on which upsets are likely. Measured upset
statistics are not part of this design. `tb/ind_coverage_tb.sv` instead counts every
pattern of 2 to 4 flipped cells inside a 4 × 5 window, all 6,175 of them weighted
alike:

| code            | parity bits | patterns detected |
|-----------------|-------------|-------------------|
| I2D 4/3         | 7           | 5,988             |
| I3D 2/2/3       | 7           | 5,855             |
| I2D 6/6         | 12          | 6,115             |
| I3D 4/3/5       | 12          | 6,168             |

Every pattern with an odd number of cells is caught by all four codes. At 12 bits the
default I3D code misses only 7 of the 4-cell patterns. These counts use equal weights
for every pattern, not real upset statistics. With equal weights, I3D does not beat I2D
at 7 bits. The advantage of I3D shows up at 12 bits.

`ind_parity_gen` builds the parity one 32-bit word per clock. For each word it works out
`r mod H` and `r mod D` once. The column offsets are constants, so each of the 32 bits
costs only a few XORs.

## Clusters and the erasure block

The erasure code is the simplest optimal code with one redundant block: a bitwise XOR.
For a cluster of frames F0 … Fk-1:

    R = F0 ^ F1 ^ … ^ Fk-1              (encode)
    Fi = R ^ (XOR of all Fj, j != i)    (decode one erased frame)

`erasure_buffer` holds one frame, 81 × 32 bits, and does both directions:

* **Encode:** load the first frame of the cluster, then XOR in the rest.
* **Decode:** load R, then XOR in every surviving frame.

The cost of recovery scales with the cluster size. The default is 48 frames, which splits
28,464 frames into 593 clusters. Rebuilding a frame then means reading 47 frames. A
partly filled last cluster is handled, and so is a cluster of a single frame, where R is
simply a copy of the frame.

One erasure block repairs **one** damaged frame per cluster. When two frames of a
cluster are damaged, or the stored data for a cluster is damaged, the rebuilt frame
comes out wrong. The scrubber detects this case (next section) and does not write the
wrong frame back.

## Where the redundant data lives

The parity bits and the erasure blocks are kept in two block RAMs inside the core. An
upset in those RAMs must not damage the data of two frames of the same cluster, so both
RAMs interleave their contents by cluster:

* `parity_store` holds one 12-bit entry per frame. Frame `i` of cluster `k` sits at
  address `i * NCLUST + k`. Neighbouring entries therefore always belong to different
  clusters.
* `redundant_store` holds 81 words per cluster. Word `w` of cluster `k` sits at address
  `w * NCLUST + k`. An upset that spans neighbouring words hits the blocks of different
  clusters.

The two RAMs are separate, so one upset can reach either a parity entry or an erasure
block, never both. At the default size they take 341,568 + 1,537,056 bits, about 1.9
Mbit. That is roughly 11% of the device's 461 BRAM36 blocks.

## Scrubbing sequence (`scrub_ctrl`)

The controller handles one frame at a time. It streams each frame as 81 word reads
through the configuration port.

1. **Encode sweep** (`encode_start` pulse). Every frame is read once. Its parity is
   written to `parity_store`. It is also folded into the erasure buffer, and after the
   last frame of a cluster the buffer is copied into `redundant_store`. When the sweep
   ends, `encoded` goes high. Scrubbing waits for `encoded`.
2. **Scrub sweep** (`scrub_en` high). For each frame, the stored parity is fetched while
   the frame streams through the parity generator. The two are then compared. If they
   match, the scrubber moves on to the next frame. At the last frame it pulses
   `pass_done` and starts again from frame 0.
3. **Recovery** (the parities differ). The scrubber pulses `err_detect` and then:
   1. Loads the cluster's erasure block into the buffer.
   2. XORs in every other frame of the cluster.
   3. Streams the rebuilt frame through the parity generator.
   4. Checks the result:
      * If its parity matches the stored entry, the frame is written back over the
        configuration port, and `frame_corrected` pulses.
      * If not, `frame_uncorrectable` pulses and the frame is left alone. This happens
        when two frames of the cluster are damaged, or when the parity entry or the
        erasure block itself is damaged.
4. Dropping `scrub_en` stops the scrubber after the frame in progress. The next start
   resumes at the following frame.

All events carry the frame number on `event_frame`. The counters `detected_cnt`,
`corrected_cnt`, `uncorrectable_cnt` and `pass_cnt` count them.

### Timing

Let L be the read latency of the configuration port. At the default size with L = 1:

| operation                         | cycles                                       | default   |
|-----------------------------------|----------------------------------------------|-----------|
| check one frame                   | 81 + L + 1                                   | 83        |
| full scrub sweep, no errors       | 28464 × (81 + L + 1)                         | 2,362,512 |
| encode sweep                      | 28464 × (81 + L + 1) + 593 × 81              | 2,410,545 |
| recover one frame (added)         | 82 + 47 × (81 + L) + 81 + 1 + 81             | 4,099     |

At 100 MHz, one sweep takes about 24 ms and one recovery about 41 µs.

## Top level and ports (`ind_scrub_top`)

`ind_scrub_top` wires up five blocks:

* `scrub_ctrl`
* `ind_parity_gen`
* `erasure_buffer`
* `parity_store`
* `redundant_store`

The configuration memory belongs to the device, so its port is brought out:

| port                 | dir | width | meaning                                             |
|----------------------|-----|-------|-----------------------------------------------------|
| `cfg_rd`, `cfg_wr`   | out | 1     | read or write one word this cycle (never both)      |
| `cfg_frame`          | out | 15    | frame address                                       |
| `cfg_word`           | out | 7     | word within the frame, 0 … 80                       |
| `cfg_wdata`          | out | 32    | write data                                          |
| `cfg_rvalid`, `cfg_rdata` | in | 1, 32 | read answer                                    |

The port accepts one access per cycle and has no back-pressure. It must answer reads in
order, after a fixed latency of one cycle or more. A real device needs a small adapter
to its configuration access port, for example one that stalls the core's clock enable
while the port is busy. That adapter is not part of this design.

Control and status ports:

* `encode_start`, `scrub_en`
* `busy`, `encoded`
* the event pulses and `event_frame`
* four 32-bit counters

Reset is asynchronous and active low. It clears the control state and the counters, but
not the RAM contents.

## Parameters

| parameter  | default | meaning                                                  |
|------------|---------|----------------------------------------------------------|
| `FRAMES`   | 28464   | configuration frames scrubbed                            |
| `WORDS`    | 81      | words per frame                                          |
| `W`        | 32      | bits per word                                            |
| `V, H, D`  | 4, 3, 5 | vertical, horizontal and diagonal interleaving distances |
| `USE_DIAG` | 1       | 1 = I3D, 0 = I2D                                         |
| `CLUSTER`  | 48      | frames sharing one erasure block                         |

The derived widths (`PW = V+H+D`, `NCLUST`, `FA_W`, `CA_W`, `PA_W`, `WA_W`) are
computed from these. Override them only all together. The shared defaults live in
`rtl/ind_pkg.sv`.

## What follows the scheme and what is this design's own

These parts follow the published scheme:

* detection-only interleaved parity in two or three dimensions
* the 81 × 32-bit frame and the 28,464-frame device
* the example distances 4/3/5
* one XOR-able redundant block per cluster, used to rebuild a frame treated as erased
* the redundant data kept in block RAM and interleaved across clusters

These parts are choices made in this design:

* The grid orientation: rows are words, columns are bit positions.
* The cluster size of 48.
* The exact interleaving address maps.
* Two separate RAMs for parity and erasure blocks.
* An encode sweep in hardware. The scheme computes these data once, off-line, while the
  design is mapped.
* Streaming one word per clock.
* The configuration-port protocol.
* Checking the rebuilt frame's parity before writing it back.
* Scrubbing every frame rather than only the frames the user design actually uses.
* The reset behaviour.

Limitations:

* The design does not model the detection coverage of the parity codes against measured
  upset statistics. Those depend on occurrence probabilities that were not available.
* The redundant data in the two RAMs is not scrubbed itself. A damaged entry is only
  noticed when its frame fails a check, and is then reported as uncorrectable.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/config_mem_model.sv` is a
behavioural configuration memory: every word starts at a known pseudo-random value, and
testbenches flip bits in it to create upsets.

```
verilator --binary --timing --assert -Irtl -Itb rtl/ind_pkg.sv \
    tb/ind_scrub_top_tb.sv --top-module ind_scrub_top_tb -Mdir obj && obj/Vind_scrub_top_tb
```

| testbench               | what it shows                                                                 |
|-------------------------|-------------------------------------------------------------------------------|
| `ind_parity_gen_tb`     | I3D/I2D parity against a cell-by-cell reference; upset patterns that I2D misses; latency |
| `erasure_buffer_tb`     | encode a cluster, then rebuild each frame in turn                             |
| `parity_store_tb`, `redundant_store_tb` | read-back, one-cycle latency, interleaved placement           |
| `scrub_ctrl_tb`         | exact port sequences: sweep order, survivors read in a recovery, write-back, single-frame cluster |
| `ind_scrub_top_tb`      | 22 frames, clusters of 4, port latency 2: stored data vs. reference, sweep cycle counts, corrections in several clusters, double upset, damaged parity entry, stop. Counts each mechanism |
| `ind_coverage_tb`       | the coverage table above, with every generator output checked against a reference |
| `ind_scrub_top_full_tb` | default size (28,464 frames): encode, a 2×2 upset and a single upset, one full sweep, memory restored. About 5 s of simulation |
