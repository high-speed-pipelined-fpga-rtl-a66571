# Pipelined modulus-based steganography core

This core hides secret bits in the pixels of a grey-scale cover image, and gets
them back out again. Each pixel changes by at most a few grey levels. It combines
two classic modulus-based schemes:

* **EMD** (exploiting modification direction). A group of *m* pixels carries one
  digit in base 2m+1. To set that digit, at most one pixel moves by ±1.
* **DE** (diamond encoding). A pixel pair carries one digit in base 2k²+2k+1. To
  set that digit, the pair moves by a vector (a,b) with |a|+|b| ≤ k.

Each secret block has L = L1 + L2 bits and is split in two segments:

* **Segment L1** goes through the **x-y lookup table**. This gives two EMD digits:
  S0 (the column) and S1 (the row). They are hidden in group Q0 (MX pixels) and
  group Q1 (MY pixels).
* **Segment L2** goes through the **z lookup table**. This gives one DE digit, S2.
  It is hidden in the pixel pair Q2 = (p,q).

No base conversion is done in hardware. The tables replace it, so the datapath has
no dividers. The tables are also a shared secret: a receiver needs the same table
contents to read the data back.

The default configuration is MX = MY = MZ = 2, L1 = 4, L2 = 3. It hides 7 bits in
every 6 pixels (1.17 bits per pixel). At most two pixels change by 1 each: one in
Q0 and one in Q1. The pair Q2 moves by at most 2 in total.

## The arithmetic

Throughout, pixel g_1 of a group is the first pixel of that group.

**EMD, group of m pixels** (`emd_wsm`, `emd_modify`)

* The group's value is F = (1·g_1 + 2·g_2 + … + m·g_m) mod (2m+1).
* To embed digit S, compute s = (S − F) mod (2m+1), then:
  * s = 0: nothing changes.
  * s ≤ m: increment g_s.
  * s > m: decrement g_(2m+1−s).
* Extraction is F of the stego group.

**DE, pair (p,q) with parameter k** (`de_fmod`, `de_modify`)

* The pair's value is F = ((2k+1)·p + q) mod (2k²+2k+1).
* The distance is d = (S − F) mod (2k²+2k+1).
* The "diamond" is the set of offsets {(a,b) : |a|+|b| ≤ k}. It has exactly
  2k²+2k+1 members, and each has a different value ((2k+1)a + b) mod (2k²+2k+1).
  So exactly one offset has the value d.
* `de_modify` compares d against the constant value of each diamond position. This
  elaborates into a small constant decoder. The output is (p+a, q+b).

**Pixel range.** A change must never wrap around 0 or 255. So before the weighted
sums are taken, `embed_pipe` limits the cover pixels:

* EMD pixels are limited to [1, 254].
* The DE pair is limited to [MZ, 255−MZ].

A pixel at the extremes can therefore move by up to 2 (EMD) or 2·MZ (DE).
Extraction needs no change for this.

## The lookup tables

**x-y table** (`xy_lut`)

* A grid of (2MX+1) × (2MY+1) cells. Cell (x,y) has index y·(2MX+1)+x.
* Each cell holds an L1-bit value and a valid bit.
* Default layout: cell i holds i for the first 2^L1 cells. For the defaults this is
  a 5 × 5 grid with 0..15 filled row by row. Cells 16..24 are unused.

**z table** (`z_lut`)

* One cell per digit 0 … 2MZ²+2MZ of the DE system, that is, per position of the
  diamond distance pattern.
* Default layout: digit d holds value d for d < 2^L2.

Both tables have the same three ports:

* **Search port**, used for embedding. All cells are compared with the segment at
  once. The matching cell's coordinates, or its digit, are the secret digits.
* **Read port**, used for extraction. It returns the cell at the recovered digits.
* **Write port**, used to build the table. It takes one cell per cycle. The core
  accepts table writes only while it is idle.

Reset loads the default layouts. Any one-to-one placement of the segment values
works, and a placement agreed by both ends acts as a key.

If a value is missing from a table, or a recovered digit points at an invalid
cell, `out_miss` is raised. Where a value appears twice, the lowest cell index
wins.

## Dataflow and pipeline

```
wr_data ─► input FIFO ─► shift register ─► group reg ─┬─► embed: table search │R1│ weighted sums │R2│ modify │out│
 (bytes)   (2048 x 8)    (record by Mode)             └─► extract: weighted sums │R│ table read │out│
```

**Input FIFO** (`sync_fifo`). It holds 2048 bytes and has a registered read port.
The host writes bytes while `wr_ready` is high.

**Controller** (`stego_ctrl`). It is a three-state machine with no program store:

* **IDLE.** The host fills the FIFO, and `busy_irq` is low. When the FIFO becomes
  full, the controller latches `mode` and moves to RUN.
* **RUN.** `busy_irq` is raised. This is the interrupt that tells the host to stop
  reading memory. The FIFO is read one byte per clock until it is empty.
* **DRAIN.** The controller waits until no data is left in flight, then returns to
  IDLE.

**Shift register** (`group_shift_reg`). It assembles one record at a time, in the
format the latched mode selects:

| mode | record |
|------|--------|
| embed (0) | ⌈L/8⌉ secret bytes, little-endian, low L bits used; then the MX+MY+2 cover pixels |
| extract (1) | the MX+MY+2 stego pixels |

Within the secret block, the low L1 bits are segment L1 and the next L2 bits are
segment L2. Among the pixels, Q0 comes first, then Q1, then p, then q.

A record may be split across two FIFO blocks. A partial record is kept until the
next block arrives. If the next block uses the other mode, the partial record is
dropped.

**Embedding pipeline** (`embed_pipe`)

1. Table search and pixel range limiting, then register R1.
2. The three weighted-sum modulo functions, then register R2.
3. EMD and DE modification, then the output register.

R1 and R2 are the two sub-pipelining stages of the architecture: one after the
tables and one after the weighted sums.

**Recovery pipeline** (`extract_pipe`)

1. The three weighted-sum modulo functions, then a register.
2. Table reads, then the output register.

Both pipelines accept one group per cycle.

**Results** leave on `out_valid` with `out_mode`. For an embedded group they are
`out_pixels`; for a recovered block they are `out_secret = {L2 segment, L1 segment}`.
There is no back-pressure on the output.

### Timing

* **Throughput.** While a block runs, the core takes one byte per clock. That is 8
  bits per clock, or 2.32 Gbit/s at 290 MHz.
* **Group rate.** An embed record is 7 bytes, so the default configuration delivers
  one stego group every 7 cycles. Extract records are 6 bytes.
* **Latency.** The first stego group of a block is valid **13 cycles** after the
  cycle in which the host writes the byte that fills the FIFO. The 13 cycles are:
  * 1 cycle for the full flag to register;
  * 1 cycle to start reading;
  * 7 bytes of the first record, arriving through the registered FIFO read;
  * the group register;
  * R1 and R2;
  * the output register.
* **Block overhead.** After a block, the core returns to IDLE once the last group
  has left the pipeline. That takes about 5 cycles after the last byte is read.

### Using it from a host

1. Optionally, while idle, write the two tables through `tbl_we` / `tbl_sel` /
   `tbl_addr` / `tbl_valid` / `tbl_value`.
2. Set `mode` and write bytes while `wr_ready` is high.
3. When the FIFO fills, `busy_irq` rises and the results stream out.
4. When `busy_irq` falls, write the next block.

The last block of an image has to be padded to a full FIFO. Results from the
padding should be discarded.

## Measured behaviour on whole images

Two image testbenches run the core on a synthetic 512 × 512 image. The image is a
ramp with noise and two saturated bands. Each run embeds at full payload, then
feeds the stego image back and recovers the data. Both share the harness
`tb/image_run.sv`.

| testbench | configuration | rate | recovery | PSNR | cycles busy / total |
|-----------|---------------|------|----------|------|---------------------|
| `tb_image_default` | MX=MY=MZ=2, L1=4, L2=3 | 1.167 bpp | bit-exact | 49.3 dB | 307 628 / 611 561 |
| `tb_image_l5` | MX=MY=3, MZ=4, L1=L2=5 | 1.25 bpp | bit-exact | 46.7 dB | 328 128 / 653 918 |

**PSNR.** For random data the expected mean squared error of the default
configuration is (2·4/5 + 28/13)/6 ≈ 0.63, which is about 50 dB. The measured
value is close to that. Figures of about 60 dB at 2.49 bpp have been published for
this scheme. They cannot be reached by the encoding described above, which carries
7 bits per 6 pixels, and they are not reproduced here.

**Cycles.** The core reads one byte per clock while it is busy. With 290 MHz, the
busy cycles alone give about 940 frames/s. The host cannot write while the core is
busy, so refilling the FIFO doubles the total time per frame.

## Where this RTL departs from, or adds to, the scheme

* **Host interface.** The core is meant to sit behind a processor bus (AXI4 on a
  Zynq-class device). Here it has plain byte-stream, table-write and result ports.
  No bus wrapper, processor, DDR3 or DMA is included.
* **Own choices.** The following are choices of this design:
  * the record format and the bit and pixel order;
  * the FIFO depth;
  * the DRAIN state;
  * mode latching, and dropping a partial record when the mode changes;
  * table write gating;
  * the miss flag;
  * pixel range limiting;
  * the output register.
* **Fixed table meaning.** Each cell of the z table stands for one DE digit, that
  is, one position of the distance pattern. The embedding step derives the diamond
  vector from the digit. The x-y table holds values at (x,y) coordinates, as in the
  scheme's Figure-4-style grid.
* **13-cycle latency.** The reference point of the 13 cycles is an interpretation:
  from the write that fills the FIFO to the first stego group. The register count
  was chosen so that this holds.
* **Retiming.** The register balancing of the original implementation is a
  synthesis option. It is not written into the RTL.
* **Parallel cores.** Several cores could run in parallel to raise the frame rate.
  That is a system-level option and is not part of this RTL.
* **Other configurations.** The scheme was also evaluated with L1 = L2 = 5, without
  its m values given. `tb_image_l5` uses MX = MY = 3, MZ = 4 (49 x-y cells, 41 DE
  digits).

## Files

| file | contents |
|------|----------|
| `rtl/stego_pkg.sv` | pixel type, mode enum, radix helpers, default parameters |
| `rtl/stego_core.sv` | top level |
| `rtl/stego_ctrl.sv` | controller |
| `rtl/sync_fifo.sv` | input FIFO |
| `rtl/group_shift_reg.sv` | record assembly |
| `rtl/xy_lut.sv`, `rtl/z_lut.sv` | lookup tables |
| `rtl/embed_pipe.sv`, `rtl/extract_pipe.sv` | datapaths |
| `rtl/emd_wsm.sv`, `rtl/emd_modify.sv`, `rtl/de_fmod.sv`, `rtl/de_modify.sv` | arithmetic |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/image_run.sv`, `tb/tb_image_default.sv`, `tb/tb_image_l5.sv` | whole-image workloads |

## Verification

Every module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **Arithmetic units.** They are checked against plain integer arithmetic, with
  random and corner inputs, for the default m and k and for a larger one (m = 3,
  k = 4).
* **Embedding checks.** The embedding tests do not compare against stored
  expected pixels. Instead they check two properties:
  * the stego group decodes to the intended digits;
  * every pixel stays within the allowed distance of its range-limited cover
    value.
* **End to end.** `tb_stego_core` runs the top level at its default parameters:
  1. Embed 2048 random blocks. Some cover pixels are at 0 or 255, and the records
     straddle FIFO blocks.
  2. Recover all 2048 blocks, bit-exact.
  3. Rebuild both tables with a permutation.
  4. Embed a block that ends in a partial record, then switch mode.
  5. Recover those blocks, then random groups whose digits hit invalid cells.

  It also checks the 13-cycle latency. It counts each of these events and requires
  every one to occur at least once:
  * busy interrupts;
  * refused writes;
  * straddling records;
  * mode switches;
  * dropped partial records;
  * table writes;
  * range-limited pixels;
  * table misses.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/stego_pkg.sv tb/tb_stego_core.sv \
          --top-module tb_stego_core -o sim && ./obj_dir/sim
```

Replace `tb_stego_core` with any other `tb_<module>` to run that testbench. The
full end-to-end run takes well under a second.

To change the configuration, override MX, MY, MZ, L1, L2 and FIFO_DEPTH on
`stego_core`. Keep (2MX+1)(2MY+1) ≥ 2^L1 and 2MZ²+2MZ+1 ≥ 2^L2 if the default
table layouts are to hold every segment value. The end-to-end testbench is written
for the default configuration.
