# Two-way parallel histogram computation with a dual-ported memory

Counting a histogram means one read-modify-write per pixel: read the bin that the pixel value
selects, add one, write it back. Doing two pixels at once with one table breaks as soon as both
pixels have the same value (a *memory collision*): both read the same old count and one of the two
increments is lost. Collisions are the normal case in images, because neighbouring pixels tend to
share values.

This design avoids collisions by giving each of the two pixels its own table. Pixels at even image
addresses are counted in one histogram array, pixels at odd addresses in a second. The two arrays
sit in the two halves of one dual-ported memory, so the two ports never touch the same element.
Each port does its own read-modify-write at twice the system clock. When every pixel has been
counted, a merge pass adds the two arrays bin by bin.

Per image this takes NPIX/2 cycles for the counting and 2^BPP cycles for the merge, against NPIX
cycles for one pixel per cycle. For images much larger than the number of bins, that is close to
twice as fast.

Two front ends feed the same histogram engine:

* **`phc`**: the image is held in an on-chip dual-ported image memory. Two counters read one even
  and one odd pixel per cycle from it.
* **`phc_stream`**: pixel pairs arrive on a valid/ready stream and are not stored. Only the
  histogram memory is on chip, so the image size is no longer bounded by on-chip memory.

`phc_top` instantiates both side by side.

## The read-modify-write in one system cycle

This is the part that needs the most care. The histogram memory (`hist_mem`) is clocked by
`clk2x`, which runs at twice `clk`. The rising edges of `clk2x` are aligned with those of `clk`.
A toggle flip-flop on `clk2x` (`rw_phase`) produces `rw`. `rw` is 0 in the first half of every
`clk` cycle and 1 in the second half. The memory samples `rw` on its edges:

```
clk      ‾‾‾‾‾‾‾‾‾\_________/‾‾‾‾‾‾‾‾‾\___
clk2x    ‾‾‾‾\____/‾‾‾‾\____/‾‾‾‾\____/‾‾
         E0        E1        E0'
rw       0 (read half)  1 (write half)  0 ...
```

* At **E0** a new system cycle starts. The clk-domain registers update: the new pixel pair and the
  new operation appear. `rw` becomes 0.
* At **E1**, the `clk2x` edge in the middle of the cycle, the memory sees `rw = 0`. Each port reads
  the element its address selects. For port A that is the even pixel's bin; for port B it is
  2^BPP plus the odd pixel's bin.
* In the second half, `hist_datapath` forms `din = dout + 1` combinationally.
* At **E0'**, the edge that ends the cycle, the memory sees `rw = 1`. Each port writes `din`. The
  address is still the same, because the clk-domain registers only change after this edge.

Because the write ends the cycle in which the read happened, a pixel equal to the previous one on
the same port reads the updated count. That needs no forwarding. Because the two ports work in
disjoint halves, two equal pixels in one pair do not collide either. The assertion in `hist_mem`
checks that two writes never hit the same element.

This only works if the memory's address is stable across the whole cycle. So every input of the
engine must come straight from a `clk` register. In `phc` it comes from the image memory's output
register; `phc_stream` adds an input register for this. Reset must also be synchronous to `clk`:
the engine re-registers it on `clk` before using it for `rw_phase`, so `rw` always starts in the
read half.

## One image, step by step

`phc_ctrl` runs three passes. Each pass does one histogram-memory operation per `clk` cycle
(`phc_pkg::hist_op_e`):

| pass | cycles | port A (even array, 0 .. 2^BPP-1) | port B (odd array, 2^BPP .. 2·2^BPP-1) |
|---|---|---|---|
| clear | 2^BPP | write 0 at `idx` | write 0 at 2^BPP + `idx` |
| first step (`stage` = 0) | one per pixel pair | `pix_a` bin += 1 | `pix_b` bin += 1 |
| merge (`stage` = 1) | 2^BPP | write even[`idx`] + odd[`idx`] at `idx` | read odd[`idx`], no write |

After the merge, the finished histogram is in the even array, which is the first 2^BPP elements.
Each sum is also delivered on `res_valid` / `res_bin` / `res_count` in bin order, one cycle after
it is formed. `done` pulses together with the last result. In the idle cycles of the stream's first
step (`s_valid` low), the memory is neither read nor written.

Worked example, with BPP = 2 and a 4 × 4 image whose pixels at addresses 0 .. 15 are
`1 1 2 3 1 3 0 2 2 1 1 0 0 1 3 2`:

* after the first step, the even array holds `2 3 2 1` and the odd array `1 3 2 2`;
* after the merge, the result is `3 6 4 3`.

`tb_phc` checks exactly this, including both intermediate arrays.

### Cycle counts

For `phc`, counted from `start`:

* clear: 2^BPP cycles;
* first step: NPIX/2 + 1 cycles, the extra cycle being the image memory's read latency;
* merge: 2^BPP cycles.

So `busy` is high for 2·2^BPP + NPIX/2 + 1 cycles. The usual count for this method is
NPIX/2 + 2^BPP, which leaves out the clear pass and the fill cycle. For 256 × 256 at 8 bpp that is
33024 cycles; this RTL takes 33025 cycles plus 256 for clearing.

For `phc_stream` the first step takes one cycle per accepted pair, plus one cycle for the input
register.

## Front ends

**`phc`** (memory-based).

* `image_mem` has depth NPIX and width BPP. Its ports 1A and 1B both run on `clk`, with
  `rw` = 0 to read and 1 to write, and a one-cycle read latency.
* While idle, it is loaded one pixel pair per cycle: `ld_we` writes `ld_pix_a` at 2·`ld_pair` and
  `ld_pix_b` at 2·`ld_pair`+1. `ld_we` is ignored while `busy`.
* `pixel_addr_gen` is a +2 counter for the even address plus an adder for the odd address. It
  issues one pair per cycle during the first step and flags the last pair.

**`phc_stream`** (stream-based).

* A pair is taken on `s_valid && s_ready`.
* `s_ready` is high only during the first step. It drops after the IMG_N·IMG_N/2-th pair of the
  frame and stays low during the clear pass.
* A pair counter ends the first step, so frames have a fixed size set by a parameter.

Both front ends require an even pixel count; an assertion checks this.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `BPP` | 8 | bits per pixel; 2^BPP bins, histogram memory 2·2^BPP elements |
| `COUNT_W` | 32 | bits per histogram element |
| `IMG_N` (`phc`, `phc_top`) | 512 | image side; the image memory holds IMG_N² pixels |
| `STREAM_N` (`phc_top`), `IMG_N` (`phc_stream`) | 1024 | side of a streamed frame |

The image size is fixed when the design is built, like the width and depth of its memories. A
different image size means a different `IMG_N`.

The defaults match the largest evaluated configurations: 8 bpp, 512 × 512 images held on chip
(2 Mbit of image memory plus 16 Kbit of histogram memory), and 1024 × 1024 streamed frames. The
stream version was also evaluated at 6 and 12 bpp. Those sizes are obtained by setting `BPP`; at
12 bpp the histogram memory is 8192 × 32 bits.

## Departures from the original description and choices of this design

The following are this design's own additions; the original description does not cover them:

* the clear pass;
* the load port of the image memory;
* the result stream;
* the start/busy/done handshake;
* the stream handshake;
* the memory enables.

The following differ from the original block diagram:

* **Port B in the merge.** The diagram feeds port B's write data from `dout2B + 1` in both steps.
  Here port B only reads during the merge, so the odd array keeps its first-step contents.
* **The +1 bin counter.** The diagram clocks its register on `clock2x`. Here the register is in
  the `clk` domain and advances once per system cycle, which is the same rate.
* **Clock generation.** The clock manager that makes `clk2x` is not part of the RTL. Both clocks
  are inputs, and the required phase relation is given above.
* **Memories.** They are inferred arrays, not vendor block RAM primitives. The read-latency and
  hold behaviour matches a block RAM.
* **Cycle counts.** They include the fill cycle and the clear pass, as explained under *Cycle
  counts*.

## How far it is verified

Every module except `phc_engine` has its own self-checking testbench in `tb/`, comparing against
values computed independently in the testbench. `phc_engine` is exercised through `phc` and
`phc_stream`.

* `tb_phc` runs the worked example plus random, constant and ramp images, and checks exact cycle
  counts.
* `tb_phc_stream` runs frames with and without stream gaps, and a frame with a single value.
* `tb_phc_top` runs both front ends together at small sizes. It counts that every mechanism
  occurred: the clear pass; equal pixels in one pair; back-to-back updates of one bin; the merge;
  stream gaps; loads attempted while busy; and repeated images without reset.
* `tb_phc_top_full` runs the top at its default parameters: a random 512 × 512 image and a random
  1024 × 1024 frame, checking all 256 bins and the cycle counts. It takes about a second under
  Verilator.
* `tb_phc` also follows the worked example cycle by cycle. In each of the 8 first-step cycles and
  4 merge cycles, it checks both ports' addresses, read data and write data.
* `tb_fig6_workloads` runs the memory-based design at 8 bpp on 16², 32², 64², 128², 256² and 512²
  images. In every case the first step plus the merge takes NPIX/2 + 2^BPP + 1 cycles:

  | image | cycles (first step + merge) | ratio against one pixel per cycle |
  |---|---|---|
  | 16 × 16 | 385 | 0.66 |
  | 32 × 32 | 769 | 1.33 |
  | 64 × 64 | 2305 | 1.78 |
  | 128 × 128 | 8449 | 1.94 |
  | 256 × 256 | 33025 | 1.98 |
  | 512 × 512 | 131329 | 2.00 |

  The clear pass adds 256 cycles to each.
* `tb_fig7_workloads` runs the stream design at 6, 8 and 12 bpp on frames from 16² to 1024². At
  12 bpp the 4096-cycle merge dominates small frames: the ratio is 0.06 at 16 × 16 and 1.98 at
  1024 × 1024.

The ratios above count cycles only. The real speed-up also depends on the clock period each design
reaches with its double-rate memory clock, and simulation cannot show timing closure.

Not built: the scalar design, and 4- or 8-way versions. Those would need a memory with four or
eight ports, where the pass structure would stay the same.

## Simulating

Every testbench is a top module with no ports. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/phc_pkg.sv tb/tb_phc_top_full.sv \
          --top-module tb_phc_top_full -Mdir obj
./obj/Vtb_phc_top_full
```

Verilator finds the other modules through `-Irtl`, which works because each file is named after
its module. The testbenches make both clocks in one process, so their edges fall in the same time
step. A testbench of your own should do the same.

## Files

`rtl/`:

| file | contents |
|---|---|
| `phc_pkg.sv` | shared defaults and the operation type |
| `phc_top.sv` | both front ends side by side |
| `phc.sv` | memory-based front end |
| `phc_stream.sv` | stream-based front end |
| `phc_engine.sv` | histogram engine: controller, phase flip-flop, datapath, memory, result register |
| `phc_ctrl.sv` | pass sequencing |
| `rw_phase.sv` | read/write phase flip-flop |
| `hist_datapath.sv` | address and write-data selection |
| `hist_mem.sv` | histogram memory |
| `image_mem.sv` | image memory |
| `pixel_addr_gen.sv` | even/odd address counter |

`tb/`: one testbench per module, named `tb_<module>.sv`; `tb_phc_top_full.sv`; the workload testbenches `tb_fig6_workloads.sv` and `tb_fig7_workloads.sv` with their helpers `phc_mem_run.sv` and `phc_stream_run.sv`.
